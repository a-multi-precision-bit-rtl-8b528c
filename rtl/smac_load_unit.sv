// Streamer load unit: turns a stream of byte addresses into TCDM reads and
// pushes the returned words into the engine's input FIFO.
//
// TCDM protocol: `tcdm_req` with `tcdm_addr` is held until `tcdm_gnt`; the
// data of a granted read arrive with `tcdm_r_valid` in a later cycle, in
// order.  The unit only issues a read while it holds a credit, one per free
// FIFO entry (CREDITS = FIFO depth); a credit is spent when a read is
// granted and returned when the consumer pops a word (`credit_ret`), so the
// FIFO can always take the returning data and `out_valid` needs no ready.
//
// The design description names the load unit of the streamer; the credit
// scheme is this implementation's choice.
module smac_load_unit
  import smac_pkg::*;
#(
  parameter int unsigned CREDITS = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             addr_valid,
  output logic             addr_ready,
  input  logic [31:0]      addr,
  output logic             tcdm_req,
  output logic [31:0]      tcdm_addr,
  input  logic             tcdm_gnt,
  input  logic             tcdm_r_valid,
  input  logic [BUS_W-1:0] tcdm_r_data,
  output logic             out_valid,
  output logic [BUS_W-1:0] out_data,
  input  logic             credit_ret
);

  logic [$clog2(CREDITS+1)-1:0] credits;

  assign tcdm_req   = addr_valid && (credits != '0);
  assign tcdm_addr  = addr;
  assign addr_ready = tcdm_req && tcdm_gnt;
  assign out_valid  = tcdm_r_valid;
  assign out_data   = tcdm_r_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credits <= ($clog2(CREDITS+1))'(CREDITS);
    else credits <= credits - ($clog2(CREDITS+1))'(addr_ready) + ($clog2(CREDITS+1))'(credit_ret);
  end

endmodule
