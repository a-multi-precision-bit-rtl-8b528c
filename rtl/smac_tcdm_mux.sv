// Streamer interconnect: shares one BUS_W-bit TCDM port between the load
// unit (reads) and the store unit (writes).
//
// When both request in the same cycle, a round-robin pointer picks one and
// the other waits; the pointer moves after every granted conflict.  The
// port's `r_valid` is forwarded to the load unit only when the previous
// granted request was a read, so a memory that also answers writes with
// `r_valid` is handled.  Byte enables are all ones (whole words only).
//
// The design description names the streamer interconnect; arbitration and
// protocol are this implementation's choice.
module smac_tcdm_mux
  import smac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // load side (reads)
  input  logic               ld_req,
  input  logic [31:0]        ld_addr,
  output logic               ld_gnt,
  output logic               ld_r_valid,
  output logic [BUS_W-1:0]   ld_r_data,
  // store side (writes)
  input  logic               st_req,
  input  logic [31:0]        st_addr,
  input  logic [BUS_W-1:0]   st_wdata,
  output logic               st_gnt,
  // TCDM port
  output logic               tcdm_req,
  output logic               tcdm_we,
  output logic [BUS_W/8-1:0] tcdm_be,
  output logic [31:0]        tcdm_addr,
  output logic [BUS_W-1:0]   tcdm_wdata,
  input  logic               tcdm_gnt,
  input  logic               tcdm_r_valid,
  input  logic [BUS_W-1:0]   tcdm_r_data,
  output logic               conflict   // both sides requested this cycle
);

  logic prio_st;     // store side wins the next conflict
  logic sel_st;
  logic rd_q;

  assign conflict   = ld_req && st_req;
  assign sel_st     = st_req && (!ld_req || prio_st);
  assign tcdm_req   = ld_req || st_req;
  assign tcdm_we    = sel_st;
  assign tcdm_be    = '1;
  assign tcdm_addr  = sel_st ? st_addr : ld_addr;
  assign tcdm_wdata = st_wdata;
  assign st_gnt     = sel_st && tcdm_gnt;
  assign ld_gnt     = !sel_st && ld_req && tcdm_gnt;
  assign ld_r_valid = tcdm_r_valid && rd_q;
  assign ld_r_data  = tcdm_r_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_st <= 1'b0; rd_q <= 1'b0;
    end else begin
      if (conflict && tcdm_gnt) prio_st <= !sel_st;
      rd_q <= ld_gnt;
    end
  end

  // At most one side is granted, and only a side that asked.
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(ld_gnt && st_gnt));
  a_gnt_req:   assert property (@(posedge clk) disable iff (!rst_n) (ld_gnt -> ld_req) && (st_gnt -> st_req));

endmodule
