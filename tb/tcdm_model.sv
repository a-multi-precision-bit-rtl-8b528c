// Behavioural model of the shared tightly coupled data memory (TCDM) seen by
// the accelerator: WORDS words of BUS_W bits, byte-addressed, one port.
//
// A request is granted in the same cycle with probability GNT_PCT percent
// (other masters of the memory are modelled as random refusals).  A granted
// read returns its word with `r_valid` one cycle later; a granted write
// updates the word and also answers with `r_valid` one cycle later, as a
// TCDM does.  Testbenches preload and inspect `mem` directly.
module tcdm_model
  import smac_pkg::*;
#(
  parameter int unsigned WORDS   = 32768,
  parameter int unsigned GNT_PCT = 100
) (
  input  logic               clk,
  input  logic               req,
  input  logic               we,
  input  logic [BUS_W/8-1:0] be,
  input  logic [31:0]        addr,
  input  logic [BUS_W-1:0]   wdata,
  output logic               gnt,
  output logic               r_valid,
  output logic [BUS_W-1:0]   r_data
);
  logic [BUS_W-1:0] mem [WORDS];
  int unsigned refused = 0;
  int unsigned gnt_pct = GNT_PCT;

  always_comb gnt = req && ok;
  logic ok = 1'b1;

  always @(negedge clk) ok <= ($urandom_range(99, 0) < gnt_pct);

  always @(posedge clk) begin
    r_valid <= req && gnt;
    if (req && !gnt) refused <= refused + 1;
    if (req && gnt) begin
      if (we) begin
        for (int b = 0; b < BUS_W / 8; b++)
          if (be[b]) mem[addr[31:4] % WORDS][b*8 +: 8] <= wdata[b*8 +: 8];
      end else r_data <= mem[addr[31:4] % WORDS];
    end
  end

endmodule
