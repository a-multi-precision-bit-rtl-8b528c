// ReLU output stage of a SMAC block (combinational).
//
// A multiplexer picks the AC3 register of `out_slot`; a second multiplexer,
// selected by that value's sign bit, outputs 0 for a negative value and
// otherwise the value's low Pa bits, zero-extended to a byte.
//
// The two multiplexers and the sign-bit select follow the design
// description; cutting to Pa bits without saturation is this
// implementation's choice.
module smac_relu #(
  parameter int unsigned A3_W = smac_pkg::AC3_W,
  parameter int unsigned NSL  = smac_pkg::NSLOT,
  parameter int unsigned OW   = smac_pkg::LANE_W
) (
  input  logic signed [A3_W-1:0]  ac3 [NSL],
  input  logic [$clog2(NSL)-1:0]  out_slot,
  input  logic [3:0]              pa,
  output logic [OW-1:0]           out_act
);

  logic signed [A3_W-1:0] sel;
  logic [OW-1:0]          mask;

  assign sel     = ac3[out_slot];
  assign mask    = OW'(((OW+1)'(1) << pa) - (OW+1)'(1));
  assign out_act = sel[A3_W-1] ? '0 : (sel[OW-1:0] & mask);

endmodule
