// AC3 and quantization: third accumulator of a SMAC block, over the chunks
// of a convolution volume, with four registers for the four filter slots.
//
// On `valid` the selected AC2 register is added into AC3[slot] (or loaded,
// on the first chunk `first_v`).  After the volume, each `q_shift` cycle
// shifts all four AC3 registers right by one (arithmetic), so a
// preloaded count of cycles divides by 2^q without a barrel shifter.
// `q_shift` takes priority; the controller never asserts both.
//
// The input multiplexer over the AC2 registers, the adder, the four
// registers and the serial >>q follow the design description; the 32-bit
// width is this implementation's choice, sized for 3x3 kernels over any
// channel count used by VGG16 and SqueezeNet.
module smac_ac3 #(
  parameter int unsigned A2_W  = $clog2(smac_pkg::M) + 2 + smac_pkg::PA_MAX + smac_pkg::PW_MAX,
  parameter int unsigned A3_W  = smac_pkg::AC3_W,
  parameter int unsigned NSL   = smac_pkg::NSLOT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     valid,
  input  logic                     first_v,
  input  logic [$clog2(NSL)-1:0]   slot,
  input  logic signed [A2_W-1:0]   ac2 [NSL],
  input  logic                     q_shift,
  output logic signed [A3_W-1:0]   ac3 [NSL]
);

  logic signed [A3_W-1:0] fb;
  assign fb = first_v ? A3_W'(0) : ac3[slot];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSL; s++) ac3[s] <= '0;
    end else if (q_shift) begin
      for (int s = 0; s < NSL; s++) ac3[s] <= ac3[s] >>> 1;
    end else if (valid) begin
      ac3[slot] <= fb + A3_W'(ac2[slot]);
    end
  end

endmodule
