// AC1: first accumulator of a SMAC block, over the activation bits.
//
// Activation bits arrive LSB first, so the partial sum of bit k must weigh
// 2^k.  Instead of shifting each new term left, the accumulator adds it at
// the top and shifts the running sum right:
//     ac1 <= (first ? 0 : ac1 >>> 1) + (psum << (Pa-1))
// After Pa valid cycles ac1 = sum_k psum_k * 2^k exactly (no bit is shifted
// out, because every earlier term still sits at least one position above
// bit 0).  Updates happen only on `valid` cycles; `first` restarts the sum.
//
// The accumulator with its right-shift feedback follows the design
// description; the add-at-the-top offset that keeps it exact and the width
// (PS_W + PA_MAX bits) are this implementation's choices.
module smac_ac1 #(
  parameter int unsigned PS_W = $clog2(smac_pkg::M) + 2,
  parameter int unsigned A1_W = PS_W + smac_pkg::PA_MAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid,
  input  logic                   first,
  input  logic [3:0]             pa,
  input  logic signed [PS_W-1:0] psum,
  output logic signed [A1_W-1:0] ac1
);

  logic signed [A1_W-1:0] add;
  assign add = A1_W'(psum) <<< (pa - 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ac1 <= '0;
    else if (valid) ac1 <= (first ? A1_W'(0) : (ac1 >>> 1)) + add;
  end

endmodule
