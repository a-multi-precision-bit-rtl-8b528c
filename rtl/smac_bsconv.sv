// Bit-serial convolution stage of a SMAC block.
//
// A register holds one bit-plane of M weights (bit wb of each weight).  Each
// cycle the M current activation bits are ANDed with it and an adder counts
// the ones; on the activation sign-bit cycle (`msb_a`) the count is negated,
// because in two's complement that bit weighs -2^(Pa-1).  The signed count
// is registered: `psum` is valid one cycle after its inputs.  `w_load`
// copies `w_in` into the weight register at the clock edge; the AND uses
// the register's value before that edge.
//
// The AND gates, the adder with the MSB_a input and the output register
// follow the design description; reading MSB_a as a negation of the sum is
// this implementation's interpretation.
module smac_bsconv #(
  parameter int unsigned M_P  = smac_pkg::M,
  parameter int unsigned PS_W = $clog2(M_P) + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   w_load,
  input  logic [M_P-1:0]         w_in,
  input  logic [M_P-1:0]         a_bits,
  input  logic                   msb_a,
  output logic signed [PS_W-1:0] psum
);

  logic [M_P-1:0]  w_reg;
  logic [PS_W-1:0] pop;

  always_comb begin
    pop = '0;
    for (int i = 0; i < M_P; i++) pop = pop + PS_W'(w_reg[i] & a_bits[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_reg <= '0;
      psum  <= '0;
    end else begin
      if (w_load) w_reg <= w_in;
      psum <= msb_a ? -$signed(pop) : $signed(pop);
    end
  end

endmodule
