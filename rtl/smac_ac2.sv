// AC2: second accumulator of a SMAC block, over the weight bits, with four
// registers for four filters ("slots").
//
// Stage a (input `load`): the finished AC1 value is copied into a register,
// negated when the current weight bit-plane is the sign plane (`msb_w`),
// because in two's complement that plane weighs -2^(Pw-1).
// Stage b (one cycle later): the slot register accumulates it with the same
// add-at-the-top, shift-right scheme as AC1:
//     ac2[slot] <= (first_w ? 0 : ac2[slot] >>> 1) + (r12 << (Pw-1))
// After the Pw bit-planes of a slot, ac2[slot] is the signed dot product.
// `first_w` and `slot` are sampled with `load` and used in stage b.
//
// The negating register and the four accumulator registers with >>1
// feedback follow the design description; widths and the offset are this
// implementation's choices.
module smac_ac2 #(
  parameter int unsigned A1_W  = $clog2(smac_pkg::M) + 2 + smac_pkg::PA_MAX,
  parameter int unsigned A2_W  = A1_W + smac_pkg::PW_MAX,
  parameter int unsigned NSL   = smac_pkg::NSLOT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     msb_w,
  input  logic                     first_w,
  input  logic [$clog2(NSL)-1:0]   slot,
  input  logic [3:0]               pw,
  input  logic signed [A1_W-1:0]   ac1,
  output logic signed [A2_W-1:0]   ac2 [NSL]
);

  logic signed [A1_W-1:0]   r12;
  logic                     v_b, first_b;
  logic [$clog2(NSL)-1:0]   slot_b;
  logic signed [A2_W-1:0]   add, fb;

  assign add = A2_W'(r12) <<< (pw - 4'd1);
  assign fb  = first_b ? A2_W'(0) : (ac2[slot_b] >>> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r12 <= '0; v_b <= 1'b0; first_b <= 1'b0; slot_b <= '0;
      for (int s = 0; s < NSL; s++) ac2[s] <= '0;
    end else begin
      if (load) r12 <= msb_w ? -ac1 : ac1;
      v_b     <= load;
      first_b <= first_w;
      slot_b  <= slot;
      if (v_b) ac2[slot_b] <= fb + add;
    end
  end

endmodule
