// SMAC: one serial multiply-accumulate block.
//
// Each clock the block ANDs M weight bits (one bit-plane of M weights of one
// filter, held in a register) with M activation bits (bit `xbit` of the M
// shared activations) and adds the M one-bit products.  Three accumulation
// levels then rebuild full-precision dot products without any multiplier.
// The block chains five stage modules and pipelines the control word
// alongside the data:
//
//   smac_bsconv  AND + adder, negated on the activation MSB cycle; registered.
//   smac_ac1     sum over the Pa activation bits.
//   smac_ac2     negating register (weight MSB plane) and four AC2 registers
//                summing over the Pw weight bit-planes, one per filter slot.
//   smac_ac3     four AC3 registers summing the chunks of one convolution
//                volume, plus serial quantization by `q_shift` pulses.
//   smac_relu    ReLU(AC3[out_slot]) cut to Pa bits.
//
// Interface/timing: `w_load` copies `w_in` into the weight register at the
// clock edge; control `ctrl` and `a_bits` of the same cycle use the weight
// register as it is in that cycle.  A bit-cycle's AC3 update happens 4 clocks
// after it entered (5 pipeline registers), so the controller waits 5 cycles
// before quantizing.  `out_act` is combinational from the AC3 registers.
module smac
  import smac_pkg::*;
#(
  parameter int unsigned M_P = smac_pkg::M
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                w_load,
  input  logic [M_P-1:0]      w_in,
  input  logic [M_P-1:0]      a_bits,
  input  smac_ctrl_t          ctrl,
  input  logic [3:0]          pa,
  input  logic [3:0]          pw,
  input  logic                q_shift,
  input  logic [SLOT_W-1:0]   out_slot,
  output logic [LANE_W-1:0]   out_act
);

  localparam int unsigned PS_W = $clog2(M_P) + 2;
  localparam int unsigned A1_W = PS_W + PA_MAX;
  localparam int unsigned A2_W = A1_W + PW_MAX;

  smac_ctrl_t              c1, c2;
  logic signed [PS_W-1:0]  psum;
  logic signed [A1_W-1:0]  ac1;
  logic signed [A2_W-1:0]  ac2 [NSLOT];
  logic signed [AC3_W-1:0] ac3 [NSLOT];

  // Control word delayed to match each stage's input.  c3 keeps only the
  // cycles that load the AC1->AC2 register, c4 only the cycles that finish
  // a slot's last weight bit-plane.
  smac_ctrl_t c3, c4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0; c2 <= '0; c3 <= '0; c4 <= '0;
    end else begin
      c1       <= ctrl;
      c2       <= c1;
      c3       <= c2;
      c3.valid <= c2.valid && c2.last_x;
      c4       <= c3;
      c4.valid <= c3.valid && c3.last_w;
    end
  end

  smac_bsconv #(.M_P(M_P), .PS_W(PS_W)) u_bsconv (
    .clk, .rst_n, .w_load, .w_in, .a_bits,
    .msb_a (ctrl.last_x),
    .psum
  );

  smac_ac1 #(.PS_W(PS_W), .A1_W(A1_W)) u_ac1 (
    .clk, .rst_n,
    .valid (c1.valid),
    .first (c1.first_x),
    .pa,
    .psum,
    .ac1
  );

  smac_ac2 #(.A1_W(A1_W), .A2_W(A2_W), .NSL(NSLOT)) u_ac2 (
    .clk, .rst_n,
    .load    (c2.valid && c2.last_x),
    .msb_w   (c2.last_w),
    .first_w (c2.first_w),
    .slot    (c2.slot),
    .pw,
    .ac1,
    .ac2
  );

  smac_ac3 #(.A2_W(A2_W), .A3_W(AC3_W), .NSL(NSLOT)) u_ac3 (
    .clk, .rst_n,
    .valid   (c4.valid),
    .first_v (c4.first_v),
    .slot    (c4.slot),
    .ac2,
    .q_shift,
    .ac3
  );

  smac_relu #(.A3_W(AC3_W), .NSL(NSLOT), .OW(LANE_W)) u_relu (
    .ac3, .out_slot, .pa, .out_act
  );

endmodule
