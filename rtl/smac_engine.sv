// SMAC engine: the datapath cluster of NUM_SMAC SMAC blocks.
//
// All blocks share the same M = 16 activations; each block works on its own
// filter (one per slot), so one pass over a volume chunk yields NUM_SMAC x 4
// filter results.  Data arrive as a single in-order stream of BUS_W-bit
// words: per volume chunk one activation word (16 activations, one per byte
// lane, Pa low bits used) followed by `nslot` x `pw` weight bit-planes.  A
// bit-plane is NUM_SMAC*M bits (PLANE_WORDS words); word k carries the M
// bits of SMAC blocks k*BUS_W/M .. (k+1)*BUS_W/M-1, block s in bits
// [s*M +: M] of the concatenated plane, bit i = the current weight bit of
// the weight that multiplies activation i.
//
// Incoming words fill a staging buffer (activation word + one bit-plane);
// `plane_rdy` says it is full and `plane_take` from the low-level control
// copies the plane into the SMAC weight registers (and a newly arrived
// activation word into the working activation register) while the next
// plane streams in.  The working activation register is never shifted: the
// bit for the current cycle is selected by `xbit`.  Results leave as
// OUT_WORDS words per slot, 16 byte lanes each, selected by out_slot/out_word.
//
// Following the design description: 64 SMACs sharing activations, 128 bits of
// weight bits per cycle, 1024 bits per bit-plane (8 cycles at Pa = 8).  The
// staging buffer, the stream order and the data layout are this
// implementation's choices.  With a 128-bit stream a bit-plane takes 8
// cycles to arrive, so at Pa = 4 the engine waits for weights half the time.
module smac_engine
  import smac_pkg::*;
#(
  parameter int unsigned NUM_SMAC_P = smac_pkg::NUM_SMAC,
  parameter int unsigned OUT_WORDS  = (NUM_SMAC_P * LANE_W) / BUS_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [3:0]                    pa,
  input  logic [3:0]                    pw,
  input  logic [2:0]                    nslot,
  // input stream
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [BUS_W-1:0]              in_data,
  // control
  output logic                          plane_rdy,
  input  logic                          plane_take,
  input  smac_ctrl_t                    ctrl,
  input  logic [BIT_W-1:0]              xbit,
  input  logic                          q_shift,
  input  logic [SLOT_W-1:0]             out_slot,
  input  logic [$clog2(OUT_WORDS)-1:0]  out_word,
  output logic [BUS_W-1:0]              out_data
);

  localparam int unsigned PLANE_WORDS = (NUM_SMAC_P * M) / BUS_W;
  localparam int unsigned PK_W        = (PLANE_WORDS > 1) ? $clog2(PLANE_WORDS) : 1;
  localparam int unsigned LANES       = BUS_W / LANE_W;

  if (M * LANE_W != BUS_W) begin : g_chk_act
    $error("one activation word must hold M byte lanes");
  end
  if ((NUM_SMAC_P * M) % BUS_W != 0) begin : g_chk_plane
    $error("a bit-plane must be whole words");
  end
  if ((NUM_SMAC_P * LANE_W) % BUS_W != 0) begin : g_chk_out
    $error("results must fill whole words");
  end

  // ---------------- stream loader ----------------
  logic [BUS_W-1:0]        act_stage, act_work;
  logic [PLANE_WORDS*BUS_W-1:0] plane_stage;
  logic                    plane_full, act_new, fill_act;
  logic [PK_W-1:0]         fill_k;
  logic [6:0]              fill_p;      // plane index inside the chunk
  logic [6:0]              planes_per_chunk;

  assign planes_per_chunk = 7'(nslot) * 7'(pw);
  // A word may enter in the cycle the full plane is handed to the SMACs.
  assign in_ready  = !plane_full || plane_take;
  assign plane_rdy = plane_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_stage <= '0; act_work <= '0; plane_stage <= '0;
      plane_full <= 1'b0; act_new <= 1'b0; fill_act <= 1'b1; fill_k <= '0; fill_p <= '0;
    end else if (start) begin
      plane_full <= 1'b0; act_new <= 1'b0; fill_act <= 1'b1; fill_k <= '0; fill_p <= '0;
    end else begin
      // hand-over first, so that a word accepted in the same cycle wins
      if (plane_take) begin
        plane_full <= 1'b0;
        if (act_new) begin
          act_work <= act_stage;
          act_new  <= 1'b0;
        end
      end
      if (in_valid && in_ready) begin
        if (fill_act) begin
          act_stage <= in_data;
          act_new   <= 1'b1;
          fill_act  <= 1'b0;
        end else begin
          plane_stage[fill_k*BUS_W +: BUS_W] <= in_data;
          if (fill_k == PK_W'(PLANE_WORDS - 1)) begin
            fill_k     <= '0;
            plane_full <= 1'b1;
            if (fill_p == planes_per_chunk - 7'd1) begin
              fill_p   <= '0;
              fill_act <= 1'b1;
            end else fill_p <= fill_p + 7'd1;
          end else fill_k <= fill_k + 1'b1;
        end
      end
    end
  end

  // ---------------- shared activation bits ----------------
  logic [M-1:0] a_bits;
  always_comb
    for (int i = 0; i < M; i++) a_bits[i] = act_work[i*LANE_W + int'(xbit)];

  // ---------------- SMAC array ----------------
  logic [LANE_W-1:0] res [NUM_SMAC_P];

  for (genvar s = 0; s < NUM_SMAC_P; s++) begin : g_smac
    smac u_smac (
      .clk, .rst_n,
      .w_load  (plane_take),
      .w_in    (plane_stage[s*M +: M]),
      .a_bits,
      .ctrl,
      .pa, .pw,
      .q_shift,
      .out_slot,
      .out_act (res[s])
    );
  end

  // ---------------- output word assembly ----------------
  always_comb
    for (int i = 0; i < LANES; i++) out_data[i*LANE_W +: LANE_W] = res[int'(out_word)*LANES + i];

endmodule
