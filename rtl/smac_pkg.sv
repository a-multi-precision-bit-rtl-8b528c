// Shared constants and types of the bit-serial MAC accelerator.
//
// The datapath is sized for the widest precision it supports: 8-bit
// activations (Pa) and 8-bit weights (Pw), both two's complement.  M = 16
// activation/weight pairs enter one SMAC block per bit-cycle, 64 SMAC blocks
// form the engine and each block keeps partial sums for 4 filters ("slots").
// The memory side moves 128-bit words.  Those numbers follow the design
// description; the accumulator widths below are derived from them here.
package smac_pkg;

  localparam int unsigned M         = 16;   // activations per convolution step
  localparam int unsigned NUM_SMAC  = 64;   // SMAC blocks in the engine
  localparam int unsigned NSLOT     = 4;    // filters held per SMAC (AC2/AC3 registers)
  localparam int unsigned PA_MAX    = 8;    // widest activation
  localparam int unsigned PW_MAX    = 8;    // widest weight
  localparam int unsigned BUS_W     = 128;  // TCDM / stream word width
  localparam int unsigned LANE_W    = 8;    // one activation or result per byte lane

  // Popcount of M AND products, signed: -M..M needs $clog2(M)+2 bits.
  localparam int unsigned PSUM_W = $clog2(M) + 2;
  // AC1 holds sum_k p_k*2^k over PA_MAX activation bits: |.| <= M*(2^PA_MAX-1).
  localparam int unsigned AC1_W  = PSUM_W + PA_MAX;
  // AC2 holds one M-term dot product of PA_MAX x PW_MAX operands.
  localparam int unsigned AC2_W  = AC1_W + PW_MAX;
  // AC3 accumulates a whole convolution volume (up to 3x3 x 512 channels).
  localparam int unsigned AC3_W  = 32;

  localparam int unsigned SLOT_W = $clog2(NSLOT);
  localparam int unsigned BIT_W  = $clog2(PA_MAX);   // bit index 0..7

  // Per-bit-cycle control that enters the SMAC pipeline together with the
  // activation bits.  The SMAC delays each field to the stage that uses it.
  typedef struct packed {
    logic              valid;    // a real bit-cycle (AND + adder stage active)
    logic              first_x;  // first activation bit: AC1 restarts
    logic              last_x;   // last activation bit (MSB_a): negate, AC1 final
    logic              first_w;  // first weight bit: AC2[slot] restarts
    logic              last_w;   // last weight bit (MSB_w): negate, AC2 final
    logic              first_v;  // first chunk of the volume: AC3[slot] restarts
    logic [SLOT_W-1:0] slot;     // which of the 4 filters this bit-cycle serves
  } smac_ctrl_t;

  // Programming of one convolution job, as held by the register file.
  typedef struct packed {
    logic [31:0] act_base;   // byte address of the input feature map (HWC, 16 ch/word)
    logic [31:0] w_base;     // byte address of the weight bit-planes
    logic [31:0] out_base;   // byte address of the output feature map
    logic [3:0]  pa;         // activation precision, 1..8 (4 or 8 in practice)
    logic [3:0]  pw;         // weight precision, 1..8 (4, 6 or 8 in practice)
    logic [2:0]  nslot;      // filter slots in use, 1..4 (64 filters each)
    logic [15:0] ch_words;   // input channels / 16
    logic [1:0]  ksize;      // kernel side f, 1..3
    logic [15:0] w_in;       // input feature map width
    logic [15:0] h_out;      // output rows
    logic [15:0] w_out;      // output columns
    logic [4:0]  qshift;     // quantization right shift
    logic [7:0]  ngroup;     // filter groups of nslot*64 filters per pixel (0 = 1)
  } smac_cfg_t;

endpackage
