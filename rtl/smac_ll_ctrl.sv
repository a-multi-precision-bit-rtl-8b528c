// Low-level control unit of the SMAC engine: an FSM plus a cluster of
// counters that sequence the bit-serial loops of one convolution job.
//
// For every pass (`npix` of them: an output pixel, or one filter group of
// it) the unit walks the volume chunks (kernel positions x channel groups
// of 16), and per chunk the filter slots and the weight
// bit-planes (LSB first); for every bit-plane it issues Pa bit-cycles, one
// per activation bit (LSB first).  A bit-plane is taken from the engine's
// staging buffer (`plane_take`) as soon as the previous plane's last
// bit-cycle is issued, so planes run back to back when the stream keeps up;
// otherwise the unit waits in WAIT_PLANE (a stall).  After the last plane of
// a pixel it drains the 4-deep SMAC pipeline, pulses `q_shift` `qshift`
// times (serial quantization in AC3) and then hands the results out as
// `nslot` x OUT_WORDS words on a valid/ready port, slot-major.
//
// Interface: `start` (one cycle) begins a job with the configuration inputs,
// which must stay constant until `done` (one cycle, after the last output
// word is accepted).  `ctrl` and `xbit` go to every SMAC in the same cycle.
//
// Following the design description: a low-level FSM with counters drives the
// datapath, quantization is a preloaded counter shifting AC3 serially, and
// the FSM reports its status to the high-level FSM.  The state set (seven
// states rather than sixteen), the loop order inside a pixel and the
// back-to-back plane hand-over are this implementation's choices.
module smac_ll_ctrl
  import smac_pkg::*;
#(
  parameter int unsigned OUT_WORDS = (NUM_SMAC * LANE_W) / BUS_W,
  parameter int unsigned PIPE      = 4   // cycles from a bit-cycle to its AC3 update
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [3:0]                    pa,
  input  logic [3:0]                    pw,
  input  logic [2:0]                    nslot,
  input  logic [19:0]                   nchunk,
  input  logic [31:0]                   npix,
  input  logic [4:0]                    qshift,
  input  logic                          plane_rdy,
  output logic                          plane_take,
  output smac_ctrl_t                    ctrl,
  output logic [BIT_W-1:0]              xbit,
  output logic                          q_shift,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [SLOT_W-1:0]             out_slot,
  output logic [$clog2(OUT_WORDS)-1:0]  out_word,
  output logic                          busy,
  output logic                          done,
  output logic                          stall   // waiting for a weight bit-plane
);

  typedef enum logic [2:0] {IDLE, WAIT_PLANE, COMPUTE, DRAIN, QUANT, OUTPUT} state_t;
  state_t st;

  logic [BIT_W-1:0]  wbit;
  logic [SLOT_W-1:0] slot;
  logic [19:0]       chunk;
  logic [31:0]       pix;
  logic [4:0]        cnt;

  logic last_x, last_w, last_s, last_c, last_plane, last_word;
  assign last_x     = ({1'b0, xbit} == pa - 4'd1);
  assign last_w     = ({1'b0, wbit} == pw - 4'd1);
  assign last_s     = ({1'b0, slot} == nslot - 3'd1);
  assign last_c     = (chunk == nchunk - 20'd1);
  assign last_plane = last_w && last_s && last_c;
  assign last_word  = (out_word == $clog2(OUT_WORDS)'(OUT_WORDS - 1)) && ({1'b0, out_slot} == nslot - 3'd1);

  always_comb begin
    ctrl         = '0;
    ctrl.valid   = (st == COMPUTE);
    ctrl.first_x = (xbit == '0);
    ctrl.last_x  = last_x;
    ctrl.first_w = (wbit == '0);
    ctrl.last_w  = last_w;
    ctrl.first_v = (chunk == '0);
    ctrl.slot    = slot;
    plane_take   = ((st == WAIT_PLANE) || (st == COMPUTE && last_x && !last_plane)) && plane_rdy;
    q_shift      = (st == QUANT);
    out_valid    = (st == OUTPUT);
    busy         = (st != IDLE);
    stall        = (st == WAIT_PLANE) || (st == COMPUTE && last_x && !last_plane && !plane_rdy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; xbit <= '0; wbit <= '0; slot <= '0; chunk <= '0; pix <= '0;
      cnt <= '0; out_slot <= '0; out_word <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          st <= WAIT_PLANE; xbit <= '0; wbit <= '0; slot <= '0; chunk <= '0; pix <= '0;
        end
        WAIT_PLANE: if (plane_rdy) begin
          st <= COMPUTE; xbit <= '0;
        end
        COMPUTE: if (!last_x) begin
          xbit <= xbit + 1'b1;
        end else begin
          xbit <= '0;
          if (last_plane) begin
            st <= DRAIN; cnt <= '0;
          end else begin
            if (!plane_rdy) st <= WAIT_PLANE;
            if (!last_w) wbit <= wbit + 1'b1;
            else begin
              wbit <= '0;
              if (!last_s) slot <= slot + 1'b1;
              else begin
                slot  <= '0;
                chunk <= chunk + 20'd1;
              end
            end
          end
        end
        DRAIN: if (cnt == 5'(PIPE - 1)) begin
          cnt <= '0;
          st  <= (qshift == '0) ? OUTPUT : QUANT;
          out_slot <= '0; out_word <= '0;
        end else cnt <= cnt + 5'd1;
        QUANT: if (cnt == qshift - 5'd1) st <= OUTPUT;
               else cnt <= cnt + 5'd1;
        OUTPUT: if (out_ready) begin
          if (last_word) begin
            wbit <= '0; slot <= '0; chunk <= '0; out_word <= '0; out_slot <= '0;
            if (pix == npix - 32'd1) begin
              st <= IDLE; done <= 1'b1;
            end else begin
              st <= WAIT_PLANE; pix <= pix + 32'd1;
            end
          end else if (out_word == $clog2(OUT_WORDS)'(OUT_WORDS - 1)) begin
            out_word <= '0; out_slot <= out_slot + 1'b1;
          end else out_word <= out_word + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end

  // Quantization shifts never overlap a bit-cycle (the AC3 stage gives q_shift priority).
  a_quant_alone: assert property (@(posedge clk) disable iff (!rst_n) !(q_shift && ctrl.valid));

endmodule
