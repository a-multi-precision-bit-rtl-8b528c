// High-level control unit: address generation for the memory streams.
//
// On `start` it walks the convolution loops of the whole job and issues,
// on a valid/ready address port, the byte address of every input word in
// the order the engine consumes them:
//
//   for each output row h, column w (pixel):
//     for each filter group g (nslot*64 filters):
//       for each kernel row l, column j, channel group c:
//         activation word  act_base + (((h+l)*w_in + (w+j))*ch_words + c)*16
//         nslot*pw*PLANE_WORDS weight words, read consecutively from w_base
//   (the weight pointer runs on through the groups and restarts at w_base
//   for every pixel, so group g's planes follow those of group g-1)
//
// A second address port gives the store unit consecutive addresses from
// out_base, one per result word (pixel, then group, then slot, then word).  The
// job is complete when the store unit has acknowledged every result word:
// `done` pulses and `busy` falls.
//
// Following the design description: a high-level FSM handles address
// generation and the memory interface, programmed from the register file,
// and a layer with more filters than one pass holds (256) is split into
// several passes over the same input window.  Splitting by a group count
// inside each pixel, rather than elsewhere, is this implementation's choice.
// The memory layout (activations channel-innermost with 16 channels per
// word, weights as pre-arranged bit-planes in consumption order, outputs
// contiguous) is this implementation's choice.
module smac_hl_ctrl
  import smac_pkg::*;
#(
  parameter int unsigned PLANE_WORDS = (NUM_SMAC * M) / BUS_W,
  parameter int unsigned OUT_WORDS   = (NUM_SMAC * LANE_W) / BUS_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  smac_cfg_t   cfg,
  output logic        ld_valid,
  input  logic        ld_ready,
  output logic [31:0] ld_addr,
  output logic        st_valid,
  input  logic        st_ready,
  output logic [31:0] st_addr,
  input  logic        st_ack,
  output logic        busy,
  output logic        done
);

  localparam int unsigned BYTES = BUS_W / 8;

  logic        ld_act;              // next load is the activation word of a chunk
  logic        ld_on;
  logic [15:0] h, w;
  logic [1:0]  l, j;
  logic [15:0] c;
  logic [7:0]  g, ngrp;
  logic [15:0] wcnt, wper;          // weight word inside the chunk
  logic [31:0] w_ptr;
  logic [31:0] st_idx, st_total, ack_cnt;

  assign ngrp     = (cfg.ngroup == 8'd0) ? 8'd1 : cfg.ngroup;
  assign wper     = 16'(cfg.nslot) * 16'(cfg.pw) * 16'(PLANE_WORDS);

  logic [31:0] act_word;
  assign act_word = ((32'(h) + 32'(l)) * 32'(cfg.w_in) + 32'(w) + 32'(j)) * 32'(cfg.ch_words) + 32'(c);

  assign ld_valid = busy && ld_on;
  assign ld_addr  = ld_act ? cfg.act_base + act_word * BYTES : w_ptr;
  assign st_valid = busy && (st_idx != st_total);
  assign st_addr  = cfg.out_base + st_idx * BYTES;

  logic last_c, last_j, last_l, last_g, last_w, last_h;
  assign last_c = (c == cfg.ch_words - 16'd1);
  assign last_j = (j == cfg.ksize - 2'd1);
  assign last_l = (l == cfg.ksize - 2'd1);
  assign last_g = (g == ngrp - 8'd1);
  assign last_w = (w == cfg.w_out - 16'd1);
  assign last_h = (h == cfg.h_out - 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; ld_on <= 1'b0; ld_act <= 1'b1;
      h <= '0; w <= '0; g <= '0; l <= '0; j <= '0; c <= '0; wcnt <= '0; w_ptr <= '0;
      st_idx <= '0; st_total <= '0; ack_cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; ld_on <= 1'b1; ld_act <= 1'b1;
        h <= '0; w <= '0; g <= '0; l <= '0; j <= '0; c <= '0; wcnt <= '0; w_ptr <= cfg.w_base;
        st_idx <= '0; ack_cnt <= '0;
        st_total <= 32'(cfg.h_out) * 32'(cfg.w_out) * 32'(ngrp) * 32'(cfg.nslot) * OUT_WORDS;
      end else if (busy) begin
        // ---- load address sequence ----
        if (ld_valid && ld_ready) begin
          if (ld_act) ld_act <= 1'b0;
          else begin
            w_ptr <= w_ptr + BYTES;
            if (wcnt != wper - 16'd1) wcnt <= wcnt + 16'd1;
            else begin
              wcnt   <= '0;
              ld_act <= 1'b1;
              if (!last_c) c <= c + 16'd1;
              else begin
                c <= '0;
                if (!last_j) j <= j + 2'd1;
                else begin
                  j <= '0;
                  if (!last_l) l <= l + 2'd1;
                  else begin
                    l <= '0;
                    if (!last_g) g <= g + 8'd1;    // next group: its planes follow
                    else begin
                      g <= '0;
                      w_ptr <= cfg.w_base;           // next pixel reuses the weights
                      if (!last_w) w <= w + 16'd1;
                      else begin
                        w <= '0;
                        if (!last_h) h <= h + 16'd1;
                        else ld_on <= 1'b0;          // every input word issued
                      end
                    end
                  end
                end
              end
            end
          end
        end
        // ---- store address sequence and completion ----
        if (st_valid && st_ready) st_idx <= st_idx + 32'd1;
        if (st_ack) begin
          ack_cnt <= ack_cnt + 32'd1;
          if (ack_cnt == st_total - 32'd1) begin
            busy <= 1'b0; done <= 1'b1; ld_on <= 1'b0;
          end
        end
      end
    end
  end

  // Valid/ready rule: an offered address stays offered and unchanged until taken.
  a_ld_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              ld_valid && !ld_ready |=> ld_valid && $stable(ld_addr));
  a_st_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              st_valid && !st_ready |=> st_valid && $stable(st_addr));

endmodule
