// SMAC HWPE: the bit-serial convolution accelerator as a memory-coupled
// processing engine for a microcontroller system.
//
// The host core writes a job into the register file over the peripheral
// port and triggers it.  The high-level control then generates the byte
// addresses of every activation and weight word; the streamer's load unit
// reads them from the shared tightly coupled data memory (TCDM) through the
// streamer interconnect into the input FIFO; the SMAC engine consumes the
// stream while the low-level control sequences its bit-serial loops; the
// quantized, ReLU-ed results go through the output FIFO to the store unit,
// which writes them back to the TCDM at addresses from the high-level
// control.  `evt` pulses when the last result word has been written.
//
//        periph --> regfile --cfg--> hl_ctrl --ld addr--> load_unit --+
//                                  \-> ll_ctrl                         |
//   TCDM <--> tcdm_mux <-----------------------------------------------+
//                ^  \--> in FIFO --> smac_engine --> out FIFO --> store_unit
//                +---------------------------------------------------/
//
// Ports: a 32-bit peripheral slave (see smac_regfile for the map) and one
// BUS_W = 128-bit TCDM master (req/gnt address phase, r_valid data phase,
// byte addresses, 16-byte aligned).  Memory layouts are described in
// smac_hl_ctrl and smac_engine.
//
// Following the design description: control (register file, low-level FSM,
// high-level FSM), streamer (load unit, store unit, interconnect) and a FIFO
// on each stream around the SMAC engine, with a 128 bit/cycle memory port.
// Using a single shared TCDM port and one clock domain is this
// implementation's choice.
module smac_hwpe
  import smac_pkg::*;
#(
  parameter int unsigned NUM_SMAC_P = smac_pkg::NUM_SMAC,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // peripheral (configuration) port
  input  logic               periph_req,
  input  logic               periph_we,
  input  logic [7:0]         periph_addr,
  input  logic [31:0]        periph_wdata,
  output logic               periph_gnt,
  output logic               periph_r_valid,
  output logic [31:0]        periph_r_data,
  // TCDM master port
  output logic               tcdm_req,
  output logic               tcdm_we,
  output logic [BUS_W/8-1:0] tcdm_be,
  output logic [31:0]        tcdm_addr,
  output logic [BUS_W-1:0]   tcdm_wdata,
  input  logic               tcdm_gnt,
  input  logic               tcdm_r_valid,
  input  logic [BUS_W-1:0]   tcdm_r_data,
  // job finished event
  output logic               evt,
  // activity observation (for profiling)
  output logic               busy,
  output logic               stall_weights,
  output logic               tcdm_conflict
);

  localparam int unsigned PLANE_WORDS = (NUM_SMAC_P * M) / BUS_W;
  localparam int unsigned OUT_WORDS   = (NUM_SMAC_P * LANE_W) / BUS_W;

  smac_cfg_t cfg;
  logic start, hl_busy, hl_done, ll_busy, ll_done;

  // ---------------- control ----------------
  smac_regfile u_regfile (
    .clk, .rst_n,
    .req (periph_req), .we (periph_we), .addr (periph_addr), .wdata (periph_wdata),
    .gnt (periph_gnt), .r_valid (periph_r_valid), .r_data (periph_r_data),
    .busy, .done (hl_done), .cfg, .start, .evt
  );

  assign busy = hl_busy || ll_busy;

  logic        ld_a_valid, ld_a_ready, st_a_valid, st_a_ready, st_ack;
  logic [31:0] ld_a, st_a;

  smac_hl_ctrl #(.PLANE_WORDS(PLANE_WORDS), .OUT_WORDS(OUT_WORDS)) u_hl (
    .clk, .rst_n, .start, .cfg,
    .ld_valid (ld_a_valid), .ld_ready (ld_a_ready), .ld_addr (ld_a),
    .st_valid (st_a_valid), .st_ready (st_a_ready), .st_addr (st_a),
    .st_ack, .busy (hl_busy), .done (hl_done)
  );

  logic        plane_rdy, plane_take, q_shift, o_valid, o_ready;
  smac_ctrl_t  ctrl;
  logic [BIT_W-1:0] xbit;
  logic [SLOT_W-1:0] o_slot;
  logic [$clog2(OUT_WORDS)-1:0] o_word;
  logic [19:0] nchunk;
  logic [31:0] npix;

  // The low-level control sees one "pixel" per filter group of each output
  // pixel: the group loop only changes which weights and output words are
  // addressed, which is the high-level control's business.
  assign nchunk = 20'(cfg.ksize) * 20'(cfg.ksize) * 20'(cfg.ch_words);
  assign npix   = 32'(cfg.h_out) * 32'(cfg.w_out) * 32'((cfg.ngroup == 8'd0) ? 8'd1 : cfg.ngroup);

  smac_ll_ctrl #(.OUT_WORDS(OUT_WORDS)) u_ll (
    .clk, .rst_n, .start,
    .pa (cfg.pa), .pw (cfg.pw), .nslot (cfg.nslot), .nchunk, .npix, .qshift (cfg.qshift),
    .plane_rdy, .plane_take, .ctrl, .xbit, .q_shift,
    .out_valid (o_valid), .out_ready (o_ready), .out_slot (o_slot), .out_word (o_word),
    .busy (ll_busy), .done (ll_done), .stall (stall_weights)
  );

  // ---------------- streamer ----------------
  logic             lu_req, lu_gnt, lu_rv, su_req, su_gnt;
  logic [31:0]      lu_addr, su_addr;
  logic [BUS_W-1:0] lu_rdata, su_wdata;
  logic             lu_out_valid;
  logic [BUS_W-1:0] lu_out_data;
  logic             in_valid, in_ready;
  logic [BUS_W-1:0] in_data;
  logic             res_valid, res_ready;
  logic [BUS_W-1:0] res_data, eng_out;

  smac_load_unit #(.CREDITS(FIFO_DEPTH)) u_load (
    .clk, .rst_n,
    .addr_valid (ld_a_valid), .addr_ready (ld_a_ready), .addr (ld_a),
    .tcdm_req (lu_req), .tcdm_addr (lu_addr), .tcdm_gnt (lu_gnt),
    .tcdm_r_valid (lu_rv), .tcdm_r_data (lu_rdata),
    .out_valid (lu_out_valid), .out_data (lu_out_data),
    .credit_ret (in_valid && in_ready)
  );

  smac_store_unit u_store (
    .data_valid (res_valid), .data_ready (res_ready), .data (res_data),
    .addr_valid (st_a_valid), .addr_ready (st_a_ready), .addr (st_a),
    .tcdm_req (su_req), .tcdm_addr (su_addr), .tcdm_wdata (su_wdata), .tcdm_gnt (su_gnt),
    .ack (st_ack)
  );

  smac_tcdm_mux u_xbar (
    .clk, .rst_n,
    .ld_req (lu_req), .ld_addr (lu_addr), .ld_gnt (lu_gnt), .ld_r_valid (lu_rv), .ld_r_data (lu_rdata),
    .st_req (su_req), .st_addr (su_addr), .st_wdata (su_wdata), .st_gnt (su_gnt),
    .tcdm_req, .tcdm_we, .tcdm_be, .tcdm_addr, .tcdm_wdata, .tcdm_gnt, .tcdm_r_valid, .tcdm_r_data,
    .conflict (tcdm_conflict)
  );

  // ---------------- FIFOs ----------------
  logic lu_push_ready;
  logic [$clog2(FIFO_DEPTH+1)-1:0] in_cnt, out_cnt;

  smac_fifo #(.W(BUS_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid (lu_out_valid), .in_ready (lu_push_ready), .in_data (lu_out_data),
    .out_valid (in_valid), .out_ready (in_ready), .out_data (in_data), .count (in_cnt)
  );

  smac_fifo #(.W(BUS_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_valid (o_valid), .in_ready (o_ready), .in_data (eng_out),
    .out_valid (res_valid), .out_ready (res_ready), .out_data (res_data), .count (out_cnt)
  );

  // The load unit's credits guarantee room for every returning word.
  a_in_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) lu_out_valid |-> lu_push_ready);

  // ---------------- engine ----------------
  smac_engine #(.NUM_SMAC_P(NUM_SMAC_P), .OUT_WORDS(OUT_WORDS)) u_engine (
    .clk, .rst_n, .start,
    .pa (cfg.pa), .pw (cfg.pw), .nslot (cfg.nslot),
    .in_valid, .in_ready, .in_data,
    .plane_rdy, .plane_take, .ctrl, .xbit, .q_shift,
    .out_slot (o_slot), .out_word (o_word), .out_data (eng_out)
  );

endmodule
