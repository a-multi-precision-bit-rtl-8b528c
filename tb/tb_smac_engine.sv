// Self-checking testbench of the SMAC engine at its default size.
//
// The low-level control unit sequences the engine, as in the accelerator;
// the testbench is the input stream (activation word, then weight
// bit-planes, per chunk) with random gaps, and the output consumer with
// random back-pressure.  Expected results are integer convolutions of the
// random data, shifted, ReLU-ed and cut to Pa bits.  It also checks that the
// stream is refused while a full plane waits (a later pixel's data arriving
// while the current pixel drains) and that, with a gap-free
// stream at Pa = 8, a bit-plane is consumed every 8 cycles.
module tb_smac_engine;
  import smac_pkg::*;
  localparam int NS = NUM_SMAC, PW_ = NS * M / BUS_W, OW = NS * LANE_W / BUS_W;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [3:0] pa, pw; logic [2:0] nslot;
  logic in_valid = 0, in_ready; logic [BUS_W-1:0] in_data = '0;
  logic plane_rdy, plane_take, q_shift, out_valid, out_ready = 0, busy, done, stall;
  smac_ctrl_t ctrl; logic [BIT_W-1:0] xbit;
  logic [SLOT_W-1:0] out_slot; logic [$clog2(OW)-1:0] out_word;
  logic [BUS_W-1:0] out_data;
  logic [19:0] nchunk; logic [31:0] npix = 1; logic [4:0] qshift;

  smac_engine dut (.*);
  smac_ll_ctrl u_ll (.clk, .rst_n, .start, .pa, .pw, .nslot, .nchunk, .npix, .qshift,
    .plane_rdy, .plane_take, .ctrl, .xbit, .q_shift, .out_valid, .out_ready, .out_slot, .out_word,
    .busy, .done, .stall);

  int checks = 0, failures = 0, refused_full = 0, takes = 0;
  always @(posedge clk) begin
    if (in_valid && !in_ready && plane_rdy) refused_full++;
    if (plane_take) takes++;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int act [4][M];
  int wt [4][4*NS][M];

  // Offer one word from a falling edge until a rising edge accepts it.
  task automatic push(logic [BUS_W-1:0] wd);
    logic acc;
    in_valid = 1; in_data = wd;
    forever begin
      #1 acc = in_ready;
      @(negedge clk);
      if (acc) break;
    end
    in_valid = 0;
  endtask

  task automatic job(int ipa, int ipw, int ins, int nch, int q, int gaps, int np = 1);
    longint s; logic [7:0] e; int nout, first_take, last_take;
    npix = np; pa = 4'(ipa); pw = 4'(ipw); nslot = 3'(ins); nchunk = 20'(nch); qshift = 5'(q);
    for (int c = 0; c < nch; c++) for (int i = 0; i < M; i++) begin
      act[c][i] = int'($urandom_range((1 << ipa) - 1, 0)) - (1 << (ipa - 1));
      for (int f = 0; f < ins * NS; f++) wt[c][f][i] = int'($urandom_range((1 << ipw) - 1, 0)) - (1 << (ipw - 1));
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    takes = 0;
    fork
      begin // stream
        for (int pp = 0; pp < np; pp++)
        for (int c = 0; c < nch; c++) begin
          logic [BUS_W-1:0] wd;
          for (int i = 0; i < M; i++) wd[i*8 +: 8] = 8'(act[c][i]);
          @(negedge clk);
          push(wd);
          for (int t = 0; t < ins; t++) for (int b = 0; b < ipw; b++) for (int k = 0; k < PW_; k++) begin
            if (gaps && $urandom_range(3, 0) == 0) @(negedge clk);
            for (int sl = 0; sl < BUS_W / M; sl++) for (int i = 0; i < M; i++)
              wd[sl*M + i] = wt[c][t*NS + k*(BUS_W/M) + sl][i][b];
            push(wd);
          end
        end
        in_valid = 0;
      end
      begin // consumer
        nout = 0;
        while (nout < ins * OW * np) begin
          @(negedge clk);
          out_ready = gaps ? ($urandom_range(1, 0) == 1) : 1'b1;
          #1;
          if (out_valid && out_ready) begin
            for (int ln = 0; ln < BUS_W / 8; ln++) begin
              int f; f = int'(out_slot) * NS + int'(out_word) * (BUS_W / 8) + ln;
              s = 0;
              for (int c = 0; c < nch; c++) for (int i = 0; i < M; i++) s += longint'(act[c][i]) * wt[c][f][i];
              s = s >>> q;
              e = (s < 0) ? 8'd0 : 8'(s & ((1 << ipa) - 1));
              checks++;
              if (out_data[ln*8 +: 8] !== e) begin
                failures++;
                if (failures < 8) $display("FAIL filter %0d got %0d exp %0d", f, out_data[ln*8 +: 8], e);
              end
            end
            nout++;
          end
        end
        @(negedge clk);   // let the last accepted word pass its rising edge
        out_ready = 0;
      end
    join
    wait (!busy);
    checks++;
    if (takes != np * nch * ins * ipw) begin failures++; $display("FAIL %0d plane takes, expected %0d", takes, np * nch * ins * ipw); end
  endtask

  // Rate: with a gap-free stream at Pa = 8, consecutive takes are 8 cycles apart.
  int last_take_cyc = -1, cyc = 0, rate_ok = 0, rate_bad = 0;
  logic rate_on = 0;
  always @(posedge clk) begin
    cyc++;
    if (plane_take && rate_on) begin
      if (last_take_cyc >= 0) begin
        if (cyc - last_take_cyc == 8) rate_ok++; else if (ctrl.slot == SLOT_W'(0) && ctrl.first_w) ; else rate_bad++;
      end
      last_take_cyc = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    job(8, 8, 1, 1, 0, 0);
    job(4, 6, 2, 3, 4, 1);
    job(8, 4, 4, 2, 8, 1);
    rate_on = 1;
    job(8, 8, 2, 2, 6, 0);
    rate_on = 0;
    job(8, 6, 1, 2, 5, 1, 3);   // three pixels: the stream runs ahead while results drain
    rate_on = 0;
    checks++; if (refused_full == 0) begin failures++; $display("FAIL stream never refused"); end
    checks++; if (rate_ok < 20 || rate_bad > 0) begin failures++; $display("FAIL plane rate ok=%0d bad=%0d", rate_ok, rate_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
