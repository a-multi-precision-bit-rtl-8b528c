// Self-checking testbench of the high-level control unit.
//
// For several job shapes the expected load-address list (per pixel, per
// filter group, per kernel position and channel group: one activation
// address, then the weight words, running on from w_base through the groups
// and starting again at w_base for the next pixel) and store-address list (consecutive
// words from out_base) are built here and compared with what the unit
// issues under random ready signals.  Store acknowledges are given at
// random; `done` must pulse exactly when the last one arrives.
module tb_smac_hl_ctrl;
  import smac_pkg::*;
  localparam int PLW = 8, OW = 4;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  smac_cfg_t cfg;
  logic ld_valid, ld_ready = 0, st_valid, st_ready = 0, st_ack = 0, busy, done;
  logic [31:0] ld_addr, st_addr;

  smac_hl_ctrl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic job(int ins, int ngrp, int ipw, int f, int chw, int ho, int wo);
    int exp_ld[$], exp_st[$], nld, nst, nack, wi, dones;
    logic [31:0] wp;
    cfg = '0;
    cfg.act_base = 32'h100; cfg.w_base = 32'h8000; cfg.out_base = 32'h20000;
    cfg.pa = 8; cfg.pw = 4'(ipw); cfg.nslot = 3'(ins); cfg.ch_words = 16'(chw); cfg.ksize = 2'(f);
    wi = wo + f - 1;
    cfg.w_in = 16'(wi); cfg.h_out = 16'(ho); cfg.w_out = 16'(wo); cfg.ngroup = 8'(ngrp);
    for (int h = 0; h < ho; h++) for (int w = 0; w < wo; w++) begin
      wp = cfg.w_base;
      for (int g = 0; g < (ngrp == 0 ? 1 : ngrp); g++)
      for (int l = 0; l < f; l++) for (int j = 0; j < f; j++) for (int c = 0; c < chw; c++) begin
        exp_ld.push_back(cfg.act_base + (((h + l) * wi + (w + j)) * chw + c) * 16);
        for (int k = 0; k < ins * ipw * PLW; k++) begin exp_ld.push_back(wp); wp += 16; end
      end
    end
    for (int i = 0; i < ho * wo * (ngrp == 0 ? 1 : ngrp) * ins * OW; i++) exp_st.push_back(cfg.out_base + i * 16);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    nld = 0; nst = 0; nack = 0; dones = 0;
    while (!(dones > 0 && !busy)) begin
      ld_ready = ($urandom_range(3, 0) != 0);
      st_ready = ($urandom_range(1, 0) == 1);
      // the last result can only be written after the last input word was read
      st_ack   = (nack < nst) && ($urandom_range(1, 0) == 1) && (nack < exp_st.size() - 1 || nld == exp_ld.size());
      #1;
      if (ld_valid && ld_ready) begin
        checks++;
        if (nld >= exp_ld.size() || ld_addr != exp_ld[nld]) begin
          failures++; if (failures < 10) $display("FAIL load %0d: %h", nld, ld_addr);
        end
        nld++;
      end
      if (st_valid && st_ready) begin
        checks++;
        if (nst >= exp_st.size() || st_addr != exp_st[nst]) begin
          failures++; if (failures < 10) $display("FAIL store %0d: %h", nst, st_addr);
        end
        nst++;
      end
      if (st_ack) nack++;
      @(negedge clk);
      if (done) begin
        dones++;
        checks++; if (nack != exp_st.size()) begin failures++; $display("FAIL done after %0d acks", nack); end
      end
    end
    st_ack = 0;
    checks++; if (nld != exp_ld.size()) begin failures++; $display("FAIL %0d loads, exp %0d", nld, exp_ld.size()); end
    checks++; if (nst != exp_st.size()) begin failures++; $display("FAIL %0d stores, exp %0d", nst, exp_st.size()); end
    checks++; if (dones != 1) begin failures++; $display("FAIL %0d done pulses", dones); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    //  slots groups pw f chw ho wo
    job(1,    1,     8, 1, 1, 1, 1);
    job(2,    0,     4, 3, 2, 2, 3);
    job(4,    3,     6, 2, 1, 3, 2);
    job(3,    1,     8, 3, 3, 1, 2);
    job(4,    2,     4, 1, 2, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
