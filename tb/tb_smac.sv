// Self-checking testbench of one SMAC block.
//
// The testbench plays the controller: for each of several convolution
// chunks it feeds, per filter slot, the weight bit-planes LSB first and per
// plane the activation bits LSB first, loading the next plane on the last
// bit-cycle of the current one (no bubbles).  The expected result of every
// slot is computed from signed integer dot products, then shifted by the
// quantization amount and passed through ReLU and the Pa-bit cut.  Every
// supported precision pair (Pa 4/8, Pw 4/6/8) is run several times.
module tb_smac;
  import smac_pkg::*;

  localparam int NCH = 3;  // chunks in the volume

  logic clk = 0, rst_n = 0;
  logic w_load;
  logic [M-1:0] w_in, a_bits;
  smac_ctrl_t ctrl;
  logic [3:0] pa, pw;
  logic q_shift;
  logic [SLOT_W-1:0] out_slot;
  logic [LANE_W-1:0] out_act;

  int checks = 0, failures = 0;

  smac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int act [NCH][M];
  int wt  [NCH][NSLOT][M];
  longint expv [NSLOT];

  function automatic logic [M-1:0] plane(int c, int t, int b);
    logic [M-1:0] p;
    for (int i = 0; i < M; i++) p[i] = wt[c][t][i][b];
    return p;
  endfunction

  task automatic run_case(int ipa, int ipw, int q);
    int np, c, t, b;
    logic [M-1:0] nxt;
    pa = 4'(ipa); pw = 4'(ipw);
    for (int cc = 0; cc < NCH; cc++)
      for (int i = 0; i < M; i++) begin
        act[cc][i] = $signed($urandom_range((1 << ipa) - 1, 0)) - (1 << (ipa - 1));
        for (int tt = 0; tt < NSLOT; tt++)
          wt[cc][tt][i] = $signed($urandom_range((1 << ipw) - 1, 0)) - (1 << (ipw - 1));
      end
    for (int tt = 0; tt < NSLOT; tt++) begin
      expv[tt] = 0;
      for (int cc = 0; cc < NCH; cc++)
        for (int i = 0; i < M; i++) expv[tt] += longint'(act[cc][i]) * longint'(wt[cc][tt][i]);
    end
    // preload first plane
    @(negedge clk);
    ctrl = '0; w_load = 1; w_in = plane(0, 0, 0);
    np = NCH * NSLOT * ipw;
    for (int p = 0; p < np; p++) begin
      c = p / (NSLOT * ipw); t = (p / ipw) % NSLOT; b = p % ipw;
      for (int x = 0; x < ipa; x++) begin
        @(negedge clk);
        ctrl.valid = 1; ctrl.first_x = (x == 0); ctrl.last_x = (x == ipa - 1);
        ctrl.first_w = (b == 0); ctrl.last_w = (b == ipw - 1);
        ctrl.first_v = (c == 0); ctrl.slot = SLOT_W'(t);
        for (int i = 0; i < M; i++) a_bits[i] = act[c][i][x];
        w_load = 0;
        if (x == ipa - 1 && p + 1 < np) begin
          int c2, t2, b2;
          c2 = (p + 1) / (NSLOT * ipw); t2 = ((p + 1) / ipw) % NSLOT; b2 = (p + 1) % ipw;
          nxt = plane(c2, t2, b2);
          w_load = 1; w_in = nxt;
        end
      end
    end
    @(negedge clk); ctrl = '0; w_load = 0;
    repeat (5) @(negedge clk);
    for (int k = 0; k < q; k++) begin q_shift = 1; @(negedge clk); end
    q_shift = 0;
    for (int tt = 0; tt < NSLOT; tt++) begin
      longint v; logic [LANE_W-1:0] e;
      out_slot = SLOT_W'(tt);
      #1;
      v = expv[tt] >>> q;
      e = (v < 0) ? '0 : LANE_W'(v & ((1 << ipa) - 1));
      checks++;
      if (out_act !== e) begin
        failures++;
        $display("FAIL pa=%0d pw=%0d q=%0d slot=%0d exp_sum=%0d got=%0d exp=%0d", ipa, ipw, q, tt, expv[tt], out_act, e);
      end
    end
  endtask

  initial begin
    int pas[2] = '{4, 8};
    int pws[3] = '{4, 6, 8};
    ctrl = '0; w_load = 0; w_in = '0; a_bits = '0; q_shift = 0; out_slot = '0; pa = 8; pw = 8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++)
      foreach (pas[i]) foreach (pws[j]) begin
        run_case(pas[i], pws[j], 0);                                  // raw sum, low Pa bits
        run_case(pas[i], pws[j], int'($urandom_range(12, 4)));        // quantized
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
