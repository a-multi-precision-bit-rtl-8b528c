// Self-checking testbench of the low-level control unit.
//
// A reference walk of the loops (pixel, chunk, slot, weight bit, activation
// bit) is advanced on every issued bit-cycle and compared field by field
// with `ctrl` and `xbit`.  Plane availability and output back-pressure are
// random in some jobs.  Also checked: one plane hand-over per bit-plane,
// exactly `qshift` quantization pulses per pixel, after the 4-cycle drain,
// nslot x OUT_WORDS output words per pixel in slot/word order, one `done`,
// and, with planes always available, the bit-serial latency of a pixel:
// planes x Pa issue cycles with no gap.
module tb_smac_ll_ctrl;
  import smac_pkg::*;
  localparam int OW = 4;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [3:0] pa, pw; logic [2:0] nslot; logic [19:0] nchunk; logic [31:0] npix; logic [4:0] qshift;
  logic plane_rdy = 0, plane_take, q_shift, out_valid, out_ready = 0, busy, done, stall;
  smac_ctrl_t ctrl; logic [BIT_W-1:0] xbit; logic [SLOT_W-1:0] out_slot; logic [1:0] out_word;

  smac_ll_ctrl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic job(int ipa, int ipw, int ins, int nch, int np, int q, int rnd);
    int x, b, t, c, p, takes, qs, outs, dones, issue, since_drain, first_issue, last_issue, cyc;
    pa = 4'(ipa); pw = 4'(ipw); nslot = 3'(ins); nchunk = 20'(nch); npix = np; qshift = 5'(q);
    x = 0; b = 0; t = 0; c = 0; p = 0; takes = 0; qs = 0; outs = 0; dones = 0; issue = 0;
    since_drain = -1; first_issue = -1; last_issue = -1; cyc = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (dones == 0) begin
      plane_rdy = rnd ? ($urandom_range(2, 0) != 0) : 1'b1;
      out_ready = rnd ? ($urandom_range(1, 0) == 1) : 1'b1;
      #1;
      if (ctrl.valid) begin
        if (first_issue < 0) first_issue = cyc;
        last_issue = cyc;
        chk(xbit == BIT_W'(x) && ctrl.first_x == (x == 0) && ctrl.last_x == (x == ipa - 1), "x fields");
        chk(ctrl.first_w == (b == 0) && ctrl.last_w == (b == ipw - 1) && ctrl.slot == SLOT_W'(t) && ctrl.first_v == (c == 0), "w/slot/v fields");
        issue++;
        if (++x == ipa) begin x = 0; if (++b == ipw) begin b = 0; if (++t == ins) begin t = 0; if (++c == nch) c = 0; end end end
        if (x == 0 && b == 0 && t == 0 && c == 0) since_drain = 0;
      end else if (since_drain >= 0) since_drain++;
      if (plane_take) takes++;
      if (q_shift) begin
        chk(since_drain >= 5, "quantization waits for the pipeline");
        qs++;
      end
      if (out_valid && out_ready) begin
        chk(int'(out_slot) == (outs % (ins * OW)) / OW && int'(out_word) == outs % OW, "output order");
        if (outs % (ins * OW) == 0) chk(qs == q * (outs / (ins * OW) + 1), "quantization pulses");
        outs++;
      end
      @(negedge clk); cyc++;
      if (done) dones++;
    end
    chk(takes == np * nch * ins * ipw, "plane hand-overs");
    chk(issue == np * nch * ins * ipw * ipa, "bit-cycles issued");
    chk(outs == np * ins * OW, "output words");
    chk(!busy, "idle after done");
    if (!rnd && np == 1) chk(last_issue - first_issue + 1 == nch * ins * ipw * ipa, "gap-free issue latency");
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    job(8, 8, 1, 1, 1, 0, 0);
    job(4, 6, 2, 3, 1, 3, 0);
    job(8, 4, 4, 2, 2, 7, 1);
    job(4, 4, 3, 5, 3, 0, 1);
    job(8, 6, 1, 9, 2, 12, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
