// Workload testbench: one output pixel (or a small strip) of representative
// layers of the two networks the accelerator targets, at full size, with
// their real channel and filter counts.  Layers with more than 256 filters
// run as one job split into filter groups of up to 256:
//   VGG16 conv1   3x3,   3 -> 64   channels zero-padded to 16
//   VGG16 conv    3x3, 256 -> 512  2 groups
//   VGG16 conv    3x3, 512 -> 512  2 groups
//   VGG16 fc      1x1, 25088 -> 64 (64 of the first fully connected layer's filters)
//   VGG16 fc      1x1, 4096 -> 256 (one of 16 groups)
//   SqueezeNet fire squeeze 1x1, 128 -> 16, expand 3x3, 16 -> 64,
//   conv10 1x1, 512 -> 1000 (4 groups, 24 filter lanes unused)
// Data come from a hash of their coordinates, so nothing large is stored in
// the testbench.  Every output byte is compared with an integer convolution
// (shift, ReLU, low Pa bits), and the job time with the bit-serial budget:
// at least one cycle per activation bit of every bit-plane and at least
// eight cycles (the 128-bit port) per plane, at most that plus the
// per-chunk and per-pixel overheads.  MAC/cycle is printed per layer.
module tb_cnn_workloads;
  import smac_pkg::*;

  localparam int NS = NUM_SMAC;
  localparam int PLANE_WORDS = NS * M / BUS_W;
  localparam int OUT_WORDS = NS * LANE_W / BUS_W;
  localparam int WORDS = 131072;
  localparam int ACT_BASE = 32'h0000_0000, W_BASE = 32'h0001_0000, OUT_BASE = 32'h001E_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic periph_req = 0, periph_we = 0, periph_gnt, periph_r_valid;
  logic [7:0] periph_addr = 0;
  logic [31:0] periph_wdata = 0, periph_r_data;
  logic tcdm_req, tcdm_we, tcdm_gnt, tcdm_r_valid;
  logic [BUS_W/8-1:0] tcdm_be;
  logic [31:0] tcdm_addr;
  logic [BUS_W-1:0] tcdm_wdata, tcdm_r_data;
  logic evt, busy, stall_weights, tcdm_conflict;

  smac_hwpe dut (.*);
  tcdm_model #(.WORDS(WORDS), .GNT_PCT(100)) u_mem (
    .clk, .req (tcdm_req), .we (tcdm_we), .be (tcdm_be), .addr (tcdm_addr), .wdata (tcdm_wdata),
    .gnt (tcdm_gnt), .r_valid (tcdm_r_valid), .r_data (tcdm_r_data));

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // signed value of p bits from a hash of four coordinates
  function automatic int hv(int a, int b, int c, int d, int p);
    int unsigned h;
    h = 32'(a) * 32'h9E3779B1 ^ 32'(b) * 32'h85EBCA77 ^ 32'(c) * 32'hC2B2AE3D ^ 32'(d) * 32'h27D4EB2F;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12;
    return int'(h % (1 << p)) - (1 << (p - 1));
  endfunction

  int seed = 1;
  // activation at (y, x, ch); channels at or above creal are zero padding
  function automatic int actv(int y, int x, int ch, int creal, int pa);
    return (ch < creal) ? hv(seed, y, x, ch, pa) : 0;
  endfunction
  // weight of filter fo at (l, j, ch); filters at or above kreal are unused (zero)
  function automatic int wtv(int fo, int l, int j, int ch, int kreal, int pw);
    return (fo < kreal) ? hv(seed + 7, fo, l * 3 + j, ch, pw) : 0;
  endfunction

  task automatic preg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    periph_req = 1; periph_we = 1; periph_addr = a; periph_wdata = d;
    @(negedge clk);
    periph_req = 0; periph_we = 0;
  endtask

  task automatic layer(string name, int pa, int pw, int f, int creal, int kreal, int ho, int wo, int q);
    int hi, wi, chw, c, nslot, ngrp, gw, cyc, planes, lo, hi_b, bad;
    seed++;
    chw = (creal + 15) / 16; c = chw * 16;
    ngrp  = (kreal + 4 * NS - 1) / (4 * NS);           // passes of up to 256 filters
    nslot = (kreal + ngrp * NS - 1) / (ngrp * NS);
    gw    = f * f * chw * nslot * pw * PLANE_WORDS;     // weight words per group
    hi = ho + f - 1; wi = wo + f - 1;
    for (int y = 0; y < hi; y++) for (int x = 0; x < wi; x++) for (int g = 0; g < chw; g++) begin
      logic [BUS_W-1:0] wd;
      for (int i = 0; i < 16; i++) wd[i*8 +: 8] = 8'(actv(y, x, g*16 + i, creal, pa));
      u_mem.mem[(ACT_BASE / 16) + (y * wi + x) * chw + g] = wd;
    end
    for (int gg = 0; gg < ngrp; gg++)
    for (int l = 0; l < f; l++) for (int j = 0; j < f; j++) for (int g = 0; g < chw; g++)
      for (int t = 0; t < nslot; t++) for (int b = 0; b < pw; b++) for (int kw = 0; kw < PLANE_WORDS; kw++) begin
        logic [BUS_W-1:0] wd;
        for (int sl = 0; sl < BUS_W / M; sl++) for (int i = 0; i < M; i++) begin
          int v; v = wtv((gg*nslot + t)*NS + kw*(BUS_W/M) + sl, l, j, g*16 + i, kreal, pw);
          wd[sl*M + i] = v[b];
        end
        u_mem.mem[(W_BASE / 16) + gg*gw + ((((l*f + j)*chw + g)*nslot + t)*pw + b)*PLANE_WORDS + kw] = wd;
      end
    preg(8'h08, ACT_BASE); preg(8'h0C, W_BASE); preg(8'h10, OUT_BASE);
    preg(8'h14, (pw << 4) | pa); preg(8'h18, nslot); preg(8'h1C, chw); preg(8'h20, f);
    preg(8'h24, wi); preg(8'h28, ho); preg(8'h2C, wo); preg(8'h30, q); preg(8'h34, ngrp);
    preg(8'h00, 0);
    cyc = 0;
    while (!evt) begin @(posedge clk); cyc++; end
    bad = 0;
    for (int y = 0; y < ho; y++) for (int x = 0; x < wo; x++) for (int fo = 0; fo < ngrp * nslot * NS; fo++) begin
      longint s; logic [7:0] e, g;
      s = 0;
      for (int l = 0; l < f; l++) for (int j = 0; j < f; j++) for (int ch = 0; ch < creal; ch++)
        s += longint'(actv(y + l, x + j, ch, creal, pa)) * longint'(wtv(fo, l, j, ch, kreal, pw));
      s = s >>> q;
      e = (s < 0) ? 8'd0 : 8'(s & ((1 << pa) - 1));
      g = u_mem.mem[(OUT_BASE / 16) + ((y*wo + x)*ngrp*nslot + fo / NS)*OUT_WORDS + (fo % NS) / 16][(fo % 16)*8 +: 8];
      checks++;
      if (g !== e) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s px(%0d,%0d) filter %0d: got %0d exp %0d", name, y, x, fo, g, e);
      end
    end
    planes = ho * wo * ngrp * f * f * chw * nslot * pw;
    lo   = planes * ((pa > PLANE_WORDS) ? pa : PLANE_WORDS);
    hi_b = ho * wo * ngrp * (f * f * chw * (nslot * pw * PLANE_WORDS + 3) + 4 + q + nslot * OUT_WORDS + 20);
    checks++;
    if (cyc < lo || cyc > hi_b) begin failures++; $display("FAIL %s: %0d cycles outside [%0d, %0d]", name, cyc, lo, hi_b); end
    $display("%-34s Pa=%0d Pw=%0d: %0d cycles, %0.2f MAC/cycle (%0d of %0d filter lanes used)",
             name, pa, pw, cyc, real'(ho * wo * kreal * f * f * creal) / real'(cyc), kreal, ngrp * nslot * NS);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    //    name                                 pa pw f  C_in  filters ho wo  q
    layer("VGG16 conv1 3x3 3->64",              8, 8, 3,     3,  64,   1, 2,  6);
    layer("VGG16 conv 3x3 256->512 (2 groups)", 8, 4, 3,   256, 512,   1, 1, 12);
    layer("VGG16 conv 3x3 512->512 (2 groups)", 8, 6, 3,   512, 512,   1, 1, 14);
    layer("VGG16 fc 1x1 25088->64",             8, 8, 1, 25088,  64,   1, 1, 16);
    layer("VGG16 fc 1x1 4096->256 (1/16 of it)",4, 4, 1,  4096, 256,   1, 1, 10);
    layer("SqueezeNet fire squeeze 1x1 128->16",4, 4, 1,   128,  16,   2, 2,  5);
    layer("SqueezeNet fire expand 3x3 16->64",  8, 8, 3,    16,  64,   2, 2,  8);
    layer("SqueezeNet conv10 1x1 512->1000",    8, 8, 1,   512,1000,   1, 1, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
