// Workload testbench: the 3x3 convolution with 128 input channels and 128
// filters used as the reference layer for latency (a third-layer VGG16
// convolution, 112x112 output), run on the full-size accelerator for a
// strip of output pixels at each precision pair.
//
// Every output is checked against an integer convolution, and the cycles
// per output pixel are compared with the published totals for the whole
// 112x112 layer divided by its 12544 pixels: 117.57 M (Pa 8, Pw 8),
// 88.67 M (8, 6), 58.92 M (8, 4) cycles, within 5 %.  At Pa = 4, Pw = 4 the
// published 30.84 M cycles assume a weight bit-plane every 4 cycles; this
// implementation fetches 128 bits per cycle, so a bit-plane takes 8 cycles
// and the expected figure is the Pa 8 / Pw 4 one; that is what is checked.
module tb_vgg_conv_layer;
  import smac_pkg::*;

  localparam int NS = NUM_SMAC;
  localparam int PLANE_WORDS = NS * M / BUS_W;
  localparam int OUT_WORDS = NS * LANE_W / BUS_W;
  localparam int MAXH = 4, MAXC = 128, MAXK = 2 * NS;
  localparam int ACT_BASE = 32'h0000_0000, W_BASE = 32'h0001_0000, OUT_BASE = 32'h0004_0000;

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
  tcdm_model #(.WORDS(32768), .GNT_PCT(100)) u_mem (
    .clk, .req (tcdm_req), .we (tcdm_we), .be (tcdm_be), .addr (tcdm_addr), .wdata (tcdm_wdata),
    .gnt (tcdm_gnt), .r_valid (tcdm_r_valid), .r_data (tcdm_r_data));

  int checks = 0, failures = 0;
  int n_stall = 0, n_conflict = 0, n_quant = 0, n_relu = 0, n_multichunk = 0, n_slot4 = 0;
  int n_pa4 = 0, n_pa8 = 0, n_pw4 = 0, n_pw6 = 0, n_pw8 = 0, n_refused = 0;

  always @(posedge clk) begin
    if (stall_weights) n_stall++;
    if (tcdm_conflict) n_conflict++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int act [MAXH][MAXH][MAXC];
  int wt  [MAXK][3][3][MAXC];

  task automatic preg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    periph_req = 1; periph_we = 1; periph_addr = a; periph_wdata = d;
    @(negedge clk);
    periph_req = 0; periph_we = 0;
  endtask

  task automatic rreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    periph_req = 1; periph_we = 0; periph_addr = a;
    @(negedge clk);
    periph_req = 0;
    d = periph_r_data;
  endtask

  task automatic run_job(int pa, int pw, int nslot, int f, int chw, int ho, int wo, int q, int gpct);
    int hi, wi, c, k, cyc, lo, hi_b, planes;
    logic [31:0] rd;
    hi = ho + f - 1; wi = wo + f - 1; c = chw * 16; k = nslot * NS;
    u_mem.gnt_pct = gpct;
    // --- data ---
    for (int y = 0; y < hi; y++) for (int x = 0; x < wi; x++) for (int ch = 0; ch < c; ch++)
      act[y][x][ch] = int'($urandom_range((1 << pa) - 1, 0)) - (1 << (pa - 1));
    for (int fo = 0; fo < k; fo++) for (int l = 0; l < f; l++) for (int j = 0; j < f; j++)
      for (int ch = 0; ch < c; ch++)
        wt[fo][l][j][ch] = int'($urandom_range((1 << pw) - 1, 0)) - (1 << (pw - 1));
    for (int y = 0; y < hi; y++) for (int x = 0; x < wi; x++) for (int g = 0; g < chw; g++) begin
      logic [BUS_W-1:0] wd;
      for (int i = 0; i < 16; i++) wd[i*8 +: 8] = 8'(act[y][x][g*16 + i]);
      u_mem.mem[(ACT_BASE / 16) + (y * wi + x) * chw + g] = wd;
    end
    for (int l = 0; l < f; l++) for (int j = 0; j < f; j++) for (int g = 0; g < chw; g++)
      for (int t = 0; t < nslot; t++) for (int b = 0; b < pw; b++) for (int kw = 0; kw < PLANE_WORDS; kw++) begin
        logic [BUS_W-1:0] wd;
        for (int sl = 0; sl < BUS_W / M; sl++) for (int i = 0; i < M; i++)
          wd[sl*M + i] = wt[t*NS + kw*(BUS_W/M) + sl][l][j][g*16 + i][b];
        u_mem.mem[(W_BASE / 16) + ((((l*f + j)*chw + g)*nslot + t)*pw + b)*PLANE_WORDS + kw] = wd;
      end
    // --- program and run ---
    preg(8'h08, ACT_BASE); preg(8'h0C, W_BASE); preg(8'h10, OUT_BASE);
    preg(8'h14, (pw << 4) | pa); preg(8'h18, nslot); preg(8'h1C, chw); preg(8'h20, f);
    preg(8'h24, wi); preg(8'h28, ho); preg(8'h2C, wo); preg(8'h30, q);
    rreg(8'h14, rd);
    checks++; if (rd[7:0] != 8'((pw << 4) | pa)) begin failures++; $display("FAIL PREC readback %h", rd); end
    preg(8'h00, 0);
    cyc = 0;
    while (!evt) begin @(posedge clk); cyc++; end
    rreg(8'h04, rd);
    checks++; if (rd[1:0] != 2'b10) begin failures++; $display("FAIL STATUS %b", rd[1:0]); end
    // --- compare ---
    for (int y = 0; y < ho; y++) for (int x = 0; x < wo; x++) for (int fo = 0; fo < k; fo++) begin
      longint s; logic [7:0] e, g; int t, kw, ln;
      s = 0;
      for (int l = 0; l < f; l++) for (int j = 0; j < f; j++) for (int ch = 0; ch < c; ch++)
        s += longint'(act[y + l][x + j][ch]) * longint'(wt[fo][l][j][ch]);
      s = s >>> q;
      e = (s < 0) ? 8'd0 : 8'(s & ((1 << pa) - 1));
      if (s < 0) n_relu++;
      t = fo / NS; kw = (fo % NS) / 16; ln = fo % 16;
      g = u_mem.mem[(OUT_BASE / 16) + ((y*wo + x)*nslot + t)*OUT_WORDS + kw][ln*8 +: 8];
      checks++;
      if (g !== e) begin
        failures++;
        if (failures < 10) $display("FAIL job pa=%0d pw=%0d f=%0d px(%0d,%0d) filter %0d: got %0d exp %0d (sum %0d)", pa, pw, f, y, x, fo, g, e, s);
      end
    end
    // --- cycles per output pixel against the published layer totals ---
    begin
      real per_px, ref_px;
      per_px = real'(cyc) / real'(ho * wo);
      ref_px = (pa == 8 && pw == 8) ? 117.57e6 : (pa == 8 && pw == 6) ? 88.67e6 : 58.92e6;
      ref_px = ref_px / 12544.0;
      $display("  %0.1f cycles per output pixel, published layer total gives %0.1f", per_px, ref_px);
      checks++;
      if (per_px < 0.95 * ref_px || per_px > 1.05 * ref_px) begin
        failures++; $display("FAIL cycles per pixel outside 5 %% of %0.1f", ref_px);
      end
    end
    $display("job pa=%0d pw=%0d slots=%0d f=%0d C=%0d out=%0dx%0d q=%0d grant=%0d%%: %0d cycles, %0.2f MAC/cycle",
             pa, pw, nslot, f, c, ho, wo, q, gpct, cyc, real'(ho*wo*k*f*f*c) / real'(cyc));
    if (q > 0) n_quant++;
    if (f * f * chw > 1) n_multichunk++;
    if (nslot == 4) n_slot4++;
    if (pa == 4) n_pa4++; else n_pa8++;
    if (pw == 4) n_pw4++; else if (pw == 6) n_pw6++; else n_pw8++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    //      pa pw slots f chw ho wo  q  grant%
    run_job(8, 8, 2,    3, 8, 1, 3, 14, 100);
    run_job(8, 6, 2,    3, 8, 1, 3, 12, 100);
    run_job(8, 4, 2,    3, 8, 1, 3, 10, 100);
    run_job(4, 4, 2,    3, 8, 1, 3,  6, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
