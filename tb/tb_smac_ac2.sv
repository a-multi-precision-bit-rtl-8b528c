// Self-checking testbench of the AC2 stage (negating register and four
// slot accumulators).
//
// For each weight precision 1..8 the test builds, per slot, Pw random AC1
// values (one per weight bit-plane) and feeds them with the bit-planes of
// the four slots interleaved in a random order.  After all planes each
// AC2 register must hold sum_b s_b * ac1_b * 2^b, where s_b = -1 on the
// sign plane (msb_w) and +1 otherwise.  Extreme AC1 values are included.
module tb_smac_ac2;
  localparam int M   = smac_pkg::M;
  localparam int A1  = $clog2(M) + 2 + smac_pkg::PA_MAX;
  localparam int A2  = A1 + smac_pkg::PW_MAX;
  localparam int NSL = smac_pkg::NSLOT;
  localparam longint AMAX = longint'(M) * 255;

  logic clk = 0, rst_n = 0;
  logic load, msb_w, first_w;
  logic [$clog2(NSL)-1:0] slot;
  logic [3:0] pw;
  logic signed [A1-1:0] ac1;
  logic signed [A2-1:0] ac2 [NSL];

  int checks = 0, failures = 0;

  smac_ac2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint vals [NSL][8];
  longint exp_v [NSL];
  int nextb [NSL];

  initial begin
    int s, left;
    load = 0; msb_w = 0; first_w = 0; slot = '0; pw = 4'd8; ac1 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int ipw = 1; ipw <= 8; ipw++)
      for (int g = 0; g < 30; g++) begin
        pw = 4'(ipw);
        for (int t = 0; t < NSL; t++) begin
          exp_v[t] = 0; nextb[t] = 0;
          for (int b = 0; b < ipw; b++) begin
            vals[t][b] = (g == 0) ? AMAX : (g == 1) ? -AMAX
                       : longint'($urandom_range(2 * 4080, 0)) - 4080;
            exp_v[t] += ((b == ipw - 1) ? -vals[t][b] : vals[t][b]) <<< b;
          end
        end
        left = NSL * ipw;
        while (left > 0) begin
          s = $urandom_range(NSL - 1, 0);
          if (nextb[s] == ipw) continue;
          @(negedge clk);
          load = 1; slot = s[$clog2(NSL)-1:0];
          first_w = (nextb[s] == 0); msb_w = (nextb[s] == ipw - 1);
          ac1 = A1'(vals[s][nextb[s]]);
          nextb[s]++; left--;
          @(posedge clk);
          if ($urandom_range(3, 0) == 0) begin
            @(negedge clk) load = 0; ac1 = A1'($urandom);
            @(posedge clk);
          end
        end
        @(negedge clk) load = 0;
        @(posedge clk); #1;
        for (int t = 0; t < NSL; t++) begin
          checks++;
          if (longint'(ac2[t]) != exp_v[t]) begin
            failures++;
            if (failures < 10) $display("mismatch pw=%0d slot=%0d ac2=%0d exp=%0d", ipw, t, ac2[t], exp_v[t]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
