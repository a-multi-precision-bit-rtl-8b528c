// Self-checking testbench of the AC1 accumulator.
//
// For every activation precision 1..8 the test feeds groups of Pa random
// signed partial sums (with random idle cycles in between, `valid` low) and
// checks that after the group AC1 holds sum_k psum_k * 2^k.  The extreme
// values (+M on every bit, -M on every bit) are included, and idle cycles
// must leave the accumulator unchanged.
module tb_smac_ac1;
  localparam int M  = smac_pkg::M;
  localparam int PS = $clog2(M) + 2;
  localparam int A1 = PS + smac_pkg::PA_MAX;

  logic clk = 0, rst_n = 0;
  logic valid, first;
  logic [3:0] pa;
  logic signed [PS-1:0] psum;
  logic signed [A1-1:0] ac1;

  int checks = 0, failures = 0;

  smac_ac1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v;
    int p, mode;
    valid = 0; first = 0; pa = 4'd8; psum = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int ipa = 1; ipa <= 8; ipa++)
      for (int g = 0; g < 40; g++) begin
        pa = 4'(ipa);
        exp_v = 0;
        mode = g % 10;
        for (int k = 0; k < ipa; k++) begin
          if ($urandom_range(3, 0) == 0) begin
            @(negedge clk) valid = 0; psum = PS'($urandom);
            @(posedge clk);
          end
          p = (mode == 0) ? M : (mode == 1) ? -M : $urandom_range(2 * M, 0) - M;
          exp_v += longint'(p) <<< k;
          @(negedge clk);
          valid = 1; first = (k == 0); psum = PS'(p);
          @(posedge clk);
        end
        @(negedge clk) valid = 0;
        repeat ($urandom_range(2, 0)) @(posedge clk);
        #1;
        checks++;
        if (longint'(ac1) != exp_v) begin
          failures++;
          if (failures < 10) $display("mismatch pa=%0d ac1=%0d exp=%0d", ipa, ac1, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
