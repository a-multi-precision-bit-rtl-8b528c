// Self-checking testbench of the AC3 and quantization stage.
//
// Random AC2 register values are accumulated into the four AC3 registers
// over several chunks (the first chunk of each slot loads instead of adds,
// slots in random order, idle cycles in between).  Then a random number of
// q_shift pulses is applied.  Each AC3 register must equal the chunk sum
// arithmetically shifted right by that number, including negative sums.
module tb_smac_ac3;
  localparam int M   = smac_pkg::M;
  localparam int A2  = $clog2(M) + 2 + smac_pkg::PA_MAX + smac_pkg::PW_MAX;
  localparam int A3  = smac_pkg::AC3_W;
  localparam int NSL = smac_pkg::NSLOT;

  logic clk = 0, rst_n = 0;
  logic valid, first_v, q_shift;
  logic [$clog2(NSL)-1:0] slot;
  logic signed [A2-1:0] ac2 [NSL];
  logic signed [A3-1:0] ac3 [NSL];

  int checks = 0, failures = 0;

  smac_ac3 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sum_v [NSL];
  int seen [NSL];

  initial begin
    int nch, q, s;
    longint v;
    valid = 0; first_v = 0; q_shift = 0; slot = '0;
    for (int t = 0; t < NSL; t++) ac2[t] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int g = 0; g < 200; g++) begin
      nch = $urandom_range(12, 1);
      for (int t = 0; t < NSL; t++) begin sum_v[t] = 0; seen[t] = 0; end
      for (int n = 0; n < nch * NSL; n++) begin
        do s = $urandom_range(NSL - 1, 0); while (seen[s] == nch);
        @(negedge clk);
        for (int t = 0; t < NSL; t++) begin
          v = longint'($urandom_range(2000000, 0)) - 1000000;
          ac2[t] = A2'(v);
          if (t == s) sum_v[t] += v;
        end
        valid = 1; slot = s[$clog2(NSL)-1:0]; first_v = (seen[s] == 0);
        seen[s]++;
        @(posedge clk);
        if ($urandom_range(2, 0) == 0) begin
          @(negedge clk) valid = 0;
          @(posedge clk);
        end
      end
      @(negedge clk) valid = 0;
      q = $urandom_range(12, 0);
      for (int k = 0; k < q; k++) begin
        @(negedge clk) q_shift = 1;
        @(posedge clk);
      end
      @(negedge clk) q_shift = 0;
      #1;
      for (int t = 0; t < NSL; t++) begin
        checks++;
        if (longint'(ac3[t]) != (sum_v[t] >>> q)) begin
          failures++;
          if (failures < 10) $display("mismatch slot=%0d ac3=%0d exp=%0d", t, ac3[t], sum_v[t] >>> q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
