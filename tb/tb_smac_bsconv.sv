// Self-checking testbench of the bit-serial convolution stage.
//
// Random weight planes and activation bits are driven on the falling edge;
// after the next rising edge `psum` must equal the count of ones in
// (weight register AND activation bits), negated when `msb_a` was set.  The
// weight register is loaded only on some cycles, so the test also checks
// that the AND uses the register value from before the load edge and that
// the register holds between loads.
module tb_smac_bsconv;
  localparam int M  = smac_pkg::M;
  localparam int PS = $clog2(M) + 2;

  logic clk = 0, rst_n = 0;
  logic w_load, msb_a;
  logic [M-1:0] w_in, a_bits;
  logic signed [PS-1:0] psum;

  int checks = 0, failures = 0;

  smac_bsconv dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [M-1:0] model_w;
  int exp_v;

  initial begin
    w_load = 0; msb_a = 0; w_in = '0; a_bits = '0; model_w = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      w_load = ($urandom_range(3, 0) == 0);
      w_in   = M'($urandom);
      a_bits = (n % 50 == 7) ? '1 : M'($urandom);
      if (n % 50 == 8) begin a_bits = '1; w_load = 1; w_in = '1; end
      msb_a  = $urandom_range(1, 0);
      exp_v  = $countones(model_w & a_bits);
      if (msb_a) exp_v = -exp_v;
      @(posedge clk);
      if (w_load) model_w = w_in;
      #1;
      checks++;
      if (int'(psum) != exp_v) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d psum=%0d exp=%0d", n, psum, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
