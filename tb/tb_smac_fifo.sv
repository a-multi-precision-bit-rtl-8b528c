// Self-checking testbench of the stream FIFO: random pushes and pops
// against a queue model, checking order, data, the fill count, that a
// full FIFO refuses and an empty one offers nothing, and that both
// the full and the empty state were reached.
module tb_smac_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = 0, out_data;
  logic [$clog2(D+1)-1:0] count;

  smac_fifo #(.W(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] q [$];
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int phase;
      @(negedge clk);
      phase = (n / 200) % 3;   // fill-heavy, drain-heavy, balanced
      in_valid = $urandom_range(9, 0) < (phase == 0 ? 8 : phase == 1 ? 2 : 5);
      out_ready = $urandom_range(9, 0) < (phase == 0 ? 2 : phase == 1 ? 8 : 5);
      in_data = W'($urandom());
      #1;
      checks++;
      if (int'(count) != q.size() || in_ready != (q.size() < D) || out_valid != (q.size() > 0)) begin
        failures++; $display("FAIL flags count=%0d model=%0d", count, q.size());
      end
      if (q.size() == D) fulls++;
      if (q.size() == 0) empties++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != q[0]) begin failures++; $display("FAIL data %h exp %h", out_data, q[0]); end
        void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++; if (fulls == 0 || empties == 0) begin failures++; $display("FAIL full/empty not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
