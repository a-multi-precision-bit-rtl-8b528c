// Self-checking testbench of the streamer load unit.
//
// A memory model with random grants answers the reads; a queue plays the
// input FIFO, popped at random (each pop returns a credit).  Checked: the
// words arrive in address order with the memory's contents, the queue
// never holds more than CREDITS words (no overflow), every address is
// consumed exactly once, and the unit stops requesting when out of credit.
module tb_smac_load_unit;
  import smac_pkg::*;
  localparam int CR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic addr_valid = 0, addr_ready, tcdm_req, tcdm_gnt, tcdm_r_valid, out_valid, credit_ret = 0;
  logic [31:0] addr = 0, tcdm_addr;
  logic [BUS_W-1:0] tcdm_r_data, out_data;

  smac_load_unit #(.CREDITS(CR)) dut (.*);
  tcdm_model #(.WORDS(256), .GNT_PCT(60)) u_mem (.clk, .req (tcdm_req), .we (1'b0), .be ('1),
    .addr (tcdm_addr), .wdata ('0), .gnt (tcdm_gnt), .r_valid (tcdm_r_valid), .r_data (tcdm_r_data));

  int checks = 0, failures = 0, no_credit = 0;
  logic [BUS_W-1:0] q [$];
  int exp_a [$];
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int na, nrx;
    for (int i = 0; i < 256; i++) u_mem.mem[i] = {$urandom(), $urandom(), $urandom(), $urandom()};
    for (int i = 0; i < 500; i++) exp_a.push_back($urandom_range(255, 0));
    repeat (3) @(posedge clk); rst_n = 1;
    na = 0; nrx = 0;
    while (nrx < 500) begin
      @(negedge clk);
      addr_valid = (na < 500) && ($urandom_range(4, 0) != 0);
      addr = exp_a[na % 500] * 16;
      credit_ret = (q.size() > 0) && ($urandom_range(2, 0) == 0);
      #1;
      if (addr_valid && !tcdm_req) no_credit++;
      if (addr_valid && addr_ready) na++;
      if (out_valid) begin
        checks++;
        if (out_data != u_mem.mem[exp_a[nrx]]) begin failures++; $display("FAIL word %0d", nrx); end
        nrx++;
        q.push_back(out_data);
      end
      if (credit_ret) void'(q.pop_front());
      checks++;
      if (q.size() > CR) begin failures++; $display("FAIL FIFO overflow %0d", q.size()); end
    end
    checks++; if (no_credit == 0) begin failures++; $display("FAIL credit limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
