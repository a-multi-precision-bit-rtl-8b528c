// Self-checking testbench of the streamer store unit: random data and
// address streams and random grants.  A write must be requested exactly
// when both streams offer, carry the offered address and data, and consume
// both (with one acknowledge) exactly when granted.  A memory model checks
// the written contents at the end.
module tb_smac_store_unit;
  import smac_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic data_valid = 0, data_ready, addr_valid = 0, addr_ready, tcdm_req, tcdm_gnt, ack;
  logic [BUS_W-1:0] data = '0, tcdm_wdata;
  logic [31:0] addr = 0, tcdm_addr;
  logic rv; logic [BUS_W-1:0] rdat;

  smac_store_unit dut (.*);
  tcdm_model #(.WORDS(64), .GNT_PCT(50)) u_mem (.clk, .req (tcdm_req), .we (1'b1), .be ('1),
    .addr (tcdm_addr), .wdata (tcdm_wdata), .gnt (tcdm_gnt), .r_valid (rv), .r_data (rdat));

  int checks = 0, failures = 0;
  logic [BUS_W-1:0] model [64];
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nd = 0, nw = 0;
    logic [BUS_W-1:0] dq [$]; int aq [$];
    for (int i = 0; i < 64; i++) begin u_mem.mem[i] = '0; model[i] = '0; end
    for (int i = 0; i < 400; i++) begin dq.push_back({$urandom(), $urandom(), $urandom(), $urandom()}); aq.push_back($urandom_range(63, 0)); end
    while (nw < 400) begin
      @(negedge clk);
      data_valid = ($urandom_range(3, 0) != 0); data = dq[nw];
      addr_valid = ($urandom_range(3, 0) != 0); addr = aq[nw] * 16;
      #1;
      checks++;
      if (tcdm_req != (data_valid && addr_valid) || (tcdm_req && (tcdm_addr != addr || tcdm_wdata != data))) begin
        failures++; $display("FAIL request");
      end
      checks++;
      if (ack != (tcdm_req && tcdm_gnt) || data_ready != ack || addr_ready != ack) begin
        failures++; $display("FAIL handshake");
      end
      if (ack) begin model[aq[nw]] = dq[nw]; nw++; end
    end
    @(negedge clk); data_valid = 0; addr_valid = 0; @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      checks++; if (u_mem.mem[i] != model[i]) begin failures++; $display("FAIL memory word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
