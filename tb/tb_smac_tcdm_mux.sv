// Self-checking testbench of the streamer interconnect.
//
// Random load and store requests share one port to a memory model that
// grants at random.  Checked every cycle: the port carries the chosen
// side's address, direction and data; at most one side is granted, only
// when the port is granted; an idle side is never blocked by an idle
// other side; in a conflict the sides alternate (round robin); read data
// reach the load side only for reads (the model also answers writes).
module tb_smac_tcdm_mux;
  import smac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld_req = 0, ld_gnt, ld_r_valid, st_req = 0, st_gnt;
  logic [31:0] ld_addr = 0, st_addr = 0, tcdm_addr;
  logic [BUS_W-1:0] ld_r_data, st_wdata = '0, tcdm_wdata, tcdm_r_data;
  logic tcdm_req, tcdm_we, tcdm_gnt, tcdm_r_valid, conflict;
  logic [BUS_W/8-1:0] tcdm_be;

  smac_tcdm_mux dut (.*);
  tcdm_model #(.WORDS(64), .GNT_PCT(70)) u_mem (.clk, .req (tcdm_req), .we (tcdm_we), .be (tcdm_be),
    .addr (tcdm_addr), .wdata (tcdm_wdata), .gnt (tcdm_gnt), .r_valid (tcdm_r_valid), .r_data (tcdm_r_data));

  int checks = 0, failures = 0, conflicts = 0, last_winner = -1, rr_bad = 0, reads = 0;
  logic exp_rv = 0; logic [31:0] exp_ra;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    for (int i = 0; i < 64; i++) u_mem.mem[i] = {4{$urandom()}};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // data of the read granted in the previous cycle
      chk(ld_r_valid == exp_rv, "read valid routing");
      if (exp_rv) begin chk(ld_r_data == u_mem.mem[exp_ra[9:4]], "read data"); reads++; end
      ld_req = $urandom_range(1, 0); ld_addr = $urandom_range(63, 0) * 16;
      st_req = $urandom_range(1, 0); st_addr = $urandom_range(63, 0) * 16; st_wdata = {4{$urandom()}};
      #1;
      chk(!(ld_gnt && st_gnt), "one grant at most");
      chk(tcdm_req == (ld_req || st_req), "port request");
      if (st_gnt) chk(tcdm_we && tcdm_addr == st_addr && tcdm_wdata == st_wdata && tcdm_gnt, "store on port");
      if (ld_gnt) chk(!tcdm_we && tcdm_addr == ld_addr && tcdm_gnt, "load on port");
      if (ld_req && !st_req) chk(ld_gnt == tcdm_gnt, "lone load");
      if (st_req && !ld_req) chk(st_gnt == tcdm_gnt, "lone store");
      if (conflict && tcdm_gnt) begin
        int w; w = st_gnt ? 1 : 0;
        conflicts++;
        if (w == last_winner) rr_bad++;
        last_winner = w;
      end
      exp_rv = ld_gnt; exp_ra = ld_addr;
    end
    chk(conflicts > 10 && rr_bad == 0, "round robin in conflicts");
    chk(reads > 100, "reads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
