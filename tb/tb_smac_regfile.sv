// Self-checking testbench of the register file.
//
// Writes random values to every configuration register and reads them back
// (checking the one-cycle read latency and the field widths), checks that
// the configuration output follows, that TRIGGER gives a one-cycle start
// pulse, that writes are ignored while busy, that STATUS shows busy and the
// sticky "finished" bit (cleared by reading it) and that `evt` follows done.
module tb_smac_regfile;
  import smac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, we = 0, gnt, r_valid, busy = 0, done = 0, start, evt;
  logic [7:0] addr = 0; logic [31:0] wdata = 0, r_data;
  smac_cfg_t cfg;

  smac_regfile dut (.*);

  int checks = 0, failures = 0, starts = 0;
  always @(posedge clk) if (start) starts++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); req = 1; we = 1; addr = a; wdata = d; #1 chk(gnt, "grant");
    @(negedge clk); req = 0; we = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); req = 1; we = 0; addr = a;
    @(negedge clk); req = 0; chk(r_valid, "read valid one cycle later"); d = r_data;
  endtask

  localparam logic [31:0] MASK [14] = '{0, 0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'hFF, 32'h7,
                                        32'hFFFF, 32'h3, 32'hFFFF, 32'hFFFF, 32'hFFFF, 32'h1F, 32'hFF};
  initial begin
    logic [31:0] v [14];
    logic [31:0] d;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      for (int i = 2; i < 14; i++) begin v[i] = $urandom(); wr(8'(i * 4), v[i]); end
      for (int i = 2; i < 14; i++) begin rd(8'(i * 4), d); chk(d == (v[i] & MASK[i]), $sformatf("readback reg %0d", i)); end
      chk(cfg.act_base == v[2] && cfg.w_base == v[3] && cfg.out_base == v[4], "base addresses");
      chk(cfg.pa == v[5][3:0] && cfg.pw == v[5][7:4] && cfg.nslot == v[6][2:0], "precision/slots");
      chk(cfg.ch_words == v[7][15:0] && cfg.ksize == v[8][1:0] && cfg.w_in == v[9][15:0], "shape");
      chk(cfg.h_out == v[10][15:0] && cfg.w_out == v[11][15:0] && cfg.qshift == v[12][4:0], "output shape");
      chk(cfg.ngroup == v[13][7:0], "filter groups");
    end
    // trigger
    starts = 0;
    wr(8'h00, 0);
    @(negedge clk);
    chk(starts == 1, "one start pulse");
    busy = 1;
    wr(8'h08, 32'hDEAD_BEEF); wr(8'h00, 0);
    rd(8'h08, d); chk(d != 32'hDEAD_BEEF, "write ignored while busy");
    chk(starts == 1, "trigger ignored while busy");
    rd(8'h04, d); chk(d[1:0] == 2'b01, "status busy");
    @(negedge clk); done = 1; #1 chk(evt, "event follows done"); @(negedge clk); done = 0; busy = 0;
    rd(8'h04, d); chk(d[1:0] == 2'b10, "status finished");
    rd(8'h04, d); chk(d[1:0] == 2'b00, "finished cleared by read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
