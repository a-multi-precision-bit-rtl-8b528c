// Self-checking testbench of the ReLU output stage.
//
// For random AC3 register contents (including 0, -1, the largest and
// smallest values and values just above and below 2^Pa) and every slot and
// Pa in 1..8 the output must be 0 for a negative selected value and its low
// Pa bits otherwise.
module tb_smac_relu;
  localparam int A3  = smac_pkg::AC3_W;
  localparam int NSL = smac_pkg::NSLOT;
  localparam int OW  = smac_pkg::LANE_W;

  logic signed [A3-1:0] ac3 [NSL];
  logic [$clog2(NSL)-1:0] out_slot;
  logic [3:0] pa;
  logic [OW-1:0] out_act;

  int checks = 0, failures = 0;

  smac_relu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int g = 0; g < 400; g++) begin
      for (int t = 0; t < NSL; t++)
        case ((g + t) % 8)
          0: ac3[t] = '0;
          1: ac3[t] = '1;
          2: ac3[t] = {1'b0, {(A3-1){1'b1}}};
          3: ac3[t] = {1'b1, {(A3-1){1'b0}}};
          4: ac3[t] = A3'((1 << ((g % 8) + 1)) - 1);
          5: ac3[t] = A3'(1 << ((g % 8) + 1));
          default: ac3[t] = A3'($urandom);
        endcase
      for (int t = 0; t < NSL; t++)
        for (int ipa = 1; ipa <= 8; ipa++) begin
          out_slot = t[$clog2(NSL)-1:0]; pa = 4'(ipa);
          #1;
          exp_v = ac3[t][A3-1] ? 0 : int'(ac3[t][OW-1:0]) & ((1 << ipa) - 1);
          checks++;
          if (int'(out_act) != exp_v) begin
            failures++;
            if (failures < 10) $display("mismatch v=%0d pa=%0d out=%0d exp=%0d", ac3[t], ipa, out_act, exp_v);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
