// Memory-mapped register file on the peripheral channel.
//
// The host core programs a convolution job here and starts it.  Byte
// offsets (32-bit registers):
//   0x00 TRIGGER  write: start the job (ignored while busy)
//   0x04 STATUS   read: bit 0 = busy, bit 1 = a job finished since the last read
//   0x08 ACT_BASE 0x0C W_BASE 0x10 OUT_BASE   byte addresses in the TCDM
//   0x14 PREC     [3:0] Pa, [7:4] Pw
//   0x18 NSLOT    [2:0] filter slots in use (1..4, 64 filters each)
//   0x1C CH_WORDS [15:0] input channels / 16
//   0x20 KSIZE    [1:0] kernel side (1..3)
//   0x24 W_IN     0x28 H_OUT   0x2C W_OUT     [15:0]
//   0x30 QSHIFT   [4:0] quantization shift
//   0x34 NGROUP   [7:0] filter groups per pixel (0 and 1 both mean one)
// Writes to configuration registers are ignored while a job runs, so the
// values seen by the controllers are stable for the whole job.
//
// Protocol: a request is granted in the cycle it is made (`gnt` = `req`);
// a read returns `r_data` with `r_valid` one cycle later, a write also
// answers with `r_valid`.  `evt` pulses for one cycle when a job finishes.
//
// Following the design description: a memory-mapped register file behind a
// peripheral port, holding the values that program the counters of the
// control units.  The register map and protocol are this implementation's.
module smac_regfile
  import smac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [7:0]  addr,
  input  logic [31:0] wdata,
  output logic        gnt,
  output logic        r_valid,
  output logic [31:0] r_data,
  input  logic        busy,
  input  logic        done,
  output smac_cfg_t   cfg,
  output logic        start,
  output logic        evt
);

  logic finished;
  assign gnt = req;
  assign evt = done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0; start <= 1'b0; r_valid <= 1'b0; r_data <= '0; finished <= 1'b0;
    end else begin
      start   <= 1'b0;
      r_valid <= req;
      if (done) finished <= 1'b1;
      if (req && we && !busy) begin
        unique case (addr[7:2])
          6'h00: start <= 1'b1;
          6'h02: cfg.act_base <= wdata;
          6'h03: cfg.w_base   <= wdata;
          6'h04: cfg.out_base <= wdata;
          6'h05: begin cfg.pa <= wdata[3:0]; cfg.pw <= wdata[7:4]; end
          6'h06: cfg.nslot    <= wdata[2:0];
          6'h07: cfg.ch_words <= wdata[15:0];
          6'h08: cfg.ksize    <= wdata[1:0];
          6'h09: cfg.w_in     <= wdata[15:0];
          6'h0A: cfg.h_out    <= wdata[15:0];
          6'h0B: cfg.w_out    <= wdata[15:0];
          6'h0C: cfg.qshift   <= wdata[4:0];
          6'h0D: cfg.ngroup   <= wdata[7:0];
          default: ;
        endcase
      end
      if (req && !we) begin
        unique case (addr[7:2])
          6'h01: begin r_data <= {30'd0, finished, busy}; finished <= done; end
          6'h02: r_data <= cfg.act_base;
          6'h03: r_data <= cfg.w_base;
          6'h04: r_data <= cfg.out_base;
          6'h05: r_data <= {24'd0, cfg.pw, cfg.pa};
          6'h06: r_data <= {29'd0, cfg.nslot};
          6'h07: r_data <= {16'd0, cfg.ch_words};
          6'h08: r_data <= {30'd0, cfg.ksize};
          6'h09: r_data <= {16'd0, cfg.w_in};
          6'h0A: r_data <= {16'd0, cfg.h_out};
          6'h0B: r_data <= {16'd0, cfg.w_out};
          6'h0C: r_data <= {27'd0, cfg.qshift};
          6'h0D: r_data <= {24'd0, cfg.ngroup};
          default: r_data <= '0;
        endcase
      end
    end
  end

endmodule
