// Streamer store unit: joins the engine's result stream with the store
// address stream and writes each result word to the TCDM.
//
// A write is requested (`tcdm_req`, `tcdm_we` = 1, all byte enables) when
// both a result word and an address are available; when the TCDM grants
// it, both are consumed and `ack` pulses, which the high-level control
// counts to detect the end of the job.
//
// The design description names the store unit of the streamer; its
// handshake is this implementation's choice.
module smac_store_unit
  import smac_pkg::*;
(
  input  logic               data_valid,
  output logic               data_ready,
  input  logic [BUS_W-1:0]   data,
  input  logic               addr_valid,
  output logic               addr_ready,
  input  logic [31:0]        addr,
  output logic               tcdm_req,
  output logic [31:0]        tcdm_addr,
  output logic [BUS_W-1:0]   tcdm_wdata,
  input  logic               tcdm_gnt,
  output logic               ack
);

  assign tcdm_req   = data_valid && addr_valid;
  assign tcdm_addr  = addr;
  assign tcdm_wdata = data;
  assign ack        = tcdm_req && tcdm_gnt;
  assign data_ready = ack;
  assign addr_ready = ack;

endmodule
