// Synchronous stream FIFO with valid/ready on both sides.
//
// DEPTH entries of W bits in a circular buffer.  `in_ready` is high while
// there is room, `out_valid` while there is data; an entry pushed in one
// cycle can be popped from the next.  Push and pop in the same cycle are
// allowed at any fill level except a push into a full FIFO.  `count` gives
// the fill level.
//
// The design description places a FIFO on each stream between the streamer
// and the engine; depth and handshake are this implementation's choice.
module smac_fifo #(
  parameter int unsigned W     = 128,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic          push, pop;

  assign in_ready  = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
    end else begin
      if (push) wr <= (wr == AW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      if (pop)  rd <= (rd == AW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wr] <= in_data;

  // The fill level never exceeds the depth (push is refused when full).
  a_count_max: assert property (@(posedge clk) disable iff (!rst_n) count <= ($clog2(DEPTH+1))'(DEPTH));

endmodule
