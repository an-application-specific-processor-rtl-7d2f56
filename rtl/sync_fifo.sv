// sync_fifo: single-clock first-in first-out queue.
//
// Used for the opcode queue in front of each microcode sequencer and for the
// Math Unit's input, arithmetic-output and logical-output queues, which the
// document introduces to decouple computation from storage.  Depth and width
// are parameters; the document gives neither, so the defaults are this
// design's choice.
//
// Interface: `rdata` always shows the oldest entry (show-ahead), valid while
// `empty` is low.  `push` writes `wdata` at the clock edge, `pop` drops the
// oldest entry; both may happen in the same cycle.  `count` is the fill level
// and `free` the room left.  Pushing when full or popping when empty is a
// protocol error and is flagged by assertions.
//
// The assertions use the reset as their `disable iff` condition while the
// registers use it as an asynchronous clear; a lint tool may report the reset
// net as used both ways.  That is intended: the assertion logic is not part of
// the synthesized circuit.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wdata;
  end

  assign rdata = mem[rp];
  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign free  = ($clog2(DEPTH+1))'(DEPTH) - count;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
