// cache_bank: one bank of the accelerator cache, a single-port synchronous
// RAM of 64-bit words with a write enable per 32-bit half (so the 32-bit host
// port can write one half without disturbing the other).
//
// Timing: on a clock edge with `en` high, the halves selected by `we` are
// written with `wdata` and `rdata` shows the word's previous contents from the
// next cycle on (read-before-write).  `rdata` holds while `en` is low.
module cache_bank #(
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [1:0]               we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [63:0]              wdata,
  output logic [63:0]              rdata
);

  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we[0]) mem[addr][31:0]  <= wdata[31:0];
      if (we[1]) mem[addr][63:32] <= wdata[63:32];
    end
  end

endmodule
