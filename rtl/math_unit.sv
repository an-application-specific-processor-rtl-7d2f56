// math_unit: the Math Unit of one accelerator, a microcode sequencer driving
// the double-precision ALU datapath.
//
// The Control Unit sends 6-bit opcodes; the sequencer looks each up, plays
// its 37-bit microwords (stored as 38 bits with the end-of-sequence flag) into
// math_alu, and takes the next queued opcode without a gap.  A stall in the
// ALU (empty input FIFO, full output FIFO) holds the sequencer on the current
// microword.  As in the document, the unit has no addressing of its own: its
// input FIFO is filled, and its arithmetic output FIFO drained, by the Memory
// Manager; its logical output FIFO (comparison flags) is read by the Control
// Unit.
//
// Interface: opcode queue (`op_push`, `op_in`, `op_full`), microcode and LUT
// load ports from the supervisor bus, data FIFO ports as in math_alu, and
// `idle` (no opcode queued or running).  Timing: first microword two cycles
// after the opcode is queued, then one per cycle unless stalled.
module math_unit
  import mc_pkg::*;
#(
  parameter int unsigned UCODE_DEPTH = 1 << UPC_W,
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                op_push,
  input  logic [OPCODE_W-1:0] op_in,
  output logic                op_full,
  input  logic                lut_we,
  input  logic [OPCODE_W-1:0] lut_addr,
  input  logic [UPC_W-1:0]    lut_wdata,
  input  logic                ram_we,
  input  logic [UPC_W-1:0]    ram_addr,
  input  logic                ram_hi,
  input  logic [31:0]         ram_wdata,
  input  logic                in_push,
  input  fp64_t               in_data,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] in_free,
  input  logic                ar_pop,
  output fp64_t               ar_data,
  output logic                ar_empty,
  input  logic                lg_pop,
  output logic                lg_data,
  output logic                lg_empty,
  output logic                idle,
  output logic                stall,
  output logic                cmp_push,
  output logic [UPC_W-1:0]    upc
);

  logic [ALU_UOP_W-1:0] uop_bits;
  logic                 uop_valid, uop_ready, seq_start;

  ucode_seq #(.W(ALU_UOP_W), .DEPTH(UCODE_DEPTH)) u_seq (
    .clk, .rst_n,
    .op_push, .op_in, .op_full,
    .lut_we, .lut_addr, .lut_wdata,
    .ram_we, .ram_addr, .ram_hi, .ram_wdata,
    .uop(uop_bits), .uop_valid, .uop_ready,
    .upc, .seq_start, .idle
  );

  math_alu #(.FIFO_DEPTH(FIFO_DEPTH)) u_alu (
    .clk, .rst_n,
    .uop(alu_uop_t'(uop_bits)), .uop_valid, .uop_ready,
    .in_push, .in_data, .in_free,
    .ar_pop, .ar_data, .ar_empty,
    .lg_pop, .lg_data, .lg_empty,
    .stall, .cmp_push
  );

endmodule
