// ucode_seq: microcode sequencer that expands 6-bit opcodes into sequences of
// microwords.
//
// Each Math Unit and Memory Manager owns one.  The structure follows the
// document's block diagram: an instruction input FIFO holds the queued
// opcodes; a 64-entry look-up table gives the first microcode address of each
// opcode; the sequencer control keeps a 10-bit microprogram counter; the
// microcode RAM holds the microwords, each with an end-of-sequence flag above
// the W control bits.  While a sequence runs the counter steps by one; on the
// word flagged as last the next queued opcode is taken at once, so
// back-to-back sequences leave no idle cycle.
//
// Loading (from the supervisor bus): `lut_we` writes one LUT entry.  Microcode
// words are written in two 32-bit halves at the same `ram_addr`: first
// `ram_hi`=0 (bits 31:0, held), then `ram_hi`=1 (bits W:32), which commits
// the word.  This split and the FIFO depth are this design's choices.
//
// Timing: an opcode pushed at cycle t is popped at t+1 if the sequencer is
// idle and its first microword is presented at t+2.  `uop` is valid while
// `uop_valid` is high and is consumed on a cycle where `uop_ready` is high;
// the consumer holds `uop_ready` low to stall.  The RAM is read at the
// registered program counter, as a synchronous RAM with a registered address.
module ucode_seq
  import mc_pkg::*;
#(
  parameter int unsigned W          = ALU_UOP_W,
  parameter int unsigned DEPTH      = 1 << UPC_W,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // opcode queue
  input  logic                 op_push,
  input  logic [OPCODE_W-1:0]  op_in,
  output logic                 op_full,
  // loading
  input  logic                 lut_we,
  input  logic [OPCODE_W-1:0]  lut_addr,
  input  logic [UPC_W-1:0]     lut_wdata,
  input  logic                 ram_we,
  input  logic [UPC_W-1:0]     ram_addr,
  input  logic                 ram_hi,
  input  logic [31:0]          ram_wdata,
  // microword stream
  output logic [W-1:0]         uop,
  output logic                 uop_valid,
  input  logic                 uop_ready,
  output logic [UPC_W-1:0]     upc,
  output logic                 seq_start,
  output logic                 idle
);

  logic [W:0]          ram [DEPTH];
  logic [UPC_W-1:0]    lut [1 << OPCODE_W];
  logic [31:0]         hold;
  logic                running;
  logic [UPC_W-1:0]    pc;
  logic [OPCODE_W-1:0] head_op;
  logic                fifo_empty, fifo_pop;
  logic [W:0]          cur;
  logic                last;

  sync_fifo #(.WIDTH(OPCODE_W), .DEPTH(FIFO_DEPTH)) u_ififo (
    .clk, .rst_n,
    .push(op_push), .wdata(op_in),
    .pop(fifo_pop), .rdata(head_op),
    .full(op_full), .empty(fifo_empty),
    .count(), .free()
  );

  // loading
  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= lut_wdata;
    if (ram_we && !ram_hi) hold <= ram_wdata;
    if (ram_we && ram_hi)  ram[ram_addr] <= (W+1)'({ram_wdata, hold});
  end

  assign cur       = ram[pc];
  assign last      = cur[W];
  assign uop       = cur[W-1:0];
  assign uop_valid = running;
  assign upc       = pc;
  assign fifo_pop  = !fifo_empty && (!running || (uop_ready && last));
  assign seq_start = fifo_pop;
  assign idle      = !running && fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      pc      <= '0;
    end else if (fifo_pop) begin
      running <= 1'b1;
      pc      <= lut[head_op];
    end else if (running && uop_ready) begin
      if (last) running <= 1'b0;
      else      pc      <= pc + 1'b1;
    end
  end

endmodule
