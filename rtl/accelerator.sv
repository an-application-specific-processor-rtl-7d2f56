// accelerator: one accelerating unit, a Math Unit, a Memory Manager and a
// Virtual Cache Manager wired as in the document's architecture figure.
//
// The Control Unit queues opcodes into the Math Unit and the Memory Manager
// separately; the two then run their own microcode and meet only through the
// Math Unit's FIFOs: Memory Manager reads go through the VCM to the cache and
// their data into the Math Unit input FIFO; Memory Manager writes take the
// Math Unit's arithmetic results and store them through the VCM.  The
// comparison flags go to the Control Unit.  Data paths to the cache are 64
// bits wide and the virtual address 15 bits, as printed in the figure.
//
// Interface: opcode queues and load ports of both sequencers, the physical
// cache port towards cache_mem, the logical FIFO, the GVC synchronisation
// signals, and status for statistics.  Timing is that of the parts.
module accelerator
  import mc_pkg::*;
#(
  parameter int unsigned UCODE_DEPTH = 1 << UPC_W,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned OFF_W       = VADDR_W - 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // Math Unit opcodes and loading
  input  logic                alu_op_push,
  input  logic [OPCODE_W-1:0] alu_op,
  output logic                alu_op_full,
  output logic                alu_idle,
  input  logic                alu_lut_we,
  input  logic                alu_ram_we,
  // Memory Manager opcodes and loading
  input  logic                mm_op_push,
  input  logic [OPCODE_W-1:0] mm_op,
  output logic                mm_op_full,
  output logic                mm_idle,
  input  logic                mm_lut_we,
  input  logic                mm_ram_we,
  // shared load bus
  input  logic [OPCODE_W-1:0] lut_addr,
  input  logic [UPC_W-1:0]    lut_wdata,
  input  logic [UPC_W-1:0]    ram_addr,
  input  logic                ram_hi,
  input  logic [31:0]         ram_wdata,
  // physical cache port
  output logic                p_req,
  output logic                p_we,
  output logic [1:0]          p_bank,
  output logic [OFF_W-1:0]    p_off,
  output fp64_t               p_wdata,
  input  logic                p_gnt,
  input  fp64_t               p_rdata,
  // comparison results to the Control Unit
  input  logic                lg_pop,
  output logic                lg_data,
  output logic                lg_empty,
  // synchronisation with the supervisor
  output logic                step_done,
  input  logic                host_go,
  output logic                go_ack,
  // status
  output logic                alu_stall,
  output logic                mm_stall,
  output logic                cmp_push,
  output logic [15:0]         swaps
);

  localparam int unsigned FREE_W = $clog2(FIFO_DEPTH + 1);

  logic [FREE_W-1:0]  in_free;
  logic               in_push, ar_pop, ar_empty;
  fp64_t              in_data, ar_data;
  logic               v_req, v_we, v_gnt;
  logic [VADDR_W-1:0] v_addr;
  fp64_t              v_wdata, v_rdata;
  logic [7:0]         bank_map;

  math_unit #(.UCODE_DEPTH(UCODE_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_math (
    .clk, .rst_n,
    .op_push(alu_op_push), .op_in(alu_op), .op_full(alu_op_full),
    .lut_we(alu_lut_we), .lut_addr, .lut_wdata,
    .ram_we(alu_ram_we), .ram_addr, .ram_hi, .ram_wdata,
    .in_push, .in_data, .in_free,
    .ar_pop, .ar_data, .ar_empty,
    .lg_pop, .lg_data, .lg_empty,
    .idle(alu_idle), .stall(alu_stall), .cmp_push, .upc()
  );

  mem_manager #(.UCODE_DEPTH(UCODE_DEPTH), .FREE_W(FREE_W)) u_mm (
    .clk, .rst_n,
    .op_push(mm_op_push), .op_in(mm_op), .op_full(mm_op_full),
    .lut_we(mm_lut_we), .lut_addr, .lut_wdata,
    .ram_we(mm_ram_we), .ram_addr, .ram_hi, .ram_wdata,
    .c_req(v_req), .c_we(v_we), .c_addr(v_addr), .c_wdata(v_wdata),
    .c_gnt(v_gnt), .c_rdata(v_rdata),
    .alu_in_free(in_free), .alu_push(in_push), .alu_wdata(in_data),
    .alu_ar_empty(ar_empty), .alu_ar_data(ar_data), .alu_ar_pop(ar_pop),
    .bank_map, .step_done, .host_go, .go_ack,
    .idle(mm_idle), .stall(mm_stall), .upc()
  );

  vcm #(.OFF_W(OFF_W)) u_vcm (
    .clk, .rst_n, .bank_map,
    .v_req, .v_we, .v_addr, .v_wdata, .v_gnt, .v_rdata,
    .p_req, .p_we, .p_bank, .p_off, .p_wdata, .p_gnt, .p_rdata,
    .swaps
  );

endmodule
