// mc_accel_top: the computational unit of the Monte Carlo energy accelerator:
// two accelerators, four shared cache banks, the Control Unit and the
// supervisor-bus interface.
//
// The supervisor CPU (off this module) loads the microcode of the four
// sequencers and the Control Unit program over the 32-bit bus, stores the
// lattice data into the caches and starts the Control Unit.  The Control Unit
// then dispatches opcodes to both accelerators, which run concurrently, each
// on the cache banks its VCM map selects.  When an accelerator finishes a
// step its Memory Manager flags it; the supervisor refills the idle banks and
// lets it continue with a swapped bank map.  The interrupt marks the end of
// the program.
//
// Ports: the supervisor bus (see sub_bus_if for the address map) and the
// interrupt.  CACHE_DEPTH is the 64-bit words per bank: 8192 follows from the
// printed 15-bit accelerator address (2 bank bits, 13 offset bits).
module mc_accel_top
  import mc_pkg::*;
#(
  parameter int unsigned CACHE_DEPTH = 1 << (VADDR_W - 2),
  parameter int unsigned UCODE_DEPTH = 1 << UPC_W,
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [19:0] bus_addr,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  output logic        bus_wait,
  output logic        irq
);

  localparam int unsigned OFF_W = $clog2(CACHE_DEPTH);

  // loading
  logic [1:0]          alu_lut_we, alu_ram_we, mm_lut_we, mm_ram_we;
  logic [OPCODE_W-1:0] lut_addr;
  logic [UPC_W-1:0]    lut_wdata, ram_addr;
  logic                ram_hi;
  logic [31:0]         ram_wdata;
  // Control Unit
  logic                prog_we, cu_start, cu_running, cu_done;
  logic [7:0]          prog_addr, cu_pc;
  logic [31:0]         prog_wdata, cu_cycles;
  logic [3:0]          u_push, u_full, u_idle;
  logic [3:0][OPCODE_W-1:0] u_op;
  logic [1:0]          lg_empty, lg_data, lg_pop;
  // caches
  logic [1:0]          a_req, a_we, a_gnt;
  logic [1:0][1:0]     a_bank;
  logic [1:0][OFF_W-1:0] a_off;
  logic [1:0][63:0]    a_wdata, a_rdata;
  logic                h_req, h_we, h_gnt;
  logic [OFF_W+2:0]    h_addr;
  logic [31:0]         h_wdata, h_rdata;
  // synchronisation and status
  logic [1:0]          step_done, go_ack, host_go, alu_stall, mm_stall, cmp_push;
  logic [1:0][15:0]    swaps;

  sub_bus_if u_if (
    .clk, .rst_n,
    .bus_addr, .bus_wr, .bus_rd, .bus_wdata, .bus_rdata, .bus_rvalid, .bus_wait,
    .h_req, .h_we, .h_addr(h_addr[HADDR_W-1:0]), .h_wdata, .h_gnt, .h_rdata,
    .alu_lut_we, .alu_ram_we, .mm_lut_we, .mm_ram_we,
    .lut_addr, .lut_wdata, .ram_addr, .ram_hi, .ram_wdata,
    .prog_we, .prog_addr, .prog_wdata, .cu_start, .cu_running, .cu_done, .cu_cycles,
    .step_done, .go_ack, .host_go, .swaps
  );

  control_unit u_cu (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_wdata, .start(cu_start),
    .running(cu_running), .done(cu_done), .irq,
    .u_push, .u_op, .u_full, .u_idle,
    .lg_empty, .lg_data, .lg_pop,
    .cycles(cu_cycles), .pc(cu_pc)
  );

  for (genvar k = 0; k < 2; k++) begin : g_acc
    accelerator #(.UCODE_DEPTH(UCODE_DEPTH), .FIFO_DEPTH(FIFO_DEPTH), .OFF_W(OFF_W)) u_acc (
      .clk, .rst_n,
      .alu_op_push(u_push[2*k]),   .alu_op(u_op[2*k]),   .alu_op_full(u_full[2*k]),   .alu_idle(u_idle[2*k]),
      .alu_lut_we(alu_lut_we[k]), .alu_ram_we(alu_ram_we[k]),
      .mm_op_push(u_push[2*k+1]),  .mm_op(u_op[2*k+1]),  .mm_op_full(u_full[2*k+1]),  .mm_idle(u_idle[2*k+1]),
      .mm_lut_we(mm_lut_we[k]),   .mm_ram_we(mm_ram_we[k]),
      .lut_addr, .lut_wdata, .ram_addr, .ram_hi, .ram_wdata,
      .p_req(a_req[k]), .p_we(a_we[k]), .p_bank(a_bank[k]), .p_off(a_off[k]),
      .p_wdata(a_wdata[k]), .p_gnt(a_gnt[k]), .p_rdata(a_rdata[k]),
      .lg_pop(lg_pop[k]), .lg_data(lg_data[k]), .lg_empty(lg_empty[k]),
      .step_done(step_done[k]), .host_go(host_go[k]), .go_ack(go_ack[k]),
      .alu_stall(alu_stall[k]), .mm_stall(mm_stall[k]), .cmp_push(cmp_push[k]),
      .swaps(swaps[k])
    );
  end

  cache_mem #(.DEPTH(CACHE_DEPTH)) u_cache (
    .clk, .rst_n,
    .a_req, .a_we, .a_bank, .a_off, .a_wdata, .a_gnt, .a_rdata,
    .h_req, .h_we, .h_addr, .h_wdata, .h_gnt, .h_rdata
  );

endmodule
