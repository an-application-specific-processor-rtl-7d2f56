// sub_bus_if: the interface between the supervisor CPU's 32-bit bus ("sub
// bus") and the accelerator.
//
// The supervisor loads microcode, look-up tables and the Control Unit
// program, moves data in and out of the caches, starts the Control Unit,
// reads the cycle counter, and steps the accelerators through the cache-swap
// protocol: each Memory Manager raises a step-done flag with GVC and may wait
// for a go flag that the supervisor sets.  The document names this interface
// and its 32-bit width; the address map below is this design's choice.
//
// Word address map, region = bus_addr[19:16]:
//   0  caches, bus_addr[15:0] as the 16-bit host cache address (read/write)
//   1  ALU1 microcode   {word[9:0], half}   2  ALU1 LUT [5:0]
//   3  MM1 microcode                        4  MM1 LUT
//   5  ALU2 microcode                       6  ALU2 LUT
//   7  MM2 microcode                        8  MM2 LUT
//   9  Control Unit program [7:0]
//   A  registers: 0 W bit0 start / R {done, running}
//                 1 R cycle counter
//                 2 W set go flags [1:0] / R {go[1:0]}
//                 3 W clear step-done flags [1:0] / R {step_done[1:0]}
//                 4 R {swaps acc2, swaps acc1}
//                 5 R run clock counter: cycles the Control Unit has been
//                   running since the last start
// Microcode, LUT and program regions are write-only and read as zero.
//
// The run clock counter here is the interface-side timer; the Control Unit
// has its own program-controlled counter (register 1).
//
// Timing: writes take one cycle, except cache accesses, which hold
// `bus_wait` high until the cache arbiter grants them.  A read returns its
// data with `bus_rvalid` one cycle after it is accepted.
module sub_bus_if
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // supervisor bus
  input  logic [19:0]        bus_addr,
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               bus_rvalid,
  output logic               bus_wait,
  // cache host port
  output logic               h_req,
  output logic               h_we,
  output logic [HADDR_W-1:0] h_addr,
  output logic [31:0]        h_wdata,
  input  logic               h_gnt,
  input  logic [31:0]        h_rdata,
  // microcode and LUT loading, index 0 = accelerator 1
  output logic [1:0]         alu_lut_we,
  output logic [1:0]         alu_ram_we,
  output logic [1:0]         mm_lut_we,
  output logic [1:0]         mm_ram_we,
  output logic [OPCODE_W-1:0] lut_addr,
  output logic [UPC_W-1:0]   lut_wdata,
  output logic [UPC_W-1:0]   ram_addr,
  output logic               ram_hi,
  output logic [31:0]        ram_wdata,
  // Control Unit
  output logic               prog_we,
  output logic [7:0]         prog_addr,
  output logic [31:0]        prog_wdata,
  output logic               cu_start,
  input  logic               cu_running,
  input  logic               cu_done,
  input  logic [31:0]        cu_cycles,
  // cache-swap synchronisation with the Memory Managers
  input  logic [1:0]         step_done,
  input  logic [1:0]         go_ack,
  output logic [1:0]         host_go,
  input  logic [1:0][15:0]   swaps
);

  logic [3:0]  region;
  logic        acc;
  logic        reg_rd_q, cache_rd_q;
  logic [31:0] reg_rdata_q;
  logic [1:0]  go_q, step_q;
  logic [31:0] run_cycles;

  assign region = bus_addr[19:16];
  assign acc    = bus_wr || bus_rd;

  // caches
  assign h_req    = acc && region == 4'h0;
  assign h_we     = bus_wr;
  assign h_addr   = bus_addr[HADDR_W-1:0];
  assign h_wdata  = bus_wdata;
  assign bus_wait = h_req && !h_gnt;

  // loading
  assign lut_addr   = bus_addr[OPCODE_W-1:0];
  assign lut_wdata  = bus_wdata[UPC_W-1:0];
  assign ram_addr   = bus_addr[UPC_W:1];
  assign ram_hi     = bus_addr[0];
  assign ram_wdata  = bus_wdata;
  assign alu_ram_we = {bus_wr && region == 4'h5, bus_wr && region == 4'h1};
  assign alu_lut_we = {bus_wr && region == 4'h6, bus_wr && region == 4'h2};
  assign mm_ram_we  = {bus_wr && region == 4'h7, bus_wr && region == 4'h3};
  assign mm_lut_we  = {bus_wr && region == 4'h8, bus_wr && region == 4'h4};
  assign prog_we    = bus_wr && region == 4'h9;
  assign prog_addr  = bus_addr[7:0];
  assign prog_wdata = bus_wdata;
  assign cu_start   = bus_wr && region == 4'hA && bus_addr[3:0] == 4'd0 && bus_wdata[0];
  assign host_go    = go_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go_q        <= '0;
      step_q      <= '0;
      reg_rd_q    <= 1'b0;
      cache_rd_q  <= 1'b0;
      reg_rdata_q <= '0;
      run_cycles  <= '0;
    end else begin
      if (cu_start)        run_cycles <= '0;
      else if (cu_running) run_cycles <= run_cycles + 32'd1;
      // go flags: set by the supervisor, cleared when a Memory Manager takes them
      go_q   <= (go_q & ~go_ack) |
                ((bus_wr && region == 4'hA && bus_addr[3:0] == 4'd2) ? bus_wdata[1:0] : 2'b00);
      step_q <= (step_q & ~((bus_wr && region == 4'hA && bus_addr[3:0] == 4'd3) ? bus_wdata[1:0] : 2'b00))
                | step_done;
      cache_rd_q <= bus_rd && h_req && h_gnt;
      reg_rd_q   <= bus_rd && region != 4'h0;
      if (bus_rd && region != 4'h0) begin
        reg_rdata_q <= '0;
        if (region == 4'hA) begin
          unique case (bus_addr[3:0])
            4'd0:    reg_rdata_q <= {30'd0, cu_done, cu_running};
            4'd1:    reg_rdata_q <= cu_cycles;
            4'd2:    reg_rdata_q <= {30'd0, go_q};
            4'd3:    reg_rdata_q <= {30'd0, step_q};
            4'd4:    reg_rdata_q <= {swaps[1], swaps[0]};
            4'd5:    reg_rdata_q <= run_cycles;
            default: reg_rdata_q <= '0;
          endcase
        end
      end
    end
  end

  assign bus_rvalid = reg_rd_q || cache_rd_q;
  assign bus_rdata  = cache_rd_q ? h_rdata : reg_rdata_q;

endmodule
