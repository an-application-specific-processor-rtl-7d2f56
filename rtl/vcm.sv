// vcm: Virtual Cache Manager of one accelerator.
//
// The Memory Manager addresses a 15-bit virtual cache space of 64-bit words.
// The VCM splits that address into a 2-bit virtual bank and a 13-bit offset
// and looks the virtual bank up in the bank map that the Memory Manager's GVC
// instruction set (two bits per virtual bank).  Changing the map is how the
// cache swap works: the banks that were being filled by the host become the
// ones the accelerator computes on, without copying.  The document names the
// VCM and places it between the accelerator and the caches; the map format
// and this split of the address are this design's choices, derived from the
// 15-bit address width it prints.
//
// It also counts map changes (`swaps`), for the performance statistics.
// Timing: the translation is combinational; read data passes straight back.
module vcm
  import mc_pkg::*;
#(
  parameter int unsigned OFF_W = VADDR_W - 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         bank_map,
  // virtual side (Memory Manager)
  input  logic               v_req,
  input  logic               v_we,
  input  logic [VADDR_W-1:0] v_addr,
  input  fp64_t              v_wdata,
  output logic               v_gnt,
  output fp64_t              v_rdata,
  // physical side (cache_mem)
  output logic               p_req,
  output logic               p_we,
  output logic [1:0]         p_bank,
  output logic [OFF_W-1:0]   p_off,
  output fp64_t              p_wdata,
  input  logic               p_gnt,
  input  fp64_t              p_rdata,
  output logic [15:0]        swaps
);

  logic [1:0] vbank;
  logic [7:0] map_q;

  assign vbank   = v_addr[VADDR_W-1 -: 2];
  assign p_bank  = bank_map[2*vbank +: 2];
  assign p_off   = v_addr[OFF_W-1:0];
  assign p_req   = v_req;
  assign p_we    = v_we;
  assign p_wdata = v_wdata;
  assign v_gnt   = p_gnt;
  assign v_rdata = p_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_q <= 8'b11_10_01_00;
      swaps <= '0;
    end else begin
      map_q <= bank_map;
      if (bank_map != map_q) swaps <= swaps + 1'b1;
    end
  end

endmodule
