// cache_mem: the four cache banks shared by the two accelerators and the
// supervisor (host) side, with a per-bank arbiter.
//
// Each accelerator reaches the banks through its Virtual Cache Manager, which
// has already turned its virtual address into a physical bank and a 13-bit
// word offset.  The host side uses a 16-bit address of 32-bit words:
// bits [15:14] pick the bank, [13:1] the 64-bit word and [0] its half.  The
// document has the caches swapped between computation and transfers from the
// board memory; which bank an accelerator uses is set by its VCM map, so a
// swap is a map change and no data moves.
//
// Arbitration (this design's choice; the document does not describe one):
// per bank, accelerator 1 before accelerator 2 before the host.  A request is
// granted in the cycle it is made if it wins (`*_gnt`); a loser keeps it up
// and waits.  Read data appears on the port's `*_rdata` the cycle after the
// grant and stays until that port's next granted read.
module cache_mem #(
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // accelerator ports, index 0 = accelerator 1
  input  logic [1:0]               a_req,
  input  logic [1:0]               a_we,
  input  logic [1:0][1:0]          a_bank,
  input  logic [1:0][$clog2(DEPTH)-1:0] a_off,
  input  logic [1:0][63:0]         a_wdata,
  output logic [1:0]               a_gnt,
  output logic [1:0][63:0]         a_rdata,
  // host port, 32-bit
  input  logic                     h_req,
  input  logic                     h_we,
  input  logic [$clog2(DEPTH)+2:0] h_addr,
  input  logic [31:0]              h_wdata,
  output logic                     h_gnt,
  output logic [31:0]              h_rdata
);

  localparam int unsigned OW = $clog2(DEPTH);

  logic [3:0]         b_en;
  logic [3:0][1:0]    b_we;
  logic [3:0][OW-1:0] b_addr;
  logic [3:0][63:0]   b_wdata, b_rdata;

  logic [1:0] h_bank;
  logic [1:0] a_bank_q [2];
  logic [1:0] h_bank_q;
  logic       h_half_q;
  logic [1:0] a_rd_q;
  logic       h_rd_q;
  logic [1:0][63:0] a_hold;
  logic [31:0]      h_hold;

  assign h_bank = h_addr[OW+2:OW+1];

  always_comb begin
    a_gnt  = '0;
    h_gnt  = 1'b0;
    b_en   = '0;
    b_we   = '0;
    b_addr = '0;
    b_wdata = '0;
    for (int b = 0; b < 4; b++) begin
      if (a_req[0] && a_bank[0] == 2'(b)) begin
        a_gnt[0]   = 1'b1;
        b_en[b]    = 1'b1;
        b_we[b]    = {2{a_we[0]}};
        b_addr[b]  = a_off[0];
        b_wdata[b] = a_wdata[0];
      end else if (a_req[1] && a_bank[1] == 2'(b)) begin
        a_gnt[1]   = 1'b1;
        b_en[b]    = 1'b1;
        b_we[b]    = {2{a_we[1]}};
        b_addr[b]  = a_off[1];
        b_wdata[b] = a_wdata[1];
      end else if (h_req && h_bank == 2'(b)) begin
        h_gnt      = 1'b1;
        b_en[b]    = 1'b1;
        b_we[b]    = h_we ? (h_addr[0] ? 2'b10 : 2'b01) : 2'b00;
        b_addr[b]  = h_addr[OW:1];
        b_wdata[b] = {h_wdata, h_wdata};
      end
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    cache_bank #(.DEPTH(DEPTH)) u_bank (
      .clk, .en(b_en[b]), .we(b_we[b]), .addr(b_addr[b]),
      .wdata(b_wdata[b]), .rdata(b_rdata[b])
    );
  end

  // read data return: remember which bank served each port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rd_q   <= '0;
      h_rd_q   <= 1'b0;
      a_bank_q <= '{default: '0};
      h_bank_q <= '0;
      h_half_q <= 1'b0;
      a_hold   <= '0;
      h_hold   <= '0;
    end else begin
      for (int p = 0; p < 2; p++) begin
        a_rd_q[p] <= a_gnt[p] && !a_we[p];
        if (a_gnt[p] && !a_we[p]) a_bank_q[p] <= a_bank[p];
        if (a_rd_q[p]) a_hold[p] <= b_rdata[a_bank_q[p]];
      end
      h_rd_q <= h_gnt && !h_we;
      if (h_gnt && !h_we) begin
        h_bank_q <= h_bank;
        h_half_q <= h_addr[0];
      end
      if (h_rd_q) h_hold <= h_half_q ? b_rdata[h_bank_q][63:32] : b_rdata[h_bank_q][31:0];
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++)
      a_rdata[p] = a_rd_q[p] ? b_rdata[a_bank_q[p]] : a_hold[p];
    h_rdata = h_rd_q ? (h_half_q ? b_rdata[h_bank_q][63:32] : b_rdata[h_bank_q][31:0]) : h_hold;
  end

endmodule
