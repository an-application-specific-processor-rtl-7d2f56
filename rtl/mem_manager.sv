// mem_manager: Memory Manager of one accelerator, the address generator that
// moves data between the cache and the Math Unit's FIFOs.
//
// The Math Unit cannot address memory, so every transfer is issued here.  The
// unit works on data laid out as cyclic three-dimensional matrices: addresses
// are given as a pointer (an X-Y-Z lattice position) plus small offsets, and
// wrap around at the matrix edges, so the same microcode runs on any lattice
// size set by INIT.  Like the Math Unit it has its own microcode sequencer fed
// with 6-bit opcodes.  The five microinstructions are the document's: INIT
// (matrix dimensions), GVC (16-bit cache configuration and host
// synchronisation word), R (read from cache into the Math Unit), W (Math Unit
// result to cache) and pointer modification, which may run in the same cycle
// as an R or W.  The microword layout (mc_pkg::mm_uop_t) and the address
// formula are this design's choices:
//
//   addr = ((((mat*Z + z')*Y + y')*X + x') * 4 + comp) mod 2^15
//   x' = (ptr.x + dx) mod X, and likewise for y', z'  (dx, dy, dz in -2..+1)
//
// so each lattice site holds four 64-bit words (three dipole components and a
// spare) and two matrices lie one after the other.
//
// GVC bits: [7:0] virtual-to-physical cache bank map for the VCM, [8] load that
// map, [9] pulse `step_done` to the host, [10] wait until `host_go` is high and
// acknowledge it with `go_ack`.
//
// Timing: a cache request is held until `c_gnt`; read data arrives one cycle
// after the grant and is pushed into the Math Unit input FIFO.  R waits while
// that FIFO has no room, W while the arithmetic output FIFO is empty.  The
// address uses the pointer value from before the same word's modification.
module mem_manager
  import mc_pkg::*;
#(
  parameter int unsigned UCODE_DEPTH = 1 << UPC_W,
  parameter int unsigned FREE_W      = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // opcode queue and microcode loading
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
  // cache port (virtual address, translated by the VCM)
  output logic                c_req,
  output logic                c_we,
  output logic [VADDR_W-1:0]  c_addr,
  output fp64_t               c_wdata,
  input  logic                c_gnt,
  input  fp64_t               c_rdata,
  // Math Unit FIFOs
  input  logic [FREE_W-1:0]   alu_in_free,
  output logic                alu_push,
  output fp64_t               alu_wdata,
  input  logic                alu_ar_empty,
  input  fp64_t               alu_ar_data,
  output logic                alu_ar_pop,
  // cache configuration and synchronisation
  output logic [7:0]          bank_map,
  output logic                step_done,
  input  logic                host_go,
  output logic                go_ack,
  // status
  output logic                idle,
  output logic                stall,
  output logic [UPC_W-1:0]    upc
);

  typedef logic [COORD_W-1:0] coord_t;
  typedef struct packed { coord_t x, y, z; } pos_t;

  logic [MM_UOP_W-1:0] uop_bits;
  mm_uop_t             u;
  logic                uop_valid, done, seq_start;
  coord_t              dim_x, dim_y, dim_z;
  pos_t                ptr [4];
  logic                rd_pending;

  ucode_seq #(.W(MM_UOP_W), .DEPTH(UCODE_DEPTH)) u_seq (
    .clk, .rst_n,
    .op_push, .op_in, .op_full,
    .lut_we, .lut_addr, .lut_wdata,
    .ram_we, .ram_addr, .ram_hi, .ram_wdata,
    .uop(uop_bits), .uop_valid, .uop_ready(done),
    .upc, .seq_start, .idle
  );

  assign u = mm_uop_t'(uop_bits);

  // cyclic coordinate step, offset -2..+1
  function automatic coord_t wrap(coord_t p, logic [1:0] d, coord_t n);
    logic signed [COORD_W+1:0] s;
    s = $signed({2'b00, p}) + $signed({{COORD_W{d[1]}}, d});
    if (s < 0)                          s = s + $signed({2'b00, n});
    else if (s >= $signed({2'b00, n}))  s = s - $signed({2'b00, n});
    return coord_t'(s);
  endfunction

  // address generation
  always_comb begin
    pos_t       p;
    coord_t     wx, wy, wz;
    logic [31:0] lin;
    p   = ptr[u.ptr];
    wx  = wrap(p.x, u.dx, dim_x);
    wy  = wrap(p.y, u.dy, dim_y);
    wz  = wrap(p.z, u.dz, dim_z);
    lin = 32'(u.mat) * 32'(dim_z) + 32'(wz);
    lin = lin * 32'(dim_y) + 32'(wy);
    lin = lin * 32'(dim_x) + 32'(wx);
    lin = (lin << 2) + 32'(u.comp);
    c_addr = lin[VADDR_W-1:0];
  end

  // issue and completion
  logic is_gvc, rd_room;
  assign is_gvc  = uop_bits[MM_CTL_GVC_BIT];
  assign rd_room = alu_in_free > FREE_W'(rd_pending);

  always_comb begin
    c_req = 1'b0;
    c_we  = 1'b0;
    done  = 1'b0;
    if (uop_valid) begin
      unique case (u.op)
        MM_NOP: done = 1'b1;
        MM_RD: begin
          c_req = rd_room;
          done  = rd_room && c_gnt;
        end
        MM_WR: begin
          c_req = !alu_ar_empty;
          c_we  = 1'b1;
          done  = !alu_ar_empty && c_gnt;
        end
        default: done = !(is_gvc && uop_bits[GVC_WAIT]) || host_go;
      endcase
    end
  end

  assign c_wdata    = alu_ar_data;
  assign alu_ar_pop = c_req && c_we && c_gnt;
  assign stall      = uop_valid && !done;
  assign go_ack     = uop_valid && u.op == MM_CTL && is_gvc && uop_bits[GVC_WAIT] && host_go;
  assign step_done  = uop_valid && done && u.op == MM_CTL && is_gvc && uop_bits[GVC_SIGNAL];
  assign alu_push   = rd_pending;
  assign alu_wdata  = c_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dim_x      <= coord_t'(1);
      dim_y      <= coord_t'(1);
      dim_z      <= coord_t'(1);
      bank_map   <= 8'b11_10_01_00;
      rd_pending <= 1'b0;
      for (int i = 0; i < 4; i++) ptr[i] <= '0;
    end else begin
      rd_pending <= c_req && !c_we && c_gnt;
      if (done) begin
        if (u.op == MM_CTL) begin
          if (!is_gvc) begin
            dim_x <= uop_bits[3*COORD_W-1 -: COORD_W];
            dim_y <= uop_bits[2*COORD_W-1 -: COORD_W];
            dim_z <= uop_bits[COORD_W-1:0];
          end else if (uop_bits[GVC_LOAD_MAP]) begin
            bank_map <= uop_bits[GVC_MAP_LO +: 8];
          end
        end else if (u.pm_en) begin
          ptr[u.pm_ptr] <= pos_t'(u.pm_val);
        end
      end
    end
  end

endmodule
