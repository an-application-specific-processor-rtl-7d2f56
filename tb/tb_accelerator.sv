// tb_accelerator: one accelerator against a model cache with random grants.
// The Memory Manager is told (INIT, GVC) that the data is an 8 x 1 x 1 ring
// in physical bank 2; for every site k it reads a[k] and a[k+1] (cyclic) and
// writes back the Math Unit's results.  The Math Unit computes a[k] - a[k+1]
// (operand B scaled by -1) and a[k] * a[k+1].  The test checks every word
// written (address after the VCM's bank mapping, and value), the bank swap
// count and that both sequencers end idle.
module tb_accelerator;
  import mc_pkg::*;
  localparam int SITES = 8;
  logic clk = 0, rst_n = 0;
  logic alu_op_push = 0, mm_op_push = 0, alu_op_full, mm_op_full, alu_idle, mm_idle;
  logic [5:0] alu_op = '0, mm_op = '0, lut_addr = '0;
  logic alu_lut_we = 0, alu_ram_we = 0, mm_lut_we = 0, mm_ram_we = 0, ram_hi = 0;
  logic [9:0] lut_wdata = '0, ram_addr = '0;
  logic [31:0] ram_wdata = '0;
  logic p_req, p_we, p_gnt = 0;
  logic [1:0] p_bank;
  logic [12:0] p_off;
  fp64_t p_wdata, p_rdata = '0;
  logic lg_pop = 0, lg_data, lg_empty, step_done, host_go = 0, go_ack;
  logic alu_stall, mm_stall, cmp_push;
  logic [15:0] swaps;
  int checks = 0, failures = 0;

  accelerator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model cache: 4 banks of 64 words
  fp64_t mem [4][64];
  int wrong_bank = 0;
  always @(negedge clk) p_gnt = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && p_req && p_gnt) begin
    if (p_bank != 2'd2 || p_off >= 64) wrong_bank++;
    else begin
      p_rdata <= mem[p_bank][p_off[5:0]];
      if (p_we) mem[p_bank][p_off[5:0]] = p_wdata;
    end
  end

  function automatic alu_uop_t nop();
    alu_uop_t u = '0;
    u.add_a = 4'd12; u.add_b = 4'd12; u.mul_a = 4'd12; u.mul_b = 4'd12;
    return u;
  endfunction

  task automatic ld_alu(int a, logic [37:0] w);
    @(negedge clk); alu_ram_we = 1; ram_addr = 10'(a); ram_hi = 0; ram_wdata = w[31:0];
    @(negedge clk); ram_hi = 1; ram_wdata = 32'(w[37:32]);
    @(negedge clk); alu_ram_we = 0;
  endtask
  task automatic ld_mm(int a, logic [34:0] w);
    @(negedge clk); mm_ram_we = 1; ram_addr = 10'(a); ram_hi = 0; ram_wdata = w[31:0];
    @(negedge clk); ram_hi = 1; ram_wdata = 32'(w[34:32]);
    @(negedge clk); mm_ram_we = 0;
  endtask

  initial begin
    alu_uop_t k [20];
    mm_uop_t  m;
    logic [33:0] w;
    real a [SITES];
    for (int i = 0; i < 20; i++) k[i] = nop();
    k[0].fetch = 1; k[0].fetch_idx = 0;
    k[1].fetch = 1; k[1].fetch_idx = 1;
    k[2].add_a = 4'd0; k[2].add_b = 4'd1; k[2].add_b_k = KB_M1;
    k[2].mul_a = 4'd0; k[2].mul_b = 4'd1;
    k[11].wa = 1; k[11].wa_idx = 0;
    k[17].wm = 1; k[17].wm_idx = 0;
    k[18].out = 1; k[18].out_sel = 4'd4;
    k[19].out = 1; k[19].out_sel = 4'd8;
    for (int b = 0; b < 4; b++) for (int i = 0; i < 64; i++) mem[b][i] = '0;
    for (int s = 0; s < SITES; s++) begin
      a[s] = real'($urandom_range(1, 100000)) / 1024.0 - 40.0;
      mem[2][s * 4] = $realtobits(a[s]);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) ld_alu(i, {1'(i == 19), k[i]});
    @(negedge clk); alu_lut_we = 1; lut_addr = 6'd1; lut_wdata = 10'd0;
    @(negedge clk); alu_lut_we = 0;
    // MM op 1 at 0: INIT 8,1,1 ; GVC map v0 -> phys 2
    w = '0; w[33:32] = MM_CTL; w[17:0] = {6'd8, 6'd1, 6'd1}; ld_mm(0, {1'b0, w});
    w = '0; w[33:32] = MM_CTL; w[31] = 1; w[8] = 1; w[7:0] = 8'b11_01_00_10; ld_mm(1, {1'b1, w});
    // MM op 2 at 10: sweep
    for (int s = 0; s < SITES; s++) begin
      m = '0; m.op = MM_RD; ld_mm(10 + 4*s, {1'b0, m});
      m = '0; m.op = MM_RD; m.dx = 2'd1; ld_mm(11 + 4*s, {1'b0, m});
      m = '0; m.op = MM_WR; m.mat = 1; m.comp = 2'd0; ld_mm(12 + 4*s, {1'b0, m});
      m = '0; m.op = MM_WR; m.mat = 1; m.comp = 2'd1;
      m.pm_en = 1; m.pm_val = {6'((s + 1) % SITES), 6'd0, 6'd0};
      ld_mm(13 + 4*s, {1'(s == SITES - 1), m});
    end
    @(negedge clk); mm_lut_we = 1; lut_addr = 6'd1; lut_wdata = 10'd0;
    @(negedge clk); lut_addr = 6'd2; lut_wdata = 10'd10;
    @(negedge clk); mm_lut_we = 0;
    // run
    @(negedge clk); mm_op_push = 1; mm_op = 6'd1;
    @(negedge clk); mm_op = 6'd2;
    @(negedge clk); mm_op_push = 0;
    for (int s = 0; s < SITES; s++) begin
      while (alu_op_full) @(negedge clk);
      @(negedge clk); alu_op_push = 1; alu_op = 6'd1;
      @(negedge clk); alu_op_push = 0;
    end
    repeat (5) @(negedge clk);
    while (!(alu_idle && mm_idle)) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int s = 0; s < SITES; s++) begin
      real d, p;
      d = a[s] + (-a[(s + 1) % SITES]);
      p = a[s] * a[(s + 1) % SITES];
      checks += 2;
      if (mem[2][(SITES + s) * 4] !== $realtobits(d)) begin
        failures++; $display("site %0d difference %h expected %h", s, mem[2][(SITES + s) * 4], $realtobits(d));
      end
      if (mem[2][(SITES + s) * 4 + 1] !== $realtobits(p)) begin
        failures++; $display("site %0d product wrong", s);
      end
    end
    checks++;
    if (wrong_bank != 0 || swaps != 16'd1) begin failures++; $display("bank mapping: %0d stray accesses, %0d swaps", wrong_bank, swaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
