// tb_mc_lattice: the dipole-energy kernel on the smallest lattice of the
// evaluated range, a 5 x 5 x 5 cyclic lattice (125 dipoles) on each
// accelerator, run twice with a cache swap in between, at default sizes and
// through the supervisor bus only, with microcode scheduled for throughput.
//
// The computation and the swap protocol are those of tb_mc_accel_top:
//     s_i = ((p(x+1) + p(x-1)) + (p(y+1) + p(y-1))) + (p(z+1) + p(z-1))
//     e_i = (0.5 * p_i) * s_i,       flag_i = (e_i < 0)
// but the Math Unit code is software-pipelined: a new site starts every 16
// microwords while the adder and multiplier latencies (9 and 15) are still
// running out for the three sites before it.  One site's work spans four
// 16-word stages (fetch and pair sums; partial sums and 0.5 p; final sum and
// product; result and comparison).  Each opcode runs stage 0 of site i, stage
// 1 of site i-1, stage 2 of site i-2 and stage 3 of site i-3; prologue and
// epilogue opcodes leave out the stages that have no site.  The scaled
// moment 0.5 p lives across two opcodes, so even and odd sites keep it in
// different multiplier registers (M0, M2) and every opcode exists in an even
// and an odd version.
//
// The Memory Manager sweep reads the seven operands of site i and then writes
// the result of site i-3, the first pointer walking the reads and the second
// the writes; eight microwords per site, fully unrolled, so 125 sites take
// 1000 of the 1024 microcode words.  This is the largest cubic lattice whose
// unrolled sweep fits.  The Control Unit keeps the Math Unit queues two
// opcodes ahead and consumes the comparison flags in a counted loop.
//
// Checks: all 500 result words, both bank-swap counts and the cycle counter, which must show at most 17 cycles per site on each
// accelerator (16 per site plus pipeline fill and the swap).
module tb_mc_lattice;
  import mc_pkg::*;

  localparam int N     = 5;
  localparam int SITES = N * N * N;

  logic clk = 0, rst_n = 0;
  logic [19:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rvalid, bus_wait, irq;
  int checks = 0, failures = 0;

  mc_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired, bus address %h", bus_addr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus access
  task automatic bus_write(logic [19:0] a, logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(posedge clk);
    while (bus_wait) @(posedge clk);
    @(negedge clk); bus_wr = 0;
  endtask

  int waits_seen = 0;
  task automatic bus_read(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(posedge clk);
    while (bus_wait) begin waits_seen++; @(posedge clk); end
    @(negedge clk); bus_rd = 0;
    while (!bus_rvalid) @(negedge clk);
    d = bus_rdata;
  endtask

  task automatic load_uword(int region, int addr, logic [63:0] w);
    bus_write({4'(region), 5'd0, 10'(addr), 1'b0}, w[31:0]);
    bus_write({4'(region), 5'd0, 10'(addr), 1'b1}, w[63:32]);
  endtask

  task automatic load_lut(int region, int op, int addr);
    bus_write({4'(region), 10'd0, 6'(op)}, 32'(addr));
  endtask

  // ------------------------------------------------------------ ALU microcode
  function automatic alu_uop_t nop();
    alu_uop_t u = '0;
    u.add_a = 4'd12; u.add_b = 4'd12; u.mul_a = 4'd12; u.mul_b = 4'd12;
    return u;
  endfunction

  // Pipelined kernel: 16 words, stages with site s_par = parity of the site.
  localparam int II = 16;
  localparam int MASKS [7] = '{4'b0001, 4'b0011, 4'b0111, 4'b1111, 4'b1110, 4'b1100, 4'b1000};

  alu_uop_t pw [II];    // opcode being built

  function automatic void stage_ops(int st, logic par);
    logic [3:0] mreg = par ? 4'd10 : 4'd8;       // M2 or M0 holds 0.5 p
    logic [1:0] midx = par ? 2'd2 : 2'd0;
    case (st)
      0: begin
        pw[0].fetch = 1; pw[0].fetch_idx = 0;                            // p -> I0
        pw[1].mul_a = 4'd0; pw[1].mul_k = KM_PH; pw[1].mul_b = 4'd13;     // 0.5 p, at t16
        for (int q = 0; q < 3; q++) begin
          pw[1 + 2*q].fetch = 1; pw[1 + 2*q].fetch_idx = 1;              // plus neighbour
          pw[2 + 2*q].fetch = 1; pw[2 + 2*q].fetch_idx = 2;              // minus neighbour
          pw[3 + 2*q].add_a = 4'd1; pw[3 + 2*q].add_b = 4'd2;            // pair sum, at t12/14/16
        end
        pw[12].wa = 1; pw[12].wa_idx = 0;                                // x pair -> A0
        pw[14].wa = 1; pw[14].wa_idx = 1;                                // y pair -> A1
        pw[15].add_a = 4'd4; pw[15].add_b = 4'd5;                        // A0 + A1, at t24
      end
      1: begin
        pw[0].wa = 1; pw[0].wa_idx = 2;                                  // z pair -> A2
        pw[0].wm = 1; pw[0].wm_idx = midx;                               // 0.5 p
        pw[8].wa = 1; pw[8].wa_idx = 3;                                  // x+y -> A3
        pw[9].add_a = 4'd7; pw[9].add_b = 4'd6;                          // A3 + A2, at t34
      end
      2: begin
        pw[2].wa = 1; pw[2].wa_idx = 0;                                  // s -> A0
        pw[3].mul_a = mreg; pw[3].mul_b = 4'd4;                          // (0.5 p) s, at t50
      end
      default: begin
        pw[2].wm = 1; pw[2].wm_idx = 1;                                  // e -> M1
        pw[3].out = 1; pw[3].out_sel = 4'd9;                             // e out
        pw[4].cmp = 1; pw[4].add_a = 4'd9; pw[4].add_b = 4'd12;           // e < 0
      end
    endcase
  endfunction

  // Opcode 8 + 2*m + parity, at microcode address 16*(2*m + parity).
  function automatic void build_pipe(int m, logic par);
    for (int w = 0; w < II; w++) pw[w] = nop();
    for (int st = 0; st < 4; st++)
      if (MASKS[m][st]) stage_ops(st, par ^ st[0]);
  endfunction

  // ------------------------------------------------------------ MM microcode
  function automatic logic [33:0] mm_ctl(logic gvc, logic [17:0] f);
    logic [33:0] w = '0;
    w[33:32] = MM_CTL; w[31] = gvc; w[17:0] = f;
    return w;
  endfunction

  function automatic logic [33:0] mm_rw(mm_op_e op, int ptr, int dx, int dy, int dz, logic mat,
                                       logic pm, int pm_ptr, int site_n);
    mm_uop_t u = '0;
    u.op = op; u.ptr = 2'(ptr);
    u.dx = 2'(dx); u.dy = 2'(dy); u.dz = 2'(dz);
    u.mat = mat; u.comp = 2'd0;
    u.pm_en = pm; u.pm_ptr = 2'(pm_ptr);
    u.pm_val = {6'(site_n % N), 6'((site_n / N) % N), 6'(site_n / (N * N))};
    return u;
  endfunction

  // Reads of site k through pointer 0; the write of site k-3 through pointer 1.
  logic [33:0] sweep [$];
  task automatic build_sweep();
    for (int k = 0; k < SITES + 3; k++) begin
      if (k < SITES) begin
        sweep.push_back(mm_rw(MM_RD, 0,  0,  0,  0, 0, 0, 0, 0));
        sweep.push_back(mm_rw(MM_RD, 0,  1,  0,  0, 0, 0, 0, 0));
        sweep.push_back(mm_rw(MM_RD, 0, -1,  0,  0, 0, 0, 0, 0));
        sweep.push_back(mm_rw(MM_RD, 0,  0,  1,  0, 0, 0, 0, 0));
        sweep.push_back(mm_rw(MM_RD, 0,  0, -1,  0, 0, 0, 0, 0));
        sweep.push_back(mm_rw(MM_RD, 0,  0,  0,  1, 0, 0, 0, 0));
        sweep.push_back(mm_rw(MM_RD, 0,  0,  0, -1, 0, 1, 0, (k + 1) % SITES));
      end
      if (k >= 3)
        sweep.push_back(mm_rw(MM_WR, 1, 0, 0, 0, 1, 1, 1, (k - 2) % SITES));
    end
    sweep.push_back(mm_ctl(1, 18'(1 << GVC_SIGNAL)));
  endtask

  // ------------------------------------------------------------ data
  real lat [4][SITES];        // x component per physical bank and site

  function automatic int site(int x, int y, int z);
    return ((z + N) % N * N + (y + N) % N) * N + (x + N) % N;
  endfunction

  task automatic fill_bank(int b);
    for (int k = 0; k < SITES; k++) begin
      logic [63:0] v;
      lat[b][k] = (real'($urandom_range(0, 2000000)) - 1000000.0) / 65536.0;
      v = $realtobits(lat[b][k]);
      bus_write({4'h0, 2'(b), 13'(k * 4), 1'b0}, v[31:0]);
      bus_write({4'h0, 2'(b), 13'(k * 4), 1'b1}, v[63:32]);
    end
  endtask

  int n_neg [4];
  task automatic check_bank(int b);
    for (int k = 0; k < SITES; k++) begin
      automatic int x = k % N, y = (k / N) % N, z = k / (N * N);
      real s, e;
      logic [31:0] lo, hi;
      s = ((lat[b][site(x+1,y,z)] + lat[b][site(x-1,y,z)]) +
           (lat[b][site(x,y+1,z)] + lat[b][site(x,y-1,z)])) +
           (lat[b][site(x,y,z+1)] + lat[b][site(x,y,z-1)]);
      e = (0.5 * lat[b][k]) * s;
      if (e < 0) n_neg[b]++;
      bus_read({4'h0, 2'(b), 13'((SITES + k) * 4), 1'b0}, lo);
      bus_read({4'h0, 2'(b), 13'((SITES + k) * 4), 1'b1}, hi);
      checks++;
      if ({hi, lo} !== $realtobits(e)) begin
        failures++;
        if (failures < 10) $display("bank %0d site %0d: %h expected %h", b, k, {hi, lo}, $realtobits(e));
      end
    end
  endtask

  // ------------------------------------------------------------ CU program
  function automatic logic [31:0] ist(int a1, int m1, int a2, int m2);
    logic [6:0] f [4];
    f[0] = (a1 < 0) ? 7'd0 : {1'b1, 6'(a1)};
    f[1] = (m1 < 0) ? 7'd0 : {1'b1, 6'(m1)};
    f[2] = (a2 < 0) ? 7'd0 : {1'b1, 6'(a2)};
    f[3] = (m2 < 0) ? 7'd0 : {1'b1, 6'(m2)};
    return {CU_IST, f[3], f[2], f[1], f[0]};
  endfunction

  localparam int TOTAL = 2 * SITES, LOOP = (SITES - 5) / 2;

  initial begin
    logic [31:0] cu_prog [$];
    logic [31:0] r;
    int t_start, t_end;
    build_sweep();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ALU microcode: 14 pipelined opcodes (7 stage masks x 2 parities)
    for (int m = 0; m < 7; m++)
      for (int par = 0; par < 2; par++) begin
        build_pipe(m, 1'(par));
        for (int k = 0; k < 2; k++) begin
          for (int w = 0; w < II; w++)
            load_uword(k ? 5 : 1, II * (2*m + par) + w, {25'd0, 1'(w == II - 1), pw[w]});
          load_lut(k ? 6 : 2, 8 + 2*m + par, II * (2*m + par));
        end
      end
    // MM microcode: op1 INIT + map A + pointer reset, op2 sweep, op3 wait + map B
    for (int k = 0; k < 2; k++) begin
      automatic logic [7:0] map_a = k ? 8'b11_10_00_01 : 8'b11_10_01_00;
      automatic logic [7:0] map_b = k ? 8'b00_10_01_11 : 8'b11_00_01_10;
      automatic int rg = k ? 7 : 3;
      load_uword(rg, 0, {30'd0, 1'b0, mm_ctl(0, {6'(N), 6'(N), 6'(N)})});
      load_uword(rg, 1, {30'd0, 1'b0, mm_ctl(1, 18'({1'b1, map_a}))});
      load_uword(rg, 2, {30'd0, 1'b0, mm_rw(MM_NOP, 0, 0, 0, 0, 0, 1, 0, 0)});
      load_uword(rg, 3, {30'd0, 1'b1, mm_rw(MM_NOP, 0, 0, 0, 0, 0, 1, 1, 0)});
      for (int i = 0; i < sweep.size(); i++)
        load_uword(rg, 4 + i, {29'd0, 1'(i == sweep.size() - 1), sweep[i]});
      load_uword(rg, 4 + sweep.size(), {29'd0, 1'b1, mm_ctl(1, 18'((1 << GVC_WAIT) | (1 << GVC_LOAD_MAP) | map_b))});
      load_lut(rg + 1, 1, 0);
      load_lut(rg + 1, 2, 4);
      load_lut(rg + 1, 3, 4 + sweep.size());
    end
    // Control Unit program.  Per step: iterations 0..SITES+2 of the pipelined
    // kernel (iteration i has parity i%2; SITES is odd), flags consumed two
    // iterations behind.
    cu_prog.push_back({CU_PCNT, 28'd3});                                 // 0
    cu_prog.push_back(ist(-1, 1, -1, 1));                                // 1
    cu_prog.push_back(ist(-1, 2, -1, 2));                                // 2
    cu_prog.push_back(ist(-1, 3, -1, 3));                                // 3
    cu_prog.push_back(ist(-1, 2, -1, 2));                                // 4
    cu_prog.push_back({CU_LDC, 2'b00, 2'd1, 8'd0, 16'd2});               // 5  two steps
    cu_prog.push_back(ist(8, -1, 8, -1));                                // 6  i=0 mask 0001 even
    cu_prog.push_back(ist(11, -1, 11, -1));                              // 7  i=1 mask 0011 odd
    cu_prog.push_back(ist(12, -1, 12, -1));                              // 8  i=2 mask 0111 even
    cu_prog.push_back(ist(15, -1, 15, -1));                              // 9  i=3 full odd
    cu_prog.push_back(ist(14, -1, 14, -1));                              // 10 i=4 full even
    cu_prog.push_back({CU_LDC, 2'b00, 2'd0, 8'd0, 16'(LOOP)});           // 11
    cu_prog.push_back(ist(15, -1, 15, -1));                              // 12 loop: odd
    cu_prog.push_back(ist(14, -1, 14, -1));                              // 13       even
    for (int j = 0; j < 4; j++)
      cu_prog.push_back({CU_JCMP, 3'b000, 1'(j), 16'd0, 8'(15 + j)});    // 14..17
    cu_prog.push_back({CU_DJNZ, 2'b00, 2'd0, 16'd0, 8'd12});             // 18
    cu_prog.push_back(ist(17, -1, 17, -1));                              // 19 i=S   mask 1110 odd
    cu_prog.push_back(ist(18, -1, 18, -1));                              // 20 i=S+1 mask 1100 even
    cu_prog.push_back(ist(21, -1, 21, -1));                              // 21 i=S+2 mask 1000 odd
    for (int j = 0; j < 10; j++)
      cu_prog.push_back({CU_JCMP, 3'b000, 1'(j), 16'd0, 8'(23 + j)});    // 22..31
    cu_prog.push_back({CU_DJNZ, 2'b00, 2'd1, 16'd0, 8'd6});              // 32
    cu_prog.push_back({CU_WAIT, 24'd0, 4'hF});                           // 33
    cu_prog.push_back({CU_PCNT, 28'd0});                                 // 34
    cu_prog.push_back({CU_HALT, 28'd0});                                 // 35
    for (int i = 0; i < cu_prog.size(); i++) bus_write({4'h9, 8'd0, 8'(i)}, cu_prog[i]);

    // lattices for step 1
    fill_bank(0);
    fill_bank(1);

    // start, then refill banks 2 and 3 while step 1 runs
    bus_write(20'hA0000, 32'd1);
    t_start = $time;
    fill_bank(2);
    fill_bank(3);
    // poll a word of bank 0 while accelerator 1 works on it
    for (int i = 0; i < 400 && waits_seen == 0; i++) bus_read({4'h0, 2'd0, 13'd8, 1'b0}, r);
    // wait for both step-done flags, then release both Memory Managers
    do bus_read(20'hA0003, r); while (r[1:0] != 2'b11);
    bus_write(20'hA0003, 32'd3);
    bus_write(20'hA0002, 32'd3);
    while (!irq) @(posedge clk);
    t_end = $time;
    @(negedge clk);
    bus_read(20'hA0000, r);
    checks++;
    if (r[1:0] != 2'b10) begin failures++; $display("status %b, expected done", r[1:0]); end
    bus_read(20'hA0003, r);
    checks++;
    if (r[1:0] != 2'b11) begin failures++; $display("second step not flagged"); end
    bus_read(20'hA0001, r);
    checks++;
    if (r == 0 || r > 32'((t_end - t_start) / 10)) begin
      failures++; $display("cycle counter %0d, run took %0d cycles", r, (t_end - t_start) / 10);
    end
    $display("accelerated run: %0d cycles for %0d sites on each accelerator", r, TOTAL);
    checks++;
    if (r > 32'(17 * TOTAL)) begin
      failures++; $display("%0d cycles, more than 17 per site", r);
    end
    begin
      logic [31:0] rc;
      logic [31:0] cc;
      bus_read(20'hA0001, cc);
      bus_read(20'hA0005, rc);
      checks++;
      if (rc < cc || rc > 32'((t_end - t_start) / 10 + 4)) begin
        failures++; $display("run clock %0d, program counter %0d, elapsed %0d", rc, cc, (t_end - t_start) / 10);
      end
    end
    bus_read(20'hA0004, r);
    checks++;
    if (r[15:0] != 16'd1 || r[31:16] != 16'd2) begin
      failures++; $display("bank swaps %0d / %0d, expected 1 / 2", r[15:0], r[31:16]);
    end
    for (int b = 0; b < 4; b++) check_bank(b);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
