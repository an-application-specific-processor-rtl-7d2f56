// tb_mc_accel_top: end-to-end run of the whole computational unit at its
// default sizes, driven only through the supervisor bus.
//
// Workload: a nearest-neighbour dipole kernel on an N x N x N cyclic lattice
// (N = 3).  For every site i, with p the x component of the dipole moment,
//     s_i = ((p(x+1) + p(x-1)) + (p(y+1) + p(y-1))) + (p(z+1) + p(z-1))
//     e_i = (0.5 * p_i) * s_i,       flag_i = (e_i < 0)
// The Math Unit microcode does the five sums, the scaled product and the
// comparison, waiting out the 9- and 15-stage latencies; the Memory Manager
// microcode reads the centre and six neighbours with cyclic wrap-around and
// writes e_i into the second matrix.  Both accelerators run it at once, each
// on its own lattice.  The supervisor then refills the two idle banks while
// the first step runs, waits for the step-done flags, releases the Memory
// Managers, which swap their bank maps, and the second step runs on the new
// data.  The Control Unit program queues the ALU opcodes, consumes the
// comparison flags with JCMP in a counted loop, times the run with PCNT and
// halts.  Every result word and the cycle counter are checked, and each
// mechanism below must occur at least once: ALU stall on an empty input FIFO,
// Memory Manager stall, Control Unit waiting on a full opcode queue, a host
// cache access waiting for an
// accelerator, the GVC wait for the host, a bank swap, comparisons, loop
// iterations and the interrupt.  (Stalls on a full logical FIFO are counted
// and printed but not required: the program consumes flags as they come.)
module tb_mc_accel_top;
  import mc_pkg::*;

  localparam int N     = 3;
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
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired: CU pc %0d running %b, ALU idle %b, MM idle %b, bus %h",
             dut.u_cu.pc, dut.u_cu.running, {dut.u_idle[2], dut.u_idle[0]}, {dut.u_idle[3], dut.u_idle[1]}, bus_addr);
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

  alu_uop_t kern [$];
  task automatic build_kernel();
    alu_uop_t u;
    for (int i = 0; i < 62; i++) kern.push_back(nop());
    kern[0].fetch = 1; kern[0].fetch_idx = 0;
    for (int p = 0; p < 3; p++) begin
      kern[1 + 3*p].fetch = 1; kern[1 + 3*p].fetch_idx = 1;
      kern[2 + 3*p].fetch = 1; kern[2 + 3*p].fetch_idx = 2;
      kern[3 + 3*p].add_a = 4'd1; kern[3 + 3*p].add_b = 4'd2;     // ready 9 later
    end
    kern[12].wa = 1; kern[12].wa_idx = 0;                          // x pair
    kern[15].wa = 1; kern[15].wa_idx = 1;                          // y pair
    kern[16].add_a = 4'd4; kern[16].add_b = 4'd5;                  // A0 + A1
    kern[18].wa = 1; kern[18].wa_idx = 2;                          // z pair
    kern[25].wa = 1; kern[25].wa_idx = 0;
    kern[26].add_a = 4'd4; kern[26].add_b = 4'd6;                  // + A2
    kern[35].wa = 1; kern[35].wa_idx = 1;                          // s
    kern[36].mul_a = 4'd0; kern[36].mul_k = KM_PH; kern[36].mul_b = 4'd5;  // (0.5 p) s
    kern[51].wm = 1; kern[51].wm_idx = 0;
    kern[52].out = 1; kern[52].out_sel = 4'd8;                     // e
    kern[52].cmp = 1; kern[52].add_a = 4'd8; kern[52].add_b = 4'd12; // e < 0, flag at 61
  endtask

  // ------------------------------------------------------------ MM microcode
  function automatic logic [33:0] mm_ctl(logic gvc, logic [17:0] f);
    logic [33:0] w = '0;
    w[33:32] = MM_CTL; w[31] = gvc; w[17:0] = f;
    return w;
  endfunction

  function automatic logic [33:0] mm_rw(mm_op_e op, int dx, int dy, int dz, logic mat,
                                       logic pm, int nx, int ny, int nz);
    mm_uop_t u = '0;
    u.op = op; u.ptr = 2'd0;
    u.dx = 2'(dx); u.dy = 2'(dy); u.dz = 2'(dz);
    u.mat = mat; u.comp = 2'd0;
    u.pm_en = pm; u.pm_ptr = 2'd0; u.pm_val = {6'(nx), 6'(ny), 6'(nz)};
    return u;
  endfunction

  logic [33:0] sweep [$];
  task automatic build_sweep();
    for (int k = 0; k < SITES; k++) begin
      automatic int n = (k + 1) % SITES;
      sweep.push_back(mm_rw(MM_RD,  0,  0,  0, 0, 0, 0, 0, 0));
      sweep.push_back(mm_rw(MM_RD,  1,  0,  0, 0, 0, 0, 0, 0));
      sweep.push_back(mm_rw(MM_RD, -1,  0,  0, 0, 0, 0, 0, 0));
      sweep.push_back(mm_rw(MM_RD,  0,  1,  0, 0, 0, 0, 0, 0));
      sweep.push_back(mm_rw(MM_RD,  0, -1,  0, 0, 0, 0, 0, 0));
      sweep.push_back(mm_rw(MM_RD,  0,  0,  1, 0, 0, 0, 0, 0));
      sweep.push_back(mm_rw(MM_RD,  0,  0, -1, 0, 0, 0, 0, 0));
      // write e and move the pointer to the next site (x fastest)
      sweep.push_back(mm_rw(MM_WR,  0,  0,  0, 1, 1, n % N, (n / N) % N, n / (N * N)));
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

  // ------------------------------------------------------------ mechanism counters
  int alu_stall_c = 0, mm_stall_c = 0, ist_full_c = 0, lg_full_c = 0, gvc_wait_c = 0;
  int cmp_c = 0, loop_c = 0, irq_c = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) begin
      if (dut.alu_stall[k]) alu_stall_c++;
      if (dut.mm_stall[k])  mm_stall_c++;
      if (dut.cmp_push[k])  cmp_c++;
    end
    if (dut.g_acc[0].u_acc.u_math.u_alu.stall && dut.g_acc[0].u_acc.u_math.u_alu.lg_full) lg_full_c++;
    if (dut.u_cu.running && dut.u_cu.op == CU_IST && !dut.u_cu.go) ist_full_c++;
    if (dut.u_cu.running && dut.u_cu.op == CU_DJNZ && dut.u_cu.jump) loop_c++;
    if (dut.g_acc[0].u_acc.u_mm.stall && dut.g_acc[0].u_acc.u_mm.u.op == MM_CTL) gvc_wait_c++;
    if (irq) irq_c++;
  end

  // ------------------------------------------------------------ CU program
  function automatic logic [31:0] ist(int a1, int m1, int a2, int m2);
    logic [6:0] f [4];
    f[0] = (a1 < 0) ? 7'd0 : {1'b1, 6'(a1)};
    f[1] = (m1 < 0) ? 7'd0 : {1'b1, 6'(m1)};
    f[2] = (a2 < 0) ? 7'd0 : {1'b1, 6'(a2)};
    f[3] = (m2 < 0) ? 7'd0 : {1'b1, 6'(m2)};
    return {CU_IST, f[3], f[2], f[1], f[0]};
  endfunction

  localparam int PRO = 20, TOTAL = 2 * SITES, MID = TOTAL - PRO;

  initial begin
    logic [31:0] cu_prog [$];
    logic [31:0] r;
    int t_start, t_end;
    build_kernel();
    build_sweep();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ALU microcode: kernel at 0, opcode 1, in both Math Units
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < kern.size(); i++)
        load_uword(k ? 5 : 1, i, {25'd0, 1'(i == kern.size() - 1), kern[i]});
      load_lut(k ? 6 : 2, 1, 0);
    end
    // MM microcode: op1 INIT + map A + pointer reset, op2 sweep, op3 wait + map B
    for (int k = 0; k < 2; k++) begin
      automatic logic [7:0] map_a = k ? 8'b11_10_00_01 : 8'b11_10_01_00;
      automatic logic [7:0] map_b = k ? 8'b00_10_01_11 : 8'b11_00_01_10;
      automatic int rg = k ? 7 : 3;
      load_uword(rg, 0, {30'd0, 1'b0, mm_ctl(0, {6'(N), 6'(N), 6'(N)})});
      load_uword(rg, 1, {30'd0, 1'b0, mm_ctl(1, 18'({1'b1, map_a}))});
      load_uword(rg, 2, {30'd0, 1'b1, mm_rw(MM_NOP, 0, 0, 0, 0, 1, 0, 0, 0)});
      for (int i = 0; i < sweep.size(); i++)
        load_uword(rg, 10 + i, {29'd0, 1'(i == sweep.size() - 1), sweep[i]});
      load_uword(rg, 300, {29'd0, 1'b1, mm_ctl(1, 18'((1 << GVC_WAIT) | (1 << GVC_LOAD_MAP) | map_b))});
      load_lut(rg + 1, 1, 0);
      load_lut(rg + 1, 2, 10);
      load_lut(rg + 1, 3, 300);
    end
    // Control Unit program
    cu_prog.push_back({CU_PCNT, 28'd3});                                 // 0
    cu_prog.push_back(ist(-1, 1, -1, 1));                                // 1
    cu_prog.push_back(ist(-1, 2, -1, 2));                                // 2
    cu_prog.push_back(ist(-1, 3, -1, 3));                                // 3
    cu_prog.push_back(ist(-1, 2, -1, 2));                                // 4
    cu_prog.push_back({CU_LDC, 2'b00, 2'd0, 8'd0, 16'(PRO)});            // 5
    cu_prog.push_back(ist(1, -1, 1, -1));                                // 6
    cu_prog.push_back({CU_DJNZ, 2'b00, 2'd0, 16'd0, 8'd6});              // 7
    cu_prog.push_back({CU_LDC, 2'b00, 2'd0, 8'd0, 16'(MID)});            // 8
    cu_prog.push_back(ist(1, -1, 1, -1));                                // 9
    cu_prog.push_back({CU_JCMP, 3'b000, 1'b0, 16'd0, 8'd11});            // 10
    cu_prog.push_back({CU_JCMP, 3'b000, 1'b1, 16'd0, 8'd12});            // 11
    cu_prog.push_back({CU_DJNZ, 2'b00, 2'd0, 16'd0, 8'd9});              // 12
    cu_prog.push_back({CU_LDC, 2'b00, 2'd0, 8'd0, 16'(PRO)});            // 13
    cu_prog.push_back({CU_JCMP, 3'b000, 1'b0, 16'd0, 8'd15});            // 14
    cu_prog.push_back({CU_JCMP, 3'b000, 1'b1, 16'd0, 8'd16});            // 15
    cu_prog.push_back({CU_DJNZ, 2'b00, 2'd0, 16'd0, 8'd14});             // 16
    cu_prog.push_back({CU_WAIT, 24'd0, 4'hF});                           // 17
    cu_prog.push_back({CU_PCNT, 28'd0});                                 // 18
    cu_prog.push_back({CU_HALT, 28'd0});                                 // 19
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

    $display("ALU stalls %0d, MM stalls %0d, IST on full queue %0d, logical FIFO full %0d",
             alu_stall_c, mm_stall_c, ist_full_c, lg_full_c);
    $display("GVC waits %0d, host waits %0d, comparisons %0d, loop jumps %0d, interrupts %0d",
             gvc_wait_c, waits_seen, cmp_c, loop_c, irq_c);
    checks++;
    if (alu_stall_c == 0 || mm_stall_c == 0 || ist_full_c == 0 ||
        gvc_wait_c == 0 || waits_seen == 0 || loop_c == 0 || irq_c != 1) begin
      failures++; $display("a mechanism never occurred");
    end
    checks++;
    if (cmp_c != 2 * TOTAL) begin failures++; $display("%0d comparisons, expected %0d", cmp_c, 2 * TOTAL); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
