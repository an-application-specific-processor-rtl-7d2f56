// tb_math_alu: runs many short microprograms on the ALU datapath.  Each loads
// four random doubles through the input FIFO, issues one sum-or-compare and
// one product with random sources (registers or constants) and random scale
// factors, writes the adder result back exactly 9 microwords later and the
// product exactly 15 later, and outputs both.  Expected values are computed
// with the simulator's double arithmetic.  The input FIFO is fed and the
// output FIFO drained at random rates so that both stall causes occur;
// the logical FIFO is read in bursts too; the test counts all three stalls.  A final no-stall program checks that one microword
// completes per cycle.
module tb_math_alu;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  alu_uop_t uop;
  logic uop_valid = 0, uop_ready;
  logic in_push = 0;
  fp64_t in_data = '0, ar_data;
  logic [4:0] in_free;
  logic ar_pop, ar_empty, lg_pop, lg_data, lg_empty, stall, cmp_push;
  int checks = 0, failures = 0;

  math_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t rnd_fp();
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 + $urandom_range(0, 40) - 20);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  function automatic real kval_a(int k); return (k == 0) ? 1.0 : (k == 1) ? -2.0 : (k == 2) ? -1.0 : 2.0; endfunction
  function automatic real kval_b(int k); return (k == 0) ? 1.0 : (k == 1) ? -1.0 : (k == 2) ? -0.5 : 0.5; endfunction
  function automatic real kval_m(int k); return (k == 0) ? 1.0 : (k == 1) ?  2.0 : (k == 2) ?  0.5 : -1.0; endfunction

  // data queues
  fp64_t feed_q [$];
  fp64_t exp_ar [$];
  logic  exp_lg [$];
  alu_uop_t prog [$];

  logic feed_fast = 0, drain_fast = 0;
  int   stall_in = 0, stall_out = 0, cmps = 0;

  // feeder: pushes queued data into the input FIFO at a random rate
  always @(negedge clk) begin
    in_push = 0;
    if (rst_n && feed_q.size() > 0 && in_free > 0 && (feed_fast || $urandom_range(0, 2) == 0)) begin
      in_push = 1;
      in_data = feed_q.pop_front();
    end
  end

  // drainer and checkers
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  // the drain pauses for 400 of every 800 cycles so the output FIFO fills up
  assign ar_pop = !ar_empty && (drain_fast || (((cyc / 400) % 2 == 0) && ($urandom_range(0, 2) == 0)));
  // the flags are read only in alternate 1600-cycle windows, so the logical FIFO fills
  assign lg_pop = !lg_empty && (drain_fast || ((cyc / 1600) % 2 == 0));
  int   stall_lg = 0;
  always @(posedge clk) if (rst_n && stall && !(uop.fetch) && !(uop.out)) stall_lg++;
  always @(posedge clk) if (rst_n) begin
    if (stall && uop.fetch && uop_valid) stall_in++;
    if (stall && uop.out && uop_valid)   stall_out++;
    if (ar_pop) begin
      checks++;
      if (exp_ar.size() == 0) begin failures++; $display("unexpected output %h", ar_data); end
      else begin
        automatic fp64_t e = exp_ar.pop_front();
        if (ar_data !== e) begin
          failures++;
          if (failures < 10) $display("output %h expected %h", ar_data, e);
        end
      end
    end
    if (lg_pop) begin
      checks++; cmps++;
      if (exp_lg.size() == 0 || lg_data !== exp_lg.pop_front()) begin
        failures++; $display("comparison flag wrong");
      end
    end
  end

  function automatic alu_uop_t nop();
    alu_uop_t u = '0;
    u.add_a = 4'd12; u.add_b = 4'd12; u.mul_a = 4'd12; u.mul_b = 4'd12;
    return u;
  endfunction

  task automatic build_trial();
    fp64_t iv [4];
    fp64_t src_v [16];
    alu_uop_t u;
    int ra, rb, rc, rd, ka, kb, km, j, k;
    logic c;
    real sa, sm;
    for (int r = 0; r < 4; r++) begin
      iv[r] = rnd_fp();
      feed_q.push_back(iv[r]);
      u = nop(); u.fetch = 1; u.fetch_idx = 2'(r);
      prog.push_back(u);
    end
    for (int r = 0; r < 16; r++) src_v[r] = (r < 4) ? iv[r] : (r >= 12) ? ((r % 2) ? FP_ONE : FP_ZERO) : FP_ZERO;
    ra = $urandom_range(0, 4); if (ra == 4) ra = 12 + $urandom_range(0, 1);
    rb = $urandom_range(0, 4); if (rb == 4) rb = 12;
    rc = $urandom_range(0, 3);
    rd = $urandom_range(0, 4); if (rd == 4) rd = 13;
    ka = $urandom_range(0, 3); kb = $urandom_range(0, 3); km = $urandom_range(0, 3);
    c  = 1'($urandom);
    j  = $urandom_range(0, 3); k = $urandom_range(0, 3);
    u = nop();
    u.cmp = c; u.add_a = 4'(ra); u.add_b = 4'(rb);
    u.add_a_k = add_a_k_e'(ka); u.add_b_k = add_b_k_e'(kb);
    u.mul_a = 4'(rc); u.mul_b = 4'(rd); u.mul_k = mul_k_e'(km);
    prog.push_back(u);
    for (int n = 0; n < 8; n++) prog.push_back(nop());
    u = nop(); u.wa = 1; u.wa_idx = 2'(j); prog.push_back(u);          // 9 after issue
    for (int n = 0; n < 5; n++) prog.push_back(nop());
    u = nop(); u.wm = 1; u.wm_idx = 2'(k); prog.push_back(u);          // 15 after issue
    u = nop(); u.out = 1; u.out_sel = 4'(4 + j); prog.push_back(u);
    u = nop(); u.out = 1; u.out_sel = 4'(8 + k); prog.push_back(u);
    sa = kval_a(ka) * $bitstoreal(src_v[ra]) + kval_b(kb) * $bitstoreal(src_v[rb]);
    sm = kval_m(km) * $bitstoreal(src_v[rc]) * $bitstoreal(src_v[rd]);
    exp_ar.push_back($realtobits(sa));
    exp_ar.push_back($realtobits(sm));
    if (c) exp_lg.push_back(kval_a(ka) * $bitstoreal(src_v[ra]) < kval_b(kb) * $bitstoreal(src_v[rb]));
  endtask

  task automatic run_prog();
    while (prog.size() > 0) begin
      @(negedge clk);
      uop = prog[0]; uop_valid = 1;
      @(posedge clk);
      if (uop_ready) void'(prog.pop_front());
    end
    @(negedge clk); uop_valid = 0; uop = nop();
  endtask

  int valid_cycles = 0;
  always @(posedge clk) if (uop_valid) valid_cycles++;

  initial begin
    int t0, t1, n;
    uop = nop();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) build_trial();
    run_prog();
    repeat (50) @(posedge clk);
    // no-stall program: data already waiting, output drained at once
    feed_fast = 1; drain_fast = 1;
    build_trial();
    repeat (10) @(posedge clk);
    n = prog.size();
    t0 = valid_cycles;
    run_prog();
    t1 = valid_cycles;
    checks++;
    if (t1 - t0 != n) begin
      failures++; $display("%0d microwords took %0d cycles", n, t1 - t0);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (exp_ar.size() != 0 || exp_lg.size() != 0) begin failures++; $display("results missing"); end
    checks++;
    if (stall_in == 0 || stall_out == 0 || stall_lg == 0 || cmps == 0) begin
      failures++; $display("mechanism not exercised: in %0d out %0d cmp %0d", stall_in, stall_out, cmps);
    end
    $display("stalls on empty input %0d, on full output %0d, on full logical FIFO %0d, comparisons %0d", stall_in, stall_out, stall_lg, cmps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
