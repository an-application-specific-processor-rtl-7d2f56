// tb_fp_add: self-checking test of the double-precision adder/comparator.
//
// Random operand pairs (wide exponent spread, equal-exponent cancellations,
// zeros, exact negations) are fed with `adv` toggling at random.  The
// expected sum and comparison come from the simulator's own double
// arithmetic ($bitstoreal / $realtobits, round to nearest even).  Each result
// must appear after exactly 9 advances, which also checks the latency.
module tb_fp_add;
  import mc_pkg::*;

  localparam int unsigned STAGES = 9;
  localparam int unsigned N      = 4000;

  logic  clk = 0, rst_n = 0, adv = 0, cmp_in = 0;
  fp64_t a = '0, b = '0, sum;
  logic  lt, cmp_out;
  int    checks = 0, failures = 0;

  fp_add #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t rnd_fp(int espread);
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 + $signed($urandom_range(0, 2*espread)) - espread);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  // expected results, indexed by the advance on which they entered
  fp64_t exp_sum [N];
  logic  exp_lt  [N];
  logic  exp_cmp [N];
  int    sent = 0, adv_count = 0;
  int    entered_at [N];

  initial begin
    real ra, rb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N + STAGES; i++) begin
      // pick operands for slot i
      if (i < N) begin
        case ($urandom_range(0, 5))
          0: begin a = rnd_fp(60); b = rnd_fp(60); end
          1: begin a = rnd_fp(3);  b = rnd_fp(3);  end
          2: begin a = rnd_fp(3);  b = {~a[63], a[62:0]}; b[3:0] = 4'($urandom); end
          3: begin a = rnd_fp(10); b = '0; end
          4: begin a = rnd_fp(2);  b = {~a[63], a[62:0]}; end
          default: begin a = rnd_fp(0); b = rnd_fp(0); b[63] = ~a[63]; end
        endcase
        if ($urandom_range(0, 7) == 0) begin fp64_t t = a; a = b; b = t; end
        cmp_in = 1'($urandom);
        ra = $bitstoreal(a);
        rb = $bitstoreal(b);
        exp_sum[i] = $realtobits(ra + rb);
        if (exp_sum[i][62:0] == 63'd0) exp_sum[i] = 64'd0;   // exact cancellation gives +0
        exp_lt[i]  = ra < rb;
        exp_cmp[i] = cmp_in;
      end
      // advance once, with random idle cycles in between
      while ($urandom_range(0, 3) == 0) begin
        adv = 0;
        @(posedge clk); #1;
        if (i >= STAGES) check(i - STAGES);
      end
      adv = 1;
      @(posedge clk); #1;
      adv = 0;
      if (i + 1 >= STAGES) check(i + 1 - STAGES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int k);
    if (k >= N) return;
    checks++;
    if (sum !== exp_sum[k] || lt !== exp_lt[k] || cmp_out !== exp_cmp[k]) begin
      failures++;
      if (failures < 10)
        $display("mismatch %0d: sum %h exp %h lt %b exp %b cmp %b exp %b",
                 k, sum, exp_sum[k], lt, exp_lt[k], cmp_out, exp_cmp[k]);
    end
  endtask
endmodule
