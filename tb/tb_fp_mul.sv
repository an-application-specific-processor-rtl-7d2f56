// tb_fp_mul: self-checking test of the double-precision multiplier.
//
// Random operands (including zeros, results near 1.0 that exercise the
// rounding carry, and products that fall exactly halfway between two doubles
// to test round-to-nearest-even) are fed with `adv` toggling at random; expected products
// come from the simulator's double arithmetic.  Each product must appear
// after exactly 15 advances.
module tb_fp_mul;
  import mc_pkg::*;

  localparam int unsigned STAGES = 15;
  localparam int unsigned N      = 4000;

  logic  clk = 0, rst_n = 0, adv = 0;
  fp64_t a = '0, b = '0, prod;
  int    checks = 0, failures = 0;

  fp_mul #(.STAGES(STAGES)) dut (.*);

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

  fp64_t exp_p [N];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N + STAGES; i++) begin
      if (i < N) begin
        case ($urandom_range(0, 4))
          0: begin a = rnd_fp(200); b = rnd_fp(200); end
          1: begin a = rnd_fp(0); b = rnd_fp(0); b[51:40] = 12'hFFF; a[51:40] = 12'hFFF; end
          2: begin a = rnd_fp(5); b = '0; b[63] = 1'($urandom); end
          3: begin  // exact halfway cases: (1 + k*2^-52) * 1.5 with small k
            a = rnd_fp(10); a[51:0] = 52'($urandom_range(1, 255));
            b = rnd_fp(10); b[51:0] = 52'h8_0000_0000_0000;
          end
          default: begin a = rnd_fp(20); b = 64'h3FF0_0000_0000_0000; b[63] = 1'($urandom); end
        endcase
        exp_p[i] = $realtobits($bitstoreal(a) * $bitstoreal(b));
      end
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
    if (prod !== exp_p[k]) begin
      failures++;
      if (failures < 10) $display("mismatch %0d: %h exp %h", k, prod, exp_p[k]);
    end
  endtask
endmodule
