// tb_math_unit: loads two microcoded instructions into the Math Unit through
// its load ports and runs them on streamed data.
//   opcode 5 "AXPY": fetch x, y; A0 = 2*x + 0.5*y (adder), M0 = -x*y
//                    (multiplier); output A0 and M0 once they are written.
//   opcode 9 "CMP" : fetch x, y; compare x < y; flag reaches the logical FIFO.
// Both are padded with no-operation words to cover the 9- and 15-stage
// latencies.  Random opcodes are queued; every output and flag is compared
// with double arithmetic done here, and the run time without stalls is
// checked against the microword count.
module tb_math_unit;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic op_push = 0, op_full;
  logic [5:0] op_in = '0;
  logic lut_we = 0, ram_we = 0, ram_hi = 0;
  logic [5:0] lut_addr = '0;
  logic [9:0] lut_wdata = '0, ram_addr = '0, upc;
  logic [31:0] ram_wdata = '0;
  logic in_push = 0;
  fp64_t in_data = '0, ar_data;
  logic [4:0] in_free;
  logic ar_pop, ar_empty, lg_pop, lg_data, lg_empty, idle, stall, cmp_push;
  int checks = 0, failures = 0;

  math_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic alu_uop_t nop();
    alu_uop_t u = '0;
    u.add_a = 4'd12; u.add_b = 4'd12; u.mul_a = 4'd12; u.mul_b = 4'd12;
    return u;
  endfunction

  alu_uop_t axpy [$];
  alu_uop_t cmpq [$];

  task automatic load_seq(logic [5:0] op, logic [9:0] base, alu_uop_t s [$]);
    for (int k = 0; k < s.size(); k++) begin
      automatic logic [37:0] w = {1'(k == s.size() - 1), s[k]};
      @(negedge clk); ram_we = 1; ram_addr = base + 10'(k); ram_hi = 0; ram_wdata = w[31:0];
      @(negedge clk); ram_hi = 1; ram_wdata = 32'(w[37:32]);
    end
    @(negedge clk); ram_we = 0; lut_we = 1; lut_addr = op; lut_wdata = base;
    @(negedge clk); lut_we = 0;
  endtask

  fp64_t feed_q [$];
  fp64_t exp_ar [$];
  logic  exp_lg [$];

  function automatic fp64_t rnd_fp();
    fp64_t v;
    v[63] = 1'($urandom); v[62:52] = 11'(1023 + $urandom_range(0, 20) - 10);
    v[51:0] = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  always @(negedge clk) begin
    in_push = 0;
    if (rst_n && feed_q.size() > 0 && in_free > 0) begin
      in_push = 1; in_data = feed_q.pop_front();
    end
  end
  assign ar_pop = !ar_empty;
  assign lg_pop = !lg_empty;
  always @(posedge clk) if (rst_n) begin
    if (ar_pop) begin
      checks++;
      if (exp_ar.size() == 0 || ar_data !== exp_ar.pop_front()) begin
        failures++; if (failures < 10) $display("arithmetic output %h wrong", ar_data);
      end
    end
    if (lg_pop) begin
      checks++;
      if (exp_lg.size() == 0 || lg_data !== exp_lg.pop_front()) begin
        failures++; $display("flag wrong");
      end
    end
  end

  int busy = 0;
  always @(posedge clk) if (!idle) busy++;

  initial begin
    alu_uop_t u;
    int nwords = 0, b0;
    // AXPY
    u = nop(); u.fetch = 1; u.fetch_idx = 0; axpy.push_back(u);
    u = nop(); u.fetch = 1; u.fetch_idx = 1; axpy.push_back(u);
    u = nop(); u.add_a = 0; u.add_a_k = KA_P2; u.add_b = 1; u.add_b_k = KB_PH;
    u.mul_a = 0; u.mul_b = 1; u.mul_k = KM_M1; axpy.push_back(u);
    for (int n = 0; n < 8; n++) axpy.push_back(nop());
    u = nop(); u.wa = 1; u.wa_idx = 0; axpy.push_back(u);
    for (int n = 0; n < 5; n++) axpy.push_back(nop());
    u = nop(); u.wm = 1; u.wm_idx = 0; u.out = 1; u.out_sel = 4; axpy.push_back(u);
    u = nop(); u.out = 1; u.out_sel = 8; axpy.push_back(u);
    // CMP
    u = nop(); u.fetch = 1; u.fetch_idx = 2; cmpq.push_back(u);
    u = nop(); u.fetch = 1; u.fetch_idx = 3; cmpq.push_back(u);
    u = nop(); u.cmp = 1; u.add_a = 2; u.add_b = 3; cmpq.push_back(u);
    for (int n = 0; n < 9; n++) cmpq.push_back(nop());

    repeat (2) @(posedge clk);
    rst_n = 1;
    load_seq(6'd5, 10'd40, axpy);
    load_seq(6'd9, 10'd300, cmpq);
    // timing check: two AXPY with data ready
    for (int k = 0; k < 2; k++) begin
      automatic fp64_t x = rnd_fp(), y = rnd_fp();
      feed_q.push_back(x); feed_q.push_back(y);
      exp_ar.push_back($realtobits(2.0 * $bitstoreal(x) + 0.5 * $bitstoreal(y)));
      exp_ar.push_back($realtobits(-($bitstoreal(x) * $bitstoreal(y))));
    end
    repeat (10) @(negedge clk);
    b0 = busy;
    @(negedge clk); op_push = 1; op_in = 6'd5;
    @(negedge clk); op_in = 6'd5;
    @(negedge clk); op_push = 0;
    repeat (60) @(negedge clk);
    checks++;
    // idle drops the cycle after the first push, one cycle before the first
    // microword; the two sequences then run back to back
    if (busy - b0 != 2 * axpy.size() + 1) begin
      failures++; $display("busy %0d cycles, expected %0d", busy - b0, 2 * axpy.size() + 1);
    end
    // random mix
    for (int n = 0; n < 200; n++) begin
      automatic fp64_t x = rnd_fp(), y = rnd_fp();
      feed_q.push_back(x); feed_q.push_back(y);
      while (op_full) @(negedge clk);
      @(negedge clk); op_push = 1;
      if ($urandom_range(0, 1)) begin
        op_in = 6'd5;
        exp_ar.push_back($realtobits(2.0 * $bitstoreal(x) + 0.5 * $bitstoreal(y)));
        exp_ar.push_back($realtobits(-($bitstoreal(x) * $bitstoreal(y))));
      end else begin
        op_in = 6'd9;
        exp_lg.push_back($bitstoreal(x) < $bitstoreal(y));
      end
      @(negedge clk); op_push = 0;
    end
    while (!idle) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_ar.size() != 0 || exp_lg.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
