// tb_ucode_seq: loads a microprogram of several sequences of different
// lengths, queues random opcodes and checks the emitted microword stream
// against the expected expansion, with random stalls from the consumer.  A
// first phase without stalls checks the cycle count: an opcode pushed at t
// yields its first word at t+2 and queued sequences follow without a gap.
module tb_ucode_seq;
  import mc_pkg::*;
  localparam int unsigned W = 37;
  localparam int unsigned NSEQ = 6;

  logic clk = 0, rst_n = 0;
  logic op_push = 0, op_full;
  logic [5:0] op_in = '0;
  logic lut_we = 0, ram_we = 0, ram_hi = 0;
  logic [5:0] lut_addr = '0;
  logic [9:0] lut_wdata = '0, ram_addr = '0, upc;
  logic [31:0] ram_wdata = '0;
  logic [W-1:0] uop;
  logic uop_valid, uop_ready = 1, seq_start, idle;
  int checks = 0, failures = 0;

  ucode_seq #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          seq_len  [NSEQ] = '{1, 3, 5, 2, 8, 4};
  logic [9:0]  seq_base [NSEQ];
  logic [5:0]  seq_op   [NSEQ] = '{6'd0, 6'd7, 6'd13, 6'd40, 6'd63, 6'd21};
  logic [W-1:0] expect_q [$];

  function automatic logic [W-1:0] word_of(int s, int k);
    return W'({s[7:0], k[7:0]}) ^ W'(37'h1_2345_6789) ^ (W'(s) << 30);
  endfunction

  task automatic write_word(logic [9:0] addr, logic [W:0] w);
    @(negedge clk); ram_we = 1; ram_addr = addr; ram_hi = 0; ram_wdata = w[31:0];
    @(negedge clk); ram_hi = 1; ram_wdata = 32'(w[W:32]);
    @(negedge clk); ram_we = 0;
  endtask

  task automatic queue_op(int s);
    @(negedge clk); op_push = 1; op_in = seq_op[s];
    for (int k = 0; k < seq_len[s]; k++) expect_q.push_back(word_of(s, k));
    @(negedge clk); op_push = 0;
  endtask

  // cycle count of the no-stall phase
  logic phase1 = 0;
  int   busy_cnt = 0, first_word_cycle = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (phase1 && uop_valid) begin
      busy_cnt <= busy_cnt + 1;
      if (first_word_cycle < 0) first_word_cycle <= cyc;
    end
  end

  // checker
  always @(posedge clk) if (rst_n && uop_valid && uop_ready) begin
    checks++;
    if (expect_q.size() == 0) begin
      failures++; $display("unexpected microword %h", uop);
    end else begin
      automatic logic [W-1:0] e = expect_q.pop_front();
      if (uop !== e) begin
        failures++;
        if (failures < 10) $display("microword %h expected %h (pc %0d)", uop, e, upc);
      end
    end
  end

  initial begin
    int base = 100;
    int t0, busy;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSEQ; s++) begin
      seq_base[s] = 10'(base);
      for (int k = 0; k < seq_len[s]; k++)
        write_word(10'(base + k), {1'(k == seq_len[s]-1), word_of(s, k)});
      @(negedge clk); lut_we = 1; lut_addr = seq_op[s]; lut_wdata = seq_base[s];
      @(negedge clk); lut_we = 0;
      base += seq_len[s] + 7;
    end
    // phase 1: timing, no stalls. Push three opcodes back to back.
    @(negedge clk); op_push = 1; op_in = seq_op[1]; phase1 = 1; t0 = cyc;
    for (int k = 0; k < seq_len[1]; k++) expect_q.push_back(word_of(1, k));
    @(negedge clk); op_in = seq_op[4];
    for (int k = 0; k < seq_len[4]; k++) expect_q.push_back(word_of(4, k));
    @(negedge clk); op_in = seq_op[0];
    expect_q.push_back(word_of(0, 0));
    @(negedge clk); op_push = 0;
    // first word appears 2 cycles after the first push; words then come every cycle
    repeat (30) @(negedge clk);
    phase1 = 0;
    busy = busy_cnt;
    checks++;
    if (first_word_cycle != t0 + 2) begin
      failures++; $display("first word at cycle %0d, expected %0d", first_word_cycle, t0 + 2);
    end
    checks++;
    if (busy != seq_len[1] + seq_len[4] + 1) begin
      failures++; $display("busy cycles %0d, expected %0d", busy, seq_len[1] + seq_len[4] + 1);
    end
    checks++;
    if (!idle) begin failures++; $display("not idle after draining"); end
    // phase 2: random opcodes, random stalls
    fork
      begin
        for (int n = 0; n < 300; n++) begin
          while (op_full) @(negedge clk);
          queue_op($urandom_range(0, NSEQ-1));
        end
      end
      begin
        for (int c = 0; c < 4000; c++) begin
          @(negedge clk); uop_ready = ($urandom_range(0, 3) != 0);
        end
      end
    join
    @(negedge clk); uop_ready = 1;
    repeat (50) @(negedge clk);
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("%0d words never emitted", expect_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
