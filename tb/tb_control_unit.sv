// tb_control_unit: loads a small program with a counted loop of IST + WAIT,
// a JCMP branch on a comparison flag, performance counting and HALT, and runs
// it twice (flag false, then true).  Model sequencers stay busy for a random
// time after each opcode and report full at random; the test checks the
// opcodes pushed, that IST waits for full queues and WAIT for busy units, the
// branch taken, the cycle counter against the measured time, and the
// interrupt pulse.
module tb_control_unit;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0, start = 0, running, done, irq;
  logic [7:0] prog_addr = '0, pc;
  logic [31:0] prog_wdata = '0, cycles;
  logic [3:0] u_push, u_full = '0, u_idle;
  logic [3:0][5:0] u_op;
  logic [1:0] lg_empty, lg_data, lg_pop;
  int checks = 0, failures = 0;

  control_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model units
  int busy [4] = '{0, 0, 0, 0};
  typedef struct { int unit; logic [5:0] op; } push_t;
  push_t got [$];
  int full_waits = 0, busy_waits = 0;
  always_comb for (int j = 0; j < 4; j++) u_idle[j] = (busy[j] == 0);
  always @(posedge clk) begin
    for (int j = 0; j < 4; j++) begin
      if (u_push[j]) begin
        if (u_full[j]) begin failures++; $display("push into a full queue"); end
        got.push_back('{j, u_op[j]});
        busy[j] <= $urandom_range(3, 12);
      end else if (busy[j] > 0) busy[j] <= busy[j] - 1;
    end
    if (running && pc == 8'd2 && u_push == 0) full_waits++;
    if (running && pc == 8'd3 && (u_idle & 4'b1001) != 4'b1001) busy_waits++;
  end
  always @(negedge clk) u_full = 4'($urandom_range(0, 15)) & 4'($urandom_range(0, 15));

  // model logical FIFO of ALU1: one flag, ready after a delay
  logic flag_val = 0, flag_there = 0;
  assign lg_empty = {1'b1, !flag_there};
  assign lg_data  = {1'b0, flag_val};
  always @(posedge clk) if (lg_pop[0]) flag_there <= 0;
  always @(posedge clk) if (lg_pop[1]) begin failures++; $display("ALU2 flag popped"); end

  function automatic logic [31:0] ist(int a1, int m1, int a2, int m2);
    logic [6:0] f [4];
    f[0] = (a1 < 0) ? 7'd0 : {1'b1, 6'(a1)};
    f[1] = (m1 < 0) ? 7'd0 : {1'b1, 6'(m1)};
    f[2] = (a2 < 0) ? 7'd0 : {1'b1, 6'(a2)};
    f[3] = (m2 < 0) ? 7'd0 : {1'b1, 6'(m2)};
    return {CU_IST, f[3], f[2], f[1], f[0]};
  endfunction

  logic [31:0] prog_img [11];
  int irqs = 0;
  always @(posedge clk) if (irq) irqs++;

  int t_run, t_stop;
  logic [7:0] pc_q = '0;
  always @(posedge clk) begin
    // the edge that moves pc off an instruction is the one that executes it
    #1;
    if (pc_q == 8'd0 && pc == 8'd1)  t_run  = $time - 1;
    if (pc_q == 8'd9 && pc == 8'd10) t_stop = $time - 1;
    pc_q = pc;
  end

  initial begin
    prog_img[0]  = {CU_PCNT, 28'd3};
    prog_img[1]  = {CU_LDC, 2'b00, 2'd0, 8'd0, 16'd3};
    prog_img[2]  = ist(5, -1, -1, 9);
    prog_img[3]  = {CU_WAIT, 24'd0, 4'b1001};
    prog_img[4]  = {CU_DJNZ, 2'b00, 2'd0, 16'd0, 8'd2};
    prog_img[5]  = {CU_JCMP, 3'b000, 1'b0, 16'd0, 8'd8};
    prog_img[6]  = ist(-1, -1, 7, -1);
    prog_img[7]  = {CU_JMP, 20'd0, 8'd9};
    prog_img[8]  = ist(-1, 11, -1, -1);
    prog_img[9]  = {CU_PCNT, 28'd0};
    prog_img[10] = {CU_HALT, 28'd0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 11; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = prog_img[i];
    end
    @(negedge clk); prog_we = 0;
    for (int run = 0; run < 2; run++) begin
      got.delete();
      flag_val = 1'(run);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      repeat (40) @(negedge clk);
      flag_there = 1;
      while (!done) @(negedge clk);
      // expected pushes
      checks++;
      if (got.size() != 7) begin failures++; $display("%0d opcodes pushed, expected 7", got.size()); end
      else begin
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (got[2*k].unit != 0 || got[2*k].op != 5 || got[2*k+1].unit != 3 || got[2*k+1].op != 9) begin
            failures++; $display("loop push %0d wrong", k);
          end
        end
        checks++;
        if (run == 0 ? (got[6].unit != 2 || got[6].op != 7) : (got[6].unit != 1 || got[6].op != 11)) begin
          failures++; $display("branch on flag %0d wrong: unit %0d op %0d", run, got[6].unit, got[6].op);
        end
      end
      checks++;
      if (cycles != 32'((t_stop - t_run) / 10)) begin
        failures++; $display("cycle counter %0d, measured %0d", cycles, (t_stop - t_run) / 10);
      end
    end
    checks++;
    if (irqs != 2) begin failures++; $display("%0d interrupts", irqs); end
    checks++;
    if (full_waits == 0 || busy_waits == 0) begin failures++; $display("waits not exercised %0d %0d", full_waits, busy_waits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
