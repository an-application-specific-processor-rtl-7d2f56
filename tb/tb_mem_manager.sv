// tb_mem_manager: loads Memory Manager microcode, runs it against a model
// cache with random grant delays and a Math Unit FIFO model with random room,
// and checks every granted access (address, direction, write data), the data
// pushed to the Math Unit, the bank map set by GVC, the step-done pulse and
// the wait for the host's go.  Expected addresses are computed here from the
// lattice formula with cyclic wrap-around.
module tb_mem_manager;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic op_push = 0, op_full;
  logic [5:0] op_in = '0;
  logic lut_we = 0, ram_we = 0, ram_hi = 0;
  logic [5:0] lut_addr = '0;
  logic [9:0] lut_wdata = '0, ram_addr = '0, upc;
  logic [31:0] ram_wdata = '0;
  logic c_req, c_we, c_gnt = 0;
  logic [14:0] c_addr;
  fp64_t c_wdata, c_rdata = '0, alu_wdata, alu_ar_data;
  logic [4:0] alu_in_free = 5'd16;
  logic alu_push, alu_ar_empty, alu_ar_pop;
  logic [7:0] bank_map;
  logic step_done, host_go = 0, go_ack, idle, stall;
  int checks = 0, failures = 0;

  mem_manager dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t pattern(logic [14:0] a);
    return {17'h1ABCD, 32'hDEAD_0000, a};
  endfunction

  // ------------------------------------------------ expected traffic
  typedef struct { logic we; logic [14:0] addr; } acc_t;
  acc_t  exp_acc [$];
  fp64_t exp_push [$];
  fp64_t ar_q [$];         // Math Unit results waiting to be written
  fp64_t ar_sent [$];      // the same, in the order they must be written

  assign alu_ar_empty = (ar_q.size() == 0);
  assign alu_ar_data  = alu_ar_empty ? '0 : ar_q[0];

  // model cache: random grant, data one cycle later
  always @(negedge clk) c_gnt = ($urandom_range(0, 2) != 0);
  always @(negedge clk) alu_in_free = 5'($urandom_range(0, 3));
  always @(posedge clk) if (rst_n) begin
    c_rdata <= pattern(c_addr);
    if (alu_ar_pop) void'(ar_q.pop_front());
    if (c_req && c_gnt) begin
      checks++;
      if (exp_acc.size() == 0) begin failures++; $display("unexpected access"); end
      else begin
        automatic acc_t e = exp_acc.pop_front();
        if (e.we !== c_we || e.addr !== c_addr) begin
          failures++;
          if (failures < 10) $display("access we=%b addr=%0d, expected we=%b addr=%0d", c_we, c_addr, e.we, e.addr);
        end
        if (c_we) begin
          checks++;
          if (c_wdata !== ar_sent.pop_front()) begin failures++; $display("write data wrong"); end
        end
      end
    end
    if (alu_push) begin
      checks++;
      if (exp_push.size() == 0 || alu_wdata !== exp_push.pop_front()) begin
        failures++; $display("read data to Math Unit wrong");
      end
    end
  end

  int done_pulses = 0, acks = 0, rd_stalls = 0;
  always @(posedge clk) begin
    if (step_done) done_pulses++;
    if (go_ack) acks++;
    if (stall && !c_req) rd_stalls++;   // waiting for room in the Math Unit FIFO
  end

  // ------------------------------------------------ microcode building
  int dims [3] = '{5, 4, 3};
  int pmod [4][3];

  function automatic int wrapi(int p, int d, int n);
    return ((p + d) % n + n) % n;
  endfunction

  function automatic logic [1:0] enc(int d); return 2'(d); endfunction

  task automatic load_seq(logic [5:0] op, logic [9:0] base, logic [33:0] s [$]);
    for (int k = 0; k < s.size(); k++) begin
      automatic logic [34:0] w = {1'(k == s.size() - 1), s[k]};
      @(negedge clk); ram_we = 1; ram_addr = base + 10'(k); ram_hi = 0; ram_wdata = w[31:0];
      @(negedge clk); ram_hi = 1; ram_wdata = 32'(w[34:32]);
    end
    @(negedge clk); ram_we = 0; lut_we = 1; lut_addr = op; lut_wdata = base;
    @(negedge clk); lut_we = 0;
  endtask

  task automatic queue_op(logic [5:0] op);
    while (op_full) @(negedge clk);
    @(negedge clk); op_push = 1; op_in = op;
    @(negedge clk); op_push = 0;
  endtask

  initial begin
    logic [33:0] s_init [$];
    logic [33:0] s_rand [$];
    logic [33:0] s_wait [$];
    mm_uop_t u;
    logic [33:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // INIT 5x4x3 ; GVC map 0x1B, load, signal
    w = '0; w[33:32] = MM_CTL; w[17:0] = {6'd5, 6'd4, 6'd3}; s_init.push_back(w);
    w = '0; w[33:32] = MM_CTL; w[31] = 1; w[7:0] = 8'h1B; w[8] = 1; w[9] = 1; s_init.push_back(w);
    // GVC wait for host
    w = '0; w[33:32] = MM_CTL; w[31] = 1; w[10] = 1; s_wait.push_back(w);
    // random R/W/NOP with pointer modifications
    for (int k = 0; k < 400; k++) begin
      int dx, dy, dz, wx, wy, wz, lin;
      u = '0;
      u.op  = mm_op_e'($urandom_range(0, 2));
      u.ptr = 2'($urandom_range(0, 3));
      dx = $urandom_range(0, 3) - 2; dy = $urandom_range(0, 3) - 2; dz = $urandom_range(0, 3) - 2;
      u.dx = enc(dx); u.dy = enc(dy); u.dz = enc(dz);
      u.mat = 1'($urandom); u.comp = 2'($urandom);
      wx = wrapi(pmod[u.ptr][0], dx, dims[0]);
      wy = wrapi(pmod[u.ptr][1], dy, dims[1]);
      wz = wrapi(pmod[u.ptr][2], dz, dims[2]);
      lin = ((((u.mat * dims[2] + wz) * dims[1] + wy) * dims[0] + wx) * 4) + u.comp;
      if (u.op == MM_RD) begin
        exp_acc.push_back('{1'b0, 15'(lin)});
        exp_push.push_back(pattern(15'(lin)));
      end else if (u.op == MM_WR) begin
        automatic fp64_t v = {$urandom, $urandom};
        exp_acc.push_back('{1'b1, 15'(lin)});
        ar_q.push_back(v); ar_sent.push_back(v);
      end
      if ($urandom_range(0, 2) == 0) begin
        int nx = $urandom_range(0, dims[0]-1), ny = $urandom_range(0, dims[1]-1), nz = $urandom_range(0, dims[2]-1);
        u.pm_en = 1; u.pm_ptr = 2'($urandom);
        u.pm_val = {6'(nx), 6'(ny), 6'(nz)};
        pmod[u.pm_ptr] = '{nx, ny, nz};
      end
      s_rand.push_back(u);
    end
    load_seq(6'd1, 10'd0, s_init);
    load_seq(6'd2, 10'd10, s_wait);
    load_seq(6'd3, 10'd100, s_rand);
    queue_op(6'd1);
    queue_op(6'd2);
    queue_op(6'd3);
    repeat (30) @(negedge clk);
    checks++;
    if (bank_map !== 8'h1B || done_pulses != 1) begin failures++; $display("GVC map %h pulses %0d", bank_map, done_pulses); end
    checks++;
    if (idle || acks != 0) begin
      failures++; $display("did not wait for the host");
    end
    host_go = 1;
    @(negedge clk); host_go = 0;
    while (!idle) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (acks != 1) begin failures++; $display("go acknowledged %0d times", acks); end
    checks++;
    if (exp_acc.size() != 0 || exp_push.size() != 0) begin
      failures++; $display("%0d accesses / %0d reads missing", exp_acc.size(), exp_push.size());
    end
    checks++;
    if (rd_stalls == 0) begin failures++; $display("no read stall on a full Math Unit FIFO"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
