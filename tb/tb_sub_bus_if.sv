// tb_sub_bus_if: drives the supervisor bus and checks the address decoding
// (microcode, LUT and program write strobes with their address fields), the
// cache host port with a randomly delayed grant, register reads, the run
// clock counter, and the go / step-done flag handshake with the Memory
// Managers.
module tb_sub_bus_if;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [19:0] bus_addr = '0;
  logic bus_wr = 0, bus_rd = 0, bus_rvalid, bus_wait;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic h_req, h_we, h_gnt = 0;
  logic [15:0] h_addr;
  logic [31:0] h_wdata, h_rdata = '0;
  logic [1:0] alu_lut_we, alu_ram_we, mm_lut_we, mm_ram_we;
  logic [5:0] lut_addr;
  logic [9:0] lut_wdata, ram_addr;
  logic ram_hi;
  logic [31:0] ram_wdata;
  logic prog_we, cu_start, cu_running = 0, cu_done = 1;
  logic [7:0] prog_addr;
  logic [31:0] prog_wdata, cu_cycles = 32'd12345;
  logic [1:0] step_done = '0, go_ack = '0, host_go;
  logic [1:0][15:0] swaps = '{16'd7, 16'd3};
  int checks = 0, failures = 0;

  sub_bus_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model cache: random grant, data = address pattern one cycle after grant
  logic [31:0] cache [int];
  always @(negedge clk) h_gnt = ($urandom_range(0, 2) == 0);
  always @(posedge clk) if (h_req && h_gnt) begin
    h_rdata <= cache.exists(int'(h_addr)) ? cache[int'(h_addr)] : 32'hFFFF_FFFF;
    if (h_we) cache[int'(h_addr)] = h_wdata;
  end

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [19:0] a, logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    #1;
    // strobes are combinational: check them while the write is on the bus
    case (a[19:16])
      4'h1, 4'h5: check(alu_ram_we == (a[19:16] == 4'h1 ? 2'b01 : 2'b10) && ram_addr == a[10:1] && ram_hi == a[0] && ram_wdata == d, "ALU microcode strobe");
      4'h2, 4'h6: check(alu_lut_we == (a[19:16] == 4'h2 ? 2'b01 : 2'b10) && lut_addr == a[5:0] && lut_wdata == d[9:0], "ALU LUT strobe");
      4'h3, 4'h7: check(mm_ram_we == (a[19:16] == 4'h3 ? 2'b01 : 2'b10), "MM microcode strobe");
      4'h4, 4'h8: check(mm_lut_we == (a[19:16] == 4'h4 ? 2'b01 : 2'b10), "MM LUT strobe");
      4'h9:       check(prog_we && prog_addr == a[7:0] && prog_wdata == d, "program strobe");
      default: ;
    endcase
    if (a[19:16] != 4'h0) check((alu_ram_we | alu_lut_we | mm_ram_we | mm_lut_we) == 0 || a[19:16] inside {[4'h1:4'h8]}, "stray strobe");
    @(posedge clk);
    while (bus_wait) @(posedge clk);
    @(negedge clk); bus_wr = 0;
  endtask

  task automatic rd(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(posedge clk);
    while (bus_wait) @(posedge clk);
    @(negedge clk); bus_rd = 0;
    while (!bus_rvalid) @(negedge clk);
    d = bus_rdata;
  endtask

  initial begin
    logic [31:0] r;
    int starts = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      automatic logic [19:0] a = {4'($urandom_range(1, 9)), 16'($urandom)};
      wr(a, $urandom);
    end
    // caches
    for (int i = 0; i < 50; i++) wr({4'h0, 16'(i * 37)}, 32'(i * 1001));
    for (int i = 0; i < 50; i++) begin
      rd({4'h0, 16'(i * 37)}, r);
      check(r == 32'(i * 1001), "cache read back");
    end
    // registers
    rd(20'hA0000, r); check(r[1:0] == 2'b10, "status");
    rd(20'hA0001, r); check(r == 32'd12345, "cycle counter");
    rd(20'hA0004, r); check(r == {16'd7, 16'd3}, "swap counters");
    // start pulse
    fork
      begin wr(20'hA0000, 32'd1); end
      begin repeat (3) @(posedge clk) if (cu_start) starts++; end
    join
    check(starts == 1, "start pulse");
    // run clock counter: counts the cycles the Control Unit runs, cleared by start
    @(negedge clk); cu_running = 1;
    repeat (37) @(negedge clk);
    cu_running = 0;
    rd(20'hA0005, r); check(r == 32'd37, "run clock counter");
    wr(20'hA0000, 32'd1);
    rd(20'hA0005, r); check(r == 32'd0, "run clock counter cleared by start");
    // step-done flags: set by the Memory Managers, cleared by the supervisor
    @(negedge clk); step_done = 2'b10;
    @(negedge clk); step_done = 2'b00;
    rd(20'hA0003, r); check(r[1:0] == 2'b10, "step flag set");
    wr(20'hA0003, 32'd2);
    rd(20'hA0003, r); check(r[1:0] == 2'b00, "step flag cleared");
    // go flags: set by the supervisor, taken by the Memory Managers
    wr(20'hA0002, 32'd3);
    check(host_go == 2'b11, "go set");
    @(negedge clk); go_ack = 2'b01;
    @(negedge clk); go_ack = 2'b00;
    check(host_go == 2'b10, "go taken");
    rd(20'hA0002, r); check(r[1:0] == 2'b10, "go readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
