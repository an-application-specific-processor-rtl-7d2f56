// tb_cache_mem: three requesters (two accelerators, host) issue random reads
// and writes to the four banks, often to the same bank.  The test checks the
// fixed priority (accelerator 1, accelerator 2, host), that losers wait, and
// every read value against a model memory updated in grant order, including
// 32-bit host writes into one half of a 64-bit word.
module tb_cache_mem;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned OW = 6;
  logic clk = 0, rst_n = 0;
  logic [1:0] a_req = '0, a_we = '0, a_gnt;
  logic [1:0][1:0] a_bank = '0;
  logic [1:0][OW-1:0] a_off = '0;
  logic [1:0][63:0] a_wdata = '0, a_rdata;
  logic h_req = 0, h_we = 0, h_gnt;
  logic [OW+2:0] h_addr = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  int checks = 0, failures = 0, conflicts = 0;

  cache_mem #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] model [4][DEPTH];
  logic [63:0] a_exp [2];
  logic        a_chk [2];
  logic [31:0] h_exp;
  logic        h_chk;

  initial begin
    for (int b = 0; b < 4; b++) for (int i = 0; i < DEPTH; i++) model[b][i] = '0;
    a_chk = '{0, 0}; h_chk = 0;
    repeat (2) @(posedge clk);
    // clear the banks through the host port
    rst_n = 1;
    for (int b = 0; b < 4; b++) for (int i = 0; i < 2*DEPTH; i++) begin
      @(negedge clk); h_req = 1; h_we = 1; h_addr = {2'(b), 7'(i)}; h_wdata = '0;
    end
    @(negedge clk); h_req = 0;
    for (int n = 0; n < 5000; n++) begin
      logic [1:0] bank_x, bank_y, bank_h;
      @(negedge clk);
      // checks of last cycle's reads
      for (int p = 0; p < 2; p++) if (a_chk[p]) begin
        checks++;
        if (a_rdata[p] !== a_exp[p]) begin failures++; if (failures < 10) $display("acc%0d read %h exp %h", p, a_rdata[p], a_exp[p]); end
      end
      if (h_chk) begin
        checks++;
        if (h_rdata !== h_exp) begin failures++; if (failures < 10) $display("host read %h exp %h", h_rdata, h_exp); end
      end
      bank_x = 2'($urandom_range(0, 1)); bank_y = 2'($urandom_range(0, 2)); bank_h = 2'($urandom_range(0, 3));
      a_req = 2'($urandom); a_we = 2'($urandom);
      a_bank[0] = bank_x; a_bank[1] = bank_y;
      a_off[0] = OW'($urandom); a_off[1] = OW'($urandom);
      a_wdata[0] = {$urandom, $urandom}; a_wdata[1] = {$urandom, $urandom};
      h_req = 1'($urandom); h_we = 1'($urandom);
      h_addr = {bank_h, 7'($urandom)}; h_wdata = $urandom;
      #1;
      // expected grants
      begin
        logic g0, g1, gh;
        g0 = a_req[0];
        g1 = a_req[1] && !(g0 && a_bank[1] == a_bank[0]);
        gh = h_req && !(g0 && a_bank[0] == bank_h) && !(g1 && a_bank[1] == bank_h);
        if ((a_req[1] && !g1) || (h_req && !gh)) conflicts++;
        checks++;
        if (a_gnt !== {g1, g0} || h_gnt !== gh) begin
          failures++; if (failures < 10) $display("grant %b/%b expected %b%b/%b", a_gnt, h_gnt, g1, g0, gh);
        end
        // model update in read-before-write order
        a_chk[0] = g0 && !a_we[0]; a_chk[1] = g1 && !a_we[1]; h_chk = gh && !h_we;
        if (a_chk[0]) a_exp[0] = model[a_bank[0]][a_off[0]];
        if (a_chk[1]) a_exp[1] = model[a_bank[1]][a_off[1]];
        if (h_chk)    h_exp = h_addr[0] ? model[bank_h][h_addr[OW:1]][63:32] : model[bank_h][h_addr[OW:1]][31:0];
        if (g0 && a_we[0]) model[a_bank[0]][a_off[0]] = a_wdata[0];
        if (g1 && a_we[1]) model[a_bank[1]][a_off[1]] = a_wdata[1];
        if (gh && h_we) begin
          if (h_addr[0]) model[bank_h][h_addr[OW:1]][63:32] = h_wdata;
          else           model[bank_h][h_addr[OW:1]][31:0]  = h_wdata;
        end
      end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("no bank conflict happened"); end
    $display("conflicts %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
