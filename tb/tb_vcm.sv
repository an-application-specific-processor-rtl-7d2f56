// tb_vcm: random bank maps and virtual addresses; checks the physical bank,
// offset, pass-through of the handshake and the count of map changes.
module tb_vcm;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] bank_map = 8'b11_10_01_00;
  logic v_req = 0, v_we = 0, v_gnt, p_req, p_we, p_gnt = 0;
  logic [14:0] v_addr = '0;
  fp64_t v_wdata = '0, v_rdata, p_wdata, p_rdata = '0;
  logic [1:0] p_bank;
  logic [12:0] p_off;
  logic [15:0] swaps;
  int checks = 0, failures = 0, changes = 0;

  vcm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = bank_map;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) begin
        // a permutation: swap two entries of the current map
        automatic int x = $urandom_range(0, 3), y = $urandom_range(0, 3);
        automatic logic [1:0] t = bank_map[2*x +: 2];
        bank_map[2*x +: 2] = bank_map[2*y +: 2];
        bank_map[2*y +: 2] = t;
      end
      v_addr = 15'($urandom); v_req = 1'($urandom); v_we = 1'($urandom);
      v_wdata = {$urandom, $urandom}; p_rdata = {$urandom, $urandom}; p_gnt = 1'($urandom);
      #1;
      checks++;
      if (p_bank !== bank_map[2*v_addr[14:13] +: 2] || p_off !== v_addr[12:0] ||
          p_req !== v_req || p_we !== v_we || p_wdata !== v_wdata ||
          v_gnt !== p_gnt || v_rdata !== p_rdata) begin
        failures++;
        if (failures < 10) $display("translation wrong: addr %h map %h bank %0d", v_addr, bank_map, p_bank);
      end
      if (bank_map != prev) changes++;
      prev = bank_map;
    end
    @(negedge clk);
    checks++;
    if (swaps != 16'(changes)) begin failures++; $display("swaps %0d expected %0d", swaps, changes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
