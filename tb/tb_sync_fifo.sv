// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, full/empty flags and fill level every cycle.
module tb_sync_fifo;
  localparam int unsigned W = 16, D = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count, free;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      // bias: fill phases and drain phases so both flags are reached
      automatic int bias = ((i / 200) % 2 == 0) ? 3 : 1;
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == D) ||
          count !== model.size() || free !== D - model.size() ||
          (model.size() > 0 && rdata !== model[0])) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: count %0d model %0d", i, count, model.size());
      end
      push  = ($urandom_range(0, 3) < bias) && (model.size() < D);
      pop   = ($urandom_range(0, 3) >= bias) && (model.size() > 0);
      wdata = W'($urandom);
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
