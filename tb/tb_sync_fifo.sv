// Testbench for sync_fifo: random pushes and pops (never overflowing or
// underflowing) checked against a queue model, including simultaneous push
// and pop, full and empty flags and the occupancy count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, empty, full;
  logic [63:0] din = '0, dout;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [63:0] model[$];
  int saw_full = 0;

  sync_fifo #(.WIDTH(64), .DEPTH(16)) dut (.clk(clk), .rst_n(rst_n), .push_i(push),
    .din_i(din), .pop_i(pop), .dout_o(dout), .empty_o(empty), .full_o(full), .count_o(count));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == 16), "full flag");
      check(count == 5'(model.size()), "count");
      if (model.size() > 0) check(dout == model[0], "head word");
      if (full) saw_full++;
      // bias towards filling in the first half and draining in the second
      push = (model.size() < 16 || pop) && ($urandom_range(99) < ((n / 500) % 2 ? 35 : 70));
      pop  = (model.size() > 0) && ($urandom_range(99) < ((n / 500) % 2 ? 70 : 35));
      if (push && model.size() == 16 && !pop) push = 0;
      din = {$urandom, $urandom};
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
      #1;
      push = 0; pop = 0;
    end
    check(saw_full > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
