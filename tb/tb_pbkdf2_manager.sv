// Testbench for pbkdf2_manager with N = 4 modelled PBKDF2 units whose busy
// time is random. Checks that passphrase n goes to unit n mod 4, that the
// manager waits on a busy scheduled unit instead of skipping it, that at
// most one start is issued per cycle and that a start pops the source.
module tb_pbkdf2_manager;
  import wpa_pkg::*;

  localparam int N = 4;

  logic clk = 0, rst_n = 0, start = 0, empty, rq_next;
  logic [BLK_W-1:0] data_i, data_o;
  logic [N-1:0] busy = '0, pstart;
  int checks = 0, failures = 0, waits_on_busy = 0;
  int busy_left [N];
  int sent = 0, taken = 0;
  localparam int TOTAL = 200;

  pbkdf2_manager #(.N_PBKDF2(N)) dut (.clk(clk), .rst_n(rst_n), .start_i(start),
    .empty_i(empty), .data_i(data_i), .rq_next_o(rq_next), .busy_i(busy),
    .start_o(pstart), .data_o(data_o));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // source: entry k carries k in its low bits; available at random
  assign data_i = BLK_W'(taken);
  logic avail = 0;
  assign empty = !(avail && taken < TOTAL);

  always @(posedge clk) if (rst_n) begin
    if (!empty && busy[taken % N] && !rq_next) waits_on_busy++;
    check($onehot0(pstart), "one start per cycle");
    check(rq_next == (pstart != '0), "pop with start");
    for (int u = 0; u < N; u++) begin
      if (pstart[u]) begin
        check(u == taken % N, $sformatf("entry %0d to unit %0d", taken, u));
        check(data_o == BLK_W'(taken), "dispatched data");
        check(!busy[u], "start only to an idle unit");
        busy[u] <= 1'b1;
        busy_left[u] = 5 + $urandom_range(40);
      end else if (busy[u]) begin
        busy_left[u]--;
        if (busy_left[u] == 0) busy[u] <= 1'b0;
      end
    end
    if (rq_next) taken++;
    avail <= ($urandom_range(3) != 0);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    start = 1;
    @(negedge clk);
    start = 0;
    wait (taken == TOTAL);
    repeat (5) @(negedge clk);
    check(waits_on_busy > 0, "manager waited on a busy unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
