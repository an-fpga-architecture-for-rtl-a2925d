// Testbench for passphrase_manager with the memory model. A dictionary of
// random passphrases is placed in memory (one 64-byte record per entry) and
// read back through the manager; the consumer pops at random times, and for
// a while not at all so the FIFOs fill and requests must stop. Checks every
// passphrase in order, the request count never exceeding the dictionary
// size, the back-pressure limit, done, and a second run with a new start.
module tb_passphrase_manager;
  import wpa_pkg::*;
  import sha1_ref_pkg::*;

  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0, start = 0, rq_next = 0;
  logic [ADDR_W-1:0] dict_addr = '0;
  logic [CNT_W-1:0]  dict_size = '0;
  logic [7:0] rq_ld, rvalid;
  logic [7:0][ADDR_W-1:0] raddr;
  logic [7:0][63:0] rdata;
  logic empty, valid, done;
  logic [511:0] data;
  int checks = 0, failures = 0;
  int requests = 0, max_outstanding = 0, popped = 0, full_stops = 0;

  passphrase_manager dut (.clk(clk), .rst_n(rst_n), .start_i(start),
    .dict_addr_i(dict_addr), .dict_size_i(dict_size), .rd_rq_ld_o(rq_ld),
    .rd_addr_o(raddr), .rd_valid_i(rvalid), .rd_data_i(rdata), .empty_o(empty),
    .data_o(data), .valid_o(valid), .done_o(done), .rq_next_i(rq_next));

  mc_mem_model u_mem (.clk(clk), .rst_n(rst_n), .force_stall_i(1'b0),
    .rd_rq_ld_i(rq_ld), .rd_addr_i(raddr), .rd_valid_o(rvalid), .rd_data_o(rdata),
    .wr_rq_st_i('0), .wr_addr_i('0), .wr_data_i('0), .wr_flush_i('0),
    .wr_fsh_cmp_o(), .wr_rq_next_o());

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  always @(posedge clk) if (rst_n && !start) begin
    if (rq_ld[0]) begin
      requests++;
      check(rq_ld == 8'hff, "all eight ports request together");
      for (int j = 0; j < 8; j++)
        check(raddr[j] == dict_addr + 48'(64 * (requests - 1) + 8 * j), "request address");
      if (requests - popped == DEPTH) full_stops++;
    end
    if (requests - popped > max_outstanding) max_outstanding = requests - popped;
  end

  // Store a string as a 64-byte record, little-endian words.
  task automatic put(input logic [47:0] base, input int n, input bq_t s);
    for (int w = 0; w < 8; w++) begin
      logic [63:0] v = '0;
      for (int b = 0; b < 8; b++)
        if (8 * w + b < s.size()) v[8*b +: 8] = s[8 * w + b];
      u_mem.mem[(base + 48'(64 * n + 8 * w)) >> 3] = v;
    end
  endtask

  task automatic run(input logic [47:0] base, input int n);
    bq_t dict [$];
    int got = 0;
    for (int i = 0; i < n; i++) begin
      dict.push_back(rand_str(8, 63));
      put(base, i, dict[i]);
    end
    @(negedge clk);
    dict_addr = base;
    dict_size = CNT_W'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    requests = 0;
    popped = 0;
    while (got < n) begin
      // stall the consumer for a long stretch in the middle
      rq_next = !empty && !(got >= 5 && got < 6 && ($urandom_range(400) != 0))
                && ($urandom_range(3) != 0);
      if (rq_next) begin
        check(valid, "valid with data");
        check(data == q2key(dict[got]), $sformatf("passphrase %0d", got));
        got++;
        popped++;
      end
      @(negedge clk);
      rq_next = 0;
    end
    repeat (60) @(negedge clk);
    check(requests == n, $sformatf("exactly %0d requests (%0d)", n, requests));
    check(empty && done, "empty and done at the end");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(48'h1000, 60);
    check(max_outstanding == DEPTH && full_stops > 0, "requests stopped at FIFO capacity");
    run(48'h80000, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
