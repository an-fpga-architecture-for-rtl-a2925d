// Testbench for result_manager with N = 3 modelled PBKDF2 units and the
// memory model. Unit u produces the PMKs of entries u, u+3, ... (each a
// random 256-bit value) after random delays and holds each until it is
// acknowledged. Checks that every PMK lands at its entry's address in
// dictionary order with the right byte order, that writes halt while any
// write port stalls (random stalls and one long forced stall), the complete
// count, the flush at the end and busy.
module tb_result_manager;
  import wpa_pkg::*;

  localparam int N = 3;
  localparam int TOTAL = 40;
  localparam logic [47:0] BASE = 48'h20000;

  logic clk = 0, rst_n = 0, start = 0, force_stall = 0;
  logic [N-1:0] valid = '0, ack;
  logic [N-1:0][PMK_W-1:0] result;
  logic [3:0] rq_st, flush, fsh_cmp, rq_next;
  logic [3:0][47:0] addr;
  logic [3:0][63:0] wdata;
  logic [CNT_W-1:0] count;
  logic busy;
  int checks = 0, failures = 0, stalled_waits = 0, flushes = 0;
  logic [255:0] pmk [TOTAL];
  int next_entry [N];
  int delay [N];

  result_manager #(.N_PBKDF2(N)) dut (.clk(clk), .rst_n(rst_n), .start_i(start),
    .pmk_addr_i(BASE), .dict_size_i(CNT_W'(TOTAL)), .valid_i(valid), .result_i(result),
    .ack_o(ack), .wr_rq_st_o(rq_st), .wr_addr_o(addr), .wr_data_o(wdata),
    .wr_flush_o(flush), .wr_fsh_cmp_i(fsh_cmp), .wr_rq_next_i(rq_next),
    .complete_count_o(count), .busy_o(busy));

  mc_mem_model #(.STALL_PCT(15)) u_mem (.clk(clk), .rst_n(rst_n), .force_stall_i(force_stall),
    .rd_rq_ld_i('0), .rd_addr_i('0), .rd_valid_o(), .rd_data_o(),
    .wr_rq_st_i(rq_st), .wr_addr_i(addr), .wr_data_i(wdata), .wr_flush_i(flush),
    .wr_fsh_cmp_o(fsh_cmp), .wr_rq_next_o(rq_next));

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

  // modelled PBKDF2 units
  always @(posedge clk) if (rst_n && !start) begin
    if (valid != '0 && !(&rq_next)) stalled_waits++;
    if (rq_st != '0) check(&rq_next, "no store during a stall");
    if (flush != '0) flushes++;
    for (int u = 0; u < N; u++) begin
      if (ack[u]) begin
        check(valid[u], "ack only to a valid unit");
        valid[u] <= 1'b0;
        next_entry[u] += N;
        delay[u] = $urandom_range(30);
      end else if (!valid[u] && next_entry[u] < TOTAL) begin
        if (delay[u] == 0) begin
          valid[u]  <= 1'b1;
          result[u] <= pmk[next_entry[u]];
        end else delay[u]--;
      end
    end
  end

  initial begin
    for (int i = 0; i < TOTAL; i++) pmk[i] = {$urandom, $urandom, $urandom, $urandom,
                                              $urandom, $urandom, $urandom, $urandom};
    for (int u = 0; u < N; u++) begin next_entry[u] = u; delay[u] = u; end
    result = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    wait (count == 10);
    @(negedge clk);
    force_stall = 1;                      // long stall on every write port
    repeat (100) @(negedge clk);
    check(count == 10 || count == 11, "no progress while stalled");
    force_stall = 0;
    wait (!busy);
    check(count == CNT_W'(TOTAL), "complete count");
    check(u_mem.store_errors == 0, "stores respected the stall signal");
    check(flushes > 0, "flush issued");
    check(stalled_waits > 0, "stall seen with a result waiting");
    for (int i = 0; i < TOTAL; i++) begin
      logic [255:0] got;
      for (int w = 0; w < 4; w++) begin
        logic [63:0] v;
        v = u_mem.mem[(BASE + 48'(32 * i + 8 * w)) >> 3];
        for (int b = 0; b < 8; b++) got[255 - 64*w - 8*b -: 8] = v[8*b +: 8];
      end
      check(got == pmk[i], $sformatf("PMK %0d in memory", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
