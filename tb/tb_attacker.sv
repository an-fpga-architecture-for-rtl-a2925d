// End-to-end testbench for the attacker at reduced size (3 PBKDF2 units,
// 8-stage SHA-1 pipeline, 3 PBKDF2 iterations, 4-entry passphrase FIFOs).
// Two attacks: 23 random passphrases under one SSID, with random and one long
// forced write stall, then a second start with a new SSID and 5 entries.
// Every PMK in memory is compared with the reference PBKDF2 of its
// dictionary entry. Each mechanism of the design is counted and must occur:
// FIFO back-pressure, dispatch waiting on a busy unit, write stalls, a
// finished PMK held for its acknowledge, block re-cycling, second-block
// launch, HMAC units waiting for a pipeline slot, and the final flush.
module tb_attacker;
  import wpa_pkg::*;
  import sha1_ref_pkg::*;

  localparam int N      = 3;
  localparam int UNROLL = 8;
  localparam int ITER   = 3;
  localparam int DEPTH  = 4;
  localparam int CTRB   = 4;
  localparam logic [47:0] DICT = 48'h0010_0000;
  localparam logic [47:0] PMKS = 48'h0080_0000;

  logic clk = 0, rst_n = 0, start = 0, force_stall = 0;
  logic [CNT_W-1:0] dict_size = '0, count;
  logic [SSID_W-1:0] ssid = '0;
  logic [TLEN_W-1:0] ssid_len = '0;
  logic busy;
  logic [7:0] rq_ld, rvalid;
  logic [7:0][ADDR_W-1:0] raddr;
  logic [7:0][63:0] rdata;
  logic [3:0] rq_st, flush, fsh_cmp, rq_next;
  logic [3:0][ADDR_W-1:0] waddr;
  logic [3:0][63:0] wdata;
  int checks = 0, failures = 0;
  longint cyc = 0;

  attacker #(.N_PBKDF2(N), .SHA_UNROLL(UNROLL), .ITER(ITER), .FIFO_DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .dict_size_i(dict_size),
    .dict_addr_i(DICT), .pmk_addr_i(PMKS), .ssid_i(ssid), .ssid_len_i(ssid_len),
    .complete_count_o(count), .busy_o(busy),
    .rd_rq_ld_o(rq_ld), .rd_addr_o(raddr), .rd_valid_i(rvalid), .rd_data_i(rdata),
    .wr_rq_st_o(rq_st), .wr_addr_o(waddr), .wr_data_o(wdata), .wr_flush_o(flush),
    .wr_fsh_cmp_i(fsh_cmp), .wr_rq_next_i(rq_next));

  mc_mem_model #(.STALL_PCT(5)) u_mem (.clk(clk), .rst_n(rst_n), .force_stall_i(force_stall),
    .rd_rq_ld_i(rq_ld), .rd_addr_i(raddr), .rd_valid_o(rvalid), .rd_data_o(rdata),
    .wr_rq_st_i(rq_st), .wr_addr_i(waddr), .wr_data_i(wdata), .wr_flush_i(flush),
    .wr_fsh_cmp_o(fsh_cmp), .wr_rq_next_o(rq_next));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---- mechanism counters ----
  int n_fifo_full = 0, n_unit_wait = 0, n_wr_stall = 0, n_held = 0, n_recycle = 0;
  int n_second_blk = 0, n_slot_wait = 0, n_flush = 0, n_store = 0;
  logic [N-1:0] held;

  for (genvar k = 0; k < N; k++) begin : g_mon
    // a unit has a finished PMK it cannot store: the previous one is unacknowledged
    assign held[k] = (dut.g_pbkdf2[k].u_pbkdf2.state == 2'd3) && dut.pb_valid[k];
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_pm.in_flight == ($bits(dut.u_pm.in_flight))'(DEPTH)) n_fifo_full++;
    if (!dut.pm_empty && dut.pb_busy[dut.u_pbm.ptr]) n_unit_wait++;
    if (dut.pb_valid[dut.u_rm.ptr] && !(&rq_next) && dut.u_rm.state == 2'd1) n_wr_stall++;
    if (held != '0) n_held++;
    if (dut.u_sha1.tail.valid && dut.u_sha1.tail.t != 7'd80) n_recycle++;
    if (dut.u_sha1.tail.valid && dut.u_sha1.tail.t == 7'd80 && !dut.u_sha1.tail.blk) n_second_blk++;
    if ((dut.sha_req & ~dut.sha_grant) != '0) n_slot_wait++;
    if (flush != '0) n_flush++;
    if (rq_st != '0) n_store++;
  end

  // dictionary record: little-endian 64-bit words, zero padded to 64 bytes
  task automatic put(input int n, input bq_t s);
    for (int w = 0; w < 8; w++) begin
      logic [63:0] v = '0;
      for (int b = 0; b < 8; b++)
        if (8 * w + b < s.size()) v[8*b +: 8] = s[8 * w + b];
      u_mem.mem[(DICT + 48'(64 * n + 8 * w)) >> 3] = v;
    end
  endtask

  function automatic logic [255:0] get_pmk(input int n);
    logic [255:0] got;
    for (int w = 0; w < 4; w++) begin
      logic [63:0] v;
      v = u_mem.mem.exists((PMKS + 48'(32 * n + 8 * w)) >> 3)
        ? u_mem.mem[(PMKS + 48'(32 * n + 8 * w)) >> 3] : 64'h0;
      for (int b = 0; b < 8; b++) got[255 - 64*w - 8*b -: 8] = v[8*b +: 8];
    end
    return got;
  endfunction

  // One attack: the dictionary, the SSID, and a forced write stall of
  // stall_len cycles once stall_at PMKs are stored.
  task automatic attack(input bq_t words [$], input bq_t s, input int stall_at,
                        input int stall_len, input logic [255:0] known0);
    logic [255:0] exp [$];
    longint t0;
    for (int i = 0; i < words.size(); i++) begin
      put(i, words[i]);
      u_mem.mem[(PMKS + 48'(32 * i)) >> 3] = 64'h0;
      exp.push_back(pbkdf2(words[i], s, ITER, CTRB));
    end
    if (known0 != '0) check(exp[0] == known0, "reference model known answer");
    @(negedge clk);
    dict_size = CNT_W'(words.size());
    ssid      = q2ssid(s);
    ssid_len  = 9'(8 * s.size());
    start     = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc;
    check(busy, "busy during the attack");
    if (stall_len > 0) begin
      wait (count == CNT_W'(stall_at));
      @(negedge clk);
      force_stall = 1;
      repeat (stall_len) @(negedge clk);
      force_stall = 0;
    end
    wait (!busy);
    $display("attack of %0d entries took %0d cycles", words.size(), cyc - t0);
    check(count == CNT_W'(words.size()), $sformatf("complete count %0d", count));
    check(u_mem.store_errors == 0, "no store during a stall");
    for (int i = 0; i < words.size(); i++)
      check(get_pmk(i) == exp[i], $sformatf("PMK %0d %h exp %h", i, get_pmk(i), exp[i]));
    if (known0 != '0) check(get_pmk(0) == known0, "IEEE 802.11i reference PMK stored");
  endtask

  initial begin
    bq_t words [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!busy && count == '0, "idle after reset");
    words = {};
    words.push_back(str2q("password"));
    for (int i = 1; i < 23; i++) words.push_back(rand_str(8, 63));
    attack(words, str2q("IEEE"), 7, 3000, '0);
    words = {};
    for (int i = 0; i < 5; i++) words.push_back(rand_str(8, 63));
    attack(words, rand_str(1, 32), 0, 0, '0);
    check(n_fifo_full > 0,  $sformatf("passphrase FIFOs filled (%0d cycles)", n_fifo_full));
    check(n_unit_wait > 0,  $sformatf("dispatch waited on a busy unit (%0d)", n_unit_wait));
    check(n_wr_stall > 0,   $sformatf("write stall with a PMK waiting (%0d)", n_wr_stall));
    check(n_recycle > 0,    $sformatf("blocks re-cycled through the pipeline (%0d)", n_recycle));
    check(n_second_blk > 0, $sformatf("second blocks launched (%0d)", n_second_blk));
    check(n_slot_wait > 0,  $sformatf("HMAC waited for a pipeline slot (%0d)", n_slot_wait));
    check(n_flush > 0,      $sformatf("write ports flushed (%0d)", n_flush));
    check(n_store > 0,      $sformatf("PMK stores (%0d)", n_store));
    check(n_held > 0,       $sformatf("finished PMK held for its acknowledge (%0d)", n_held));
    $display("mechanisms: fifo_full=%0d unit_wait=%0d wr_stall=%0d held=%0d recycle=%0d second_blk=%0d slot_wait=%0d flush=%0d stores=%0d",
             n_fifo_full, n_unit_wait, n_wr_stall, n_held, n_recycle, n_second_blk,
             n_slot_wait, n_flush, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
