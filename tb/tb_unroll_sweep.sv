// Workload testbench: the loop-unrolling sweep. Four attackers are built
// with SHA_UNROLL = 2, 20, 40 and 80 pipeline stages and N_PBKDF2 = UNROLL/2
// units each, so every HMAC unit has one pipeline slot. Each runs a
// dictionary of 2*N_PBKDF2 random passphrases (two full rounds of its
// units) with the iteration count cut to 16 to keep the run short. Checks
// all PMKs against the reference PBKDF2 and that PMKs per cycle, normalized
// to the 2-stage build, come out as 1 : 10 : 20 : 40 within 5 percent.
module tb_unroll_sweep;
  import wpa_pkg::*;
  import sha1_ref_pkg::*;

  localparam int NCFG = 4;
  localparam int UNR [NCFG] = '{2, 20, 40, 80};
  localparam int ITER = 16;
  localparam logic [47:0] DICT = 48'h0010_0000;
  localparam logic [47:0] PMKS = 48'h0080_0000;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint cycles [NCFG];
  bit finished [NCFG];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
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

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int U = UNR[g];
    localparam int N = U / 2;
    logic start = 0, busy;
    logic [CNT_W-1:0] dict_size = '0, count;
    logic [SSID_W-1:0] ssid = '0;
    logic [TLEN_W-1:0] ssid_len = '0;
    logic [7:0] rq_ld, rvalid;
    logic [7:0][ADDR_W-1:0] raddr;
    logic [7:0][63:0] rdata;
    logic [3:0] rq_st, flush, fsh_cmp, rq_next;
    logic [3:0][ADDR_W-1:0] waddr;
    logic [3:0][63:0] wdata;

    attacker #(.N_PBKDF2(N), .SHA_UNROLL(U), .ITER(ITER)) dut (
      .clk(clk), .rst_n(rst_n), .start_i(start), .dict_size_i(dict_size),
      .dict_addr_i(DICT), .pmk_addr_i(PMKS), .ssid_i(ssid), .ssid_len_i(ssid_len),
      .complete_count_o(count), .busy_o(busy),
      .rd_rq_ld_o(rq_ld), .rd_addr_o(raddr), .rd_valid_i(rvalid), .rd_data_i(rdata),
      .wr_rq_st_o(rq_st), .wr_addr_o(waddr), .wr_data_o(wdata), .wr_flush_o(flush),
      .wr_fsh_cmp_i(fsh_cmp), .wr_rq_next_i(rq_next));

    mc_mem_model #(.STALL_PCT(0)) u_mem (.clk(clk), .rst_n(rst_n), .force_stall_i(1'b0),
      .rd_rq_ld_i(rq_ld), .rd_addr_i(raddr), .rd_valid_o(rvalid), .rd_data_o(rdata),
      .wr_rq_st_i(rq_st), .wr_addr_i(waddr), .wr_data_i(wdata), .wr_flush_i(flush),
      .wr_fsh_cmp_o(fsh_cmp), .wr_rq_next_o(rq_next));

    bq_t words [$];
    int dispatched = 0;
    // each dispatched passphrase must be the next dictionary entry
    always @(posedge clk) if (rst_n && dut.pm_next) begin
      if (dispatched < words.size())
        check(dut.pb_data == q2key(words[dispatched]),
              $sformatf("unroll %0d: dispatch %0d data %h exp %h", U, dispatched, dut.pb_data, q2key(words[dispatched])));
      dispatched++;
    end

    initial begin
      bq_t s;
      logic [255:0] exp [$];
      longint t0;
      finished[g] = 0;
      s = rand_str(1, 32);
      for (int i = 0; i < 2 * N; i++) begin
        words.push_back(rand_str(8, 63));
        exp.push_back(pbkdf2(words[i], s, ITER, 4));
        for (int w = 0; w < 8; w++) begin
          logic [63:0] v;
          v = '0;
          for (int b = 0; b < 8; b++)
            if (8 * w + b < words[i].size()) v[8*b +: 8] = words[i][8 * w + b];
          u_mem.mem[(DICT + 48'(64 * i + 8 * w)) >> 3] = v;
        end
      end
      wait (rst_n);
      @(negedge clk);
      dict_size = CNT_W'(2 * N);
      ssid      = q2ssid(s);
      ssid_len  = 9'(8 * s.size());
      start     = 1;
      @(negedge clk);
      start = 0;
      t0 = cyc;
      wait (!busy);
      cycles[g] = cyc - t0;
      check(count == CNT_W'(2 * N), $sformatf("unroll %0d: count", U));
      for (int i = 0; i < 2 * N; i++) begin
        logic [255:0] got;
        for (int w = 0; w < 4; w++) begin
          logic [63:0] v;
          v = u_mem.mem[(PMKS + 48'(32 * i + 8 * w)) >> 3];
          for (int b = 0; b < 8; b++) got[255 - 64*w - 8*b -: 8] = v[8*b +: 8];
        end
        if (got != exp[i])
          for (int j = 0; j < 2 * N; j++) if (got == exp[j]) $display("  PMK %0d equals expected PMK %0d", i, j);
        check(got == exp[i], $sformatf("unroll %0d: PMK %0d got %h exp %h len %0d", U, i, got, exp[i], words[i].size()));
      end
      finished[g] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    for (int g = 0; g < NCFG; g++) begin
      real rate, norm;
      rate = real'(UNR[g]) / real'(cycles[g]);          // 2N PMKs = UNROLL PMKs
      norm = rate / (2.0 / real'(cycles[0]));
      $display("unroll %0d: %0d PMKs in %0d cycles, normalized PMKs/cycle %0.2f (expected %0d)",
               UNR[g], UNR[g], cycles[g], norm, UNR[g] / 2);
      check(norm > 0.95 * (UNR[g] / 2) && norm < 1.05 * (UNR[g] / 2),
            $sformatf("unroll %0d normalized rate", UNR[g]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
