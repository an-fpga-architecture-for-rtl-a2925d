// Testbench for hmac_sha1, served by a sha1_pipeline. Checks RFC 2202 test
// case 2 (key "Jefe"), then random keys of 8..63 bytes with salts of 0..36
// bytes and with 20-byte messages (the two message shapes PBKDF2 uses)
// against the reference HMAC; two HMAC units run concurrently. Also checks
// busy/valid behaviour and the run time of an HMAC on an idle pipeline.
module tb_hmac_sha1;
  import wpa_pkg::*;
  import sha1_ref_pkg::*;

  localparam int UNROLL = 8;

  logic clk = 0, rst_n = 0;
  logic [1:0] start = '0, busy, valid;
  logic [1:0][BLK_W-1:0] key;
  logic [1:0][T_W-1:0] t;
  logic [1:0][TLEN_W-1:0] tlen;
  logic [1:0][HASH_W-1:0] res;
  logic [1:0] req, grant, done;
  logic [1:0][BLK_W-1:0] b0, b1;
  logic [HASH_W-1:0] hash;
  int checks = 0, failures = 0;
  longint cyc = 0;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    hmac_sha1 dut (.clk(clk), .rst_n(rst_n), .start_i(start[i]), .key_i(key[i]),
                   .t_i(t[i]), .t_len_i(tlen[i]), .busy_o(busy[i]), .valid_o(valid[i]),
                   .result_o(res[i]), .sha_req_o(req[i]), .sha_blk0_o(b0[i]),
                   .sha_blk1_o(b1[i]), .sha_grant_i(grant[i]), .sha_done_i(done[i]),
                   .sha_hash_i(hash));
  end

  sha1_pipeline #(.UNROLL(UNROLL), .NCLIENT(2)) u_sha (
    .clk(clk), .rst_n(rst_n), .req_i(req), .blk0_i(b0), .blk1_i(b1),
    .grant_o(grant), .done_o(done), .hash_o(hash));

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

  function automatic logic [T_W-1:0] q2t(input bq_t q);
    logic [T_W-1:0] v = '0;
    for (int i = 0; i < q.size(); i++) v[T_W-1 - 8*i -: 8] = q[i];
    return v;
  endfunction

  task automatic run(input int u, input bq_t k, input bq_t msg, input bit check_time);
    logic [159:0] exp;
    longint t0;
    exp = hmac(k, msg);
    @(negedge clk);
    check(!busy[u], "idle before start");
    key[u]  = q2key(k);
    t[u]    = q2t(msg);
    tlen[u] = 9'(8 * msg.size());
    start[u] = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start[u] = 1'b0;
    check(busy[u], "busy after start");
    while (!valid[u]) @(negedge clk);
    check(res[u] == exp, $sformatf("unit %0d hmac %h exp %h", u, res[u], exp));
    // 4 build cycles, 2 x (grant + 160 hash + 1 output) cycles, done cycle
    if (check_time) check(cyc - t0 == 329, $sformatf("hmac cycles %0d", cyc - t0));
    @(negedge clk);
    check(!valid[u] && !busy[u], "valid is a single pulse");
  endtask

  task automatic unit_loop(input int u, input int n);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(1)) run(u, rand_str(8, 63), rand_str(20, 20), 1'b0);
      else                   run(u, rand_str(8, 63), rand_str(0, 36), 1'b0);
    end
  endtask

  initial begin
    key = '0; t = '0; tlen = '0;
    check(hmac(str2q("Jefe"), str2q("what do ya want for nothing?"))
          == 160'heffcdf6ae5eb2fa2d27416d5f184df9c259a7c79, "reference HMAC known answer");
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, str2q("Jefe"), str2q("what do ya want for nothing?"), 1'b1);
    fork
      unit_loop(0, 25);
      unit_loop(1, 25);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
