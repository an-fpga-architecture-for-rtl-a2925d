// Testbench for pbkdf2.
//  * Unit A at the default parameters (4096 iterations, 4-byte index) must
//    reproduce the IEEE 802.11i reference PMK for passphrase "password" and
//    SSID "IEEE", and take the expected number of cycles.
//  * Unit B (3 iterations, one-byte index) gets random passphrases and SSIDs
//    and is compared with the reference PBKDF2. It also exercises the result
//    hold: a second passphrase is started while the first PMK is not yet
//    acknowledged; the unit must then stay busy and keep the first PMK until
//    the acknowledge.
module tb_pbkdf2;
  import wpa_pkg::*;
  import sha1_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // two PBKDF2 units, each with its own SHA-1 pipeline
  logic [1:0] start = '0, busy, valid, ack = '0;
  logic [1:0][BLK_W-1:0] pass;
  logic [1:0][SSID_W-1:0] ssid;
  logic [1:0][TLEN_W-1:0] slen;
  logic [1:0][PMK_W-1:0] res;
  logic [1:0][1:0] req, grant, done;
  logic [1:0][1:0][BLK_W-1:0] b0, b1;
  logic [1:0][HASH_W-1:0] hash;

  pbkdf2 dut_a (.clk(clk), .rst_n(rst_n), .start_i(start[0]), .passphrase_i(pass[0]),
                .ssid_i(ssid[0]), .ssid_len_i(slen[0]), .busy_o(busy[0]), .valid_o(valid[0]),
                .result_o(res[0]), .ack_i(ack[0]), .sha_req_o(req[0]), .sha_blk0_o(b0[0]),
                .sha_blk1_o(b1[0]), .sha_grant_i(grant[0]), .sha_done_i(done[0]),
                .sha_hash_i(hash[0]));
  pbkdf2 #(.ITER(3), .CTR_BYTES(1)) dut_b (
                .clk(clk), .rst_n(rst_n), .start_i(start[1]), .passphrase_i(pass[1]),
                .ssid_i(ssid[1]), .ssid_len_i(slen[1]), .busy_o(busy[1]), .valid_o(valid[1]),
                .result_o(res[1]), .ack_i(ack[1]), .sha_req_o(req[1]), .sha_blk0_o(b0[1]),
                .sha_blk1_o(b1[1]), .sha_grant_i(grant[1]), .sha_done_i(done[1]),
                .sha_hash_i(hash[1]));

  for (genvar i = 0; i < 2; i++) begin : g_sha
    sha1_pipeline #(.UNROLL(20), .NCLIENT(2)) u_sha (
      .clk(clk), .rst_n(rst_n), .req_i(req[i]), .blk0_i(b0[i]), .blk1_i(b1[i]),
      .grant_o(grant[i]), .done_o(done[i]), .hash_o(hash[i]));
  end

  task automatic kick(input int u, input bq_t p, input bq_t s);
    @(negedge clk);
    check(!busy[u], "not busy before start");
    pass[u]  = q2key(p);
    ssid[u]  = q2ssid(s);
    slen[u]  = 9'(8 * s.size());
    start[u] = 1'b1;
    @(negedge clk);
    start[u] = 1'b0;
  endtask

  task automatic unit_a;
    longint t0;
    kick(0, str2q("password"), str2q("IEEE"));
    t0 = cyc;
    while (!valid[0]) @(negedge clk);
    check(res[0] == 256'hf42c6fc52df0ebef9ebb4b90b38a5f902e83fe1b135a70e23aed762e9710a12e,
          $sformatf("IEEE 802.11i PMK %h", res[0]));
    // per iteration: one HMAC (329 cycles) plus the kick and collect cycles
    check(cyc - t0 == 4096 * 331 + 1, $sformatf("PMK cycles %0d", cyc - t0));
    ack[0] = 1'b1;
    @(negedge clk);
    ack[0] = 1'b0;
    check(!valid[0], "valid cleared by ack");
  endtask

  task automatic unit_b;
    bq_t s;
    logic [255:0] e1, e2;
    bq_t p1, p2;
    s  = rand_str(1, 32);
    for (int n = 0; n < 12; n++) begin
      bq_t p;
      logic [255:0] e;
      p = rand_str(8, 63);
      if (n % 4 == 0) s = rand_str(0, 32);
      e = pbkdf2(p, s, 3, 1);
      kick(1, p, s);
      while (!valid[1]) @(negedge clk);
      check(res[1] == e, $sformatf("random PMK %h exp %h", res[1], e));
      ack[1] = 1'b1;
      @(negedge clk);
      ack[1] = 1'b0;
    end
    // result hold while unacknowledged
    p1 = rand_str(8, 63);
    p2 = rand_str(8, 63);
    e1 = pbkdf2(p1, s, 3, 1);
    e2 = pbkdf2(p2, s, 3, 1);
    kick(1, p1, s);
    while (!valid[1]) @(negedge clk);
    kick(1, p2, s);                       // accepted with the first PMK pending
    repeat (2500) @(negedge clk);         // second PMK is long finished
    check(busy[1], "held: unit stays busy");
    check(valid[1] && res[1] == e1, "held: first PMK unchanged");
    ack[1] = 1'b1;
    @(negedge clk);
    ack[1] = 1'b0;
    check(valid[1] && res[1] == e2 && !busy[1], "second PMK after the acknowledge");
    ack[1] = 1'b1;
    @(negedge clk);
    ack[1] = 1'b0;
    check(!valid[1], "all acknowledged");
  endtask

  initial begin
    pass = '0; ssid = '0; slen = '0;
    check(pbkdf2(str2q("password"), str2q("IEEE"), 4096, 4)
          == 256'hf42c6fc52df0ebef9ebb4b90b38a5f902e83fe1b135a70e23aed762e9710a12e,
          "reference PBKDF2 known answer");
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      unit_a;
      unit_b;
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
