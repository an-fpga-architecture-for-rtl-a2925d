// Testbench for sha1_pipeline at its default size (20 stages, 20 clients).
// Every client repeatedly submits a random message of 56..119 bytes, padded
// here to exactly two blocks, and checks the digest against the reference
// SHA-1 of the unpadded message. Also checks: a known FIPS 180 digest, that
// digests go only to the client that asked, the 161-cycle grant-to-digest
// latency, that results leave in entry order, and that with every client
// busy at most UNROLL messages are in flight.
module tb_sha1_pipeline;
  import wpa_pkg::*;
  import sha1_ref_pkg::*;

  localparam int UNROLL  = 20;
  localparam int NCLIENT = 20;
  localparam int LAT     = 161;

  logic clk = 0, rst_n = 0;
  logic [NCLIENT-1:0] req = '0, grant, done;
  logic [NCLIENT-1:0][BLK_W-1:0] blk0, blk1;
  logic [HASH_W-1:0] hash;
  int checks = 0, failures = 0;
  int in_flight = 0, max_in_flight = 0;
  longint cyc = 0;

  sha1_pipeline dut (.clk(clk), .rst_n(rst_n), .req_i(req), .blk0_i(blk0),
                     .blk1_i(blk1), .grant_o(grant), .done_o(done), .hash_o(hash));

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

  always @(posedge clk) if (rst_n) begin
    in_flight <= in_flight + $countones(grant) - $countones(done);
    if (in_flight > max_in_flight) max_in_flight <= in_flight;
    check($onehot0(grant) && $onehot0(done), "one grant and one digest per cycle");
  end

  // Digest order must equal entry order (one slot leaves per cycle).
  int order_q[$];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCLIENT; c++) if (grant[c]) order_q.push_back(c);
    for (int c = 0; c < NCLIENT; c++) if (done[c]) begin
      check(order_q.size() > 0 && order_q[0] == c, "digest order equals entry order");
      if (order_q.size() > 0) void'(order_q.pop_front());
    end
  end

  task automatic submit(input int c, input bq_t msg, input bit check_lat);
    bq_t m;
    longint unsigned bits;
    longint t0;
    logic [159:0] exp;
    exp = sha1(msg);
    m = msg;
    bits = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while (m.size() != 120) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(bits[8*i +: 8]);
    for (int i = 0; i < 64; i++) begin
      blk0[c][511 - 8*i -: 8] = m[i];
      blk1[c][511 - 8*i -: 8] = m[64 + i];
    end
    // requests change just after a falling edge; grant is then settled
    // and is taken at the next rising edge
    req[c] = 1'b1;
    #1;
    while (!grant[c]) begin
      @(negedge clk);
      #1;
    end
    t0 = cyc;
    @(negedge clk);
    req[c] = 1'b0;
    do @(negedge clk); while (!done[c]);
    check(hash == exp, $sformatf("client %0d digest %h exp %h", c, hash, exp));
    if (check_lat) check(cyc - t0 == LAT, $sformatf("latency %0d", cyc - t0));
  endtask

  task automatic client(input int c, input int n);
    for (int k = 0; k < n; k++) submit(c, rand_str(56, 119), 1'b0);
  endtask

  initial begin
    blk0 = '0;
    blk1 = '0;
    check(sha1(str2q("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"))
          == 160'h84983e441c3bd26ebaae4aa1f95129e5e54670f1, "reference model known answer");
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // a lone message: known answer and latency
    submit(3, str2q("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"), 1'b1);
    @(negedge clk);
    // every client at once
    for (int c = 0; c < NCLIENT; c++) begin
      fork
        automatic int cc = c;
        client(cc, 6);
      join_none
    end
    wait fork;
    repeat (2) @(posedge clk);
    check(max_in_flight == UNROLL, $sformatf("pipeline filled (%0d in flight)", max_in_flight));
    check(order_q.size() == 0, "all digests returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
