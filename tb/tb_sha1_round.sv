// Testbench for sha1_round: random slots through one stage, compared with a
// round computed here from the SHA-1 definition (W[t+16] recurrence, f_t and
// K_t by round range). Also checks that the side fields pass unchanged and
// that the stage takes exactly one clock.
module tb_sha1_round;
  import wpa_pkg::*;

  logic clk = 0, rst_n = 0;
  sha_slot_t si, so;
  int checks = 0, failures = 0;

  sha1_round dut (.clk(clk), .rst_n(rst_n), .slot_i(si), .slot_o(so));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rl(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    si = '0;
    repeat (2) @(posedge clk);
    #1 check(so.valid == 1'b0, "reset clears valid");
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      sha_slot_t x;
      logic [31:0] w [16];
      logic [31:0] f, k, a_exp;
      x = '0;
      x.valid = 1'b1;
      x.mid = 8'($urandom);
      x.blk = 1'($urandom);
      x.t   = 7'(n % 80);
      x.h   = {$urandom, $urandom, $urandom, $urandom, $urandom};
      x.st  = {$urandom, $urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 16; i++) x.w[511 - 32*i -: 32] = $urandom;
      for (int i = 0; i < 16; i++) x.blk1[511 - 32*i -: 32] = $urandom;
      for (int i = 0; i < 16; i++) w[i] = x.w[511 - 32*i -: 32];
      if (x.t < 20)      begin f = (x.st.b & x.st.c) | (~x.st.b & x.st.d); k = 32'h5A827999; end
      else if (x.t < 40) begin f = x.st.b ^ x.st.c ^ x.st.d; k = 32'h6ED9EBA1; end
      else if (x.t < 60) begin f = (x.st.b & x.st.c) | (x.st.b & x.st.d) | (x.st.c & x.st.d); k = 32'h8F1BBCDC; end
      else               begin f = x.st.b ^ x.st.c ^ x.st.d; k = 32'hCA62C1D6; end
      a_exp = rl(x.st.a, 5) + f + x.st.e + k + w[0];
      @(negedge clk);
      si = x;
      @(posedge clk);
      #1;
      check(so.st.a == a_exp, "a");
      check(so.st.b == x.st.a && so.st.c == rl(x.st.b, 30) && so.st.d == x.st.c
            && so.st.e == x.st.d, "b..e");
      check(so.w[511 -: 480] == x.w[479:0], "window shift");
      // W[t+16] = ROTL1(W[t+13] ^ W[t+8] ^ W[t+2] ^ W[t])
      check(so.w[31:0] == rl(w[13] ^ w[8] ^ w[2] ^ w[0], 1), "new W15");
      check(so.t == x.t + 1, "round count");
      check(so.h == x.h && so.mid == x.mid && so.blk == x.blk && so.blk1 == x.blk1
            && so.valid, "pass-through fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
