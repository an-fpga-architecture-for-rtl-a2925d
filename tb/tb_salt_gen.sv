// Testbench for salt_gen: the worked example (SSID "test", one-byte index
// 0x01 -> 0x7465737401) and random SSIDs of 0..32 bytes with both index
// widths, compared with a byte-by-byte concatenation built here.
module tb_salt_gen;
  import wpa_pkg::*;
  import sha1_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [SSID_W-1:0] ssid;
  logic [TLEN_W-1:0] len;
  logic [7:0]        idx;
  logic [T_W-1:0]    t1, t4;
  logic [TLEN_W-1:0] l1, l4;

  salt_gen #(.CTR_BYTES(1)) dut1 (.ssid_i(ssid), .ssid_len_i(len), .index_i(idx), .t_o(t1), .t_len_o(l1));
  salt_gen                  dut4 (.ssid_i(ssid), .ssid_len_i(len), .index_i(idx), .t_o(t4), .t_len_o(l4));

  initial begin
    #100000;
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

  function automatic logic [T_W-1:0] concat(input bq_t q);
    logic [T_W-1:0] v = '0;
    for (int i = 0; i < q.size(); i++) v[T_W-1 - 8*i -: 8] = q[i];
    return v;
  endfunction

  initial begin
    ssid = q2ssid(str2q("test"));
    len  = 9'd32;
    idx  = 8'h01;
    #1;
    check(t1[T_W-1 -: 40] == 40'h7465737401 && t1[T_W-41:0] == '0, "example test||0x01");
    check(l1 == 9'd40, "example length");
    for (int n = 0; n < 300; n++) begin
      bq_t s, s1, s4;
      s = rand_str(0, 32);
      ssid = q2ssid(s);
      len  = 9'(8 * s.size());
      idx  = 8'($urandom_range(1, 2));
      s1 = s; s1.push_back(idx);
      s4 = s; s4.push_back(8'h00); s4.push_back(8'h00); s4.push_back(8'h00); s4.push_back(idx);
      #1;
      check(t1 == concat(s1) && l1 == 9'(8 * s1.size()), "one-byte index");
      check(t4 == concat(s4) && l4 == 9'(8 * s4.size()), "four-byte index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
