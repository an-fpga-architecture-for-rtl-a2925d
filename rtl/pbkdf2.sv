// PBKDF2-HMAC-SHA1 unit producing one 256-bit WPA/WPA2 PMK.
//
// PMK = T1 || T2[159:64], Ti = U1 ^ U2 ^ ... ^ U_ITER with
// U1 = HMAC(P, SSID || INT(i)) and Uj = HMAC(P, U(j-1)).
// The two derived-key blocks are independent, so two HMAC units run side by
// side (block 1 on HMAC0, block 2 on HMAC1). In round 0 the T multiplexers
// select the salt from salt_gen; in every later round they select the
// previous HMAC result held in U0/U1. Each round the HMAC results are stored
// in U0/U1 and XOR-accumulated into the block sums; the round counter then
// advances, and when it reaches ITER the 256-bit result is formed.
//
// Interface (to the PBKDF2 Manager and Result Manager):
//   start_i  one-cycle pulse while busy_o is low; passphrase_i is captured.
//   busy_o   high while a PMK is being computed.
//   valid_o / result_o  the finished PMK, held until ack_i. A new passphrase
//            may be accepted while an unacknowledged result is held; if that
//            computation finishes before the ack it waits (busy_o stays high).
// ssid_i / ssid_len_i must be stable during the whole attack. Two client
// ports go to the shared SHA-1 pipeline. Timing: ITER rounds of one HMAC
// (about 330 cycles each with a free pipeline) plus two cycles per round.
//
// The datapath follows the design. Waiting for both HMAC valids (rather than
// HMAC0 alone) is needed here because the two units share a pipeline and
// may finish a few cycles apart; the XOR accumulators are the PBKDF2 sum.
module pbkdf2
  import wpa_pkg::*;
#(
  parameter int unsigned ITER      = 4096,
  parameter int unsigned CTR_BYTES = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start_i,
  input  logic [BLK_W-1:0]       passphrase_i,
  input  logic [SSID_W-1:0]      ssid_i,
  input  logic [TLEN_W-1:0]      ssid_len_i,
  output logic                   busy_o,
  output logic                   valid_o,
  output logic [PMK_W-1:0]       result_o,
  input  logic                   ack_i,
  // two client ports (HMAC0, HMAC1) to the shared SHA-1 pipeline
  output logic [1:0]             sha_req_o,
  output logic [1:0][BLK_W-1:0]  sha_blk0_o,
  output logic [1:0][BLK_W-1:0]  sha_blk1_o,
  input  logic [1:0]             sha_grant_i,
  input  logic [1:0]             sha_done_i,
  input  logic [HASH_W-1:0]      sha_hash_i
);

  localparam int unsigned RW = $clog2(ITER + 1);

  typedef enum logic [1:0] {S_IDLE, S_KICK, S_RUN, S_FINISH} state_t;

  state_t            state;
  logic [BLK_W-1:0]  pass_q;
  logic [RW-1:0]     round;
  logic [1:0]        got;
  logic [HASH_W-1:0] u_q   [2];
  logic [HASH_W-1:0] acc_q [2];

  logic [T_W-1:0]    salt   [2];
  logic [TLEN_W-1:0] salt_len [2];
  logic [T_W-1:0]    t_mux  [2];
  logic [TLEN_W-1:0] tl_mux [2];
  logic [1:0]        h_valid, h_busy;
  logic [HASH_W-1:0] h_res  [2];
  logic              hmac_start;

  assign hmac_start = (state == S_KICK);

  for (genvar i = 0; i < 2; i++) begin : g_blk
    salt_gen #(.CTR_BYTES(CTR_BYTES)) u_salt (
      .ssid_i     (ssid_i),
      .ssid_len_i (ssid_len_i),
      .index_i    (8'(i + 1)),
      .t_o        (salt[i]),
      .t_len_o    (salt_len[i])
    );

    assign t_mux[i]  = (round == '0) ? salt[i] : {u_q[i], {(T_W - HASH_W){1'b0}}};
    assign tl_mux[i] = (round == '0) ? salt_len[i] : TLEN_W'(HASH_W);

    hmac_sha1 u_hmac (
      .clk         (clk),
      .rst_n       (rst_n),
      .start_i     (hmac_start),
      .key_i       (pass_q),
      .t_i         (t_mux[i]),
      .t_len_i     (tl_mux[i]),
      .busy_o      (h_busy[i]),
      .valid_o     (h_valid[i]),
      .result_o    (h_res[i]),
      .sha_req_o   (sha_req_o[i]),
      .sha_blk0_o  (sha_blk0_o[i]),
      .sha_blk1_o  (sha_blk1_o[i]),
      .sha_grant_i (sha_grant_i[i]),
      .sha_done_i  (sha_done_i[i]),
      .sha_hash_i  (sha_hash_i)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pass_q   <= '0;
      round    <= '0;
      got      <= '0;
      u_q      <= '{default: '0};
      acc_q    <= '{default: '0};
      valid_o  <= 1'b0;
      result_o <= '0;
    end else begin
      if (ack_i) valid_o <= 1'b0;
      unique case (state)
        S_IDLE: if (start_i) begin
          pass_q <= passphrase_i;
          round  <= '0;
          state  <= S_KICK;
        end
        S_KICK: begin
          got   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          for (int i = 0; i < 2; i++) begin
            if (h_valid[i]) begin
              u_q[i]   <= h_res[i];
              acc_q[i] <= (round == '0) ? h_res[i] : (acc_q[i] ^ h_res[i]);
            end
          end
          got <= got | h_valid;
          if ((got | h_valid) == 2'b11) begin
            round <= round + RW'(1);
            state <= (round == RW'(ITER - 1)) ? S_FINISH : S_KICK;
          end
        end
        S_FINISH: if (!valid_o || ack_i) begin
          result_o <= {acc_q[0], acc_q[1][HASH_W-1 -: (PMK_W - HASH_W)]};
          valid_o  <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) start_i |-> !busy_o);
  assert property (@(posedge clk) disable iff (!rst_n) ack_i |-> valid_o);
  assert property (@(posedge clk) disable iff (!rst_n) hmac_start |-> (h_busy == 2'b00));

endmodule
