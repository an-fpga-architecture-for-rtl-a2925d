// HMAC-SHA1 controller: H(K ^ opad, H(K ^ ipad, T)).
//
// The key K is one 512-bit block (a zero-padded passphrase), so each of the
// two hashes is a two-block SHA-1 message:
//   inner: block 0 = K ^ ipad
//          block 1 = T, a '1' bit, zeros, 64-bit length 512 + len(T)
//   outer: block 0 = K ^ opad
//          block 1 = inner digest, a '1' bit, zeros, 64-bit length 672
// The padding bit is placed by shifting a single one right by len(T) and
// OR-ing it into the left-aligned T. The blocks are handed to the shared
// SHA-1 pipeline (sha1_pipeline) through a request/grant port and the digest
// comes back with a done pulse.
//
// A ten-state FSM steps through: Wait Start, Build Block 1, Build Block 2,
// SHA-1 of Message 1, Wait for Hash Valid, Build Block 1, Build Block 2,
// SHA-1 of Message 2, Wait for Hash Valid, Done.
//
// Interface: start_i is a one-cycle pulse while busy_o is low. key_i, t_i
// and t_len_i must stay stable until valid_o. t_i is left-aligned, zero
// beyond t_len_i bits, t_len_i <= 288. valid_o pulses for one cycle with
// result_o; result_o keeps that value until the next run's inner digest
// returns (the same register holds it, about 165 cycles after the next
// start), so a user should capture it on valid_o. Timing: 4 build cycles,
// 2 request cycles (longer if the pipeline has no free slot), 2 x 161
// pipeline cycles and the Done cycle, about 330 cycles per HMAC.
//
// The state sequence and block layouts follow the design; holding the key
// in the caller instead of in this module is this design's choice.
module hmac_sha1
  import wpa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [BLK_W-1:0]  key_i,
  input  logic [T_W-1:0]    t_i,
  input  logic [TLEN_W-1:0] t_len_i,
  output logic              busy_o,
  output logic              valid_o,
  output logic [HASH_W-1:0] result_o,
  // port to the shared SHA-1 pipeline
  output logic              sha_req_o,
  output logic [BLK_W-1:0]  sha_blk0_o,
  output logic [BLK_W-1:0]  sha_blk1_o,
  input  logic              sha_grant_i,
  input  logic              sha_done_i,
  input  logic [HASH_W-1:0] sha_hash_i
);

  typedef enum logic [3:0] {
    S_WAIT_START,
    S_BUILD1_IN,
    S_BUILD2_IN,
    S_SHA_MSG1,
    S_WAIT_HASH1,
    S_BUILD1_OUT,
    S_BUILD2_OUT,
    S_SHA_MSG2,
    S_WAIT_HASH2,
    S_DONE
  } state_t;

  state_t state;
  logic [BLK_W-1:0] inner_blk1;

  // Inner second block: T | (1 >> len) with the message length at the bottom.
  always_comb begin
    inner_blk1 = {t_i, {(BLK_W - T_W){1'b0}}} | ({1'b1, {(BLK_W-1){1'b0}}} >> t_len_i);
    inner_blk1[63:0] = 64'(BLK_W) + 64'(t_len_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_WAIT_START;
      sha_blk0_o <= '0;
      sha_blk1_o <= '0;
      result_o   <= '0;
    end else begin
      unique case (state)
        S_WAIT_START: if (start_i) state <= S_BUILD1_IN;
        S_BUILD1_IN: begin
          sha_blk0_o <= key_i ^ {(BLK_W/8){IPAD_BYTE}};
          state      <= S_BUILD2_IN;
        end
        S_BUILD2_IN: begin
          sha_blk1_o <= inner_blk1;
          state      <= S_SHA_MSG1;
        end
        S_SHA_MSG1:   if (sha_grant_i) state <= S_WAIT_HASH1;
        S_WAIT_HASH1: if (sha_done_i) begin
          result_o <= sha_hash_i;          // inner digest, kept for block 2
          state    <= S_BUILD1_OUT;
        end
        S_BUILD1_OUT: begin
          sha_blk0_o <= key_i ^ {(BLK_W/8){OPAD_BYTE}};
          state      <= S_BUILD2_OUT;
        end
        S_BUILD2_OUT: begin
          sha_blk1_o <= {result_o, 1'b1, {(BLK_W - HASH_W - 1 - 64){1'b0}},
                         64'(BLK_W + HASH_W)};
          state      <= S_SHA_MSG2;
        end
        S_SHA_MSG2:   if (sha_grant_i) state <= S_WAIT_HASH2;
        S_WAIT_HASH2: if (sha_done_i) begin
          result_o <= sha_hash_i;
          state    <= S_DONE;
        end
        S_DONE:       state <= S_WAIT_START;
        default:      state <= S_WAIT_START;
      endcase
    end
  end

  assign busy_o    = (state != S_WAIT_START);
  assign valid_o   = (state == S_DONE);
  assign sha_req_o = (state == S_SHA_MSG1) || (state == S_SHA_MSG2);

  // A grant or a digest may only arrive while this unit is waiting for it.
  assert property (@(posedge clk) disable iff (!rst_n) sha_grant_i |-> sha_req_o);
  assert property (@(posedge clk) disable iff (!rst_n)
                   sha_done_i |-> (state == S_WAIT_HASH1 || state == S_WAIT_HASH2));

endmodule
