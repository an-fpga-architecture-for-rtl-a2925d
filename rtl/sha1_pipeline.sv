// Pipelined two-block SHA-1 shared by several clients.
//
// The 80 rounds of SHA-1 are unrolled UNROLL times (UNROLL must divide 80)
// into a ring of sha1_round stages. Every message hashed here is exactly two
// 512-bit blocks long, which is all an HMAC over a 512-bit key block needs.
// A message enters the ring with its first block as the round-0 window and
// its second block parked beside it in the slot (the "MSG BLK 1" shift
// register). Each time a slot leaves the last stage the entry multiplexer
// decides what goes into stage 0:
//   * fewer than 80 rounds done   -> the slot re-cycles for UNROLL more rounds;
//   * block 0 finished            -> H + (a..e) becomes the new chaining value
//                                    and the second block is launched in the
//                                    same slot (Pipeline Select);
//   * block 1 finished            -> H + (a..e) is the digest; it is
//                                    registered on hash_o with the message id
//                                    and the slot becomes free;
//   * slot free                   -> a waiting client's message is accepted.
// So up to UNROLL messages are hashed at once and they leave in the order in
// which they entered.
//
// Clients: req_i[c] with blk0_i[c]/blk1_i[c] held until grant_o[c] pulses
// (one cycle, the message is taken that cycle). Free slots are given to the
// requesting clients in round-robin order. The digest appears on hash_o with
// done_o[c] high for one cycle, 161 cycles after the grant (80 per block plus
// the output register); a client reads hash_o when its done_o bit is high.
//
// The round-robin choice among clients and the per-client done bits are this
// design's own way of sharing one pipeline among all HMAC units.
module sha1_pipeline
  import wpa_pkg::*;
#(
  parameter int unsigned UNROLL  = 20,
  parameter int unsigned NCLIENT = 20
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NCLIENT-1:0]             req_i,
  input  logic [NCLIENT-1:0][BLK_W-1:0]  blk0_i,
  input  logic [NCLIENT-1:0][BLK_W-1:0]  blk1_i,
  output logic [NCLIENT-1:0]             grant_o,
  output logic [NCLIENT-1:0]             done_o,
  output logic [HASH_W-1:0]              hash_o
);

  localparam int unsigned CW = (NCLIENT > 1) ? $clog2(NCLIENT) : 1;

  initial begin
    assert (80 % UNROLL == 0) else $error("UNROLL must divide 80");
    assert (NCLIENT <= 2**MID_W) else $error("NCLIENT exceeds message id range");
  end

  sha_slot_t stage_in  [UNROLL];
  sha_slot_t stage_out [UNROLL];

  for (genvar k = 0; k < UNROLL; k++) begin : g_stage
    if (k > 0) begin : g_link
      assign stage_in[k] = stage_out[k-1];
    end
    sha1_round u_round (
      .clk    (clk),
      .rst_n  (rst_n),
      .slot_i (stage_in[k]),
      .slot_o (stage_out[k])
    );
  end

  sha_slot_t         tail, entry;
  logic [HASH_W-1:0] h_sum;
  logic              slot_free, finish;
  logic [CW-1:0]     rr, pick;
  logic              pick_ok;

  assign tail = stage_out[UNROLL-1];

  // H + (a..e), word by word
  always_comb begin
    h_sum[159:128] = tail.h[159:128] + tail.st.a;
    h_sum[127:96]  = tail.h[127:96]  + tail.st.b;
    h_sum[95:64]   = tail.h[95:64]   + tail.st.c;
    h_sum[63:32]   = tail.h[63:32]   + tail.st.d;
    h_sum[31:0]    = tail.h[31:0]    + tail.st.e;
  end

  // Round-robin choice among requesting clients, starting at rr.
  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int unsigned i = 0; i < NCLIENT; i++) begin
      logic [CW-1:0] c;
      c = CW'((int'(rr) + i) % NCLIENT);
      if (!pick_ok && req_i[c]) begin
        pick    = c;
        pick_ok = 1'b1;
      end
    end
  end

  always_comb begin
    finish    = tail.valid && (tail.t == 7'd80) && tail.blk;
    slot_free = !tail.valid || finish;
    grant_o   = '0;
    entry     = tail;
    if (tail.valid && tail.t != 7'd80) begin
      entry = tail;                         // re-cycle
    end else if (tail.valid && !tail.blk) begin
      entry      = tail;                    // launch the second block
      entry.blk  = 1'b1;
      entry.t    = '0;
      entry.h    = h_sum;
      entry.st   = h_sum;
      entry.w    = tail.blk1;
    end else if (slot_free && pick_ok) begin
      entry       = '0;                     // accept a new message
      entry.valid = 1'b1;
      entry.mid   = MID_W'(pick);
      entry.h     = SHA1_IV;
      entry.st    = SHA1_IV;
      entry.w     = blk0_i[pick];
      entry.blk1  = blk1_i[pick];
      grant_o[pick] = 1'b1;
    end else begin
      entry       = tail;
      entry.valid = 1'b0;
    end
  end

  assign stage_in[0] = entry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr     <= '0;
      done_o <= '0;
      hash_o <= '0;
    end else begin
      if (slot_free && pick_ok)
        rr <= (pick == CW'(NCLIENT - 1)) ? '0 : pick + CW'(1);
      done_o <= '0;
      if (finish) begin
        done_o[tail.mid[CW-1:0]] <= 1'b1;
        hash_o                   <= h_sum;
      end
    end
  end

endmodule
