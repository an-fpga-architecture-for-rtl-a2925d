// One SHA-1 inner-loop pipeline stage.
//
// Applies one round t of the SHA-1 compression function to the slot it
// receives and registers the result, so a chain of these stages is the
// unrolled inner loop. Per round:
//   a' = ROTL5(a) + f_t(b,c,d) + e + K_t + W0,  b' = a,  c' = ROTL30(b),
//   d' = c,  e' = d,
// and the sixteen-word message window shifts left by one word, the new W15
// being ROTL1(W13 ^ W8 ^ W2 ^ W0). The round index t selects f_t and K_t and
// is incremented. Chaining value H0..H4, message id, block id and the waiting
// second block travel through unchanged; H is only added back after the
// 80th round, outside this stage.
//
// Interface: slot_i is sampled every clock; slot_o is the registered result
// one cycle later. Only slot_o.valid is reset (active-low rst_n).
//
// The datapath (XOR of W0, W2, W8, W13, the two rotators, f_t, K_t and the
// adder tree) is the stage the design describes; the ROTL1 on the schedule
// word, which that picture leaves out, is taken from the SHA-1 standard.
module sha1_round
  import wpa_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  sha_slot_t slot_i,
  output sha_slot_t slot_o
);

  sha_slot_t nxt;
  logic [31:0] w0, w2, w8, w13;

  always_comb begin
    w0  = slot_i.w[BLK_W-1-32*0  -: 32];
    w2  = slot_i.w[BLK_W-1-32*2  -: 32];
    w8  = slot_i.w[BLK_W-1-32*8  -: 32];
    w13 = slot_i.w[BLK_W-1-32*13 -: 32];

    nxt      = slot_i;
    nxt.st.a = rotl32(slot_i.st.a, 5) + sha1_f(slot_i.t, slot_i.st.b, slot_i.st.c, slot_i.st.d)
             + slot_i.st.e + sha1_k(slot_i.t) + w0;
    nxt.st.b = slot_i.st.a;
    nxt.st.c = rotl32(slot_i.st.b, 30);
    nxt.st.d = slot_i.st.c;
    nxt.st.e = slot_i.st.d;
    nxt.w    = {slot_i.w[BLK_W-33:0], rotl32(w13 ^ w8 ^ w2 ^ w0, 1)};
    nxt.t    = slot_i.t + 7'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_o       <= '0;
    end else begin
      slot_o       <= nxt;
    end
  end

endmodule
