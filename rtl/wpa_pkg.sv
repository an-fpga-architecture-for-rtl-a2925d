// Shared types, constants and SHA-1 helper functions for the WPA/WPA2 PMK
// generator.
//
// Conventions used throughout the design:
//  * Byte strings (passphrase, SSID, hash blocks) are held left-aligned and
//    big-endian: the first byte of the string sits in the most significant
//    byte of the vector, as SHA-1 consumes it.
//  * A passphrase occupies one 512-bit field (at most 63 characters, zero
//    padded), which is also the HMAC key block.
//  * The SSID occupies a 256-bit field (at most 32 bytes) and its length is
//    given in bits.
package wpa_pkg;

  localparam int BLK_W   = 512;   // SHA-1 block / HMAC key block
  localparam int HASH_W  = 160;   // SHA-1 digest
  localparam int PMK_W   = 256;   // PBKDF2 derived key length (dkLen)
  localparam int SSID_W  = 256;   // 32-byte SSID maximum
  localparam int T_W     = SSID_W + 32;  // SSID followed by the block index
  localparam int TLEN_W  = 9;     // bit length of T, up to T_W
  localparam int MID_W   = 8;     // message id carried through the SHA-1 pipe
  localparam int MC_W    = 64;    // data width of one memory controller port
  localparam int ADDR_W  = 48;    // byte address width
  localparam int CNT_W   = 32;    // dictionary entry counters

  localparam logic [HASH_W-1:0] SHA1_IV =
    {32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};

  localparam logic [7:0] IPAD_BYTE = 8'h36;
  localparam logic [7:0] OPAD_BYTE = 8'h5c;

  // Working variables a..e of one SHA-1 computation.
  typedef struct packed {
    logic [31:0] a, b, c, d, e;
  } sha_state_t;

  // One slot of the SHA-1 pipeline (Fig. 8 / Fig. 9 register contents).
  typedef struct packed {
    logic              valid;
    logic [MID_W-1:0]  mid;     // which client the message belongs to
    logic              blk;     // 0: first block in flight, 1: second block
    logic [6:0]        t;       // rounds completed on the current block
    logic [HASH_W-1:0] h;       // chaining value H0..H4 for this block
    sha_state_t        st;      // a..e
    logic [BLK_W-1:0]  w;       // W0..W15, W0 in the top word
    logic [BLK_W-1:0]  blk1;    // second message block, waiting its turn
  } sha_slot_t;

  function automatic logic [31:0] rotl32(input logic [31:0] x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic logic [31:0] sha1_f(input logic [6:0] t,
                                         input logic [31:0] b, c, d);
    if (t < 7'd20)      return (b & c) | (~b & d);
    else if (t < 7'd40) return b ^ c ^ d;
    else if (t < 7'd60) return (b & c) | (b & d) | (c & d);
    else                return b ^ c ^ d;
  endfunction

  function automatic logic [31:0] sha1_k(input logic [6:0] t);
    if (t < 7'd20)      return 32'h5A827999;
    else if (t < 7'd40) return 32'h6ED9EBA1;
    else if (t < 7'd60) return 32'h8F1BBCDC;
    else                return 32'hCA62C1D6;
  endfunction

  // Reverse the byte order of a 64-bit memory word. Memory holds strings in
  // ascending byte addresses on a little-endian host, so byte 0 of a word is
  // in bits [7:0] there and must become the most significant byte here.
  function automatic logic [63:0] bswap64(input logic [63:0] x);
    logic [63:0] y;
    for (int i = 0; i < 8; i++) y[8*i +: 8] = x[8*(7-i) +: 8];
    return y;
  endfunction

endpackage
