// First-round T generation for PBKDF2: SSID || INT(i).
//
// PBKDF2 salts the first HMAC of derived-key block i with the SSID followed
// by the block index i. The index, CTR_BYTES bytes wide and big-endian, is
// placed at the top of a T_W-bit word and shifted right logically by the
// SSID length; an OR with the left-aligned SSID then yields the salt without
// any byte-wise packing. Example with SSID "test" (32 bits) and a one-byte
// index 0x01: 0x74657374 | 0x0000000001 = 0x7465737401.
//
// Interface: purely combinational. ssid_i is left-aligned (first character
// in bits [255:248]) and zero beyond ssid_len_i bits; ssid_len_i is in bits
// and a multiple of 8. t_o is left-aligned and t_len_o = ssid_len_i +
// 8*CTR_BYTES.
//
// The shift-and-OR construction follows the design; the index width is a
// parameter. Its default of four bytes is the INT(i) encoding of PBKDF2,
// which WPA/WPA2 PMKs require; CTR_BYTES = 1 gives a one-byte index.
module salt_gen
  import wpa_pkg::*;
#(
  parameter int unsigned CTR_BYTES = 4
) (
  input  logic [SSID_W-1:0] ssid_i,
  input  logic [TLEN_W-1:0] ssid_len_i,
  input  logic [7:0]        index_i,
  output logic [T_W-1:0]    t_o,
  output logic [TLEN_W-1:0] t_len_o
);

  logic [T_W-1:0] idx_top;

  always_comb begin
    idx_top = '0;
    idx_top[T_W-1 -: 8*CTR_BYTES] = (8*CTR_BYTES)'(index_i);
    t_o     = {ssid_i, 32'b0} | (idx_top >> ssid_len_i);
    t_len_o = ssid_len_i + TLEN_W'(8 * CTR_BYTES);
  end

endmodule
