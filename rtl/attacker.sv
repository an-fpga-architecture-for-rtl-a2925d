// Attacker: WPA/WPA2 PMK generator for one FPGA application engine.
//
// For every passphrase of a dictionary in memory it computes the pairwise
// master key PMK = PBKDF2-HMAC-SHA1(passphrase, SSID, ITER, 256 bits) and
// writes it to a PMK store in memory, entry n of the dictionary giving entry
// n of the store, so host software can compare PMKs against a captured
// handshake. Data flows through four stages:
//   passphrase_manager  eight 64-bit read ports -> 512-bit passphrases
//   pbkdf2_manager      round-robin dispatch to N_PBKDF2 pbkdf2 units
//   pbkdf2 x N_PBKDF2   two hmac_sha1 units each, all 2*N_PBKDF2 HMAC units
//                       sharing one sha1_pipeline of SHA_UNROLL stages
//   result_manager      round-robin collection, four 64-bit write ports
// Order is preserved because memory returns reads in request order and both
// managers walk the units in the same fixed order.
//
// Interface: start_i (one cycle) begins an attack with dict_size_i entries
// of 64 bytes at dict_addr_i, PMKs of 32 bytes written from pmk_addr_i, SSID
// ssid_i (left-aligned, first character in bits [255:248]) of ssid_len_i
// bits. busy_o is high from the cycle after start_i until all PMKs are
// stored and the write ports are flushed; complete_count_o counts stored
// PMKs. The memory controller ports are plain arrays: eight read ports
// (request load, address / valid, data) and four write ports (request store,
// address, data, flush / flush complete, request-next = not stalled).
//
// With the defaults (ten PBKDF2 units, twenty pipeline stages) every HMAC
// unit owns one pipeline slot on average and the engine produces ten PMKs
// about every ITER * 330 cycles. ITER = 4096 and the 256-bit key length are
// fixed by WPA/WPA2.
module attacker
  import wpa_pkg::*;
#(
  parameter int unsigned N_PBKDF2   = 10,
  parameter int unsigned SHA_UNROLL = 20,
  parameter int unsigned ITER       = 4096,
  parameter int unsigned CTR_BYTES  = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // attack parameters and status
  input  logic                      start_i,
  input  logic [CNT_W-1:0]          dict_size_i,
  input  logic [ADDR_W-1:0]         dict_addr_i,
  input  logic [ADDR_W-1:0]         pmk_addr_i,
  input  logic [SSID_W-1:0]         ssid_i,
  input  logic [TLEN_W-1:0]         ssid_len_i,
  output logic [CNT_W-1:0]          complete_count_o,
  output logic                      busy_o,
  // memory controller read ports 0..7
  output logic [7:0]                rd_rq_ld_o,
  output logic [7:0][ADDR_W-1:0]    rd_addr_o,
  input  logic [7:0]                rd_valid_i,
  input  logic [7:0][MC_W-1:0]      rd_data_i,
  // memory controller write ports 8..11
  output logic [3:0]                wr_rq_st_o,
  output logic [3:0][ADDR_W-1:0]    wr_addr_o,
  output logic [3:0][MC_W-1:0]      wr_data_o,
  output logic [3:0]                wr_flush_o,
  input  logic [3:0]                wr_fsh_cmp_i,
  input  logic [3:0]                wr_rq_next_i
);

  localparam int unsigned NCLIENT = 2 * N_PBKDF2;

  // SSID held for the whole attack
  logic [SSID_W-1:0] ssid_q;
  logic [TLEN_W-1:0] ssid_len_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ssid_q     <= '0;
      ssid_len_q <= '0;
    end else if (start_i) begin
      ssid_q     <= ssid_i;
      ssid_len_q <= ssid_len_i;
    end
  end

  // Passphrase Manager -> PBKDF2 Manager
  logic             pm_empty, pm_valid, pm_done, pm_next;
  logic [BLK_W-1:0] pm_data;

  passphrase_manager #(.N_RD(8), .FIFO_DEPTH(FIFO_DEPTH)) u_pm (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_i     (start_i),
    .dict_addr_i (dict_addr_i),
    .dict_size_i (dict_size_i),
    .rd_rq_ld_o  (rd_rq_ld_o),
    .rd_addr_o   (rd_addr_o),
    .rd_valid_i  (rd_valid_i),
    .rd_data_i   (rd_data_i),
    .empty_o     (pm_empty),
    .data_o      (pm_data),
    .valid_o     (pm_valid),
    .done_o      (pm_done),
    .rq_next_i   (pm_next)
  );

  // PBKDF2 Manager -> PBKDF2 units
  logic [N_PBKDF2-1:0] pb_busy, pb_start, pb_valid, pb_ack;
  logic [BLK_W-1:0]    pb_data;
  logic [N_PBKDF2-1:0][PMK_W-1:0] pb_result;

  pbkdf2_manager #(.N_PBKDF2(N_PBKDF2)) u_pbm (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (start_i),
    .empty_i   (pm_empty),
    .data_i    (pm_data),
    .rq_next_o (pm_next),
    .busy_i    (pb_busy),
    .start_o   (pb_start),
    .data_o    (pb_data)
  );

  // PBKDF2 units and the shared SHA-1 pipeline
  logic [NCLIENT-1:0]            sha_req, sha_grant, sha_done;
  logic [NCLIENT-1:0][BLK_W-1:0] sha_blk0, sha_blk1;
  logic [HASH_W-1:0]             sha_hash;

  for (genvar k = 0; k < N_PBKDF2; k++) begin : g_pbkdf2
    pbkdf2 #(.ITER(ITER), .CTR_BYTES(CTR_BYTES)) u_pbkdf2 (
      .clk          (clk),
      .rst_n        (rst_n),
      .start_i      (pb_start[k]),
      .passphrase_i (pb_data),
      .ssid_i       (ssid_q),
      .ssid_len_i   (ssid_len_q),
      .busy_o       (pb_busy[k]),
      .valid_o      (pb_valid[k]),
      .result_o     (pb_result[k]),
      .ack_i        (pb_ack[k]),
      .sha_req_o    (sha_req[2*k +: 2]),
      .sha_blk0_o   (sha_blk0[2*k +: 2]),
      .sha_blk1_o   (sha_blk1[2*k +: 2]),
      .sha_grant_i  (sha_grant[2*k +: 2]),
      .sha_done_i   (sha_done[2*k +: 2]),
      .sha_hash_i   (sha_hash)
    );
  end

  sha1_pipeline #(.UNROLL(SHA_UNROLL), .NCLIENT(NCLIENT)) u_sha1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .req_i   (sha_req),
    .blk0_i  (sha_blk0),
    .blk1_i  (sha_blk1),
    .grant_o (sha_grant),
    .done_o  (sha_done),
    .hash_o  (sha_hash)
  );

  // PMK Result Manager
  result_manager #(.N_PBKDF2(N_PBKDF2), .N_WR(4)) u_rm (
    .clk              (clk),
    .rst_n            (rst_n),
    .start_i          (start_i),
    .pmk_addr_i       (pmk_addr_i),
    .dict_size_i      (dict_size_i),
    .valid_i          (pb_valid),
    .result_i         (pb_result),
    .ack_o            (pb_ack),
    .wr_rq_st_o       (wr_rq_st_o),
    .wr_addr_o        (wr_addr_o),
    .wr_data_o        (wr_data_o),
    .wr_flush_o       (wr_flush_o),
    .wr_fsh_cmp_i     (wr_fsh_cmp_i),
    .wr_rq_next_i     (wr_rq_next_i),
    .complete_count_o (complete_count_o),
    .busy_o           (busy_o)
  );

  // The passphrase stream ends exactly when the last entry is dispatched.
  assert property (@(posedge clk) disable iff (!rst_n) pm_valid |-> !pm_done);

endmodule
