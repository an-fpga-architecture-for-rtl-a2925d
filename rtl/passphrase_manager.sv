// Passphrase Manager: fetches dictionary entries over eight memory ports.
//
// Every dictionary entry is a 64-byte record holding a zero-padded
// passphrase. One request is issued on all N_RD = 8 read ports at once, port
// j asking for the 64-bit word at dict_addr + 64*n + 8*j, so a whole entry is
// requested in one cycle; the read count is then incremented. Each port's
// responses, which the memory system returns in request order, go into that
// port's FIFO. When all eight FIFOs are non-empty their head words together
// form the next passphrase: empty_o goes low and the PBKDF2 Manager may take
// it with rq_next_i. Requests continue until the read count equals the
// dictionary size or the FIFOs could not hold another entry (entries
// requested but not yet taken are counted against the FIFO depth, so a
// response never finds its FIFO full).
//
// Interface: start_i (one cycle) loads dict_addr_i / dict_size_i and clears
// the counts. Read port j: rd_rq_ld_o/rd_addr_o request, rd_valid_i/rd_data_i
// response (no stall on this side). data_o is the 512-bit passphrase, word 0
// (lowest address) in the top bits; each 64-bit memory word is byte-swapped
// so that the string's first byte is the most significant (memory is little
// endian). valid_o mirrors !empty_o; done_o is high once every entry has
// been requested and taken.
//
// The eight ports, per-port FIFOs, read counter and stop conditions follow
// the design; FIFO depth, address arithmetic, byte order and the meaning
// given to valid_o/done_o are this design's choices.
module passphrase_manager
  import wpa_pkg::*;
#(
  parameter int unsigned N_RD       = 8,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start_i,
  input  logic [ADDR_W-1:0]            dict_addr_i,
  input  logic [CNT_W-1:0]             dict_size_i,
  // memory controller read ports
  output logic [N_RD-1:0]              rd_rq_ld_o,
  output logic [N_RD-1:0][ADDR_W-1:0]  rd_addr_o,
  input  logic [N_RD-1:0]              rd_valid_i,
  input  logic [N_RD-1:0][MC_W-1:0]    rd_data_i,
  // to the PBKDF2 Manager
  output logic                         empty_o,
  output logic [N_RD*MC_W-1:0]         data_o,
  output logic                         valid_o,
  output logic                         done_o,
  input  logic                         rq_next_i
);

  localparam int unsigned FW = $clog2(FIFO_DEPTH + 1);

  logic [ADDR_W-1:0] base_q;
  logic [CNT_W-1:0]  size_q, read_cnt, taken_cnt;
  logic [FW-1:0]     in_flight;
  logic              issue, pop;
  logic [N_RD-1:0]   f_empty, f_full;
  logic [FW-1:0]     f_count [N_RD];
  logic [MC_W-1:0]   f_dout [N_RD];

  assign issue = (read_cnt < size_q) && (in_flight < FW'(FIFO_DEPTH));
  assign pop   = rq_next_i && !empty_o;

  for (genvar j = 0; j < N_RD; j++) begin : g_port
    assign rd_rq_ld_o[j] = issue;
    assign rd_addr_o[j]  = base_q + ADDR_W'({read_cnt, 6'b0}) + ADDR_W'(8 * j);

    sync_fifo #(.WIDTH(MC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .push_i  (rd_valid_i[j]),
      .din_i   (rd_data_i[j]),
      .pop_i   (pop),
      .dout_o  (f_dout[j]),
      .empty_o (f_empty[j]),
      .full_o  (f_full[j]),
      .count_o (f_count[j])
    );

    // Reads are only issued for FIFO space already reserved in in_flight,
    // so a FIFO never holds more than in_flight words and never overflows.
    assert property (@(posedge clk) disable iff (!rst_n) f_count[j] <= in_flight);
    assert property (@(posedge clk) disable iff (!rst_n) rd_valid_i[j] |-> !f_full[j]);

    assign data_o[N_RD*MC_W-1-MC_W*j -: MC_W] = bswap64(f_dout[j]);
  end

  assign empty_o = |f_empty;
  assign valid_o = !empty_o;
  assign done_o  = (taken_cnt == size_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q    <= '0;
      size_q    <= '0;
      read_cnt  <= '0;
      taken_cnt <= '0;
      in_flight <= '0;
    end else if (start_i) begin
      base_q    <= dict_addr_i;
      size_q    <= dict_size_i;
      read_cnt  <= '0;
      taken_cnt <= '0;
      in_flight <= '0;
    end else begin
      if (issue) read_cnt  <= read_cnt + CNT_W'(1);
      if (pop)   taken_cnt <= taken_cnt + CNT_W'(1);
      in_flight <= in_flight + (issue ? FW'(1) : FW'(0)) - (pop ? FW'(1) : FW'(0));
    end
  end

  // All eight ports answer every request, so their FIFOs never disagree by
  // more than the responses still in transit.
  assert property (@(posedge clk) disable iff (!rst_n) rq_next_i |-> !empty_o);

endmodule
