// Result Manager: stores finished PMKs to memory in dictionary order.
//
// A pointer walks the PBKDF2 units in the same round-robin order the PBKDF2
// Manager used for dispatch. When the unit under the pointer shows a valid
// result and none of the N_WR = 4 write ports asks to stall, the 256-bit PMK
// is written in one cycle as four 64-bit stores, port j storing bytes
// 8j..8j+7 at pmk_addr + 32*n + 8*j; the unit is acknowledged (it may then
// overwrite its result register), the stored-PMK count is incremented and
// the pointer advances. A stall on any port halts the round robin. Once
// dict_size PMKs are stored, a flush is issued on every write port and the
// attack is complete when every port has reported flush completion.
//
// Interface: start_i (one cycle) loads pmk_addr_i / dict_size_i and clears
// the count. Write port j: wr_rq_st_o, wr_addr_o, wr_data_o, wr_flush_o to
// memory, wr_fsh_cmp_i (one-cycle flush-complete) and wr_rq_next_i (high
// when the port can take a request this cycle; low means stall) from memory.
// complete_count_o is the number of PMKs stored; busy_o is high from start
// until flush completion. Each 64-bit word is byte-swapped so the PMK's
// first byte lands at the lowest address of a little-endian memory.
//
// The round robin, the acknowledge, the count and the stall behaviour
// follow the design; the address map, the single-cycle four-port store and
// the flush sequence are this design's choices.
module result_manager
  import wpa_pkg::*;
#(
  parameter int unsigned N_PBKDF2 = 10,
  parameter int unsigned N_WR     = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start_i,
  input  logic [ADDR_W-1:0]                 pmk_addr_i,
  input  logic [CNT_W-1:0]                  dict_size_i,
  // from / to the PBKDF2 units
  input  logic [N_PBKDF2-1:0]               valid_i,
  input  logic [N_PBKDF2-1:0][PMK_W-1:0]    result_i,
  output logic [N_PBKDF2-1:0]               ack_o,
  // memory controller write ports
  output logic [N_WR-1:0]                   wr_rq_st_o,
  output logic [N_WR-1:0][ADDR_W-1:0]       wr_addr_o,
  output logic [N_WR-1:0][MC_W-1:0]         wr_data_o,
  output logic [N_WR-1:0]                   wr_flush_o,
  input  logic [N_WR-1:0]                   wr_fsh_cmp_i,
  input  logic [N_WR-1:0]                   wr_rq_next_i,
  // status
  output logic [CNT_W-1:0]                  complete_count_o,
  output logic                              busy_o
);

  localparam int unsigned PW = (N_PBKDF2 > 1) ? $clog2(N_PBKDF2) : 1;

  typedef enum logic [1:0] {S_IDLE, S_STORE, S_FLUSH, S_WAIT_FLUSH} state_t;

  state_t            state;
  logic [PW-1:0]     ptr;
  logic [ADDR_W-1:0] base_q;
  logic [CNT_W-1:0]  size_q;
  logic [N_WR-1:0]   fsh_seen;
  logic              store, stalled;

  assign stalled = !(&wr_rq_next_i);
  assign store   = (state == S_STORE) && (complete_count_o < size_q)
                && valid_i[ptr] && !stalled;

  always_comb begin
    ack_o      = '0;
    ack_o[ptr] = store;
    for (int j = 0; j < N_WR; j++) begin
      wr_rq_st_o[j] = store;
      wr_addr_o[j]  = base_q + ADDR_W'({complete_count_o, 5'b0}) + ADDR_W'(8 * j);
      wr_data_o[j]  = bswap64(result_i[ptr][PMK_W-1-MC_W*j -: MC_W]);
      wr_flush_o[j] = (state == S_FLUSH) && !stalled;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      ptr              <= '0;
      base_q           <= '0;
      size_q           <= '0;
      fsh_seen         <= '0;
      complete_count_o <= '0;
    end else if (start_i) begin
      state            <= S_STORE;
      ptr              <= '0;
      base_q           <= pmk_addr_i;
      size_q           <= dict_size_i;
      fsh_seen         <= '0;
      complete_count_o <= '0;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_STORE: begin
          if (store) begin
            complete_count_o <= complete_count_o + CNT_W'(1);
            ptr <= (ptr == PW'(N_PBKDF2 - 1)) ? '0 : ptr + PW'(1);
          end
          if (complete_count_o == size_q) state <= S_FLUSH;
        end
        S_FLUSH: if (!stalled) state <= S_WAIT_FLUSH;
        S_WAIT_FLUSH: begin
          fsh_seen <= fsh_seen | wr_fsh_cmp_i;
          if (&(fsh_seen | wr_fsh_cmp_i)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack_o));
  assert property (@(posedge clk) disable iff (!rst_n) |wr_rq_st_o |-> &wr_rq_next_i);

endmodule
