// Behavioural model of the memory system seen by one attacker engine: eight
// read ports and four write ports onto one shared, sparse 64-bit-word memory.
// Not synthesizable; used only by the testbenches.
//
// Read port j: a request (rq_ld, addr) is answered after LAT_MIN..LAT_MAX
// cycles with valid/data, always in request order per port (the read order
// queue of the real memory system). Write port j: rq_next is the "may take a
// request" signal; it drops at random (STALL_PCT percent of cycles) and for
// as long as force_stall_i is high. A store while rq_next is low is an
// error. A flush is answered with a one-cycle fsh_cmp 3..12 cycles later.
// Addresses are byte addresses of 8-byte-aligned words.
module mc_mem_model #(
  parameter int unsigned LAT_MIN   = 4,
  parameter int unsigned LAT_MAX   = 40,
  parameter int unsigned STALL_PCT = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             force_stall_i,
  input  logic [7:0]       rd_rq_ld_i,
  input  logic [7:0][47:0] rd_addr_i,
  output logic [7:0]       rd_valid_o,
  output logic [7:0][63:0] rd_data_o,
  input  logic [3:0]       wr_rq_st_i,
  input  logic [3:0][47:0] wr_addr_i,
  input  logic [3:0][63:0] wr_data_i,
  input  logic [3:0]       wr_flush_i,
  output logic [3:0]       wr_fsh_cmp_o,
  output logic [3:0]       wr_rq_next_o
);

  logic [63:0] mem [logic [44:0]];
  longint cyc = 0;
  int store_errors = 0;
  int stall_cycles = 0;

  typedef struct { longint due; logic [63:0] data; } rsp_t;
  rsp_t rq [8][$];
  longint last_due [8];
  longint flush_due [4];

  function automatic logic [63:0] rd64(input logic [47:0] a);
    return mem.exists(a[47:3]) ? mem[a[47:3]] : 64'h0;
  endfunction

  initial begin
    for (int j = 0; j < 8; j++) last_due[j] = 0;
    for (int j = 0; j < 4; j++) flush_due[j] = -1;
    rd_valid_o   = '0;
    rd_data_o    = '0;
    wr_fsh_cmp_o = '0;
    wr_rq_next_o = '1;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rd_valid_o   <= '0;
    wr_fsh_cmp_o <= '0;
    if (rst_n) begin
      for (int j = 0; j < 8; j++) begin
        if (rd_rq_ld_i[j]) begin
          rsp_t r;
          r.due  = cyc + longint'($urandom_range(LAT_MAX, LAT_MIN));
          if (r.due <= last_due[j]) r.due = last_due[j] + 1;
          last_due[j] = r.due;
          r.data = rd64(rd_addr_i[j]);
          rq[j].push_back(r);
        end
        if (rq[j].size() > 0 && rq[j][0].due <= cyc) begin
          rd_valid_o[j] <= 1'b1;
          rd_data_o[j]  <= rq[j][0].data;
          void'(rq[j].pop_front());
        end
      end
      for (int j = 0; j < 4; j++) begin
        if (wr_rq_st_i[j]) begin
          if (!wr_rq_next_o[j]) store_errors++;
          mem[wr_addr_i[j][47:3]] = wr_data_i[j];
        end
        if (wr_flush_i[j]) flush_due[j] = cyc + longint'($urandom_range(12, 3));
        if (flush_due[j] == cyc) begin
          wr_fsh_cmp_o[j] <= 1'b1;
          flush_due[j] = -1;
        end
        wr_rq_next_o[j] <= !force_stall_i && ($urandom_range(99) >= STALL_PCT);
      end
      if (!(&wr_rq_next_o)) stall_cycles++;
    end
  end

endmodule
