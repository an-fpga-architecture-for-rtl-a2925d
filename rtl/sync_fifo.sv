// Synchronous first-in first-out buffer.
//
// Holds up to DEPTH words of WIDTH bits in a register array addressed by
// read and write pointers, with an occupancy counter. push_i writes din_i
// at the tail; pop_i removes the head word, which is always visible on
// dout_o while empty_o is low (show-ahead). Pushing when full or popping
// when empty is a protocol error and is flagged by assertions. Push and pop
// may happen in the same cycle. One such FIFO per memory read port buffers
// the returning passphrase words in the Passphrase Manager; its depth is
// this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,
  input  logic [WIDTH-1:0] din_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] dout_o,
  output logic             empty_o,
  output logic             full_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push_i) mem[wr_ptr] <= din_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      count_o <= '0;
    end else begin
      if (push_i) wr_ptr <= inc(wr_ptr);
      if (pop_i)  rd_ptr <= inc(rd_ptr);
      count_o <= count_o + CW'(push_i) - CW'(pop_i);
    end
  end

  assign dout_o  = mem[rd_ptr];
  assign empty_o = (count_o == '0);
  assign full_o  = (count_o == CW'(DEPTH));

  assert property (@(posedge clk) disable iff (!rst_n) push_i |-> (!full_o || pop_i));
  assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o);

endmodule
