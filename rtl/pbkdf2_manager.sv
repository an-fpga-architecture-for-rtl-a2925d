// PBKDF2 Manager: dispatches passphrases to the PBKDF2 units in strict
// round-robin order.
//
// A pointer names the next unit in the schedule. Whenever a passphrase is
// available (empty_i low) and that unit is not busy, the manager pulses the
// unit's start line with the passphrase on data_o, pops the passphrase
// (rq_next_o) and advances the pointer. If the scheduled unit is busy the
// manager waits for it rather than skipping ahead, so entry n of the
// dictionary always goes to unit n mod N. Together with the Result Manager's
// identical schedule and the fixed PBKDF2 run time, this keeps the PMKs in
// dictionary order.
//
// Interface: start_i (one cycle) resets the pointer to unit 0 for a new
// attack. empty_i/data_i/rq_next_o face the Passphrase Manager; busy_i,
// start_o and data_o face the PBKDF2 units. Combinational dispatch: start_o
// and rq_next_o are high in the same cycle, at most one unit per cycle.
// The strict round-robin schedule is the design's; waiting on a busy unit
// instead of skipping it is what keeps the order.
module pbkdf2_manager
  import wpa_pkg::*;
#(
  parameter int unsigned N_PBKDF2 = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  logic                 empty_i,
  input  logic [BLK_W-1:0]     data_i,
  output logic                 rq_next_o,
  input  logic [N_PBKDF2-1:0]  busy_i,
  output logic [N_PBKDF2-1:0]  start_o,
  output logic [BLK_W-1:0]     data_o
);

  localparam int unsigned PW = (N_PBKDF2 > 1) ? $clog2(N_PBKDF2) : 1;

  logic [PW-1:0] ptr;
  logic          go;

  assign go        = !empty_i && !busy_i[ptr];
  assign rq_next_o = go;
  assign data_o    = data_i;

  always_comb begin
    start_o      = '0;
    start_o[ptr] = go;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (start_i) begin
      ptr <= '0;
    end else if (go) begin
      ptr <= (ptr == PW'(N_PBKDF2 - 1)) ? '0 : ptr + PW'(1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(start_o));

endmodule
