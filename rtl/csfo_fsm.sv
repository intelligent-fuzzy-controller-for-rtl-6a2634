// csfo_fsm: state register and next-state function of the
// Crisp-State-Fuzzy-Output finite state machine.
//
// The state is crisp and selects which overall fuzzy relation R_K of the rule
// memory the inference unit uses; the outputs stay fuzzy. The next state is
// Y = f_y(X_B, y) of the present state y and the Boolean variables X_B
// derived from the fuzzy inputs. The original design leaves f_y to the application,
// so here it is a programmable table: each state owns N_TRANS entries
// {valid, mask, match, next}; the first valid entry with
// (X_B & mask) == match gives the next state, and with no match the state is
// kept. Entries are written through tbl_we and are all invalid after reset.
//
// Timing: next_state is combinational from state and xb. On a clock with
// step high the state moves to next_state; force_en loads force_state
// instead and wins over step. Reset puts the machine in state 0.
module csfo_fsm
  import fuzzy_pkg::*;
#(
  parameter int unsigned NSTATES = N_STATES,
  parameter int unsigned N_TRANS = 4,
  localparam int unsigned IDX_W  = (N_TRANS > 1) ? $clog2(N_TRANS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step,
  input  logic [XB_W-1:0]    xb,
  input  logic               force_en,
  input  logic [STATE_W-1:0] force_state,
  input  logic               tbl_we,
  input  logic [STATE_W-1:0] tbl_state,
  input  logic [IDX_W-1:0]   tbl_idx,
  input  trans_t             tbl_data,
  output logic [STATE_W-1:0] state,
  output logic [STATE_W-1:0] next_state
);

  trans_t tbl [NSTATES][N_TRANS];

  always_comb begin
    next_state = state;
    for (int e = N_TRANS - 1; e >= 0; e--)
      if (tbl[state][e].valid && ((xb & tbl[state][e].mask) == tbl[state][e].match))
        next_state = tbl[state][e].next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '0;
      for (int s = 0; s < int'(NSTATES); s++)
        for (int e = 0; e < int'(N_TRANS); e++)
          tbl[s][e] <= '0;
    end else begin
      if (force_en)  state <= force_state;
      else if (step) state <= next_state;
      if (tbl_we) tbl[tbl_state][tbl_idx] <= tbl_data;
    end
  end

endmodule
