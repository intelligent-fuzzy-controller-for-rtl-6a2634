// preproc_unit: fuzzy pre-processing unit (pipeline step T2) together with
// the CSFO finite state machine.
//
// For every job from the host interface it
//  * intersects the N_INPUTS fuzzy inputs point by point,
//    X_I(u) = min(X(1)(u), X(2)(u)), which is the multi-input antecedent used
//    by both learning and inference;
//  * applies the B transform: for each input it finds the position of the
//    maximum of its membership function (first one if several, positions
//    1..U_MAX) and sets one Boolean variable per range of U_MAX/N_RANGES = 5
//    positions, so bit k*N_RANGES+0 is "X(k+1) LOW" (maximum in 1..5),
//    bit k*N_RANGES+1 covers 6..10, and so on;
//  * for an inference job, steps the CSFO FSM with those Boolean variables;
//    the job then carries the new state, which selects the relation R_K it is
//    inferred with. Learning and row-load jobs keep the relation named by the
//    host. An OP_SET_STATE job only forces the FSM state and ends here.
// The original design names the LOW variable (maximum in 1 to 5); the other ranges,
// the first-maximum rule and the table form of the next-state function are
// this design's choices.
//
// Timing: one register stage with a valid/ready handshake; a job taken on
// one clock edge is offered downstream on the next. The state change happens
// on the same edge that takes the job into the stage.
module preproc_unit
  import fuzzy_pkg::*;
#(
  parameter int unsigned NSTATES = N_STATES,
  parameter int unsigned N_TRANS = 4,
  localparam int unsigned IDX_W  = (N_TRANS > 1) ? $clog2(N_TRANS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  host_job_t          in_job,
  output logic               out_valid,
  input  logic               out_ready,
  output eng_job_t           out_job,
  // next-state table programming
  input  logic               tbl_we,
  input  logic [STATE_W-1:0] tbl_state,
  input  logic [IDX_W-1:0]   tbl_idx,
  input  trans_t             tbl_data,
  output logic [STATE_W-1:0] state
);

  localparam int unsigned RANGE = U_MAX / N_RANGES;
  localparam int unsigned POS_W = $clog2(U_MAX + 1);

  // ------------------------------------------------- intersection of inputs
  fvec_t xmin [N_INPUTS];
  assign xmin[0] = in_job.x[0];
  for (genvar k = 1; k < int'(N_INPUTS); k++) begin : g_min
    min_unit u_min (.a(xmin[k-1]), .b(in_job.x[k]), .y(xmin[k]));
  end

  // ------------------------------------------------------------ B transform
  logic [XB_W-1:0] xb;
  always_comb begin
    mu_t             best;
    logic [POS_W-1:0] pos;
    xb = '0;
    for (int k = 0; k < int'(N_INPUTS); k++) begin
      best = in_job.x[k][0];
      pos  = POS_W'(1);
      for (int u = 1; u < int'(U_MAX); u++)
        if (in_job.x[k][u] > best) begin
          best = in_job.x[k][u];
          pos  = POS_W'(u + 1);
        end
      for (int r = 0; r < int'(N_RANGES); r++)
        if (int'(pos) > r * RANGE && int'(pos) <= (r + 1) * RANGE)
          xb[k*N_RANGES + r] = 1'b1;
    end
  end

  // ---------------------------------------------------------------- the FSM
  logic               take;
  logic [STATE_W-1:0] next_state;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  csfo_fsm #(.NSTATES(NSTATES), .N_TRANS(N_TRANS)) u_fsm (
    .clk, .rst_n,
    .step       (take && in_job.op == OP_INFER),
    .xb,
    .force_en   (take && in_job.op == OP_SET_STATE),
    .force_state(in_job.bank),
    .tbl_we, .tbl_state, .tbl_idx, .tbl_data,
    .state, .next_state
  );

  // ----------------------------------------------------------- stage register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_job   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take && in_job.op != OP_SET_STATE) begin
        out_valid    <= 1'b1;
        out_job.op   <= in_job.op;
        out_job.bank <= (in_job.op == OP_INFER) ? next_state : in_job.bank;
        out_job.row  <= in_job.row;
        out_job.tag  <= in_job.tag;
        out_job.x    <= xmin[N_INPUTS-1];
        out_job.y    <= in_job.y;
        out_job.xb   <= xb;
      end
    end
  end

  // a job offered downstream stays put until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_job));

endmodule
