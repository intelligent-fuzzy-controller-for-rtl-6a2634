// fuzzy_controller: pipelined fuzzy logic controller with a crisp-state,
// fuzzy-output (CSFO) finite state machine.
//
// Four units form a linear pipeline, each working on a different job:
//   T1 host_interface  - the host downloads fuzzy inputs and a command;
//   T2 preproc_unit    - intersects the inputs, derives the Boolean
//                        variables X_B and steps the CSFO FSM, whose new
//                        state selects the relation R_K for the job;
//   T3 inference_unit  - learns a rule into R_K or infers Y = X o R_K
//                        (max-min composition), four rows per clock;
//   T4 defuzzifier     - mean-of-maxima crisp value of Y.
// T3 is the slowest step, nine clocks per job with the default four paths,
// so once the pipeline is full a new result appears every nine clocks (at
// 30 MHz, 3.3 million inferences per second). The other steps take one or
// two clocks and wait for T3 through the valid/ready handshakes.
//
// Ports: the host bus of host_interface (cs, we, addr, wdata, rdata, hwait,
// irq), plus every finished job on res_valid/res (one-clock pulse) and the
// present FSM state, for observation. Single clock, active-low synchronous
// reset.
module fuzzy_controller
  import fuzzy_pkg::*;
#(
  parameter int unsigned PATHS   = 4,
  parameter int unsigned NSTATES = N_STATES,
  parameter int unsigned N_TRANS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cs,
  input  logic               we,
  input  logic [3:0]         addr,
  input  logic [63:0]        wdata,
  output logic [63:0]        rdata,
  output logic               hwait,
  output logic               irq,
  output logic               res_valid,
  output result_t            res,
  output logic [STATE_W-1:0] fsm_state
);

  localparam int unsigned IDX_W = (N_TRANS > 1) ? $clog2(N_TRANS) : 1;

  logic               hj_valid, hj_ready;
  host_job_t          hj;
  logic               ej_valid, ej_ready;
  eng_job_t           ej;
  logic               fr_valid;
  fuzzy_res_t         fr;
  logic               err_flag, eng_busy;
  logic               tbl_we;
  logic [STATE_W-1:0] tbl_state;
  logic [IDX_W-1:0]   tbl_idx;
  trans_t             tbl_data;

  host_interface #(.N_TRANS(N_TRANS)) u_host (
    .clk, .rst_n, .cs, .we, .addr, .wdata, .rdata, .hwait, .irq,
    .job_valid(hj_valid), .job_ready(hj_ready), .job(hj),
    .tbl_we, .tbl_state, .tbl_idx, .tbl_data,
    .res_valid, .res, .err_flag, .fsm_state, .eng_busy
  );

  preproc_unit #(.NSTATES(NSTATES), .N_TRANS(N_TRANS)) u_pre (
    .clk, .rst_n,
    .in_valid(hj_valid), .in_ready(hj_ready), .in_job(hj),
    .out_valid(ej_valid), .out_ready(ej_ready), .out_job(ej),
    .tbl_we, .tbl_state, .tbl_idx, .tbl_data,
    .state(fsm_state)
  );

  inference_unit #(.PATHS(PATHS), .NSTATES(NSTATES)) u_eng (
    .clk, .rst_n,
    .in_valid(ej_valid), .in_ready(ej_ready), .in_job(ej),
    .out_valid(fr_valid), .out_res(fr),
    .err_flag, .busy(eng_busy)
  );

  defuzzifier u_defuzz (
    .clk, .rst_n,
    .in_valid(fr_valid), .in_res(fr),
    .out_valid(res_valid), .out_res(res)
  );

endmodule
