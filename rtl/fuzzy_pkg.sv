// fuzzy_pkg: data format and shared types of the pipelined fuzzy controller.
//
// A fuzzy set is a discrete membership function over a universe of 25 points
// (U_MAX = W_MAX = 25). Each membership degree is a 3-bit code; the format uses
// five levels 0..4, where 0 is non-membership and MU_ONE = 4 is full
// membership, and the 3-bit code leaves room for up to eight levels. A whole
// fuzzy set is therefore a 75-bit word (fvec_t), element j at bits
// [3j+2:3j]. These sizes follow the original design. The job and result records
// that travel down the four pipeline stages, the command encoding and the
// CSFO state width are this design's own choices.
package fuzzy_pkg;

  localparam int unsigned MU_W     = 3;          // bits per membership degree
  localparam int unsigned N_LEVELS = 5;          // degrees 0..N_LEVELS-1
  localparam logic [MU_W-1:0] MU_ONE = MU_W'(N_LEVELS - 1);  // full membership
  localparam int unsigned U_MAX    = 25;         // points of input universe U
  localparam int unsigned W_MAX    = 25;         // points of output universe W
  localparam int unsigned FVEC_W   = W_MAX * MU_W;  // 75 bits

  localparam int unsigned N_INPUTS = 2;          // fuzzy inputs X(1), X(2)
  localparam int unsigned N_RANGES = 5;          // Boolean ranges per input (B transform)
  localparam int unsigned XB_W     = N_INPUTS * N_RANGES;

  localparam int unsigned N_STATES = 4;          // CSFO FSM states = relations in R memory
  localparam int unsigned STATE_W  = $clog2(N_STATES);
  localparam int unsigned ROW_W    = $clog2(U_MAX);
  localparam int unsigned TAG_W    = 8;

  localparam int unsigned YC_FRAC  = 4;          // fraction bits of the crisp output
  localparam int unsigned YC_W     = $clog2(W_MAX + 1) + YC_FRAC;

  typedef logic [MU_W-1:0]     mu_t;
  typedef mu_t  [W_MAX-1:0]    fvec_t;           // one fuzzy set / one row of R

  // Operation carried by every job.
  typedef enum logic [2:0] {
    OP_INFER       = 3'd0,   // max-min composition with R of the CSFO state
    OP_LEARN_FIRST = 3'd1,   // first rule of a learning sequence: R := X x Y
    OP_LEARN       = 3'd2,   // further rule: R := R union (X x Y)
    OP_LOAD_ROW    = 3'd3,   // write one row of R directly (safe-model download)
    OP_SET_STATE   = 3'd4    // force the CSFO FSM into a state
  } op_e;

  // Job as issued by the host interface (pipeline step T1 -> T2).
  typedef struct packed {
    op_e                 op;
    logic [STATE_W-1:0]  bank;   // relation for learning / row load / new state
    logic [ROW_W-1:0]    row;    // row for OP_LOAD_ROW
    logic [TAG_W-1:0]    tag;
    fvec_t [N_INPUTS-1:0] x;     // fuzzy inputs X(1)..X(N_INPUTS)
    fvec_t               y;      // output set Y_I of a rule, or row data
  } host_job_t;

  // Job after pre-processing (T2 -> T3).
  typedef struct packed {
    op_e                 op;
    logic [STATE_W-1:0]  bank;   // relation R_K used by this job
    logic [ROW_W-1:0]    row;
    logic [TAG_W-1:0]    tag;
    fvec_t               x;      // combined input X_I = min(X(1), X(2))
    fvec_t               y;
    logic [XB_W-1:0]     xb;     // Boolean variables X_B of this job
  } eng_job_t;

  // Fuzzy result from the model/inference unit (T3 -> T4).
  typedef struct packed {
    op_e                 op;
    logic [STATE_W-1:0]  bank;
    logic [TAG_W-1:0]    tag;
    fvec_t               y;
  } fuzzy_res_t;

  // Final result after defuzzification.
  typedef struct packed {
    op_e                 op;
    logic [STATE_W-1:0]  bank;
    logic [TAG_W-1:0]    tag;
    fvec_t               y;      // fuzzy answer Y
    logic [YC_W-1:0]     yc;     // crisp answer, unsigned fixed point, YC_FRAC fraction bits
    logic                flat;   // Y is all zero (no point has positive membership)
  } result_t;

  // One entry of the programmable next-state table of the CSFO FSM.
  typedef struct packed {
    logic                valid;
    logic [XB_W-1:0]     mask;
    logic [XB_W-1:0]     match;
    logic [STATE_W-1:0]  next;
  } trans_t;

endpackage
