// inference_unit: the combined fuzzy model / fuzzy inference unit (pipeline
// step T3), with the R rule memory, PATHS parallel min/max datapaths and the
// error flag.
//
// Learning (OP_LEARN_FIRST, OP_LEARN) builds the overall relation of one CSFO
// state row by row: R(i,:) := max(min(X_I(i), Y_I(:)), R(i,:)), where the old
// row is replaced by zeros for the first rule of a sequence. Inference
// (OP_INFER) computes the max-min composition Y(w) = max_i min(X(i), R(i,w)),
// accumulating in the Y register. As in the original design's datapath, MUX2 chooses
// the second operand of the minimum units (Y_I when learning, the R row when
// inferring) and MUX3 the second operand of the maximum units (0, the R row,
// or the Y register). The original design's basic datapath handles one row per clock;
// its quadrupled version, the default here (PATHS = 4), handles four rows per
// clock, so a job takes ceil(U_MAX/PATHS) + 2 = 9 clocks: one to load the X_I
// and Y_I registers and address the first word of R, seven row groups, and
// one to present the result. OP_LOAD_ROW writes Y_I into one row of R, so a
// "safe" model can be downloaded; it uses the same 9-clock sequence.
//
// After each learning job, err_flag tells whether every element written to R
// equals full membership (MU_ONE); the flag keeps that value until the next
// learning job ends.
//
// Interface: in_valid/in_ready handshake (ready only while idle, a job is
// taken when both are high); out_valid is a one-clock pulse with the result,
// with no back-pressure, eight clocks after the clock edge that took the job;
// the unit takes the next job one clock later, so jobs can follow every nine
// clocks (with PATHS paths: ceil(U_MAX/PATHS) + 2). Active-low synchronous
// reset of the control state. The job's X_B field is not used here (lint reports it unused); it
// travels with the job from the pre-processing stage only for observation.
module inference_unit
  import fuzzy_pkg::*;
#(
  parameter int unsigned PATHS   = 4,
  parameter int unsigned NSTATES = N_STATES,
  localparam int unsigned GROUPS = (U_MAX + PATHS - 1) / PATHS,
  localparam int unsigned ADDR_W = $clog2(NSTATES * GROUPS),
  localparam int unsigned G_W    = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  eng_job_t   in_job,
  output logic       out_valid,
  output fuzzy_res_t out_res,
  output logic       err_flag,
  output logic       busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  logic [G_W-1:0]     g;        // row group being processed
  op_e                op_q;
  logic [STATE_W-1:0] bank_q;
  logic [ROW_W-1:0]   row_q;
  logic [TAG_W-1:0]   tag_q;
  fvec_t              xi_q;     // X_I register
  fvec_t              yi_q;     // Y_I register
  fvec_t              y_q;      // Y register (inference result)
  logic               full_acc; // all rows written so far are full membership

  // ---------------------------------------------------------------- memory
  logic              rd_en;
  logic [ADDR_W-1:0] rd_addr;
  fvec_t             rd_data [PATHS];
  logic [PATHS-1:0]  wr_en;
  logic [ADDR_W-1:0] wr_addr;
  fvec_t             wr_data [PATHS];

  rule_memory #(.PATHS(PATHS), .NSTATES(NSTATES)) u_rmem (
    .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
  );

  function automatic logic [ADDR_W-1:0] word_addr(logic [STATE_W-1:0] k, logic [G_W-1:0] grp);
    return ADDR_W'(k) * ADDR_W'(GROUPS) + ADDR_W'(grp);
  endfunction

  // -------------------------------------------------------------- datapath
  logic  learn;
  fvec_t min_a   [PATHS];   // X_I(i) broadcast to every point
  fvec_t min_b   [PATHS];   // MUX2 output
  fvec_t min_out [PATHS];
  fvec_t mux3    [PATHS];
  fvec_t max_out [PATHS];
  fvec_t y_next;
  logic [PATHS-1:0] row_ok;   // lane carries a real row (not padding)
  logic [PATHS-1:0] row_full;

  assign learn = (op_q == OP_LEARN_FIRST) || (op_q == OP_LEARN);

  for (genvar p = 0; p < int'(PATHS); p++) begin : g_path
    int unsigned i;
    mu_t xs;
    fvec_t pair [2];

    always_comb begin
      i         = int'(g) * PATHS + p;
      row_ok[p] = (i < U_MAX);
      xs        = row_ok[p] ? xi_q[i[ROW_W-1:0]] : '0;
      min_a[p]  = {W_MAX{xs}};
      min_b[p]  = (op_q == OP_INFER) ? rd_data[p] : yi_q;                  // MUX2
      if (op_q == OP_INFER)                                                // MUX3
        mux3[p] = (p == 0 && g != '0) ? y_q : '0;
      else if (op_q == OP_LEARN)
        mux3[p] = rd_data[p];
      else
        mux3[p] = '0;
      pair[0] = min_out[p];
      pair[1] = mux3[p];
      row_full[p] = 1'b1;
      for (int j = 0; j < int'(W_MAX); j++)
        if (max_out[p][j] != MU_ONE) row_full[p] = 1'b0;
    end

    min_unit u_min (.a(min_a[p]), .b(min_b[p]), .y(min_out[p]));
    max_unit #(.N_IN(2)) u_max (.in(pair), .y(max_out[p]));
  end

  // reduction of the parallel paths into the Y register
  max_unit #(.N_IN(PATHS)) u_ymax (.in(max_out), .y(y_next));

  // --------------------------------------------------------------- control
  assign in_ready = (state == S_IDLE);
  assign busy     = (state != S_IDLE);
  assign out_valid = (state == S_DONE);

  always_comb begin
    rd_en   = 1'b0;
    rd_addr = word_addr(bank_q, g + G_W'(1));
    wr_en   = '0;
    wr_addr = word_addr(bank_q, g);
    for (int p = 0; p < int'(PATHS); p++) wr_data[p] = max_out[p];
    if (state == S_IDLE) begin
      rd_en   = in_valid;
      rd_addr = word_addr(in_job.bank, '0);
    end else if (state == S_RUN) begin
      rd_en = (g != G_W'(GROUPS - 1)) && (op_q != OP_LOAD_ROW);
      for (int p = 0; p < int'(PATHS); p++) begin
        if (learn)
          wr_en[p] = row_ok[p];
        else if (op_q == OP_LOAD_ROW) begin
          wr_en[p]   = row_ok[p] && (int'(g) * PATHS + p == int'(row_q));
          wr_data[p] = yi_q;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      g         <= '0;
      err_flag  <= 1'b0;
      op_q      <= OP_INFER;
      bank_q    <= '0;
      row_q     <= '0;
      tag_q     <= '0;
      xi_q      <= '0;
      yi_q      <= '0;
      y_q       <= '0;
      full_acc  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          op_q     <= in_job.op;
          bank_q   <= in_job.bank;
          row_q    <= in_job.row;
          tag_q    <= in_job.tag;
          xi_q     <= in_job.x;
          yi_q     <= in_job.y;
          y_q      <= '0;
          full_acc <= 1'b1;
          g        <= '0;
          state    <= S_RUN;
        end
        S_RUN: begin
          if (op_q == OP_INFER) y_q <= y_next;
          for (int p = 0; p < int'(PATHS); p++)
            if (row_ok[p] && !row_full[p]) full_acc <= 1'b0;
          if (g == G_W'(GROUPS - 1)) begin
            state     <= S_DONE;
          end
          g <= g + G_W'(1);
        end
        S_DONE: begin
          if (learn) err_flag <= full_acc;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign out_res.op   = op_q;
  assign out_res.bank = bank_q;
  assign out_res.tag  = tag_q;
  assign out_res.y    = y_q;

  // a job occupies the unit for exactly GROUPS + 2 clocks
  a_period: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_ready |-> ##(GROUPS + 1) out_valid ##1 in_ready);
  // R is only written by learning and row-load jobs
  a_ro: assert property (@(posedge clk) disable iff (!rst_n)
    |wr_en |-> (learn || op_q == OP_LOAD_ROW));

endmodule
