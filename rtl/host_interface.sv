// host_interface: register interface between a host computer and the fuzzy
// controller (pipeline step T1: download of fuzzy data, read-back of results).
//
// The host sees sixteen 64-bit registers on a synchronous bus (cs, we, addr,
// wdata, rdata). It writes the fuzzy inputs X(1), X(2) and the rule output or
// row data Y, each 75 bits in two words, then a command word that turns them
// into a job for the pipeline. The command register has one job slot: a
// command written while the slot is still full is held off with hwait, and
// the host keeps the write on the bus until hwait falls. Read-back registers
// hold the last inference result (fuzzy Y and crisp yc) and a status word.
// irq is raised when a learning job ends with the error flag set (all of R
// at full membership) and stays high until the host clears it.
//
// Write map (word address):
//   0/1  X(1) bits 63:0 / 74:64       2/3  X(2)       4/5  Y
//   6    command: [2:0] op, [9:8] relation/state, [20:16] row, [31:24] tag
//   7    next-state table entry: [1:0] state, [5:4] entry, [8] valid,
//        [25:16] mask, [41:32] match, [49:48] next state
//   8    control: bit 0 = 1 clears irq
// Read map:
//   0/1  last inference result Y bits 63:0 / 74:64
//   2    last inference result: [8:0] yc (4 fraction bits), [12] flat,
//        [17:16] relation used, [31:24] tag, [34:32] op
//   3    status: [0] irq, [1] error flag, [2] job slot full,
//        [3] model/inference unit busy (clear = stand-by), [5:4] FSM state,
//        [47:32] jobs completed, [63:48] inference results
// rdata is combinational from addr. The register map, the single job slot and
// the wait handshake are this design's own; the original design fixes only that the
// host downloads fuzzy data and reads back fuzzy and crisp results over a
// 64-bit bus, with chip select, reset and an interrupt request.
module host_interface
  import fuzzy_pkg::*;
#(
  parameter int unsigned N_TRANS = 4,
  localparam int unsigned IDX_W  = (N_TRANS > 1) ? $clog2(N_TRANS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic               cs,
  input  logic               we,
  input  logic [3:0]         addr,
  input  logic [63:0]        wdata,
  output logic [63:0]        rdata,
  output logic               hwait,
  output logic               irq,
  // jobs to the pre-processing unit
  output logic               job_valid,
  input  logic               job_ready,
  output host_job_t          job,
  // next-state table programming
  output logic               tbl_we,
  output logic [STATE_W-1:0] tbl_state,
  output logic [IDX_W-1:0]   tbl_idx,
  output trans_t             tbl_data,
  // results and status from the pipeline
  input  logic               res_valid,
  input  result_t            res,
  input  logic               err_flag,
  input  logic [STATE_W-1:0] fsm_state,
  input  logic               eng_busy
);

  localparam logic [3:0] A_X1L = 4'd0, A_X1H = 4'd1, A_X2L = 4'd2, A_X2H = 4'd3,
                         A_YL  = 4'd4, A_YH  = 4'd5, A_CMD = 4'd6, A_TBL = 4'd7,
                         A_CTL = 4'd8, A_STA = 4'd3, A_INF = 4'd2;
  localparam int unsigned HI_W = FVEC_W - 64;

  logic [FVEC_W-1:0] x1_q, x2_q, y_q;
  result_t           last_q;
  logic [15:0]       n_done, n_res;
  logic              wr, cmd_wr, cmd_take;
  logic [FVEC_W-1:0] last_y;

  assign last_y = last_q.y;

  assign wr       = cs && we;
  assign cmd_wr   = wr && addr == A_CMD;
  assign cmd_take = cmd_wr && (!job_valid || job_ready);
  assign hwait    = cmd_wr && !cmd_take;

  assign tbl_we          = wr && addr == A_TBL;
  assign tbl_state       = wdata[STATE_W-1:0];
  assign tbl_idx         = wdata[4 +: IDX_W];
  assign tbl_data.valid  = wdata[8];
  assign tbl_data.mask   = wdata[16 +: XB_W];
  assign tbl_data.match  = wdata[32 +: XB_W];
  assign tbl_data.next   = wdata[48 +: STATE_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1_q      <= '0;
      x2_q      <= '0;
      y_q       <= '0;
      job_valid <= 1'b0;
      job       <= '0;
      last_q    <= '0;
      n_done    <= '0;
      n_res     <= '0;
      irq       <= 1'b0;
    end else begin
      if (wr) begin
        unique case (addr)
          A_X1L: x1_q[63:0]         <= wdata;
          A_X1H: x1_q[FVEC_W-1:64]  <= wdata[HI_W-1:0];
          A_X2L: x2_q[63:0]         <= wdata;
          A_X2H: x2_q[FVEC_W-1:64]  <= wdata[HI_W-1:0];
          A_YL:  y_q[63:0]          <= wdata;
          A_YH:  y_q[FVEC_W-1:64]   <= wdata[HI_W-1:0];
          A_CTL: if (wdata[0]) irq  <= 1'b0;
          default: ;
        endcase
      end
      if (job_valid && job_ready) job_valid <= 1'b0;
      if (cmd_take) begin
        job_valid <= 1'b1;
        job.op    <= op_e'(wdata[2:0]);
        job.bank  <= wdata[8 +: STATE_W];
        job.row   <= wdata[16 +: ROW_W];
        job.tag   <= wdata[24 +: TAG_W];
        job.x[0]  <= x1_q;
        job.x[1]  <= x2_q;
        job.y     <= y_q;
      end
      if (res_valid) begin
        n_done <= n_done + 16'd1;
        if (res.op == OP_INFER) begin
          last_q <= res;
          n_res  <= n_res + 16'd1;
        end
        if ((res.op == OP_LEARN_FIRST || res.op == OP_LEARN) && err_flag)
          irq <= 1'b1;
      end
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr)
      4'd0:  rdata           = last_y[63:0];
      4'd1:  rdata[HI_W-1:0] = last_y[FVEC_W-1:64];
      A_INF: begin
        rdata[YC_W-1:0]         = last_q.yc;
        rdata[12]               = last_q.flat;
        rdata[16 +: STATE_W]    = last_q.bank;
        rdata[24 +: TAG_W]      = last_q.tag;
        rdata[34:32]            = last_q.op;
      end
      A_STA: begin
        rdata[0]             = irq;
        rdata[1]             = err_flag;
        rdata[2]             = job_valid;
        rdata[3]             = eng_busy;
        rdata[4 +: STATE_W]  = fsm_state;
        rdata[47:32]         = n_done;
        rdata[63:48]         = n_res;
      end
      default: ;
    endcase
  end

  // the job slot holds its job until the pre-processing unit takes it
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    job_valid && !job_ready |=> job_valid && $stable(job));
  // hwait only answers a command write
  a_wait: assert property (@(posedge clk) disable iff (!rst_n) hwait |-> cmd_wr);

endmodule
