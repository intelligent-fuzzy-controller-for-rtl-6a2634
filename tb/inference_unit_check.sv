// inference_unit_check: one complete test of the model/inference unit with
// PATHS parallel paths. It learns rule sets into all four relations, runs
// inferences on random relations back to back, downloads rows directly and
// drives R to all-full membership to raise the error flag. A relation model
// kept here (union of min(X(u), Y(w)) products, max-min composition) gives
// the expected fuzzy output of every inference. It also checks the timing:
// a new job taken every ceil(25/PATHS) + 2 clocks (9 with four paths, 27
// with the basic single path) and the result one clock before the next job
// can be taken. Raises done when finished.
module inference_unit_check
  import fuzzy_pkg::*;
#(
  parameter int unsigned PATHS = 4
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int PERIOD = (U_MAX + PATHS - 1) / PATHS + 2;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, err_flag, busy;
  eng_job_t in_job;
  fuzzy_res_t out_res;

  inference_unit #(.PATHS(PATHS)) dut (.*);

  always #5 clk = ~clk;


  int R [N_STATES][U_MAX][W_MAX];
  eng_job_t jobs [$];
  fvec_t exp_y [$];
  int exp_err [$];
  int acc_cycle [$];
  int cycle = 0, last_acc = -100;
  int n_b2b = 0, n_err = 0, n_learn = 0, n_first = 0, n_load = 0, n_inf = 0;

  always @(negedge clk) cycle++;

  function automatic fvec_t rnd(int lo, int hi);
    fvec_t v;
    for (int j = 0; j < int'(W_MAX); j++) v[j] = mu_t'($urandom_range(lo, hi));
    return v;
  endfunction

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  // apply a job to the model, return the expected output
  function automatic fvec_t model(eng_job_t j, output int err);
    fvec_t y = '0;
    err = -1;
    case (j.op)
      OP_LEARN_FIRST, OP_LEARN: begin
        err = 1;
        for (int u = 0; u < int'(U_MAX); u++)
          for (int w = 0; w < int'(W_MAX); w++) begin
            R[j.bank][u][w] = mx(j.op == OP_LEARN ? R[j.bank][u][w] : 0, mn(j.x[u], j.y[w]));
            if (R[j.bank][u][w] != int'(MU_ONE)) err = 0;
          end
      end
      OP_LOAD_ROW:
        for (int w = 0; w < int'(W_MAX); w++) R[j.bank][j.row][w] = int'(j.y[w]);
      default:
        for (int w = 0; w < int'(W_MAX); w++) begin
          automatic int v = 0;
          for (int u = 0; u < int'(U_MAX); u++) v = mx(v, mn(j.x[u], R[j.bank][u][w]));
          y[w] = mu_t'(v);
        end
    endcase
    return y;
  endfunction

  task automatic add(op_e op, int bank, fvec_t x, fvec_t y, int row = 0);
    eng_job_t j;
    j.op = op; j.bank = STATE_W'(bank); j.row = ROW_W'(row); j.tag = TAG_W'(jobs.size());
    j.x = x; j.y = y; j.xb = '0;
    jobs.push_back(j);
  endtask

  // driver: keeps in_valid high while jobs are queued
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      automatic int e;
      automatic eng_job_t j = jobs.pop_front();
      exp_y.push_back(model(j, e));
      exp_err.push_back(e);
      acc_cycle.push_back(cycle);
      if (cycle - last_acc < PERIOD) begin
        failures++;
        $display("job taken %0d clocks after the previous one", cycle - last_acc);
      end
      if (cycle - last_acc == PERIOD) n_b2b++;
      last_acc = cycle;
    end
  end
  always @(negedge clk) begin
    in_valid = rst_n && jobs.size() > 0;
    if (jobs.size() > 0) in_job = jobs[0];
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic fvec_t ey = exp_y.pop_front();
    automatic int ee = exp_err.pop_front();
    automatic int c0 = acc_cycle.pop_front();
    checks++;
    if (cycle - c0 != PERIOD - 1) begin
      failures++;
      $display("latency %0d", cycle - c0);
    end
    if (out_res.op == OP_INFER) begin
      n_inf++;
      checks++;
      if (out_res.y != ey) begin
        failures++;
        if (failures < 10) $display("inference mismatch tag=%0d bank=%0d", out_res.tag, out_res.bank);
      end
    end
    if (ee >= 0) begin
      // err_flag is updated on the edge that ends the job
      @(negedge clk);
      checks++;
      if (int'(err_flag) != ee) begin
        failures++;
        $display("err_flag=%0d expected %0d", err_flag, ee);
      end
      if (ee == 1) n_err++;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    in_valid = 0; in_job = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // learn four rules into every relation
    for (int b = 0; b < int'(N_STATES); b++) begin
      add(OP_LEARN_FIRST, b, rnd(0, 4), rnd(0, 4)); n_first++;
      for (int r = 0; r < 3; r++) begin add(OP_LEARN, b, rnd(0, 4), rnd(0, 4)); n_learn++; end
    end
    for (int t = 0; t < 30; t++) add(OP_INFER, $urandom_range(0, N_STATES - 1), rnd(0, 4), '0);
    // direct row download, including the last row
    add(OP_LOAD_ROW, 2, '0, rnd(0, 4), 24); n_load++;
    add(OP_LOAD_ROW, 2, '0, rnd(0, 4), 5);  n_load++;
    for (int t = 0; t < 5; t++) add(OP_INFER, 2, rnd(0, 4), '0);
    // all-full model raises the error flag, a new sequence clears it
    add(OP_LEARN_FIRST, 3, {W_MAX{MU_ONE}}, {W_MAX{MU_ONE}});
    add(OP_LEARN, 3, rnd(0, 4), rnd(0, 4));
    add(OP_LEARN_FIRST, 3, rnd(0, 4), rnd(0, 3));
    add(OP_INFER, 3, rnd(0, 4), '0);
    wait (jobs.size() == 0 && exp_y.size() == 0);
    repeat (PERIOD + 3) @(posedge clk);
    checks++;
    if (n_b2b == 0 || n_err != 2 || n_inf != 36 || busy) failures++;
    $display("PATHS=%0d: back-to-back=%0d err=%0d infer=%0d checks=%0d failures=%0d",
             PATHS, n_b2b, n_err, n_inf, checks, failures);
    done = 1;
  end
endmodule
