// tb_preproc_unit: sends random jobs of every kind through the
// pre-processing stage with random downstream stalls. For each job leaving
// the stage it checks the intersected input, the Boolean range variables
// X_B (worked out here from the first maximum of each input), the relation
// chosen (the FSM's new state for inference, the host's for other jobs) and
// that OP_SET_STATE jobs force the state and are not passed on.
module tb_preproc_unit;
  import fuzzy_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, tbl_we;
  host_job_t in_job;
  eng_job_t out_job;
  logic [STATE_W-1:0] tbl_state, state;
  logic [1:0] tbl_idx;
  trans_t tbl_data;

  preproc_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // state s goes to (s+1) when input 1 is LOW (max in 1..5), else stays
  function automatic int model_next(int s, logic [XB_W-1:0] b);
    return b[0] ? (s + 1) % int'(N_STATES) : s;
  endfunction

  function automatic logic [XB_W-1:0] model_xb(host_job_t j);
    logic [XB_W-1:0] b = '0;
    for (int k = 0; k < int'(N_INPUTS); k++) begin
      automatic int best = -1, pos = 0;
      for (int u = 0; u < int'(U_MAX); u++)
        if (int'(j.x[k][u]) > best) begin best = int'(j.x[k][u]); pos = u + 1; end
      b[k * N_RANGES + (pos - 1) / 5] = 1'b1;
    end
    return b;
  endfunction

  eng_job_t exp_q [$];
  int mstate = 0;
  int n_out = 0, n_stall = 0, n_set = 0, n_xb = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      automatic eng_job_t e = exp_q.pop_front();
      n_out++;
      checks++;
      if (out_job != e) begin
        failures++;
        if (failures < 10) $display("mismatch tag=%0d/%0d bank=%0d/%0d xb=%h/%h", out_job.tag, e.tag, out_job.bank, e.bank, out_job.xb, e.xb);
      end
    end
  end

  initial begin
    in_valid = 0; in_job = '0; out_ready = 0; tbl_we = 0;
    tbl_state = '0; tbl_idx = '0; tbl_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < int'(N_STATES); s++) begin
      @(negedge clk);
      tbl_we = 1; tbl_state = STATE_W'(s); tbl_idx = 2'd0;
      tbl_data = '{valid: 1'b1, mask: XB_W'(1), match: XB_W'(1), next: STATE_W'((s + 1) % N_STATES)};
    end
    @(negedge clk) tbl_we = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 2) != 0);
      in_valid = ($urandom_range(0, 3) != 0);
      in_job.op = (t % 50 == 7) ? OP_SET_STATE : op_e'($urandom_range(0, 3));
      in_job.bank = STATE_W'($urandom);
      in_job.row = ROW_W'($urandom_range(0, U_MAX - 1));
      in_job.tag = TAG_W'(t);
      for (int k = 0; k < int'(N_INPUTS); k++)
        for (int u = 0; u < int'(U_MAX); u++) in_job.x[k][u] = mu_t'($urandom_range(0, 4));
      for (int u = 0; u < int'(W_MAX); u++) in_job.y[u] = mu_t'($urandom_range(0, 4));
      #1;
      if (in_valid && in_ready) begin
        automatic eng_job_t e;
        automatic logic [XB_W-1:0] b = model_xb(in_job);
        if (b[0]) n_xb++;
        checks++;
        if (int'(state) != mstate) failures++;
        if (in_job.op == OP_SET_STATE) begin
          mstate = int'(in_job.bank);
          n_set++;
        end else begin
          if (in_job.op == OP_INFER) mstate = model_next(mstate, b);
          e.op = in_job.op;
          e.bank = (in_job.op == OP_INFER) ? STATE_W'(mstate) : in_job.bank;
          e.row = in_job.row; e.tag = in_job.tag; e.y = in_job.y; e.xb = b;
          for (int u = 0; u < int'(U_MAX); u++)
            e.x[u] = (in_job.x[0][u] < in_job.x[1][u]) ? in_job.x[0][u] : in_job.x[1][u];
          exp_q.push_back(e);
        end
      end
    end
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_stall == 0 || n_set == 0 || n_xb == 0) failures++;
    $display("out=%0d stalls=%0d set_state=%0d low=%0d", n_out, n_stall, n_set, n_xb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
