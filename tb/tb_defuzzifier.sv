// tb_defuzzifier: feeds random fuzzy outputs (few levels, so several points
// often share the maximum; plus the all-zero set) back to back and checks the
// mean-of-maxima value floor(16 * sum(w_J) / L), the flat flag, the passed
// fields and the two-clock latency.
module tb_defuzzifier;
  import fuzzy_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  fuzzy_res_t in_res;
  result_t out_res;

  defuzzifier dut (.clk, .rst_n, .in_valid, .in_res, .out_valid, .out_res);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fuzzy_res_t sent [$];
  int sent_cycle [$];
  int cycle = 0;
  always @(negedge clk) cycle++;

  always @(posedge clk) if (rst_n && in_valid) begin
    sent.push_back(in_res);
    sent_cycle.push_back(cycle);
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic fuzzy_res_t r = sent.pop_front();
    automatic int c0 = sent_cycle.pop_front();
    automatic int mx = 0, l = 0, s = 0, exp_yc;
    for (int j = 0; j < int'(W_MAX); j++) if (int'(r.y[j]) > mx) mx = int'(r.y[j]);
    for (int j = 0; j < int'(W_MAX); j++) if (int'(r.y[j]) == mx) begin l++; s += j + 1; end
    exp_yc = (s * 16) / l;
    checks++;
    if (int'(out_res.yc) != exp_yc || out_res.flat != (mx == 0) || out_res.tag != r.tag || out_res.y != r.y) begin
      failures++;
      if (failures < 10) $display("mismatch tag=%0d yc=%0d exp=%0d", r.tag, out_res.yc, exp_yc);
    end
    checks++;
    if (cycle - c0 != 2) begin
      failures++;
      $display("latency %0d", cycle - c0);
    end
  end

  initial begin
    in_valid = 0; in_res = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_res.tag = TAG_W'(t);
      in_res.op = OP_INFER;
      in_res.bank = '0;
      for (int j = 0; j < int'(W_MAX); j++)
        in_res.y[j] = (t == 5) ? '0 : mu_t'($urandom_range(0, (t % 4) + 1));
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (sent.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
