// tb_rule_base_workload: a two-input linguistic model run on the full
// controller through its host bus, measuring sustained throughput.
//
// Five terms (very small, small, medium, big, very big) are triangles over
// the 25-point universes, peaking at 1, 7, 13, 19 and 25 and falling by one
// level every three points. Five rules of the form
//   IF X(1) is <term i> AND X(2) is medium THEN Y is <out(i)>
// are learned into relation 0 (first rule with OP_LEARN_FIRST, then union).
// Then 500 inferences with new values on both inputs every time are streamed
// as fast as the host bus allows; each needs four data writes and one
// command, within the nine-clock pipeline step. Every fuzzy and crisp result
// is compared with a model kept here. The test measures the clocks between
// consecutive results, which must be nine, and prints the rate this gives at
// a 30 MHz clock.
module tb_rule_base_workload;
  import fuzzy_pkg::*;

  localparam int N_JOBS = 500;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cs, we, hwait, irq, res_valid;
  logic [3:0] addr;
  logic [63:0] wdata, rdata;
  result_t res;
  logic [STATE_W-1:0] fsm_state;

  fuzzy_controller dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(negedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  function automatic fvec_t term(int peak_pos, int step);
    fvec_t v;
    for (int u = 1; u <= int'(U_MAX); u++) begin
      automatic int d = (u > peak_pos) ? u - peak_pos : peak_pos - u;
      v[u-1] = mu_t'(mx(0, int'(MU_ONE) - d / step));
    end
    return v;
  endfunction

  int R [U_MAX][W_MAX];
  result_t exp_q [$];

  task automatic bus_write(int a, logic [63:0] d);
    @(negedge clk);
    cs = 1; we = 1; addr = 4'(a); wdata = d;
    #1;
    while (hwait) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cs = 0; we = 0;
  endtask

  task automatic put_vec(int a, fvec_t v);
    logic [FVEC_W-1:0] f;
    f = v;
    bus_write(a, f[63:0]);
    bus_write(a + 1, 64'(f[FVEC_W-1:64]));
  endtask

  task automatic issue(op_e op, int tag);
    bus_write(6, {32'd0, 8'(tag), 3'd0, 5'd0, 6'd0, 2'd0, 5'd0, 3'(op)});
  endtask

  int n_res = 0, first_cycle = 0, last_cycle = 0, gap_ok = 0, gap_bad = 0;
  always @(posedge clk) if (rst_n && res_valid && res.op == OP_INFER) begin
    automatic result_t e = exp_q.pop_front();
    checks++;
    if (res.y != e.y || res.yc != e.yc || res.flat != e.flat || res.tag != e.tag) begin
      failures++;
      if (failures < 10) $display("mismatch tag=%0d yc=%0d/%0d", res.tag, res.yc, e.yc);
    end
    if (n_res == 0) first_cycle = cycle;
    else if (cycle - last_cycle == 9) gap_ok++;
    else gap_bad++;
    last_cycle = cycle;
    n_res++;
  end

  initial begin
    automatic int out_term [5] = '{2, 1, 2, 3, 2};   // rule consequents
    fvec_t t [5];
    fvec_t x1, x2, x;
    cs = 0; we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 5; i++) t[i] = term(1 + 6 * i, 3);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // learning: five rules into relation 0
    for (int i = 0; i < 5; i++) begin
      put_vec(0, t[i]); put_vec(2, t[2]); put_vec(4, t[out_term[i]]);
      issue(i == 0 ? OP_LEARN_FIRST : OP_LEARN, 200 + i);
      for (int u = 0; u < int'(U_MAX); u++)
        for (int w = 0; w < int'(W_MAX); w++)
          R[u][w] = mx(i == 0 ? 0 : R[u][w], mn(mn(t[i][u], t[2][u]), t[out_term[i]][w]));
    end
    // inference stream: sharp input sets at random positions
    for (int n = 0; n < N_JOBS; n++) begin
      automatic result_t e = '0;
      automatic int m = 0, l = 0, s = 0;
      x1 = term($urandom_range(1, 25), 1);
      x2 = term($urandom_range(8, 18), 2);
      for (int u = 0; u < int'(U_MAX); u++) x[u] = mu_t'(mn(x1[u], x2[u]));
      for (int w = 0; w < int'(W_MAX); w++) begin
        automatic int v = 0;
        for (int u = 0; u < int'(U_MAX); u++) v = mx(v, mn(x[u], R[u][w]));
        e.y[w] = mu_t'(v);
        m = mx(m, v);
      end
      for (int w = 0; w < int'(W_MAX); w++) if (int'(e.y[w]) == m) begin l++; s += w + 1; end
      e.yc = YC_W'((s * 16) / l);
      e.flat = (m == 0);
      e.tag = TAG_W'(n);
      exp_q.push_back(e);
      put_vec(0, x1); put_vec(2, x2);
      issue(OP_INFER, n);
    end
    while (n_res < N_JOBS) @(posedge clk);
    checks++;
    if (gap_bad != 0 || gap_ok != N_JOBS - 1) failures++;
    begin
      automatic real cpi = real'(last_cycle - first_cycle) / real'(N_JOBS - 1);
      $display("%0d inferences, %0.2f clocks each, %0.2f M inferences/s at 30 MHz",
               N_JOBS, cpi, 30.0 / cpi);
      checks++;
      if (30.0 / cpi < 3.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
