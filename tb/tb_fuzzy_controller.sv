// tb_fuzzy_controller: end-to-end test of the fuzzy controller through its
// host bus, at the default sizes (25-point universes, four relations, four
// paths).
//
// The host programs a next-state table (state s moves to s+1 when input 1 is
// LOW, state 3 returns to 0 when input 2 peaks in 21..25), learns four rules
// into each relation, forces the state, then streams inferences back to back
// so that the pipeline fills, commands wait (hwait) and the FSM changes
// state. It also downloads rows directly, raises the error interrupt with an
// all-full model, clears it and relearns. A model of the whole controller
// kept here (intersection, B transform, FSM table, relation learning,
// max-min composition, mean of maxima) predicts every result, which is
// compared field by field; the last result is also read back over the bus.
// Each mechanism must occur at least once, and results of back-to-back
// inferences must arrive every nine clocks.
module tb_fuzzy_controller;
  import fuzzy_pkg::*;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ reference
  int R [N_STATES][U_MAX][W_MAX];
  trans_t T [N_STATES][4];
  int mstate = 0;
  result_t exp_q [$];
  int n_first = 0, n_learn = 0, n_infer = 0, n_load = 0, n_set = 0;
  int n_trans = 0, n_wait = 0, n_irq = 0, n_flat = 0, n_rate = 0, n_res = 0;
  int n_banks_used [N_STATES];

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  function automatic logic [XB_W-1:0] model_xb(fvec_t x1, fvec_t x2);
    logic [XB_W-1:0] b = '0;
    fvec_t xs [2];
    xs[0] = x1; xs[1] = x2;
    for (int k = 0; k < 2; k++) begin
      automatic int best = -1, pos = 0;
      for (int u = 0; u < int'(U_MAX); u++)
        if (int'(xs[k][u]) > best) begin best = int'(xs[k][u]); pos = u + 1; end
      b[k * N_RANGES + (pos - 1) / 5] = 1'b1;
    end
    return b;
  endfunction

  function automatic int model_next(int s, logic [XB_W-1:0] b);
    for (int e = 0; e < 4; e++)
      if (T[s][e].valid && ((b & T[s][e].mask) == T[s][e].match)) return int'(T[s][e].next);
    return s;
  endfunction

  function automatic void model_job(op_e op, int bank, int row, int tag, fvec_t x1, fvec_t x2, fvec_t y);
    result_t r = '0;
    fvec_t x;
    for (int u = 0; u < int'(U_MAX); u++) x[u] = mu_t'(mn(x1[u], x2[u]));
    r.op = op; r.tag = TAG_W'(tag);
    case (op)
      OP_SET_STATE: begin mstate = bank; return; end
      OP_LEARN_FIRST, OP_LEARN: begin
        r.bank = STATE_W'(bank);
        for (int u = 0; u < int'(U_MAX); u++)
          for (int w = 0; w < int'(W_MAX); w++)
            R[bank][u][w] = mx(op == OP_LEARN ? R[bank][u][w] : 0, mn(x[u], y[w]));
      end
      OP_LOAD_ROW: begin
        r.bank = STATE_W'(bank);
        for (int w = 0; w < int'(W_MAX); w++) R[bank][row][w] = int'(y[w]);
      end
      default: begin
        automatic int nxt = model_next(mstate, model_xb(x1, x2));
        if (nxt != mstate) n_trans++;
        mstate = nxt;
        n_banks_used[mstate]++;
        r.bank = STATE_W'(mstate);
        for (int w = 0; w < int'(W_MAX); w++) begin
          automatic int v = 0;
          for (int u = 0; u < int'(U_MAX); u++) v = mx(v, mn(x[u], R[mstate][u][w]));
          r.y[w] = mu_t'(v);
        end
      end
    endcase
    begin
      automatic int m = 0, l = 0, s = 0;
      for (int w = 0; w < int'(W_MAX); w++) m = mx(m, int'(r.y[w]));
      for (int w = 0; w < int'(W_MAX); w++) if (int'(r.y[w]) == m) begin l++; s += w + 1; end
      r.yc = YC_W'((s * 16) / l);
      r.flat = (m == 0);
    end
    exp_q.push_back(r);
  endfunction

  // ------------------------------------------------------------- host bus
  task automatic bus_write(int a, logic [63:0] d);
    @(negedge clk);
    cs = 1; we = 1; addr = 4'(a); wdata = d;
    #1;
    while (hwait) begin n_wait++; @(negedge clk); #1; end
    @(posedge clk);
    #1 cs = 0; we = 0;
  endtask

  task automatic bus_read(int a, output logic [63:0] d);
    @(negedge clk);
    addr = 4'(a);
    #1 d = rdata;
  endtask

  task automatic put_vec(int a, fvec_t v);
    logic [FVEC_W-1:0] f = v;
    bus_write(a, f[63:0]);
    bus_write(a + 1, 64'(f[FVEC_W-1:64]));
  endtask

  int tag_n = 0;
  fvec_t cur_x1, cur_x2, cur_y;

  task automatic job(op_e op, int bank, fvec_t x1, fvec_t x2, fvec_t y, int row = 0, bit load = 1);
    if (load) begin
      if (x1 != cur_x1) put_vec(0, x1);
      if (x2 != cur_x2) put_vec(2, x2);
      if (y != cur_y) put_vec(4, y);
      cur_x1 = x1; cur_x2 = x2; cur_y = y;
    end
    model_job(op, bank, row, tag_n, x1, x2, y);
    case (op)
      OP_LEARN_FIRST: n_first++;
      OP_LEARN:       n_learn++;
      OP_INFER:       n_infer++;
      OP_LOAD_ROW:    n_load++;
      default:        n_set++;
    endcase
    bus_write(6, {32'd0, 8'(tag_n), 3'd0, 5'(row), 6'd0, 2'(bank), 5'd0, 3'(op)});
    tag_n++;
  endtask

  task automatic program_trans(int s, int e, logic v, logic [XB_W-1:0] mask, match, int nxt);
    T[s][e] = '{valid: v, mask: mask, match: match, next: STATE_W'(nxt)};
    bus_write(7, {14'd0, 2'(nxt), 6'd0, match, 6'd0, mask, 7'd0, v, 2'd0, 2'(e), 2'd0, 2'(s)});
  endtask

  // triangular fuzzy set with peak p (1..25) and slope k, or random
  function automatic fvec_t peak(int p, int k);
    fvec_t v;
    for (int u = 1; u <= int'(U_MAX); u++) begin
      automatic int d = (u > p) ? u - p : p - u;
      v[u-1] = mu_t'(mx(0, int'(MU_ONE) - d * k));
    end
    return v;
  endfunction

  function automatic fvec_t rnd();
    fvec_t v;
    for (int u = 0; u < int'(W_MAX); u++) v[u] = mu_t'($urandom_range(0, 4));
    return v;
  endfunction

  // ---------------------------------------------------------- result check
  int last_res_cycle = -100;
  result_t last_infer;
  always @(posedge clk) if (rst_n && res_valid) begin
    automatic result_t e;
    n_res++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected result tag=%0d", res.tag);
    end else begin
      e = exp_q.pop_front();
      if (res.op == OP_INFER) begin
        last_infer = res;
        if (res.flat) n_flat++;
        if (cycle - last_res_cycle == 9) n_rate++;
        if (cycle - last_res_cycle < 9) begin
          failures++;
          $display("results %0d clocks apart", cycle - last_res_cycle);
        end
        if (res != e) begin
          failures++;
          if (failures < 20)
            $display("mismatch tag=%0d: bank %0d/%0d yc %0d/%0d flat %0d/%0d y %s",
                     res.tag, res.bank, e.bank, res.yc, e.yc, res.flat, e.flat,
                     res.y == e.y ? "ok" : "differs");
        end
      end else if (res.op != e.op || res.tag != e.tag || res.bank != e.bank) begin
        failures++;
        $display("mismatch on learning job tag=%0d", res.tag);
      end
    end
    last_res_cycle = cycle;
  end
  always @(posedge irq) n_irq++;

  task automatic drain();
    int guard = 0;
    while (exp_q.size() != 0 && guard < 2000) begin @(posedge clk); guard++; end
    repeat (12) @(posedge clk);
  endtask

  logic [63:0] r;
  fvec_t zero = '0;

  initial begin
    cs = 0; we = 0; addr = '0; wdata = '0;
    cur_x1 = '0; cur_x2 = '0; cur_y = '0;
    for (int s = 0; s < int'(N_STATES); s++) for (int e = 0; e < 4; e++) T[s][e] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // next-state table: input 1 LOW -> next state; state 3: input 2 in 21..25 -> 0
    program_trans(3, 0, 1'b1, XB_W'(1 << 9), XB_W'(1 << 9), 0);
    for (int s = 0; s < int'(N_STATES); s++)
      program_trans(s, 1, 1'b1, XB_W'(1), XB_W'(1), (s + 1) % int'(N_STATES));

    // learning: four rules per relation, rule outputs shifted per state
    for (int b = 0; b < int'(N_STATES); b++)
      for (int i = 0; i < 4; i++) begin
        automatic int p = 3 + 6 * i;
        job(i == 0 ? OP_LEARN_FIRST : OP_LEARN, b, peak(p, 1), peak(p + $urandom_range(0, 3), 1),
            peak((p + 7 * b) % 25 + 1, 1 + (i % 2)));
      end
    job(OP_SET_STATE, 0, cur_x1, cur_x2, cur_y, 0, 0);

    // stream of inferences: inputs already in the registers are reused so
    // that commands follow each other faster than the pipeline drains
    for (int t = 0; t < 60; t++) begin
      automatic int pa = $urandom_range(1, 25);
      automatic fvec_t a = (t % 7 == 3) ? rnd() : peak(pa, $urandom_range(1, 2));
      automatic fvec_t c = (t % 10 == 5) ? peak($urandom_range(1, 25), 1)
                                         : peak(mx(1, mn(25, pa + $urandom_range(0, 4) - 2)), 1);
      if (t % 5 == 0) begin
        job(OP_INFER, 0, a, c, cur_y);
      end else
        job(OP_INFER, 0, cur_x1, cur_x2, cur_y, 0, 0);
    end
    job(OP_INFER, 0, zero, peak(10, 1), cur_y);      // no overlap: flat output
    drain();

    // read the last inference back over the bus
    begin
      logic [FVEC_W-1:0] yf;
      yf = last_infer.y;
      bus_read(0, r); check(r == yf[63:0], "bus read y low");
      bus_read(1, r); check(r == 64'(yf[FVEC_W-1:64]), "bus read y high");
      bus_read(2, r); check(r[8:0] == last_infer.yc && r[31:24] == last_infer.tag, "bus read crisp");
      bus_read(3, r); check(r[5:4] == fsm_state && r[5:4] == STATE_W'(mstate), "bus read state");
      check(r[63:48] == 16'(n_infer) && r[47:32] == 16'(n_infer + n_first + n_learn + n_load), "job counters");
      check(!r[3], "stand-by after drain");
    end

    // direct download of rows into relation 1, then infer there
    job(OP_SET_STATE, 1, cur_x1, cur_x2, cur_y, 0, 0);
    job(OP_LOAD_ROW, 1, cur_x1, cur_x2, peak(20, 1), 12);
    job(OP_LOAD_ROW, 1, cur_x1, cur_x2, rnd(), 24);
    for (int t = 0; t < 4; t++) job(OP_INFER, 0, peak(13, 1), peak(25 - t, 1), cur_y);
    drain();

    // error flag: an all-full rule makes R all ones and raises the interrupt
    job(OP_LEARN_FIRST, 2, {W_MAX{MU_ONE}}, {W_MAX{MU_ONE}}, {W_MAX{MU_ONE}});
    drain();
    check(irq, "irq after all-full model");
    bus_read(3, r); check(r[0] && r[1], "status shows error");
    bus_write(8, 64'd1);
    check(!irq, "irq cleared");
    job(OP_LEARN_FIRST, 2, peak(5, 1), peak(5, 1), peak(9, 1));
    job(OP_LEARN, 2, peak(18, 1), peak(18, 1), peak(20, 1));
    job(OP_SET_STATE, 2, cur_x1, cur_x2, cur_y, 0, 0);
    for (int t = 0; t < 3; t++) job(OP_INFER, 0, peak(6 + 6 * t, 1), peak(20, 1), cur_y);
    drain();
    bus_read(3, r); check(!r[1] && !irq, "error flag cleared by new model");

    check(exp_q.size() == 0, "all results arrived");
    $display("learn_first=%0d learn=%0d infer=%0d load_row=%0d set_state=%0d", n_first, n_learn, n_infer, n_load, n_set);
    $display("state_changes=%0d host_waits=%0d irq=%0d flat=%0d results_9_clocks_apart=%0d",
             n_trans, n_wait, n_irq, n_flat, n_rate);
    $display("inferences per relation: %0d %0d %0d %0d", n_banks_used[0], n_banks_used[1], n_banks_used[2], n_banks_used[3]);
    check(n_first > 0, "learn_first occurred");
    check(n_learn > 0, "learn occurred");
    check(n_load > 0, "load_row occurred");
    check(n_set > 0, "set_state occurred");
    check(n_trans > 0, "FSM state change occurred");
    check(n_wait > 0, "host wait occurred");
    check(n_irq > 0, "interrupt occurred");
    check(n_flat > 0, "flat output occurred");
    check(n_rate > 0, "results every nine clocks occurred");
    for (int s = 0; s < int'(N_STATES); s++) check(n_banks_used[s] > 0, "every relation used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
