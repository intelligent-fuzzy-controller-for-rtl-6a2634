// tb_csfo_fsm: programs random next-state tables (some entries invalid,
// overlapping matches so that entry priority matters), then applies random
// Boolean inputs, steps and forced states, comparing state and next_state
// with a table model kept here every clock.
module tb_csfo_fsm;
  import fuzzy_pkg::*;

  localparam int NT = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic step, force_en, tbl_we;
  logic [XB_W-1:0] xb;
  logic [STATE_W-1:0] force_state, tbl_state, state, next_state;
  logic [1:0] tbl_idx;
  trans_t tbl_data;
  trans_t model [N_STATES][NT];
  int mstate;
  int n_trans = 0, n_stay = 0;

  csfo_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_next(int s, logic [XB_W-1:0] b);
    for (int e = 0; e < NT; e++)
      if (model[s][e].valid && ((b & model[s][e].mask) == model[s][e].match))
        return int'(model[s][e].next);
    return s;
  endfunction

  initial begin
    step = 0; force_en = 0; tbl_we = 0; xb = '0; force_state = '0;
    tbl_state = '0; tbl_idx = '0; tbl_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    mstate = 0;
    checks++; if (state != 0) failures++;
    for (int s = 0; s < int'(N_STATES); s++)
      for (int e = 0; e < NT; e++) begin
        @(negedge clk);
        tbl_we = 1; tbl_state = STATE_W'(s); tbl_idx = 2'(e);
        tbl_data.valid = ($urandom_range(0, 4) != 0);
        tbl_data.mask  = XB_W'($urandom) & XB_W'($urandom);
        tbl_data.match = XB_W'($urandom) & tbl_data.mask;
        tbl_data.next  = STATE_W'($urandom);
        model[s][e] = tbl_data;
      end
    @(negedge clk); tbl_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      xb = XB_W'($urandom);
      step = ($urandom_range(0, 3) != 0);
      force_en = ($urandom_range(0, 19) == 0);
      force_state = STATE_W'($urandom);
      #1;
      checks++;
      if (int'(next_state) != model_next(mstate, xb) || int'(state) != mstate) begin
        failures++;
        if (failures < 10) $display("t=%0d state=%0d/%0d next=%0d/%0d", t, state, mstate, next_state, model_next(mstate, xb));
      end
      if (force_en) mstate = int'(force_state);
      else if (step) begin
        if (model_next(mstate, xb) != mstate) n_trans++; else n_stay++;
        mstate = model_next(mstate, xb);
      end
    end
    checks++;
    if (n_trans == 0 || n_stay == 0) failures++;
    $display("transitions=%0d stays=%0d", n_trans, n_stay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
