// tb_rule_memory: writes random rows into every word and lane of the rule
// memory with random per-lane enables, keeps a copy here, and reads every
// word back, checking the one-clock read latency and that disabled lanes
// kept their old rows.
module tb_rule_memory;
  import fuzzy_pkg::*;

  localparam int P = 4;
  localparam int DEPTH = N_STATES * ((U_MAX + P - 1) / P);
  localparam int AW = $clog2(DEPTH);

  int checks = 0, failures = 0;
  logic clk = 0;
  logic rd_en;
  logic [AW-1:0] rd_addr, wr_addr;
  fvec_t rd_data [P];
  logic [P-1:0] wr_en;
  fvec_t wr_data [P];
  fvec_t model [DEPTH][P];

  rule_memory dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fvec_t rnd();
    fvec_t v;
    for (int j = 0; j < int'(W_MAX); j++) v[j] = mu_t'($urandom_range(0, 4));
    return v;
  endfunction

  task automatic read_check(int a);
    @(negedge clk);
    rd_en = 1; rd_addr = AW'(a); wr_en = '0;
    @(negedge clk);
    rd_en = 0;
    for (int p = 0; p < P; p++) begin
      checks++;
      if (rd_data[p] !== model[a][p]) begin
        failures++;
        if (failures < 10) $display("mismatch addr=%0d lane=%0d", a, p);
      end
    end
    // data must hold while rd_en is low
    @(negedge clk);
    checks++;
    if (rd_data[0] !== model[a][0]) failures++;
  endtask

  initial begin
    rd_en = 0; wr_en = '0; rd_addr = '0; wr_addr = '0;
    for (int p = 0; p < P; p++) wr_data[p] = '0;
    // fill everything
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = '1; wr_addr = AW'(a);
      for (int p = 0; p < P; p++) begin wr_data[p] = rnd(); model[a][p] = wr_data[p]; end
    end
    @(negedge clk); wr_en = '0;
    // partial writes
    for (int t = 0; t < 200; t++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      wr_en = P'($urandom_range(0, (1 << P) - 1)); wr_addr = AW'(a);
      for (int p = 0; p < P; p++) begin
        wr_data[p] = rnd();
        if (wr_en[p]) model[a][p] = wr_data[p];
      end
    end
    @(negedge clk); wr_en = '0;
    for (int a = 0; a < DEPTH; a++) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
