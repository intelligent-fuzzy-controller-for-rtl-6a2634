// tb_max_unit: checks the element-wise maximum of four random fuzzy sets (the
// width used to merge the four parallel paths) against a maximum computed
// here point by point.
module tb_max_unit;
  import fuzzy_pkg::*;

  localparam int N = 4;
  int checks = 0, failures = 0;
  fvec_t in [N];
  fvec_t y;

  max_unit #(.N_IN(N)) dut (.in, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int n = 0; n < N; n++)
        for (int j = 0; j < int'(W_MAX); j++)
          in[n][j] = mu_t'($urandom_range(0, 4));
      #1;
      for (int j = 0; j < int'(W_MAX); j++) begin
        automatic int exp = 0;
        for (int n = 0; n < N; n++) if (int'(in[n][j]) > exp) exp = int'(in[n][j]);
        checks++;
        if (int'(y[j]) != exp) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d j=%0d exp=%0d y=%0d", t, j, exp, y[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
