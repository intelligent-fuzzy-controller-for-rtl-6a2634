// tb_min_unit: checks the element-wise minimum of random fuzzy sets, with
// degrees drawn over the full 3-bit code so every ordering occurs, against a
// minimum computed here point by point.
module tb_min_unit;
  import fuzzy_pkg::*;

  int checks = 0, failures = 0;
  fvec_t a, b, y;

  min_unit dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < int'(W_MAX); j++) begin
        a[j] = mu_t'($urandom_range(0, 7));
        b[j] = (t % 3 == 0) ? a[j] : mu_t'($urandom_range(0, 7));
      end
      #1;
      for (int j = 0; j < int'(W_MAX); j++) begin
        automatic int exp = (int'(a[j]) <= int'(b[j])) ? int'(a[j]) : int'(b[j]);
        checks++;
        if (int'(y[j]) != exp) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d j=%0d a=%0d b=%0d y=%0d", t, j, a[j], b[j], y[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
