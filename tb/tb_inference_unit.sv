// tb_inference_unit: runs the model/inference unit test twice, on the
// default four-path unit (9 clocks per job) and on the basic single-path
// datapath (one row per clock, 27 clocks per job), and adds up the checks.
module tb_inference_unit;

  int checks4, failures4, checks1, failures1;
  logic done4, done1;

  inference_unit_check #(.PATHS(4)) u_quad  (.checks(checks4), .failures(failures4), .done(done4));
  inference_unit_check #(.PATHS(1)) u_basic (.checks(checks1), .failures(failures1), .done(done1));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks1, failures4 + failures1 + 1);
    $finish;
  end

  initial begin
    wait (done4 && done1);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks1, failures4 + failures1);
    $finish;
  end

endmodule
