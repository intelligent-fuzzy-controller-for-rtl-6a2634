// tb_host_interface: drives the host bus. It loads random fuzzy inputs and
// commands and checks the job handed to the pipeline; holds the pipeline
// off so a second command must wait (hwait) and then checks it is taken
// unchanged; checks the next-state table write decode; feeds results and
// reads them back; raises and clears the interrupt.
module tb_host_interface;
  import fuzzy_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cs, we, hwait, irq, job_valid, job_ready, tbl_we, res_valid, err_flag, eng_busy;
  logic [3:0] addr;
  logic [63:0] wdata, rdata;
  host_job_t job;
  logic [STATE_W-1:0] tbl_state, fsm_state;
  logic [1:0] tbl_idx;
  trans_t tbl_data;
  result_t res;
  int n_wait = 0;

  host_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(int a, logic [63:0] d);
    @(negedge clk);
    cs = 1; we = 1; addr = 4'(a); wdata = d;
    #1;
    while (hwait) begin n_wait++; @(negedge clk); #1; end
    @(posedge clk);
    #1 cs = 0; we = 0;
  endtask

  task automatic bus_read(int a, output logic [63:0] d);
    addr = 4'(a);
    #1;
    d = rdata;
  endtask

  function automatic logic [FVEC_W-1:0] rnd();
    logic [FVEC_W-1:0] v;
    for (int j = 0; j < int'(W_MAX); j++) v[3*j +: 3] = 3'($urandom_range(0, 4));
    return v;
  endfunction

  task automatic load(logic [FVEC_W-1:0] x1, x2, y);
    bus_write(0, x1[63:0]); bus_write(1, 64'(x1[FVEC_W-1:64]));
    bus_write(2, x2[63:0]); bus_write(3, 64'(x2[FVEC_W-1:64]));
    bus_write(4, y[63:0]);  bus_write(5, 64'(y[FVEC_W-1:64]));
  endtask

  logic [FVEC_W-1:0] x1, x2, y, x1b, yf;
  logic [63:0] r;

  initial begin
    cs = 0; we = 0; addr = '0; wdata = '0; job_ready = 0;
    res_valid = 0; res = '0; err_flag = 0; fsm_state = 2'd2; eng_busy = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      x1 = rnd(); x2 = rnd(); y = rnd();
      load(x1, x2, y);
      bus_write(6, {32'd0, 8'(t), 3'd0, 5'(t % 25), 6'd0, 2'(t), 5'd0, 3'(t % 5)});
      check(job_valid, "job issued");
      check(job.x[0] == x1 && job.x[1] == x2 && job.y == y, "job data");
      check(job.op == op_e'(t % 5) && job.bank == 2'(t) && job.row == 5'(t % 25) && job.tag == 8'(t), "job command");
      // change the input registers and issue a second command while the slot is full
      x1b = rnd();
      bus_write(0, x1b[63:0]);
      fork
        bus_write(6, {32'd0, 8'(t + 100), 24'd0});
        begin
          repeat (3) @(posedge clk);
          @(negedge clk) job_ready = 1;
          @(negedge clk) job_ready = 0;
        end
      join
      check(job_valid && job.tag == 8'(t + 100) && job.x[0][0] == x1b[2:0], "second job after wait");
      @(negedge clk) job_ready = 1;
      @(negedge clk) job_ready = 0;
      check(!job_valid, "slot empty");
    end
    check(n_wait >= 20, "hwait seen");
    // next-state table write decode
    @(negedge clk);
    cs = 1; we = 1; addr = 4'd7;
    wdata = {14'd0, 2'd3, 6'd0, 10'h2a5, 6'd0, 10'h15a, 7'd0, 1'b1, 2'd0, 2'd2, 2'd0, 2'd1};
    #1;
    check(tbl_we && tbl_state == 2'd1 && tbl_idx == 2'd2 && tbl_data.valid
          && tbl_data.mask == 10'h15a && tbl_data.match == 10'h2a5 && tbl_data.next == 2'd3, "table write");
    @(negedge clk) cs = 0; we = 0;
    // results
    for (int t = 0; t < 10; t++) begin
      @(negedge clk);
      res_valid = 1;
      res.op = (t % 2) ? OP_INFER : OP_LEARN;
      res.tag = 8'(t); res.bank = 2'(t); res.yc = 9'(t * 37); res.flat = t[0];
      res.y = rnd();
      @(negedge clk) res_valid = 0;
      if (res.op == OP_INFER) begin
        yf = res.y;
        bus_read(0, r); check(r == yf[63:0], "read y low");
        bus_read(1, r); check(r == 64'(yf[FVEC_W-1:64]), "read y high");
        bus_read(2, r); check(r[8:0] == res.yc && r[12] == res.flat && r[17:16] == res.bank && r[31:24] == res.tag, "read info");
      end
    end
    bus_read(3, r);
    check(r[47:32] == 16'd10 && r[63:48] == 16'd5 && r[5:4] == 2'd2 && r[3] && !r[0], "status counts");
    // interrupt
    err_flag = 1;
    @(negedge clk); res_valid = 1; res.op = OP_INFER;
    @(negedge clk); res_valid = 0;
    check(!irq, "no irq on inference");
    @(negedge clk); res_valid = 1; res.op = OP_LEARN_FIRST;
    @(negedge clk); res_valid = 0;
    check(irq, "irq raised");
    bus_read(3, r); check(r[0] && r[1], "status irq");
    bus_write(8, 64'd1);
    check(!irq, "irq cleared");
    $display("waits=%0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
