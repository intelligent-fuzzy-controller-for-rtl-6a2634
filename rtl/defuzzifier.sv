// defuzzifier: mean-of-maxima defuzzification (pipeline step T4).
//
// The crisp answer is the mean position of the points where the fuzzy output
// Y reaches its maximum: yc = (1/L) * sum of w_J over those L points, with
// positions counted 1..W_MAX. Stage 1 finds the maximum degree, marks the
// points that reach it and forms L and the position sum S. Stage 2 divides by
// L with a reciprocal look-up table (the original design mentions a look-up table
// for defuzzification): yc = (S * 2^YC_FRAC * RECIP[L]) >> RECIP_SH with
// RECIP[L] = ceil(2^RECIP_SH / L). RECIP_SH = 17 makes the result equal to
// floor(S * 2^YC_FRAC / L) exactly for every S and L that can occur, i.e. the
// mean truncated to YC_FRAC = 4 fraction bits. The fixed-point format and the
// two-stage split are this design's choices. An all-zero Y has every point at
// the maximum, gives yc = 13.0 (the centre) and raises the flat flag.
//
// Timing: fully pipelined, no back-pressure; a result leaves two clocks after
// its input was presented (out_valid follows in_valid by two clocks).
module defuzzifier
  import fuzzy_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  fuzzy_res_t in_res,
  output logic       out_valid,
  output result_t    out_res
);

  localparam int unsigned RECIP_SH = 17;
  localparam int unsigned L_W      = $clog2(W_MAX + 1);
  localparam int unsigned S_W      = $clog2(W_MAX * (W_MAX + 1) / 2 + 1);

  function automatic logic [RECIP_SH:0] recip(int unsigned l);
    return (l == 0) ? '0 : (RECIP_SH+1)'(((1 << RECIP_SH) + l - 1) / l);
  endfunction

  // reciprocal table, RECIP[L] = ceil(2^17 / L)
  logic [RECIP_SH:0] recip_lut [W_MAX+1];
  for (genvar l = 0; l <= int'(W_MAX); l++) begin : g_lut
    assign recip_lut[l] = recip(l);
  end

  // ---------------------------------------------------------------- stage 1
  mu_t          ymax;
  logic [L_W-1:0] cnt;
  logic [S_W-1:0] sum;

  always_comb begin
    ymax = '0;
    for (int j = 0; j < int'(W_MAX); j++)
      if (in_res.y[j] > ymax) ymax = in_res.y[j];
    cnt = '0;
    sum = '0;
    for (int j = 0; j < int'(W_MAX); j++)
      if (in_res.y[j] == ymax) begin
        cnt = cnt + L_W'(1);
        sum = sum + S_W'(j + 1);
      end
  end

  logic           v1;
  fuzzy_res_t     res1;
  logic [L_W-1:0] cnt1;
  logic [S_W-1:0] sum1;
  logic           flat1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      res1  <= '0;
      cnt1  <= L_W'(1);
      sum1  <= '0;
      flat1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        res1  <= in_res;
        cnt1  <= cnt;
        sum1  <= sum;
        flat1 <= (ymax == '0);
      end
    end
  end

  // ---------------------------------------------------------------- stage 2
  localparam int unsigned P_W = S_W + YC_FRAC + RECIP_SH + 1;
  logic [P_W-1:0] prod;
  assign prod = P_W'({sum1, {YC_FRAC{1'b0}}}) * P_W'(recip_lut[cnt1]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_res   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out_res.op   <= res1.op;
        out_res.bank <= res1.bank;
        out_res.tag  <= res1.tag;
        out_res.y    <= res1.y;
        out_res.yc   <= YC_W'(prod >> RECIP_SH);
        out_res.flat <= flat1;
      end
    end
  end

endmodule
