// nssd_unit: single-precision pipeline from the five window sums to the
// NSSD score.
//
// With n = PATCH*PATCH pixels, means fbar = Sf/n, tbar = St/n, variances
// var = S2/n - mean^2 and deviations sigma = sqrt(var), the NSSD of the two
// normalised patches is evaluated over a common denominator so that only
// one division is needed:
//   G     = fbar*sigma_t - tbar*sigma_f
//   Num   = Sf2*var_t + St2*var_f + n*G^2 - 2*Sft*sigma_f*sigma_t
//           + 2*G*(St*sigma_f - Sf*sigma_t)
//   Den   = var_f * var_t
//   NSSD  = (Num / Den) * (1/n)
// All divisions by n are multiplications by the constant 1/n.  Num/Den is
// the one-loop form of the NSSD (five sums, one pass over the pixels)
// multiplied through by var_f*var_t, as in the reference kernel.
//
// Pipeline: nine register stages, one new window accepted every cycle,
// out_valid follows in_valid by LATENCY = 9 cycles with the coordinates
// carried alongside.  The four numerator terms are added as a balanced
// tree, (a + b) + (d - c), the relaxed operation order the reference
// kernel was compiled with.  A window whose reference or candidate patch is flat
// (all pixels equal, variance zero, NSSD undefined) scores +infinity so
// that it is never chosen as the best match.  Flatness is detected exactly
// on the integer sums (n*S2 == S1^2), because the float variance of a flat
// patch is left with a small rounding residue; a float variance that still
// comes out zero or negative is treated the same way.  Both are this
// design's own choices.  Reset clears the valid bits only.
module nssd_unit
  import nssd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  sums_t  in_sums,
  input  coord_t in_u,
  input  coord_t in_v,
  output logic   out_valid,
  output fp32_t  out_nssd,
  output coord_t out_u,
  output coord_t out_v
);

  localparam int unsigned LATENCY = 9;

  localparam fp32_t N_F    = fp_from_uint(32'(NPIX));
  localparam fp32_t NINV_F = fp_div(FP_ONE, N_F);

  logic   [LATENCY:1] vld;
  coord_t             u_q [LATENCY:1];
  coord_t             v_q [LATENCY:1];

  // stage registers
  fp32_t sf_1, st_1, sf2_1, st2_1, sft_1;
  fp32_t sf_2, st_2, sf2_2, st2_2, sft_2, fbar_2, tbar_2, mf2_2, mt2_2;
  fp32_t sf_3, st_3, sf2_3, st2_3, sft_3, fbar_3, tbar_3, varf_3, vart_3;
  fp32_t sf_4, st_4, sf2_4, st2_4, sft_4, fbar_4, tbar_4, varf_4, vart_4;
  fp32_t sgf_4, sgt_4, den_4;
  logic  flat_1, flat_2, flat_3, flat_4, flat_5, flat_6, flat_7;
  fp32_t sf2_5, st2_5, sft_5, varf_5, vart_5, den_5, g_5, sgfgt_5, x_5;
  fp32_t a_6, b_6, c_6, d_6, den_6;
  fp32_t num_7, den_7;
  fp32_t q_8;
  logic  flat_8;
  fp32_t nssd_9;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-1:1], in_valid};
  end

  always_ff @(posedge clk) begin
    u_q[1] <= in_u;
    v_q[1] <= in_v;
    for (int i = 2; i <= int'(LATENCY); i++) begin
      u_q[i] <= u_q[i-1];
      v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    // 1: integer sums to float
    sf_1  <= fp_from_uint(32'(in_sums.sf));
    st_1  <= fp_from_uint(32'(in_sums.st));
    sf2_1 <= fp_from_uint(32'(in_sums.sf2));
    st2_1 <= fp_from_uint(32'(in_sums.st2));
    sft_1 <= fp_from_uint(32'(in_sums.sft));
    flat_1 <= (32'(NPIX) * 32'(in_sums.sf2) == 32'(in_sums.sf) * 32'(in_sums.sf)) ||
              (32'(NPIX) * 32'(in_sums.st2) == 32'(in_sums.st) * 32'(in_sums.st));
    // 2: means and mean squares
    {sf_2, st_2, sf2_2, st2_2, sft_2} <= {sf_1, st_1, sf2_1, st2_1, sft_1};
    flat_2 <= flat_1;
    fbar_2 <= fp_mul(sf_1, NINV_F);
    tbar_2 <= fp_mul(st_1, NINV_F);
    mf2_2  <= fp_mul(sf2_1, NINV_F);
    mt2_2  <= fp_mul(st2_1, NINV_F);
    // 3: variances
    {sf_3, st_3, sf2_3, st2_3, sft_3} <= {sf_2, st_2, sf2_2, st2_2, sft_2};
    flat_3 <= flat_2;
    fbar_3 <= fbar_2;
    tbar_3 <= tbar_2;
    varf_3 <= fp_sub(mf2_2, fp_mul(fbar_2, fbar_2));
    vart_3 <= fp_sub(mt2_2, fp_mul(tbar_2, tbar_2));
    // 4: standard deviations and the denominator
    {sf_4, st_4, sf2_4, st2_4, sft_4} <= {sf_3, st_3, sf2_3, st2_3, sft_3};
    fbar_4 <= fbar_3;
    tbar_4 <= tbar_3;
    varf_4 <= varf_3;
    vart_4 <= vart_3;
    sgf_4  <= fp_sqrt(varf_3);
    sgt_4  <= fp_sqrt(vart_3);
    den_4  <= fp_mul(varf_3, vart_3);
    flat_4 <= flat_3 || varf_3[31] || (varf_3[30:23] == 8'd0) || vart_3[31] || (vart_3[30:23] == 8'd0);
    // 5: G, sigma_f*sigma_t and (St*sigma_f - Sf*sigma_t)
    sf2_5   <= sf2_4;
    st2_5   <= st2_4;
    sft_5   <= sft_4;
    varf_5  <= varf_4;
    vart_5  <= vart_4;
    den_5   <= den_4;
    flat_5  <= flat_4;
    g_5     <= fp_sub(fp_mul(fbar_4, sgt_4), fp_mul(tbar_4, sgf_4));
    sgfgt_5 <= fp_mul(sgf_4, sgt_4);
    x_5     <= fp_sub(fp_mul(st_4, sgf_4), fp_mul(sf_4, sgt_4));
    // 6: the four terms of the numerator
    a_6    <= fp_add(fp_mul(sf2_5, vart_5), fp_mul(st2_5, varf_5));
    b_6    <= fp_mul(N_F, fp_mul(g_5, g_5));
    c_6    <= fp_mul(FP_TWO, fp_mul(sft_5, sgfgt_5));
    d_6    <= fp_mul(FP_TWO, fp_mul(g_5, x_5));
    den_6  <= den_5;
    flat_6 <= flat_5;
    // 7: numerator, summed as a balanced tree
    num_7  <= fp_add(fp_add(a_6, b_6), fp_sub(d_6, c_6));
    den_7  <= den_6;
    flat_7 <= flat_6;
    // 8: the single division
    q_8    <= fp_div(num_7, den_7);
    flat_8 <= flat_7;
    // 9: scale by 1/n
    nssd_9 <= flat_8 ? FP_PINF : fp_mul(q_8, NINV_F);
  end

  assign out_valid = vld[LATENCY];
  assign out_nssd  = nssd_9;
  assign out_u     = u_q[LATENCY];
  assign out_v     = v_q[LATENCY];

endmodule
