// get_alpha: supply selection and the two outphasing angles alpha1, alpha2.
//
// For a sample of amplitude A and supplies a1, a2 the angle between the
// sample vector and the vector of path i is
//     alpha_i = arccos( (a_i^2 + A^2 - a_j^2) / (2 A a_i) )
//             = arccos( c1_i * A + c2_i / A ),
//     c1_i = 1/(2 a_i),  c2_i = (a_i^2 - a_j^2)/(2 a_i),
// which avoids a long division with operands of the order of A^2. A and
// 1/A come from PWL sqrt and 1/sqrt units whose input is first scaled by
// powers of 4 into [1/4, 1) (SqrtPrep) and scaled back afterwards.
//
// Pipeline (15 clocks, one sample per clock):
//   1      |I|^2, |Q|^2
//   2      MagSq = (|I|^2 + |Q|^2) >> 6          (19 bits, A^2 = code/2^18)
//   3-4    SqrtPrep (shift count k, 16-bit normalised input); the
//          comparator (amp_select) picks a1, a2, c1, c2 in clock 3
//   5-6    PWL sqrt and PWL 1/sqrt
//   7-8    post-shift: A (12 bits, /2^11), 1/A (16 bits, /2^10, saturating)
//   9-11   c1*A, c2/A products, sums, |arg| clamped below 1 and its sign
//   12-15  PWL arccos on |arg|, pi - result for negative arguments
// a1/a2 are delayed to leave with alpha1/alpha2.
//
// The stage split is the source's. Its diagram draws two multipliers and one
// arccos argument per path pair; here each path has its own argument (four
// multipliers, two adders) because alpha1 and alpha2 differ whenever
// a1 != a2. The negative-argument reflection, the clamp, 1/A at 16 bits and
// round-to-nearest for A, 1/A and the arguments (truncation biases alpha by
// about 12 LSB) are this design's choices. A negative argument needs
// A^2 < a_j^2 - a_i^2, which the threshold rule only allows when the supply
// levels are spread widely; the reflection is kept for such settings.
module get_alpha
  import amo_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_wr_t           cfg,
  input  logic [ABS_W-1:0]  abs_i,
  input  logic [ABS_W-1:0]  abs_q,
  output logic [ANG_W-1:0]  alpha1,
  output logic [ANG_W-1:0]  alpha2,
  output supply_t           a1,
  output supply_t           a2
);

  // ---- 1-2: squared magnitude ----------------------------------------------
  logic [2*ABS_W-1:0] sqi_1, sqq_1;
  logic [MAG_W-1:0]   mag_2;
  logic [MAG_W-1:0]   sum_c;

  // 25-bit sum, top 19 bits kept
  assign sum_c = MAG_W'(({1'b0, sqi_1} + {1'b0, sqq_1}) >> (2 * ABS_W + 1 - MAG_W));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sqi_1 <= '0; sqq_1 <= '0; mag_2 <= '0;
    end else begin
      sqi_1 <= abs_i * abs_i;
      sqq_1 <= abs_q * abs_q;
      mag_2 <= sum_c;
    end
  end

  // ---- 3-4: SqrtPrep ---------------------------------------------------------
  // W = mag (value W/2^18); find the smallest k with (W << 2k)[19:18] != 0.
  logic [MAG_W:0] w_c;
  logic [SQRT_IN_W-1:0] vn_c;
  logic [3:0]     k_c;
  always_comb begin
    w_c = {1'b0, mag_2};
    k_c = 4'd9;
    for (int k = 9; k >= 0; k--)
      if ((w_c << (2 * k)) >> (MAG_W - 1) != 0) k_c = 4'(k);
    vn_c = SQRT_IN_W'((w_c << (2 * k_c)) >> (MAG_W + 1 - SQRT_IN_W));
  end

  logic [SQRT_IN_W-1:0] vn_3, vn_4;
  logic [3:0]           k_3;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vn_3 <= '0; vn_4 <= '0; k_3 <= '0;
    end else begin
      vn_3 <= vn_c;
      vn_4 <= vn_3;
      k_3  <= k_c;
    end
  end

  supply_t          a1_3, a2_3;
  logic [C_W-1:0]   c11_3, c21_3, c12_3, c22_3;
  amp_select u_comparator (
    .clk, .rst_n, .cfg, .mag_sq(mag_2),
    .a1(a1_3), .a2(a2_3), .c1_1(c11_3), .c2_1(c21_3), .c1_2(c12_3), .c2_2(c22_3));

  // ---- 5-6: PWL sqrt and 1/sqrt ----------------------------------------------
  logic [SQRT_OUT_W-1:0] sq_6;
  logic [RSQ_OUT_W-1:0]  rsq_6;
  pwl_approx #(.IN_W(SQRT_IN_W), .OUT_W(SQRT_OUT_W), .KF(SQRT_KF), .TGT(TGT_SQRT)) u_sqrt_approx (
    .clk, .rst_n, .cfg, .x(vn_4), .y(sq_6));
  pwl_approx #(.IN_W(RSQ_IN_W), .OUT_W(RSQ_OUT_W), .KF(RSQ_KF), .TGT(TGT_RSQRT)) u_rsqrt_approx (
    .clk, .rst_n, .cfg, .x(vn_4), .y(rsq_6));

  logic [3:0] k_6;
  delay_line #(.W(4), .N(3)) u_dl_k (.clk, .rst_n, .d(k_3), .q(k_6));

  // ---- 7-8: post-shift -------------------------------------------------------
  logic [A_W-1:0]   amp_c, amp_7, amp_8;
  logic [RA_W-1:0]  ramp_c, ramp_7, ramp_8;
  logic [RSQ_OUT_W+9:0] rs_wide;
  always_comb begin
    // rounded: A = round(sqrt_out / 2^(4+k))
    amp_c   = A_W'((({1'b0, sq_6}) + (17'd1 << (3 + k_6))) >> (4 + k_6));
    rs_wide = ($bits(rs_wide))'(rsq_6) << k_6;
    rs_wide = rs_wide >> 5;
    ramp_c  = (rs_wide > ($bits(rs_wide))'({RA_W{1'b1}})) ? '1 : rs_wide[RA_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      amp_7 <= '0; amp_8 <= '0; ramp_7 <= '0; ramp_8 <= '0;
    end else begin
      amp_7 <= amp_c;  amp_8 <= amp_7;
      ramp_7 <= ramp_c; ramp_8 <= ramp_7;
    end
  end

  // constants and supply codes travel alongside
  logic [4*C_W-1:0] cst_8;
  delay_line #(.W(4*C_W), .N(5)) u_dl_c (.clk, .rst_n,
    .d({c11_3, c21_3, c12_3, c22_3}), .q(cst_8));
  delay_line #(.W(4), .N(12)) u_dl_a (.clk, .rst_n, .d({a1_3, a2_3}), .q({a1, a2}));

  // ---- 9-11: arccos arguments ------------------------------------------------
  logic [C_W-1:0] c11_8, c21_8, c12_8, c22_8;
  assign {c11_8, c21_8, c12_8, c22_8} = cst_8;

  logic signed [31:0] p11_9, p21_9, p12_9, p22_9;
  logic signed [31:0] arg1_10, arg2_10;
  logic [ACOS_IN_W-1:0] x1_11, x2_11;
  logic                 neg1_11, neg2_11;

  function automatic logic [ACOS_IN_W:0] clamp_abs(input logic signed [31:0] v);
    logic signed [31:0] m;
    m = (v < 0) ? -v : v;
    if (m > 32'sd4095) m = 32'sd4095;
    return {v < 0, m[ACOS_IN_W-1:0]};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p11_9 <= '0; p21_9 <= '0; p12_9 <= '0; p22_9 <= '0;
      arg1_10 <= '0; arg2_10 <= '0;
      x1_11 <= '0; x2_11 <= '0; neg1_11 <= 1'b0; neg2_11 <= 1'b0;
    end else begin
      // units 2^-21: c1 (2^-10) * A (2^-11), c2 (2^-11) * 1/A (2^-10)
      p11_9 <= $signed({19'd0, c11_8}) * $signed({20'd0, amp_8});
      p21_9 <= 32'(signed'(c21_8)) * $signed({16'd0, ramp_8});
      p12_9 <= $signed({19'd0, c12_8}) * $signed({20'd0, amp_8});
      p22_9 <= 32'(signed'(c22_8)) * $signed({16'd0, ramp_8});
      arg1_10 <= (p11_9 + p21_9 + 32'sd256) >>> 9;     // units 2^-12, rounded
      arg2_10 <= (p12_9 + p22_9 + 32'sd256) >>> 9;
      {neg1_11, x1_11} <= clamp_abs(arg1_10);
      {neg2_11, x2_11} <= clamp_abs(arg2_10);
    end
  end

  // ---- 12-15: arccos -----------------------------------------------------------
  logic [ACOS_OUT_W-1:0] ac1_13, ac2_13;
  pwl_approx #(.IN_W(ACOS_IN_W), .OUT_W(ACOS_OUT_W), .KF(ACOS_KF), .TGT(TGT_ACOS)) u_acos1 (
    .clk, .rst_n, .cfg, .x(x1_11), .y(ac1_13));
  pwl_approx #(.IN_W(ACOS_IN_W), .OUT_W(ACOS_OUT_W), .KF(ACOS_KF), .TGT(TGT_ACOS)) u_acos2 (
    .clk, .rst_n, .cfg, .x(x2_11), .y(ac2_13));

  logic neg1_13, neg2_13;
  delay_line #(.W(2), .N(2)) u_dl_neg (.clk, .rst_n, .d({neg1_11, neg2_11}), .q({neg1_13, neg2_13}));

  localparam logic [ANG_W-1:0] HALF = ANG_W'(1 << (ANG_W - 1));
  logic [ANG_W-1:0] al1_14, al2_14;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      al1_14 <= '0; al2_14 <= '0; alpha1 <= '0; alpha2 <= '0;
    end else begin
      al1_14 <= neg1_13 ? (HALF - ANG_W'(ac1_13)) : ANG_W'(ac1_13);
      al2_14 <= neg2_13 ? (HALF - ANG_W'(ac2_13)) : ANG_W'(ac2_13);
      alpha1 <= al1_14;
      alpha2 <= al2_14;
    end
  end

endmodule
