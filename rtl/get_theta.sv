// get_theta: angle theta = atan2(Q, I) of an I/Q sample, plus |I| and |Q|.
//
// The division Q/I and the arctangent are both PWL units, which need inputs
// where the functions are smooth, so the sample is first folded into a
// narrow range and the folding is undone afterwards:
//   divPrep    (clock 1)   |I|, |Q|; swap so that Q'' <= I''; shift I'' left
//                          until its MSB is set, i.e. I'' in [1,2)
//   divApprox  (clocks 2-3) r = 1/I''  (PWL, 2^7 intervals)
//   divPost    (clocks 4-5) Q'' * r, shifted back by the normalising shift
//   atanApprox (clocks 6-7) theta' = atan(Q''/I'') in [0, pi/4]  (PWL)
//   atanPost   (clock 8)   undo the swap (pi/2 - theta') and the signs of
//                          I and Q (pi - t, 2pi - t)
// Q'' = 0 and Q'' = I'' are handled as special cases (theta' = 0 and pi/4).
//
// Interface: i_in/q_in are 13-bit two's complement; abs_i/abs_q (12 bits,
// -4096 saturates to 4095) leave after 1 clock; theta (15 bits, 2*pi = 2^15)
// leaves 8 clocks after the sample; one sample per clock.
//
// The stage structure follows the source block diagram. Three flag bits
// (sign I, sign Q, swap) are carried where the diagram draws two, and
// atanPost is a single clock so that the total is the 8 clocks given for
// this block; the number formats are this design's own.
module get_theta
  import amo_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_wr_t             cfg,
  input  logic [IQ_W-1:0]     i_in,
  input  logic [IQ_W-1:0]     q_in,
  output logic [ABS_W-1:0]    abs_i,
  output logic [ABS_W-1:0]    abs_q,
  output logic [ANG_W-1:0]    theta
);

  typedef struct packed {
    logic neg_i;
    logic neg_q;
    logic swap;
    logic zero;   // Q'' = 0
    logic diag;   // Q'' = I'' (and nonzero)
  } th_flags_t;

  // ---- divPrep --------------------------------------------------------------
  function automatic logic [ABS_W-1:0] sat_abs(input logic [IQ_W-1:0] v);
    logic [IQ_W-1:0] m;
    m = v[IQ_W-1] ? (~v + 1'b1) : v;
    return m[IQ_W-1] ? '1 : m[ABS_W-1:0];
  endfunction

  logic [ABS_W-1:0] ai_c, aq_c, ip_c, qp_c;
  logic [RECIP_IN_W-1:0] inorm_c;
  logic [3:0]       sh_c;
  th_flags_t        fl_c;

  always_comb begin
    ai_c = sat_abs(i_in);
    aq_c = sat_abs(q_in);
    fl_c.neg_i = i_in[IQ_W-1];
    fl_c.neg_q = q_in[IQ_W-1];
    fl_c.swap  = aq_c > ai_c;
    ip_c = fl_c.swap ? aq_c : ai_c;
    qp_c = fl_c.swap ? ai_c : aq_c;
    fl_c.zero  = (qp_c == '0);
    fl_c.diag  = (qp_c == ip_c) && !fl_c.zero;
    // leading-one search: shift so that bit 11 is set
    sh_c = 4'd0;
    for (int b = 0; b < ABS_W; b++)
      if (ip_c[b]) sh_c = 4'(ABS_W - 1 - b);
    inorm_c = RECIP_IN_W'(ip_c << sh_c);   // leading one dropped
  end

  logic [ABS_W-1:0] qp_1;
  logic [RECIP_IN_W-1:0] inorm_1;
  logic [3:0]       sh_1;
  th_flags_t        fl_1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      abs_i <= '0; abs_q <= '0; qp_1 <= '0; inorm_1 <= '0; sh_1 <= '0; fl_1 <= '0;
    end else begin
      abs_i <= ai_c; abs_q <= aq_c; qp_1 <= qp_c; inorm_1 <= inorm_c; sh_1 <= sh_c; fl_1 <= fl_c;
    end
  end

  // ---- divApprox: r = 2^15 / I'', I'' = 1.xxxxxxxxxxx ----------------------
  logic [RECIP_OUT_W-1:0] recip_3;
  pwl_approx #(.IN_W(RECIP_IN_W), .OUT_W(RECIP_OUT_W), .KF(RECIP_KF), .TGT(TGT_RECIP)) u_div_approx (
    .clk, .rst_n, .cfg, .x(inorm_1), .y(recip_3));

  logic [ABS_W-1:0] qp_3;
  logic [3:0]       sh_4;
  th_flags_t        fl_7;
  delay_line #(.W(ABS_W), .N(2)) u_dl_q  (.clk, .rst_n, .d(qp_1), .q(qp_3));
  delay_line #(.W(4),     .N(3)) u_dl_sh (.clk, .rst_n, .d(sh_1), .q(sh_4));
  delay_line #(.W($bits(th_flags_t)), .N(6)) u_dl_fl (.clk, .rst_n, .d(fl_1), .q(fl_7));

  // ---- divPost: quotient = Q'' * r * 2^sh / 2^11, units 2^-15 ---------------
  logic [ABS_W+RECIP_OUT_W-1:0] prod_4;
  logic [ABS_W+RECIP_OUT_W+14:0] shifted;
  logic [ATAN_IN_W-1:0]          quot_c, quot_5;

  always_comb begin
    shifted = ($bits(shifted))'(prod_4) << sh_4;
    shifted = shifted >> 11;
    quot_c  = (shifted > ($bits(shifted))'({ATAN_IN_W{1'b1}})) ? '1 : shifted[ATAN_IN_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prod_4 <= '0; quot_5 <= '0;
    end else begin
      prod_4 <= qp_3 * recip_3;
      quot_5 <= quot_c;
    end
  end

  // ---- atanApprox: theta' = atan(quotient), 2*pi = 2^15 ----------------------
  logic [ATAN_OUT_W-1:0] thp_7;
  pwl_approx #(.IN_W(ATAN_IN_W), .OUT_W(ATAN_OUT_W), .KF(ATAN_KF), .TGT(TGT_ATAN)) u_atan_approx (
    .clk, .rst_n, .cfg, .x(quot_5), .y(thp_7));

  // ---- atanPost ------------------------------------------------------------------
  localparam logic [ANG_W-1:0] QUARTER = ANG_W'(1 << (ANG_W - 2));
  localparam logic [ANG_W-1:0] EIGHTH  = ANG_W'(1 << (ANG_W - 3));
  logic [ANG_W-1:0] t0, t1, t2, th_c;

  always_comb begin
    if (fl_7.zero)      t0 = '0;
    else if (fl_7.diag) t0 = EIGHTH;
    else                t0 = ANG_W'(thp_7);
    t1   = fl_7.swap  ? (QUARTER - t0) : t0;
    t2   = fl_7.neg_i ? ((QUARTER << 1) - t1) : t1;
    th_c = fl_7.neg_q ? (ANG_W'(0) - t2) : t2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) theta <= '0;
    else        theta <= th_c;
  end

endmodule
