// pwl_approx: fixed-point piece-wise linear (PWL) function unit.
//
// A smooth function y = f(x) is split into 2^ADDR_W intervals. The top
// ADDR_W bits of the input (x1) select an interval, the remaining bits (x2)
// are the position inside it. A look-up table holds, per interval, an
// intercept b, a slope k and an offset s, and the output is
//
//     y = sat( b + k * (x2 - s) )
//
// so the only arithmetic is one small subtraction and one small
// multiplication with operands about half the width of the output; b
// provides the upper part of the result, k*(x2 - s) the lower part. The
// offset s recovers the fraction of the fitted intercept that b cannot hold.
// The table contents come from a least-squares line fit per interval
// followed by quantisation of b, then s, then k (see README).
//
// Pipeline (two stages, both registered):
//   stage 1: table look-up and d = x2 - s
//   stage 2: k * d, scaled by 2^-(KF+PWL_S_FRAC), added to b, saturated
// Latency is 2 clocks, one result per clock.
//
// Table writes come over the shared cfg bus: entry idx of the table whose
// target is TGT is written with {b, k, s} when cfg.we is high. The table is
// a register array so any number of instances can be written together.
//
// Design choices beyond the source structure: b is stored at full output
// width and the low term is added to it rather than concatenated, since a
// plain concatenation fails whenever the function crosses a step of b inside
// an interval; the widths of k and s (16 bits each) and the 4 fractional bits
// of s are this design's own.
module pwl_approx
  import amo_pkg::*;
#(
  parameter int unsigned IN_W   = 15,
  parameter int unsigned OUT_W  = 15,
  parameter int unsigned KF     = 14,
  parameter int unsigned ADDR_W = PWL_ADDR_W,
  parameter cfg_tgt_e    TGT    = TGT_ATAN
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] y
);

  localparam int unsigned X2_W  = IN_W - ADDR_W;
  localparam int unsigned D_W   = X2_W + PWL_S_FRAC + 2;
  localparam int unsigned P_W   = D_W + 16;
  localparam int unsigned SH    = KF + PWL_S_FRAC;
  localparam int unsigned DEPTH = 1 << ADDR_W;

  pwl_entry_t lut [DEPTH];

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.tgt == TGT && cfg.idx < CFG_IDX_W'(DEPTH))
      lut[cfg.idx[ADDR_W-1:0]] <= pwl_entry_t'(cfg.data);
  end

  // ---- stage 1: look-up and subtract ---------------------------------------
  logic [ADDR_W-1:0] x1;
  logic [X2_W-1:0]   x2;
  pwl_entry_t        ent;
  logic signed [D_W-1:0] d_c;

  assign x1  = x[IN_W-1 -: ADDR_W];
  assign x2  = x[X2_W-1:0];
  assign ent = lut[x1];
  assign d_c = $signed({2'b00, x2, {PWL_S_FRAC{1'b0}}}) - D_W'(ent.s);

  logic        [15:0]    b_q;
  logic signed [15:0]    k_q;
  logic signed [D_W-1:0] d_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_q <= '0;
      k_q <= '0;
      d_q <= '0;
    end else begin
      b_q <= ent.b;
      k_q <= ent.k;
      d_q <= d_c;
    end
  end

  // ---- stage 2: multiply and combine ----------------------------------------
  logic signed [P_W-1:0]  prod;
  logic signed [P_W-1:0]  low;
  logic signed [P_W+1:0]  sum;
  logic [OUT_W-1:0]       y_c;

  assign prod = P_W'(k_q) * P_W'(d_q);
  assign low  = prod >>> SH;
  assign sum  = $signed({2'b00, {(P_W-16){1'b0}}, b_q}) + (P_W+2)'(low);

  always_comb begin
    if (sum < 0)
      y_c = '0;
    else if (sum > $signed((P_W+2)'({OUT_W{1'b1}})))
      y_c = '1;
    else
      y_c = sum[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= y_c;
  end

endmodule
