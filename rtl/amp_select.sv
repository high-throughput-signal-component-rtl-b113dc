// amp_select: supply-pair selection ("Comparator" of getAlpha).
//
// The squared amplitude A^2 is compared with seven programmable thresholds
// th1..th7, normally set to (2V1)^2, (V1+V2)^2, (2V2)^2, (V2+V3)^2, (2V3)^2,
// (V3+V4)^2, (2V4)^2. Region k (th_k < A^2 <= th_{k+1}) selects the k-th
// pair of the ladder (V1,V1) (V1,V2) (V2,V2) (V2,V3) (V3,V3) (V3,V4) (V4,V4),
// i.e. the smallest supplies that can still form the sample, and moving to
// an adjacent region changes only one supply. Samples above th7 keep the
// top pair (this design's choice).
//
// For the chosen pair it also outputs the programmable constants of the
// arccos argument for both paths, arg_k = c1_k*A + c2_k/A with
// c1 = 1/(2a_i), c2 = (a_i^2 - a_j^2)/(2a_i) (i = k, j = the other path).
//
// Table writes (cfg): TGT_THRESH index 0..6 = th1..th7 (19 bits);
// TGT_CONST index 4*pair + {0: c1_1, 1: c2_1, 2: c1_2, 3: c2_2} (13 bits).
// Timing: outputs are registered, 1 clock after mag_sq.
module amp_select
  import amo_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_wr_t           cfg,
  input  logic [MAG_W-1:0]  mag_sq,
  output supply_t           a1,
  output supply_t           a2,
  output logic [C_W-1:0]    c1_1,
  output logic [C_W-1:0]    c2_1,
  output logic [C_W-1:0]    c1_2,
  output logic [C_W-1:0]    c2_2
);

  logic [MAG_W-1:0] th   [N_PAIRS];
  logic [C_W-1:0]   cst  [N_PAIRS*4];

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.tgt == TGT_THRESH && cfg.idx < CFG_IDX_W'(N_PAIRS))
      th[cfg.idx[2:0]] <= cfg.data[MAG_W-1:0];
    if (cfg.we && cfg.tgt == TGT_CONST && cfg.idx < CFG_IDX_W'(N_PAIRS*4))
      cst[cfg.idx[4:0]] <= cfg.data[C_W-1:0];
  end

  // region = number of thresholds th1..th6 that A^2 exceeds
  logic [2:0] region;
  always_comb begin
    region = 3'd0;
    for (int n = 0; n < N_PAIRS - 1; n++)
      if (mag_sq > th[n]) region = 3'(n + 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a1 <= '0; a2 <= '0; c1_1 <= '0; c2_1 <= '0; c1_2 <= '0; c2_2 <= '0;
    end else begin
      a1   <= pair_a1(int'(region));
      a2   <= pair_a2(int'(region));
      c1_1 <= cst[{region, 2'd0}];
      c2_1 <= cst[{region, 2'd1}];
      c1_2 <= cst[{region, 2'd2}];
      c2_2 <= cst[{region, 2'd3}];
    end
  end

endmodule
