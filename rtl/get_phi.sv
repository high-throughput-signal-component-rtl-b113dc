// get_phi: final outphasing angles and the phase-modulator input f(phi).
//
// ftanPrep (clock 1) forms phi1 = theta - alpha1 and phi2 = theta + alpha2
// modulo one turn. With 2*pi = 2^15 the top two bits of each angle are its
// quadrant (quad1, quad2) and the low 13 bits the angle within the quadrant,
// where f(phi) = 1/(1 + tan(phi)) is smooth (slope -1/(1+sin 2phi)). Two PWL
// units (clocks 2-3) evaluate f on the in-quadrant angles and an output
// register (clock 4) aligns everything; latency 4 clocks, one sample per
// clock. fphi1/fphi2 are 10-bit, value = code/2^10, f(0) = 1 saturating to
// 1023.
//
// The f(phi) tables are programmable so that they can also absorb the static
// nonlinearity of the phase-modulator DAC, as the source suggests. The sign
// convention (theta - alpha1, theta + alpha2) follows the source's hardware
// description; the fourth (output) register is this design's way to reach
// the 4 clocks given for this block.
module get_phi
  import amo_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_wr_t           cfg,
  input  logic [ANG_W-1:0]  theta,
  input  logic [ANG_W-1:0]  alpha1,
  input  logic [ANG_W-1:0]  alpha2,
  output logic [F_W-1:0]    fphi1,
  output logic [F_W-1:0]    fphi2,
  output logic [1:0]        quad1,
  output logic [1:0]        quad2
);

  // ---- ftanPrep ----------------------------------------------------------------
  logic [ANG_W-1:0] phi1_c, phi2_c, phi1_1, phi2_1;
  assign phi1_c = theta - alpha1;
  assign phi2_c = theta + alpha2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phi1_1 <= '0; phi2_1 <= '0;
    end else begin
      phi1_1 <= phi1_c; phi2_1 <= phi2_c;
    end
  end

  // ---- f(phi) approximation --------------------------------------------------------
  logic [FTAN_OUT_W-1:0] f1_3, f2_3;
  pwl_approx #(.IN_W(FTAN_IN_W), .OUT_W(FTAN_OUT_W), .KF(FTAN_KF), .TGT(TGT_FTAN)) u_ftan1 (
    .clk, .rst_n, .cfg, .x(phi1_1[FTAN_IN_W-1:0]), .y(f1_3));
  pwl_approx #(.IN_W(FTAN_IN_W), .OUT_W(FTAN_OUT_W), .KF(FTAN_KF), .TGT(TGT_FTAN)) u_ftan2 (
    .clk, .rst_n, .cfg, .x(phi2_1[FTAN_IN_W-1:0]), .y(f2_3));

  logic [3:0] quad_3;
  delay_line #(.W(4), .N(2)) u_dl_quad (.clk, .rst_n,
    .d({phi1_1[ANG_W-1 -: 2], phi2_1[ANG_W-1 -: 2]}), .q(quad_3));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fphi1 <= '0; fphi2 <= '0; quad1 <= '0; quad2 <= '0;
    end else begin
      fphi1 <= f1_3; fphi2 <= f2_3;
      {quad1, quad2} <= quad_3;
    end
  end

endmodule
