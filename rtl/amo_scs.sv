// amo_scs: one asymmetric multi-level outphasing signal component separator.
//
// It splits each I/Q sample into two constant-envelope paths: supply codes
// a1, a2 (which of the four supply levels each PA uses) and phases phi1,
// phi2, delivered as quadrant codes quad1/quad2 plus f(phi) = 1/(1+tan(phi))
// of the in-quadrant angle for the phase modulators.
//
//   getTheta (8 clk) --theta--> 8-stage delay --------------> getPhi (4 clk)
//       \--|I|,|Q| (after 1 clk)--> getAlpha (15 clk) --alpha1/2--^
//                                         \--a1,a2--> 4-stage delay -->
//
// Latency is 20 clocks from i_in/q_in to all outputs, one sample per clock.
// The delay lengths are those of the source's block diagram; |I|,|Q| leave
// getTheta after its first clock so that both paths meet at clock 16.
// All tables are loaded through cfg (see amo_pkg for the targets).
module amo_scs
  import amo_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic [IQ_W-1:0]  i_in,
  input  logic [IQ_W-1:0]  q_in,
  output logic [F_W-1:0]   fphi1,
  output logic [F_W-1:0]   fphi2,
  output logic [1:0]       quad1,
  output logic [1:0]       quad2,
  output supply_t          a1,
  output supply_t          a2
);

  localparam int unsigned THETA_DLY = 8;
  localparam int unsigned SUPPLY_DLY = 4;

  logic [ABS_W-1:0] abs_i, abs_q;
  logic [ANG_W-1:0] theta_8, theta_16, alpha1, alpha2;
  supply_t          a1_16, a2_16;

  get_theta u_get_theta (.clk, .rst_n, .cfg, .i_in, .q_in, .abs_i, .abs_q, .theta(theta_8));

  delay_line #(.W(ANG_W), .N(THETA_DLY)) u_theta_dly (.clk, .rst_n, .d(theta_8), .q(theta_16));

  get_alpha u_get_alpha (.clk, .rst_n, .cfg, .abs_i, .abs_q,
    .alpha1, .alpha2, .a1(a1_16), .a2(a2_16));

  get_phi u_get_phi (.clk, .rst_n, .cfg, .theta(theta_16), .alpha1, .alpha2,
    .fphi1, .fphi2, .quad1, .quad2);

  delay_line #(.W(4), .N(SUPPLY_DLY)) u_supply_dly (.clk, .rst_n, .d({a1_16, a2_16}), .q({a1, a2}));

endmodule
