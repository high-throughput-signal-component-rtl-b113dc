// amo_baseband_top: digital baseband of an AMO (asymmetric multi-level
// outphasing) transmitter.
//
// Symbol path:
//   input selection  external 3-bit I/Q symbols or the on-chip PRBS source
//   compensator      1K x 24 LUT predistorter -> 12-bit I/Q symbols
//   shaping_filter   interpolating FIR, OSR 2 or 4, two samples per clock
//   amo_scs (even)   separator for the even samples
//   amo_scs (odd)    separator for the odd samples
// Each separator outputs, per sample, the PA supply codes a1/a2 and the
// phase-modulator words f(phi1)/f(phi2) with their quadrants quad1/quad2.
//
// Timing: sym_en is high when a symbol is taken (every clock at OSR 2,
// every second clock at OSR 4); ext_sym_i/ext_sym_q must be valid in that
// clock. A symbol reaches the filter history 1 clock later, the filter
// output 1 clock after that, and the separator outputs 20 clocks after the
// filter output.
//
// All programmable tables of the chip share one write bus, cfg; writes to a
// separator table go to both copies. Tables must be loaded before use.
// The PAs, supply switches, combiner and phase modulators driven by the
// outputs are outside this design.
module amo_baseband_top
  import amo_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic             sel_prbs,
  input  logic             osr4,
  input  logic [SYM_W-1:0] ext_sym_i,
  input  logic [SYM_W-1:0] ext_sym_q,
  output logic             sym_en,
  output logic [F_W-1:0]   even_fphi1,
  output logic [F_W-1:0]   even_fphi2,
  output logic [1:0]       even_quad1,
  output logic [1:0]       even_quad2,
  output supply_t          even_a1,
  output supply_t          even_a2,
  output logic [F_W-1:0]   odd_fphi1,
  output logic [F_W-1:0]   odd_fphi2,
  output logic [1:0]       odd_quad1,
  output logic [1:0]       odd_quad2,
  output supply_t          odd_a1,
  output supply_t          odd_a2
);

  // ---- input selection -------------------------------------------------------
  logic [SYM_W-1:0] prbs_i, prbs_q, sym_i, sym_q;

  prbs_gen u_prbs (.clk, .rst_n, .en(sym_en && sel_prbs), .sym_i(prbs_i), .sym_q(prbs_q));

  assign sym_i = sel_prbs ? prbs_i : ext_sym_i;
  assign sym_q = sel_prbs ? prbs_q : ext_sym_q;

  // ---- predistortion and pulse shaping ------------------------------------------
  logic [PD_W-1:0] pd_i, pd_q;
  logic            pd_valid;

  compensator u_comp (.clk, .rst_n, .cfg, .en(sym_en), .sym_i, .sym_q,
    .pd_i, .pd_q, .pd_valid);

  logic [IQ_W-1:0] i_even, q_even, i_odd, q_odd;

  shaping_filter u_filter (.clk, .rst_n, .cfg, .osr4, .sym_en,
    .in_valid(pd_valid), .in_i(pd_i), .in_q(pd_q),
    .i_even, .q_even, .i_odd, .q_odd);

  // ---- separators ----------------------------------------------------------------
  amo_scs u_scs_even (.clk, .rst_n, .cfg, .i_in(i_even), .q_in(q_even),
    .fphi1(even_fphi1), .fphi2(even_fphi2), .quad1(even_quad1), .quad2(even_quad2),
    .a1(even_a1), .a2(even_a2));

  amo_scs u_scs_odd (.clk, .rst_n, .cfg, .i_in(i_odd), .q_in(q_odd),
    .fphi1(odd_fphi1), .fphi2(odd_fphi2), .quad1(odd_quad1), .quad2(odd_quad2),
    .a1(odd_a1), .a2(odd_a2));

endmodule
