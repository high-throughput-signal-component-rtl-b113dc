// amo_pkg: types and constants shared by the AMO signal component separator.
//
// Number formats used throughout (this design's own choices unless noted):
//   I, Q samples      13-bit two's complement, value = code / 2^12          (width from the block diagram)
//   |I|, |Q|          12-bit unsigned, same scale                            (width from the block diagram)
//   angles            15-bit unsigned, full circle 2*pi = 2^15               (width from the block diagram)
//   A^2 (MagSq)       19-bit unsigned, value = code / 2^18
//   A                 12-bit unsigned, value = code / 2^11
//   1/A               16-bit unsigned, value = code / 2^10 (saturating)
//   c1 = 1/(2a_i)     13-bit unsigned, value = code / 2^10
//   c2 = (a_i^2-a_j^2)/(2a_i)  13-bit signed, value = code / 2^11
//   f(phi)            10-bit unsigned, value = code / 2^10 (saturating)
//
// Every programmable table (PWL look-up tables, thresholds, c1/c2 constants,
// compensator LUT, filter coefficients) is written through one bus, cfg_wr_t:
// a write enable, a 4-bit target, a 12-bit index and 48 bits of data.
//
// A module that imports this package uses only some of its constants; a lint
// run on such a module alone reports the others as unused parameters, which
// is expected and harmless.
package amo_pkg;

  // ---- angle and sample widths ------------------------------------------
  localparam int unsigned IQ_W    = 13;
  localparam int unsigned ABS_W   = 12;
  localparam int unsigned ANG_W   = 15;
  localparam int unsigned MAG_W   = 19;
  localparam int unsigned A_W     = 12;
  localparam int unsigned RA_W    = 16;
  localparam int unsigned C_W     = 13;
  localparam int unsigned F_W     = 10;
  localparam int unsigned SYM_W   = 3;
  localparam int unsigned PD_W    = 12;

  // ---- table write bus -----------------------------------------------------
  localparam int unsigned CFG_IDX_W  = 12;
  localparam int unsigned CFG_DATA_W = 48;

  typedef enum logic [3:0] {
    TGT_RECIP  = 4'd0,   // 1/x        (getTheta divApprox)
    TGT_ATAN   = 4'd1,   // arctan(x)  (getTheta atanApprox)
    TGT_SQRT   = 4'd2,   // sqrt(x)    (getAlpha)
    TGT_RSQRT  = 4'd3,   // 1/sqrt(x)  (getAlpha)
    TGT_ACOS   = 4'd4,   // arccos(x)  (getAlpha, both paths)
    TGT_FTAN   = 4'd5,   // 1/(1+tan)  (getPhi, both paths)
    TGT_THRESH = 4'd6,   // th1..th7 at index 0..6
    TGT_CONST  = 4'd7,   // c constants: index = pair*4 + {c1_1, c2_1, c1_2, c2_2}
    TGT_COMP   = 4'd8,   // compensator LUT, 1024 x 24
    TGT_COEF   = 4'd9    // shaping filter coefficients
  } cfg_tgt_e;

  typedef struct packed {
    logic                    we;
    cfg_tgt_e                tgt;
    logic [CFG_IDX_W-1:0]    idx;
    logic [CFG_DATA_W-1:0]   data;
  } cfg_wr_t;

  // ---- PWL look-up table entry ({b, k, s} in the 48-bit data word) ---------
  typedef struct packed {
    logic        [15:0] b;   // intercept, output LSB units (unsigned)
    logic signed [15:0] k;   // slope, KF fractional bits
    logic signed [15:0] s;   // offset in x2 units, PWL_S_FRAC fractional bits
  } pwl_entry_t;

  localparam int unsigned PWL_ADDR_W = 7;   // 2^7 intervals per function
  localparam int unsigned PWL_S_FRAC = 4;

  // Per-function geometry of the PWL units: input width, output width and
  // fractional bits of the slope.
  localparam int unsigned RECIP_IN_W = 11, RECIP_OUT_W = 16, RECIP_KF = 10;
  localparam int unsigned ATAN_IN_W  = 15, ATAN_OUT_W  = 15, ATAN_KF  = 14;
  localparam int unsigned SQRT_IN_W  = 16, SQRT_OUT_W  = 16, SQRT_KF  = 13;
  localparam int unsigned RSQ_IN_W   = 16, RSQ_OUT_W   = 16, RSQ_KF   = 13;
  localparam int unsigned ACOS_IN_W  = 12, ACOS_OUT_W  = 15, ACOS_KF  = 9;
  localparam int unsigned FTAN_IN_W  = 13, FTAN_OUT_W  = 10, FTAN_KF  = 14;

  // ---- supply selection ------------------------------------------------------
  localparam int unsigned N_PAIRS = 7;
  typedef logic [1:0] supply_t;    // 0 = V1 ... 3 = V4

  // Supply pair for each amplitude region: (V1,V1) (V1,V2) (V2,V2) ... (V4,V4)
  function automatic supply_t pair_a1(input int unsigned p);
    return supply_t'(p / 2);
  endfunction
  function automatic supply_t pair_a2(input int unsigned p);
    return supply_t'((p + 1) / 2);
  endfunction

endpackage
