// shaping_filter: interleaved interpolating pulse-shaping FIR.
//
// Each predistorted symbol is upsampled by OSR (2 or 4, chosen by osr4) and
// filtered by a programmable impulse response h[0 .. OSR*NTAP-1], written as
// a polyphase filter: output phase p of the symbol history s[0..NTAP-1]
// (s[0] newest) is  y_p = sum_t h[OSR*t + p] * s[t].
// Two samples leave per clock, an even and an odd one, each feeding its own
// separator copy, so the sample rate is twice the clock rate:
//   OSR 2: a symbol every clock, phases (0,1) every clock;
//   OSR 4: a symbol every second clock, phases (0,1) then (2,3).
// sym_en asks the source for the next symbol; the symbol arrives with
// in_valid one clock later and enters the history at that clock edge.
//
// Formats: symbols 12-bit two's complement (value/2^11); coefficients
// 12-bit two's complement (value/2^10), written through cfg target TGT_COEF
// at index n = h[n]; outputs 13-bit two's complement (value/2^12), saturated.
// Outputs are registered.
//
// The source gives the filter's role, the oversampling factors and the
// two-samples-per-clock interleaving (there from both clock edges; here from
// one edge producing two samples). Tap count and formats are this design's.
module shaping_filter
  import amo_pkg::*;
#(
  parameter int unsigned NTAP   = 8,
  parameter int unsigned COEF_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic             osr4,
  output logic             sym_en,
  input  logic             in_valid,
  input  logic [PD_W-1:0]  in_i,
  input  logic [PD_W-1:0]  in_q,
  output logic [IQ_W-1:0]  i_even,
  output logic [IQ_W-1:0]  q_even,
  output logic [IQ_W-1:0]  i_odd,
  output logic [IQ_W-1:0]  q_odd
);

  localparam int unsigned NCOEF = 4 * NTAP;
  localparam int unsigned ACC_W = PD_W + COEF_W + $clog2(NTAP) + 1;
  localparam int unsigned SHIFT = 9;   // 2^-21 -> 2^-12

  logic signed [COEF_W-1:0] h [NCOEF];
  logic signed [PD_W-1:0]   hist_i [NTAP];
  logic signed [PD_W-1:0]   hist_q [NTAP];
  logic                     half;   // OSR 4: 0 -> phases 0,1; 1 -> phases 2,3

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.tgt == TGT_COEF && cfg.idx < CFG_IDX_W'(NCOEF))
      h[cfg.idx[$clog2(NCOEF)-1:0]] <= cfg.data[COEF_W-1:0];
  end

  assign sym_en = !osr4 || !half;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      half <= 1'b0;
      for (int t = 0; t < NTAP; t++) begin
        hist_i[t] <= '0;
        hist_q[t] <= '0;
      end
    end else begin
      half <= osr4 ? !half : 1'b0;
      if (in_valid) begin
        hist_i[0] <= in_i;
        hist_q[0] <= in_q;
        for (int t = 1; t < NTAP; t++) begin
          hist_i[t] <= hist_i[t-1];
          hist_q[t] <= hist_q[t-1];
        end
      end
    end
  end

  function automatic logic [IQ_W-1:0] sat_out(input logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W-1:0] v;
    v = acc >>> SHIFT;
    if (v > ACC_W'((1 << (IQ_W - 1)) - 1))       return IQ_W'((1 << (IQ_W - 1)) - 1);
    else if (v < -ACC_W'((1 << (IQ_W - 1)) - 1)) return IQ_W'(-((1 << (IQ_W - 1)) - 1));
    else                                         return v[IQ_W-1:0];
  endfunction

  logic signed [ACC_W-1:0] acc_ie, acc_qe, acc_io, acc_qo;
  always_comb begin
    logic [$clog2(4 * NTAP)-1:0] pe, po;
    acc_ie = '0; acc_qe = '0; acc_io = '0; acc_qo = '0;
    for (int t = 0; t < NTAP; t++) begin
      pe = ($clog2(4 * NTAP))'(osr4 ? (4 * t + (half ? 2 : 0)) : (2 * t));
      po = pe + 1'b1;
      acc_ie += ACC_W'(h[pe]) * ACC_W'(hist_i[t]);
      acc_qe += ACC_W'(h[pe]) * ACC_W'(hist_q[t]);
      acc_io += ACC_W'(h[po]) * ACC_W'(hist_i[t]);
      acc_qo += ACC_W'(h[po]) * ACC_W'(hist_q[t]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_even <= '0; q_even <= '0; i_odd <= '0; q_odd <= '0;
    end else begin
      i_even <= sat_out(acc_ie);
      q_even <= sat_out(acc_qe);
      i_odd  <= sat_out(acc_io);
      q_odd  <= sat_out(acc_qo);
    end
  end

endmodule
