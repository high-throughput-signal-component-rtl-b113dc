// prbs_gen: on-chip pseudo-random 64-QAM symbol source.
//
// A 15-bit Fibonacci LFSR with polynomial x^15 + x^14 + 1 (maximal length,
// period 2^15 - 1) is advanced six bit-steps each clock that en is high; the
// six newest bits form one symbol, sym_i = bits [5:3], sym_q = bits [2:0].
// The register resets to 15'h0001. Outputs come straight from the register,
// so a new symbol appears the clock after en.
//
// The source names a PRBS input but not its polynomial or mapping; both are
// this design's choice.
module prbs_gen
  import amo_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [SYM_W-1:0] sym_i,
  output logic [SYM_W-1:0] sym_q
);

  logic [14:0] lfsr, nxt;

  always_comb begin
    nxt = lfsr;
    for (int n = 0; n < 2 * SYM_W; n++)
      nxt = {nxt[13:0], nxt[14] ^ nxt[13]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  lfsr <= 15'h0001;
    else if (en) lfsr <= nxt;
  end

  assign sym_i = lfsr[5:3];
  assign sym_q = lfsr[2:0];

endmodule
