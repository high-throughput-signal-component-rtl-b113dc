// compensator: look-up-table symbol predistorter (1K x 24).
//
// Maps each 3-bit I / 3-bit Q 64-QAM symbol to 12-bit I and Q levels. The
// 10-bit address is {sym_i, sym_q, prev_i[2:1], prev_q[2:1]}: the current
// symbol plus the two MSBs of the previous symbol in each dimension, which
// gives the predistorter a one-symbol memory. The entry holds {I[11:0],
// Q[11:0]}, two's complement, value = code/2^11.
//
// Interface: when en is high a symbol is taken; pd_i/pd_q and pd_valid are
// registered and appear one clock later (outputs hold otherwise). The table
// is written through cfg, target TGT_COMP, index = address.
//
// Table size and word width follow the source; which bits of the previous
// symbol are used is this design's choice.
module compensator
  import amo_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 2 * PD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic             en,
  input  logic [SYM_W-1:0] sym_i,
  input  logic [SYM_W-1:0] sym_q,
  output logic [PD_W-1:0]  pd_i,
  output logic [PD_W-1:0]  pd_q,
  output logic             pd_valid
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] lut [DEPTH];
  logic [1:0]        prev_i, prev_q;   // MSBs of the previous symbol
  logic [AW-1:0]     addr;

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.tgt == TGT_COMP && cfg.idx < CFG_IDX_W'(DEPTH))
      lut[cfg.idx[AW-1:0]] <= cfg.data[DATA_W-1:0];
  end

  assign addr = AW'({sym_i, sym_q, prev_i, prev_q});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_i <= '0; prev_q <= '0; pd_i <= '0; pd_q <= '0; pd_valid <= 1'b0;
    end else begin
      pd_valid <= en;
      if (en) begin
        {pd_i, pd_q} <= lut[addr];
        prev_i <= sym_i[SYM_W-1 -: 2];
        prev_q <= sym_q[SYM_W-1 -: 2];
      end
    end
  end

endmodule
