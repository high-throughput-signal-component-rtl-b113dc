// tb_compensator: loads the 1K x 24 table with a known map (level of the
// current symbol plus a term from the previous symbol's MSBs), drives random
// symbols with random gaps in en, and checks pd_i/pd_q and pd_valid one
// clock after each accepted symbol, and that outputs hold otherwise.
module tb_compensator;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  cfg_wr_t cfg = '0;
  logic [SYM_W-1:0] sym_i = '0, sym_q = '0;
  logic [PD_W-1:0] pd_i, pd_q;
  logic pd_valid;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  compensator dut (.clk, .rst_n, .cfg, .en, .sym_i, .sym_q, .pd_i, .pd_q, .pd_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int prev_i, prev_q, exp_i, exp_q;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < 1024; a++) begin
      @(posedge clk);
      cfg.we <= 1; cfg.tgt <= TGT_COMP; cfg.idx <= 12'(a); cfg.data <= 48'(comp_word(a));
    end
    @(posedge clk);
    cfg <= '0;
    prev_i = 0; prev_q = 0; exp_i = 0; exp_q = 0;
    for (int n = 0; n < 20000; n++) begin
      int si, sq;
      logic e;
      e = ($urandom_range(3) != 0);
      si = int'($urandom_range(7)); sq = int'($urandom_range(7));
      en <= e; sym_i <= SYM_W'(si); sym_q <= SYM_W'(sq);
      if (e) begin
        exp_i = comp_level(si, prev_i >> 1);
        exp_q = comp_level(sq, prev_q >> 1);
        prev_i = si; prev_q = sq;
      end
      @(posedge clk);
      #1;
      checks++;
      if (pd_valid != e || pd_i != PD_W'(exp_i) || pd_q != PD_W'(exp_q)) begin
        failures++;
        if (failures < 10) $display("n=%0d en=%0d got %0d %0d v%0d exp %0d %0d", n, e, $signed(pd_i), $signed(pd_q), pd_valid, exp_i, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
