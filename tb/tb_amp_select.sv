// tb_amp_select: loads thresholds and c1/c2 constants, then sweeps A^2 over
// random values and over each threshold +-1. One clock later it checks the
// supply pair against Table-IV style regions (th_k < A^2 <= th_k+1) and the
// four constants against the values computed from the supply levels.
module tb_amp_select;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [MAG_W-1:0] mag_sq = '0;
  supply_t a1, a2;
  logic [C_W-1:0] c1_1, c2_1, c1_2, c2_2;

  amp_select dut (.clk, .rst_n, .cfg, .mag_sq, .a1, .a2, .c1_1, .c2_1, .c1_2, .c2_2);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int prev_mag;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = N_PWL_WR; n < N_PWL_WR + N_TH_WR + N_C_WR; n++) begin
      @(posedge clk);
      cfg <= cfg_word(n, 2);
    end
    @(posedge clk);
    cfg <= '0;
    prev_mag = 0;
    for (int n = 0; n < 5000; n++) begin
      int m;
      if (n % 2 == 0) m = th_code(int'($urandom_range(6))) + int'($urandom_range(2)) - 1;
      else m = int'($urandom_range(524287));
      if (m < 0) m = 0;
      if (m > 524287) m = 524287;
      mag_sq <= MAG_W'(m);
      prev_mag = m;
      @(posedge clk);
      #1;
      if (n >= 1) begin
        int p, ai, aj;
        p = 0;
        for (int t = 0; t < 6; t++) if (prev_mag > th_code(t)) p = t + 1;
        ai = p / 2; aj = (p + 1) / 2;
        checks++;
        if (int'(a1) != ai || int'(a2) != aj ||
            int'(c1_1) != c1_code(ai) || int'(c1_2) != c1_code(aj) ||
            c2_1 != C_W'(c2_code(ai, aj)) || c2_2 != C_W'(c2_code(aj, ai))) begin
          failures++;
          if (failures < 10) $display("mag=%0d got a=%0d,%0d c=%0d %0d %0d %0d exp pair %0d", prev_mag, a1, a2, c1_1, c2_1, c1_2, c2_2, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
