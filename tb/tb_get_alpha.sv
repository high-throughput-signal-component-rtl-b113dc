// tb_get_alpha: random |I|, |Q| (uniform over the square and concentrated
// near each threshold of the supply ladder) into get_alpha with all tables,
// thresholds and constants loaded. Fifteen clocks later it checks the supply
// codes exactly (regions computed from the integer A^2) and alpha1, alpha2
// against arccos((a_i^2 + A^2 - a_j^2)/(2 A a_i)) in floating point, where the
// argument is inside [-0.95, 0.95] (the steep end of arccos is excluded),
// allowing 24 LSB of 2*pi/2^15 (0.26 degree). The largest errors sit near the
// +-0.95 edge, where arccos is steep and the quantised c1*A + c2/A argument
// (c1 up to 4.2 and 1/A up to 8 with the lowest supply at 0.12) is amplified.
// It also counts every supply region seen and fails if one never occurs.
module tb_get_alpha;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ABS_W-1:0] abs_i = '0, abs_q = '0;
  logic [ANG_W-1:0] alpha1, alpha2;
  supply_t          a1, a2;

  get_alpha dut (.clk, .rst_n, .cfg, .abs_i, .abs_q, .alpha1, .alpha2, .a1, .a2);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hi [16], hq [16];
  int region_seen [7];
  real maxerr = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N_PWL_WR + N_TH_WR + N_C_WR; n++) begin
      @(posedge clk);
      cfg <= cfg_word(n, 2);
    end
    @(posedge clk);
    cfg <= '0;
    for (int n = 0; n < 20000; n++) begin
      int vi, vq;
      if (n % 3 == 0) begin
        // near a threshold: pick a radius close to sqrt(th)
        real r, ang;
        r = $sqrt(th_code(int'($urandom_range(6))) / 262144.0) * (0.98 + 0.04 * $urandom_range(1000) / 1000.0);
        ang = $urandom_range(1000) / 1000.0 * PI / 2.0;
        vi = int'(r * $cos(ang) * 4096.0); vq = int'(r * $sin(ang) * 4096.0);
        if (vi > 4095) vi = 4095;
        if (vq > 4095) vq = 4095;
      end else begin
        vi = int'($urandom_range(4095)); vq = int'($urandom_range(4095));
      end
      abs_i <= ABS_W'(vi); abs_q <= ABS_W'(vq);
      for (int k = 15; k > 0; k--) begin hi[k] = hi[k-1]; hq[k] = hq[k-1]; end
      hi[0] = vi; hq[0] = vq;
      @(posedge clk);
      #1;
      if (n >= 14) begin
        int mag, p, ai, aj;
        real amp, arg1, arg2, e1, e2, d1, d2;
        mag = (hi[14] * hi[14] + hq[14] * hq[14]) >> 6;
        p = 0;
        for (int t = 0; t < 6; t++) if (mag > th_code(t)) p = t + 1;
        region_seen[p]++;
        ai = p / 2; aj = (p + 1) / 2;
        checks++;
        if (int'(a1) != ai || int'(a2) != aj) begin
          failures++;
          if (failures < 10) $display("supply mismatch mag=%0d got %0d %0d exp %0d %0d", mag, a1, a2, ai, aj);
        end
        amp = $sqrt(real'(hi[14]) ** 2 + real'(hq[14]) ** 2) / 4096.0;
        if (amp > 0.01) begin
          arg1 = (vlev(ai) ** 2 + amp ** 2 - vlev(aj) ** 2) / (2.0 * amp * vlev(ai));
          arg2 = (vlev(aj) ** 2 + amp ** 2 - vlev(ai) ** 2) / (2.0 * amp * vlev(aj));
          if (arg1 > -0.95 && arg1 < 0.95 && arg2 > -0.95 && arg2 < 0.95) begin
            e1 = $acos(arg1) * 32768.0 / (2.0 * PI);
            e2 = $acos(arg2) * 32768.0 / (2.0 * PI);
            d1 = wrap(real'(alpha1) - e1); d2 = wrap(real'(alpha2) - e2);
            if (d1 < 0) d1 = -d1;
            if (d2 < 0) d2 = -d2;
            if (d1 > maxerr) maxerr = d1;
            if (d2 > maxerr) maxerr = d2;
            checks++;
            if (d1 > 24.0 || d2 > 24.0) begin
              failures++;
              if (failures < 10) $display("alpha I=%0d Q=%0d p=%0d got %0d %0d exp %f %f", hi[14], hq[14], p, alpha1, alpha2, e1, e2);
            end
          end
        end
      end
    end
    for (int p = 0; p < 7; p++) begin
      checks++;
      if (region_seen[p] == 0) begin
        failures++;
        $display("supply region %0d never seen", p);
      end
    end
    $display("max alpha error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
