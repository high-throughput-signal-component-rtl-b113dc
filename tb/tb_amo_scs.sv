// tb_amo_scs: end-to-end check of one separator. Random signed I/Q samples
// (uniform and near each supply threshold) are fed one per clock after all
// tables are loaded. Twenty clocks later the supply codes are checked exactly
// and both output phases (quadrant plus f(phi) converted back to an angle)
// against theta -/+ alpha computed in floating point, within 40 LSB of
// 2*pi/2^15 (0.44 degree). It counts samples per quadrant and per supply
// region and fails if one never occurs.
module tb_amo_scs;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [IQ_W-1:0] i_in = '0, q_in = '0;
  logic [F_W-1:0]  fphi1, fphi2;
  logic [1:0]      quad1, quad2;
  supply_t         a1, a2;

  amo_scs dut (.clk, .rst_n, .cfg, .i_in, .q_in, .fphi1, .fphi2, .quad1, .quad2, .a1, .a2);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hi [32], hq [32];
  int quad_seen [4], region_seen [7];
  real maxerr = 0;

  function automatic int sabs(input int v);
    int m;
    m = v < 0 ? -v : v;
    return m > 4095 ? 4095 : m;
  endfunction

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
        real r, ang;
        r = $sqrt(th_code(int'($urandom_range(6))) / 262144.0) * (0.97 + 0.06 * $urandom_range(1000) / 1000.0);
        ang = $urandom_range(100000) / 100000.0 * 2.0 * PI;
        vi = int'(r * $cos(ang) * 4096.0); vq = int'(r * $sin(ang) * 4096.0);
      end else begin
        vi = int'($urandom_range(8190)) - 4095; vq = int'($urandom_range(8190)) - 4095;
      end
      if (vi > 4095) vi = 4095;
      if (vi < -4095) vi = -4095;
      if (vq > 4095) vq = 4095;
      if (vq < -4095) vq = -4095;
      i_in <= IQ_W'(vi); q_in <= IQ_W'(vq);
      for (int k = 31; k > 0; k--) begin hi[k] = hi[k-1]; hq[k] = hq[k-1]; end
      hi[0] = vi; hq[0] = vq;
      @(posedge clk);
      #1;
      if (n >= 19) begin
        int ii, qq, mag, p, ai, aj;
        real amp, th, arg1, arg2, ph1, ph2, d1, d2;
        ii = hi[19]; qq = hq[19];
        mag = (sabs(ii) * sabs(ii) + sabs(qq) * sabs(qq)) >> 6;
        p = 0;
        for (int t = 0; t < 6; t++) if (mag > th_code(t)) p = t + 1;
        ai = p / 2; aj = (p + 1) / 2;
        region_seen[p]++;
        quad_seen[quad1]++;
        checks++;
        if (int'(a1) != ai || int'(a2) != aj) begin
          failures++;
          if (failures < 10) $display("supply mismatch I=%0d Q=%0d got %0d %0d exp %0d %0d", ii, qq, a1, a2, ai, aj);
        end
        amp = $sqrt(real'(ii) ** 2 + real'(qq) ** 2) / 4096.0;
        if (amp > 0.01) begin
          th = $atan2(real'(qq), real'(ii));
          arg1 = (vlev(ai) ** 2 + amp ** 2 - vlev(aj) ** 2) / (2.0 * amp * vlev(ai));
          arg2 = (vlev(aj) ** 2 + amp ** 2 - vlev(ai) ** 2) / (2.0 * amp * vlev(aj));
          if (arg1 > -0.95 && arg1 < 0.95 && arg2 > -0.95 && arg2 < 0.95) begin
            ph1 = (th - $acos(arg1)) * 32768.0 / (2.0 * PI);
            ph2 = (th + $acos(arg2)) * 32768.0 / (2.0 * PI);
            d1 = wrap(phi_of(quad1, fphi1) - ph1);
            d2 = wrap(phi_of(quad2, fphi2) - ph2);
            if (d1 < 0) d1 = -d1;
            if (d2 < 0) d2 = -d2;
            if (d1 > maxerr) maxerr = d1;
            if (d2 > maxerr) maxerr = d2;
            checks++;
            if (d1 > 40.0 || d2 > 40.0) begin
              failures++;
              if (failures < 10) $display("phase I=%0d Q=%0d got q%0d f%0d q%0d f%0d exp %f %f", ii, qq, quad1, fphi1, quad2, fphi2, ph1, ph2);
            end
          end
        end
      end
    end
    for (int p = 0; p < 7; p++) begin
      checks++;
      if (region_seen[p] == 0) begin failures++; $display("region %0d never seen", p); end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) begin failures++; $display("quadrant %0d never seen", q); end
    end
    $display("max phase error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
