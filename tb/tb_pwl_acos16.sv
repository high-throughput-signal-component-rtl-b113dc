// tb_pwl_acos16: the PWL unit sized as a stand-alone 16-bit arccos,
// y = arccos(x)/(2*pi) with x and y both 16-bit fractions, using 2^8
// intervals of 2^8 points (half the input bits address the table).
//
// The table is fitted here (least-squares line per interval, b rounded with
// the half-LSB offset folded into s, k with 14 fractional bits) and written
// over cfg. Every input code is then applied, one per clock, and the output
// two clocks later is checked:
//   - bit-exact against an integer model of the datapath (all codes);
//   - within 2^-15 (2 LSB) of the exact function for x <= 0.963, the range
//     over which this accuracy is expected. Above it arccos is too steep for
//     a linear piece per interval; those codes are only checked bit-exactly.
module tb_pwl_acos16;
  import amo_pkg::*;

  localparam int IN_W = 16, OUT_W = 16, KF = 14, AW = 8;
  localparam int N2 = 1 << (IN_W - AW);
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  logic [IN_W-1:0] x = '0;
  logic [OUT_W-1:0] y;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  pwl_approx #(.IN_W(IN_W), .OUT_W(OUT_W), .KF(KF), .ADDR_W(AW), .TGT(TGT_ACOS)) dut (
    .clk, .rst_n, .cfg, .x, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f(input int c);
    return $acos(real'(c) / 65536.0) / (2.0 * PI) * 65536.0;
  endfunction

  pwl_entry_t tab [1 << AW];

  function automatic pwl_entry_t fit(input int i);
    real sx, sy, sxx, sxy, xm, ym, kr, br, bt, sr;
    longint b, k, s;
    pwl_entry_t e;
    sx = 0; sy = 0; sxx = 0; sxy = 0;
    for (int j = 0; j < N2; j++) begin
      real yv;
      yv = f(i * N2 + j);
      sx += j; sy += yv; sxx += real'(j) * j; sxy += real'(j) * yv;
    end
    xm = sx / N2; ym = sy / N2;
    kr = (sxy - N2 * xm * ym) / (sxx - N2 * xm * xm);
    br = ym - kr * xm;
    k = longint'($floor(kr * (2.0 ** KF) + 0.5));
    if (k > 32767) k = 32767;
    if (k < -32767) k = -32767;
    bt = br + 0.5;
    b = longint'($floor(bt));
    s = 0;
    // s must keep x2*16 - s inside the unit's subtractor width
    if (k != 0) begin
      sr = (real'(b) - bt) * 16.0 * (2.0 ** KF) / real'(k);
      if (sr > 4000.0 || sr < -4000.0) b = longint'($floor(bt + 0.5));
      else s = longint'($floor(sr + 0.5));
    end else b = longint'($floor(bt + 0.5));
    if (b < 0) b = 0;
    if (b > 65535) b = 65535;
    e.b = 16'(b); e.k = 16'(k); e.s = 16'(s);
    return e;
  endfunction

  function automatic int model(input int c);
    pwl_entry_t e;
    longint d, low, sum;
    e = tab[c >> (IN_W - AW)];
    d = longint'(c & (N2 - 1)) * 16 - longint'(e.s);
    low = (longint'(e.k) * d) >>> (KF + 4);
    sum = longint'(e.b) + low;
    if (sum < 0) sum = 0;
    if (sum > 65535) sum = 65535;
    return int'(sum);
  endfunction

  int prev_c;
  real maxerr;

  initial begin
    maxerr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < (1 << AW); i++) begin
      tab[i] = fit(i);
      @(posedge clk);
      cfg.we <= 1; cfg.tgt <= TGT_ACOS; cfg.idx <= 12'(i); cfg.data <= 48'(tab[i]);
    end
    @(posedge clk);
    cfg <= '0;
    for (int n = 0; n < 65536 + 2; n++) begin
      int c;
      c = n < 65536 ? n : 0;
      x <= IN_W'(c);
      @(posedge clk);
      #1;
      // y now holds the result for the input sampled at the previous edge
      // (two register stages after it was applied)
      if (n >= 1) begin
        int c2, got;
        real err;
        c2 = prev_c;
        got = int'(y);
        checks++;
        if (got != model(c2)) begin
          failures++;
          if (failures < 10) $display("x=%0d got %0d model %0d", c2, got, model(c2));
        end
        if (real'(c2) / 65536.0 <= 0.963) begin
          err = real'(got) - f(c2);
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
          checks++;
          if (err > 2.0) begin
            failures++;
            if (failures < 10) $display("x=%0d got %0d exact %f", c2, got, f(c2));
          end
        end
      end
      prev_c = c;
    end
    $display("max error over x <= 0.963: %f LSB of 2^-16", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
