// tb_get_phi: random theta, alpha1, alpha2 into get_phi with loaded f(phi)
// tables; checks, four clocks later, the quadrants of theta - alpha1 and
// theta + alpha2 exactly and f(phi) = 1/(1+tan(phi)) of the in-quadrant angle
// within 2 LSB of the floating-point value.
module tb_get_phi;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ANG_W-1:0] theta = '0, alpha1 = '0, alpha2 = '0;
  logic [F_W-1:0]   fphi1, fphi2;
  logic [1:0]       quad1, quad2;

  get_phi dut (.clk, .rst_n, .cfg, .theta, .alpha1, .alpha2, .fphi1, .fphi2, .quad1, .quad2);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hp1 [8], hp2 [8];

  function automatic int fexp(input int phi);
    real v;
    v = 1024.0 / (1.0 + $tan((phi % 8192) * 2.0 * PI / 32768.0));
    return v > 1023.0 ? 1023 : int'($floor(v + 0.5));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N_PWL_WR; n++) begin
      @(posedge clk);
      cfg <= cfg_word(n, 2);
    end
    @(posedge clk);
    cfg <= '0;
    for (int n = 0; n < 20000; n++) begin
      int t, a1v, a2v;
      t = int'($urandom_range(32767)); a1v = int'($urandom_range(16383)); a2v = int'($urandom_range(16383));
      theta <= ANG_W'(t); alpha1 <= ANG_W'(a1v); alpha2 <= ANG_W'(a2v);
      for (int k = 7; k > 0; k--) begin hp1[k] = hp1[k-1]; hp2[k] = hp2[k-1]; end
      hp1[0] = (t - a1v + 32768) % 32768;
      hp2[0] = (t + a2v) % 32768;
      @(posedge clk);
      #1;
      if (n >= 3) begin
        int e1, e2;
        e1 = fexp(hp1[3]); e2 = fexp(hp2[3]);
        checks += 2;
        if (int'(quad1) != hp1[3] / 8192 || int'(quad2) != hp2[3] / 8192) begin
          failures++;
          if (failures < 10) $display("quad mismatch phi1=%0d phi2=%0d got %0d %0d", hp1[3], hp2[3], quad1, quad2);
        end
        if (int'(fphi1) - e1 > 2 || e1 - int'(fphi1) > 2 || int'(fphi2) - e2 > 2 || e2 - int'(fphi2) > 2) begin
          failures++;
          if (failures < 10) $display("f mismatch phi1=%0d got %0d exp %0d / phi2=%0d got %0d exp %0d", hp1[3], fphi1, e1, hp2[3], fphi2, e2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
