// tb_get_theta: drives random and corner-case I/Q samples (axes, diagonals,
// full-scale negative values, zero) into get_theta after loading its 1/x and
// arctan tables, and checks, every clock, |I| and |Q| one clock later and
// theta eight clocks later against atan2 computed in floating point
// (circular error at most 3 LSB of 2*pi/2^15).
module tb_get_theta;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [IQ_W-1:0]  i_in = '0, q_in = '0;
  logic [ABS_W-1:0] abs_i, abs_q;
  logic [ANG_W-1:0] theta;

  get_theta dut (.clk, .rst_n, .cfg, .i_in, .q_in, .abs_i, .abs_q, .theta);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hi [16], hq [16];
  real maxerr = 0;

  function automatic int sabs(input int v);
    int m;
    m = v < 0 ? -v : v;
    return m > 4095 ? 4095 : m;
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
      int vi, vq;
      case (n % 16)
        0: begin vi = 0; vq = int'($urandom_range(8190)) - 4095; end
        1: begin vq = 0; vi = int'($urandom_range(8190)) - 4095; end
        2: begin vi = int'($urandom_range(8190)) - 4095; vq = (n & 32) ? vi : -vi; end
        3: begin vi = -4096; vq = int'($urandom_range(8191)) - 4096; end
        4: begin vi = 0; vq = 0; end
        5: begin vi = int'($urandom_range(64)) - 32; vq = int'($urandom_range(64)) - 32; end
        default: begin vi = int'($urandom_range(8191)) - 4096; vq = int'($urandom_range(8191)) - 4096; end
      endcase
      i_in <= IQ_W'(vi); q_in <= IQ_W'(vq);
      for (int k = 15; k > 0; k--) begin hi[k] = hi[k-1]; hq[k] = hq[k-1]; end
      hi[0] = vi; hq[0] = vq;
      @(posedge clk);
      #1;
      checks++;
      if (int'(abs_i) != sabs(hi[0]) || int'(abs_q) != sabs(hq[0])) begin
        failures++;
        if (failures < 10) $display("abs mismatch %0d %0d -> %0d %0d", hi[0], hq[0], abs_i, abs_q);
      end
      if (n >= 7) begin
        real ex, err;
        ex = (hi[7] == 0 && hq[7] == 0) ? 0.0 : $atan2(real'(hq[7]), real'(hi[7])) * 32768.0 / (2.0 * PI);
        err = wrap(real'(theta) - ex);
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 3.0) begin
          failures++;
          if (failures < 10) $display("theta I=%0d Q=%0d got %0d exp %f", hi[7], hq[7], theta, ex);
        end
      end
    end
    $display("max theta error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
