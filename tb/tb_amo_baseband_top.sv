// tb_amo_baseband_top: whole-chip test at the design's default sizes.
//
// Loads every table over the cfg bus, then runs four phases:
//   external symbols at OSR 2, PRBS symbols at OSR 2,
//   PRBS symbols at OSR 4 (coefficients reloaded), external symbols at OSR 4.
// A cycle-level integer model of the symbol path (PRBS, compensator map,
// polyphase filter) predicts the even and odd samples entering the two
// separators; twenty clocks later the separator outputs of both copies are
// checked against floating-point math (supply pair exactly, phases within
// 40 LSB of 2*pi/2^15). Counted mechanisms, each required at least once:
// both input sources, both oversampling modes, every supply region, every
// quadrant, and a supply change between consecutive samples.
// Finally the two outphased vectors a1*e^(j*phi1) + a2*e^(j*phi2) are summed
// back into a sample and compared with the filter output: the rms error,
// relative to the rms sample magnitude, must stay below 1 %.
module tb_amo_baseband_top;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  logic sel_prbs = 0, osr4 = 0;
  logic [SYM_W-1:0] ext_sym_i = '0, ext_sym_q = '0;
  logic sym_en;
  logic [F_W-1:0] even_fphi1, even_fphi2, odd_fphi1, odd_fphi2;
  logic [1:0] even_quad1, even_quad2, odd_quad1, odd_quad2;
  supply_t even_a1, even_a2, odd_a1, odd_a2;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  amo_baseband_top dut (.clk, .rst_n, .cfg, .sel_prbs, .osr4, .ext_sym_i, .ext_sym_q, .sym_en,
    .even_fphi1, .even_fphi2, .even_quad1, .even_quad2, .even_a1, .even_a2,
    .odd_fphi1, .odd_fphi2, .odd_quad1, .odd_quad2, .odd_a1, .odd_a2);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- model state ------------------------------------------------------------
  int h [32];
  int mi [8], mq [8];
  logic mhalf;
  logic [14:0] lfsr;
  int prev_i, prev_q, pd_i, pd_q;
  bit pd_v;
  // expected separator inputs, by clock: [n][0..3] = I even, Q even, I odd, Q odd
  int exp_in [64][4];
  int n_clk;

  int cnt_ext, cnt_prbs, cnt_osr2, cnt_osr4, cnt_switch;
  int region_seen [7], quad_seen [4];
  int last_region;
  real maxerr;
  real evm_err, evm_sig;   // sums of squared error and squared sample magnitude

  function automatic int sat13(input longint acc);
    longint v;
    v = acc >>> 9;
    if (v > 4095) v = 4095;
    if (v < -4095) v = -4095;
    return int'(v);
  endfunction

  function automatic int fir(input bit q, input int ph);
    longint acc;
    acc = 0;
    for (int t = 0; t < 8; t++)
      acc += longint'(h[(osr4 ? 4 : 2) * t + ph]) * (q ? longint'(mq[t]) : longint'(mi[t]));
    return sat13(acc);
  endfunction

  task automatic check_copy(input string name, input int ii, input int qq, input int a1, input int a2,
                            input int q1, input int f1, input int q2, input int f2);
    int r, reg_;
    real e;
    r = scs_check(ii, qq, a1, a2, q1, f1, q2, f2, 40.0, reg_, e);
    checks++;
    region_seen[reg_]++;
    quad_seen[q1]++;
    quad_seen[q2]++;
    if (reg_ != last_region) cnt_switch++;
    last_region = reg_;
    if (e > maxerr) maxerr = e;
    // rebuild the sample from the two outphased vectors (samples within the
    // reach of the top supply pair only)
    begin
      real si_, sq_, p1, p2, ri, rq;
      si_ = real'(ii) / 4096.0; sq_ = real'(qq) / 4096.0;
      if (si_ * si_ + sq_ * sq_ < (2.0 * vlev(3)) ** 2) begin
        p1 = phi_of(q1, f1) * 2.0 * PI / 32768.0;
        p2 = phi_of(q2, f2) * 2.0 * PI / 32768.0;
        ri = vlev(a1) * $cos(p1) + vlev(a2) * $cos(p2);
        rq = vlev(a1) * $sin(p1) + vlev(a2) * $sin(p2);
        evm_err += (ri - si_) ** 2 + (rq - sq_) ** 2;
        evm_sig += si_ * si_ + sq_ * sq_;
      end
    end
    if (r != 0) begin
      failures++;
      if (failures < 10) $display("%s I=%0d Q=%0d: a=%0d,%0d q%0d f%0d q%0d f%0d (code %0d)", name, ii, qq, a1, a2, q1, f1, q2, f2, r);
    end
  endtask

  // one clock: drive inputs, advance the model, check outputs after the edge
  task automatic tick();
    int si, sq, ph0, ph1;
    bit take;
    take = sym_en;
    si = int'($urandom_range(7)); sq = int'($urandom_range(7));
    // the generator shows its current state and steps six bits once taken
    if (sel_prbs) begin si = int'(lfsr[5:3]); sq = int'(lfsr[2:0]); end
    if (take && sel_prbs) begin
      for (int b = 0; b < 6; b++) lfsr = {lfsr[13:0], lfsr[14] ^ lfsr[13]};
    end
    ext_sym_i <= SYM_W'(si); ext_sym_q <= SYM_W'(sq);
    if (take) begin
      if (sel_prbs) cnt_prbs++; else cnt_ext++;
    end
    // filter output produced at this edge, from the history before it
    ph0 = (osr4 && mhalf) ? 2 : 0;
    ph1 = ph0 + 1;
    exp_in[n_clk % 64][0] = fir(0, ph0);
    exp_in[n_clk % 64][1] = fir(1, ph0);
    exp_in[n_clk % 64][2] = fir(0, ph1);
    exp_in[n_clk % 64][3] = fir(1, ph1);
    if (osr4) cnt_osr4++; else cnt_osr2++;
    // history update from the compensator output of this clock
    if (pd_v) begin
      for (int t = 7; t > 0; t--) begin mi[t] = mi[t-1]; mq[t] = mq[t-1]; end
      mi[0] = pd_i; mq[0] = pd_q;
    end
    pd_v = take;
    if (take) begin
      pd_i = comp_level(si, prev_i >> 1);
      pd_q = comp_level(sq, prev_q >> 1);
      prev_i = si; prev_q = sq;
    end
    mhalf = osr4 ? !mhalf : 1'b0;
    @(posedge clk);
    #1;
    if (n_clk >= 20) begin
      int k;
      k = (n_clk - 20) % 64;
      check_copy("even", exp_in[k][0], exp_in[k][1], int'(even_a1), int'(even_a2), int'(even_quad1),
                 int'(even_fphi1), int'(even_quad2), int'(even_fphi2));
      check_copy("odd", exp_in[k][2], exp_in[k][3], int'(odd_a1), int'(odd_a2), int'(odd_quad1),
                 int'(odd_fphi1), int'(odd_quad2), int'(odd_fphi2));
    end
    n_clk++;
  endtask

  task automatic load_coef(input int osr);
    for (int n = 0; n < 32; n++) begin
      h[n] = coef_code(n, osr, 8);
      @(posedge clk);
      cfg.we <= 1; cfg.tgt <= TGT_COEF; cfg.idx <= 12'(n); cfg.data <= 48'(12'(h[n]));
    end
    @(posedge clk);
    cfg <= '0;
  endtask

  // restart the datapath (tables keep their contents) in a given mode
  task automatic restart(input bit prbs, input bit mode4);
    rst_n <= 0;
    sel_prbs <= prbs;
    osr4 <= mode4;
    @(posedge clk);
    rst_n <= 1;
    #1;
    for (int t = 0; t < 8; t++) begin mi[t] = 0; mq[t] = 0; end
    mhalf = 0; lfsr = 15'h0001; prev_i = 0; prev_q = 0; pd_i = 0; pd_q = 0; pd_v = 0;
    n_clk = 0; last_region = 0;
  endtask

  initial begin
    maxerr = 0; evm_err = 0; evm_sig = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N_CFG_WR; n++) begin
      @(posedge clk);
      cfg <= cfg_word(n, 2);
    end
    @(posedge clk);
    cfg <= '0;
    for (int n = 0; n < 32; n++) h[n] = coef_code(n, 2, 8);

    restart(0, 0); repeat (6000) tick();
    restart(1, 0); repeat (6000) tick();
    load_coef(4);
    restart(1, 1); repeat (6000) tick();
    restart(0, 1); repeat (6000) tick();

    checks += 6;
    if (cnt_ext == 0)  begin failures++; $display("external source never used"); end
    if (cnt_prbs == 0) begin failures++; $display("PRBS source never used"); end
    if (cnt_osr2 == 0) begin failures++; $display("OSR 2 never run"); end
    if (cnt_osr4 == 0) begin failures++; $display("OSR 4 never run"); end
    if (cnt_switch == 0) begin failures++; $display("supply never switched"); end
    for (int p = 0; p < 7; p++) begin
      checks++;
      if (region_seen[p] == 0) begin failures++; $display("supply region %0d never seen", p); end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) begin failures++; $display("quadrant %0d never seen", q); end
    end
    $display("symbols ext=%0d prbs=%0d, clocks osr2=%0d osr4=%0d, supply switches=%0d",
             cnt_ext, cnt_prbs, cnt_osr2, cnt_osr4, cnt_switch);
    $display("regions %0d %0d %0d %0d %0d %0d %0d, max phase error %f LSB", region_seen[0], region_seen[1],
             region_seen[2], region_seen[3], region_seen[4], region_seen[5], region_seen[6], maxerr);
    $display("rms error of the rebuilt samples: %f %% of rms sample magnitude",
             100.0 * $sqrt(evm_err / evm_sig));
    checks++;
    if ($sqrt(evm_err / evm_sig) > 0.01) begin
      failures++;
      $display("rebuilt samples deviate by more than 1 %% rms");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
