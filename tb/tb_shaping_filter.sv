// tb_shaping_filter: loads raised-cosine coefficients and checks the
// interleaved interpolator in both oversampling modes.
//  1. Impulse test: a single nonzero symbol must produce, over successive
//     clocks, the even/odd sample pairs h[0],h[1],h[2],... times the symbol,
//     i.e. the whole impulse response in order (OSR 2 and OSR 4).
//  2. Random symbols with mode switches: every clock the outputs are compared
//     with an integer model of y_p = sum_t h[OSR*t+p]*s[t] and sym_en with
//     the expected request pattern.
module tb_shaping_filter;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  logic osr4 = 0, sym_en, in_valid = 0;
  logic [PD_W-1:0] in_i = '0, in_q = '0;
  logic [IQ_W-1:0] i_even, q_even, i_odd, q_odd;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  shaping_filter dut (.clk, .rst_n, .cfg, .osr4, .sym_en, .in_valid, .in_i, .in_q,
    .i_even, .q_even, .i_odd, .q_odd);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [32];
  int mi [8], mq [8];
  logic mhalf;

  function automatic int sat13(input longint acc);
    longint v;
    v = acc >>> 9;
    if (v > 4095) v = 4095;
    if (v < -4095) v = -4095;
    return int'(v);
  endfunction

  function automatic int model(input bit q, input bit odd);
    longint acc;
    int p;
    acc = 0;
    for (int t = 0; t < 8; t++) begin
      p = osr4 ? (4 * t + (mhalf ? 2 : 0)) : 2 * t;
      p += odd;
      acc += longint'(h[p]) * (q ? mq[t] : mi[t]);
    end
    return sat13(acc);
  endfunction

  task automatic load(input int osr);
    for (int n = 0; n < 32; n++) begin
      h[n] = coef_code(n, osr, 8);
      @(posedge clk);
      cfg.we <= 1; cfg.tgt <= TGT_COEF; cfg.idx <= 12'(n); cfg.data <= 48'(12'(h[n]));
    end
    @(posedge clk);
    cfg <= '0;
  endtask

  // one clock of the random test; in_valid follows sym_en of the previous clock
  logic req_q = 0;
  task automatic step(input int vi, input int vq);
    int ei, eq, oi, oq;
    in_valid <= req_q;
    in_i <= PD_W'(vi); in_q <= PD_W'(vq);
    ei = model(0, 0); eq = model(1, 0); oi = model(0, 1); oq = model(1, 1);
    if (req_q) begin
      for (int t = 7; t > 0; t--) begin mi[t] = mi[t-1]; mq[t] = mq[t-1]; end
      mi[0] = vi; mq[0] = vq;
    end
    mhalf = osr4 ? !mhalf : 1'b0;
    req_q = sym_en;
    @(posedge clk);
    #1;
    checks++;
    if ($signed(i_even) != ei || $signed(q_even) != eq || $signed(i_odd) != oi || $signed(q_odd) != oq) begin
      failures++;
      if (failures < 10) $display("osr4=%0d got %0d %0d %0d %0d exp %0d %0d %0d %0d", osr4,
        $signed(i_even), $signed(q_even), $signed(i_odd), $signed(q_odd), ei, eq, oi, oq);
    end
    checks++;
    if (sym_en != (!osr4 || !mhalf)) begin
      failures++;
      if (failures < 10) $display("sym_en wrong");
    end
  endtask

  initial begin
    int seq [64];
    int k;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int o = 2; o <= 4; o += 2) begin
      bit sent;
      load(o);
      osr4 <= (o == 4);
      rst_n <= 0;
      @(posedge clk);
      rst_n <= 1;
      for (int t = 0; t < 8; t++) begin mi[t] = 0; mq[t] = 0; end
      mhalf = 0; req_q = 0; sent = 0; k = -1;
      #1;
      // one symbol of +0.5 / -0.5, then zeros; record 4*OSR clocks of output
      for (int c = 0; c < 12 * o; c++) begin
        bit now;
        now = req_q && !sent;
        step(now ? 1024 : 0, now ? -1024 : 0);
        if (k >= 0 && k < 8 * o) begin
          seq[k] = $signed(i_even); seq[k+1] = $signed(i_odd);
          checks++;
          if ($signed(q_even) != -seq[k] || $signed(q_odd) != -seq[k+1]) failures++;
          k += 2;
        end
        if (now) begin sent = 1; k = 0; end
      end
      for (int n = 0; n < 8 * o; n++) begin
        checks++;
        if (seq[n] != sat13(longint'(h[n]) * 1024)) begin
          failures++;
          if (failures < 20) $display("impulse osr=%0d n=%0d got %0d exp %0d", o, n, seq[n], sat13(longint'(h[n]) * 1024));
        end
      end
    end
    // random symbols with mode switches
    load(2);
    osr4 <= 0;
    rst_n <= 0;
    @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 8; t++) begin mi[t] = 0; mq[t] = 0; end
    mhalf = 0; req_q = 0;
    #1;
    for (int n = 0; n < 6000; n++) begin
      if (n == 2000) osr4 = 1;
      if (n == 4000) osr4 = 0;
      step(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
