// tb_pwl_approx: checks the PWL function unit for all six functions of the
// separator. Each instance gets the least-squares table of its function; the
// output is compared bit for bit with an integer model of the datapath and,
// independently, with the exact function (max error in LSBs). Latency must
// be 2 clocks.
module tb_pwl_approx;
  import amo_pkg::*;
  import amo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [RECIP_IN_W-1:0] x_recip; logic [RECIP_OUT_W-1:0] y_recip;
  logic [ATAN_IN_W-1:0]  x_atan;  logic [ATAN_OUT_W-1:0]  y_atan;
  logic [SQRT_IN_W-1:0]  x_sqrt;  logic [SQRT_OUT_W-1:0]  y_sqrt;
  logic [RSQ_IN_W-1:0]   x_rsq;   logic [RSQ_OUT_W-1:0]   y_rsq;
  logic [ACOS_IN_W-1:0]  x_acos;  logic [ACOS_OUT_W-1:0]  y_acos;
  logic [FTAN_IN_W-1:0]  x_ftan;  logic [FTAN_OUT_W-1:0]  y_ftan;

  pwl_approx #(.IN_W(RECIP_IN_W), .OUT_W(RECIP_OUT_W), .KF(RECIP_KF), .TGT(TGT_RECIP)) u_recip (.clk, .rst_n, .cfg, .x(x_recip), .y(y_recip));
  pwl_approx #(.IN_W(ATAN_IN_W),  .OUT_W(ATAN_OUT_W),  .KF(ATAN_KF),  .TGT(TGT_ATAN))  u_atan  (.clk, .rst_n, .cfg, .x(x_atan),  .y(y_atan));
  pwl_approx #(.IN_W(SQRT_IN_W),  .OUT_W(SQRT_OUT_W),  .KF(SQRT_KF),  .TGT(TGT_SQRT))  u_sqrt  (.clk, .rst_n, .cfg, .x(x_sqrt),  .y(y_sqrt));
  pwl_approx #(.IN_W(RSQ_IN_W),   .OUT_W(RSQ_OUT_W),   .KF(RSQ_KF),   .TGT(TGT_RSQRT)) u_rsq   (.clk, .rst_n, .cfg, .x(x_rsq),   .y(y_rsq));
  pwl_approx #(.IN_W(ACOS_IN_W),  .OUT_W(ACOS_OUT_W),  .KF(ACOS_KF),  .TGT(TGT_ACOS))  u_acos  (.clk, .rst_n, .cfg, .x(x_acos),  .y(y_acos));
  pwl_approx #(.IN_W(FTAN_IN_W),  .OUT_W(FTAN_OUT_W),  .KF(FTAN_KF),  .TGT(TGT_FTAN))  u_ftan  (.clk, .rst_n, .cfg, .x(x_ftan),  .y(y_ftan));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pwl_entry_t tab [6][128];
  real maxerr [6];

  function automatic int get_y(input fn_e f);
    case (f)
      FN_RECIP: return int'(y_recip);
      FN_ATAN:  return int'(y_atan);
      FN_SQRT:  return int'(y_sqrt);
      FN_RSQRT: return int'(y_rsq);
      FN_ACOS:  return int'(y_acos);
      default:  return int'(y_ftan);
    endcase
  endfunction

  // inputs that the design actually feeds each unit; error limits in LSBs
  function automatic bit in_domain(input fn_e f, input int c);
    case (f)
      FN_SQRT, FN_RSQRT: return c >= 16384;
      FN_ACOS:           return c <= 3944;      // x <= 0.963
      default:           return 1'b1;
    endcase
  endfunction
  function automatic real tol(input fn_e f);
    return (f == FN_RSQRT) ? 2.5 : 2.0;
  endfunction

  int xs [6];
  int pipe [3][6];

  initial begin
    for (int f = 0; f < 6; f++) begin
      maxerr[f] = 0.0;
      for (int i = 0; i < 128; i++) tab[f][i] = fit_entry(fn_e'(f), i);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 6; f++)
      for (int i = 0; i < 128; i++) begin
        @(posedge clk);
        cfg.we <= 1; cfg.tgt <= cfg_tgt_e'(f); cfg.idx <= 12'(i); cfg.data <= tab[f][i];
      end
    @(posedge clk);
    cfg.we <= 0;
    // sweep: drive a new input each clock, check the result 2 clocks later
    for (int n = 0; n < 40000; n++) begin
      for (int f = 0; f < 6; f++) begin
        int w;
        w = fn_in_w(fn_e'(f));
        xs[f] = (n < 3000) ? ((n * 37 + f * 11) % (1 << w)) : int'($urandom_range((1 << w) - 1));
        if (n >= 3000 && (n % 8) == 0 && w > 12) xs[f] = (n * 13) % (1 << w);
      end
      x_recip <= RECIP_IN_W'(xs[0]); x_atan <= ATAN_IN_W'(xs[1]); x_sqrt <= SQRT_IN_W'(xs[2]);
      x_rsq <= RSQ_IN_W'(xs[3]); x_acos <= ACOS_IN_W'(xs[4]); x_ftan <= FTAN_IN_W'(xs[5]);
      pipe[2] = pipe[1]; pipe[1] = pipe[0]; pipe[0] = xs;
      @(posedge clk);
      #1;
      if (n >= 1) begin
        for (int f = 0; f < 6; f++) begin
          int c, got;
          longint expv;
          real err;
          c = pipe[1][f];
          got = get_y(fn_e'(f));
          expv = pwl_model(fn_e'(f), tab[f][c >> (fn_in_w(fn_e'(f)) - PWL_ADDR_W)], c);
          checks++;
          if (longint'(got) != expv) begin
            failures++;
            if (failures < 10) $display("fn %0d x=%0d got %0d model %0d", f, c, got, expv);
          end
          if (in_domain(fn_e'(f), c)) begin
            err = real'(got) - fn_val(fn_e'(f), c);
            if (err < 0) err = -err;
            if (err > maxerr[f]) maxerr[f] = err;
            checks++;
            if (err > tol(fn_e'(f))) begin
              failures++;
              if (failures < 10) $display("fn %0d x=%0d got %0d exact %f", f, c, got, fn_val(fn_e'(f), c));
            end
          end
        end
      end
    end
    for (int f = 0; f < 6; f++) $display("function %0d max error %f LSB", f, maxerr[f]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
