// tb_prbs_gen: checks the symbol source against a bit-serial model of the
// x^15 + x^14 + 1 sequence (six bits per symbol, I first), checks that the
// output holds while en is low, and that the symbol sequence repeats with
// the maximal period 2^15 - 1 and not earlier.
module tb_prbs_gen;
  import amo_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [SYM_W-1:0] sym_i, sym_q;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  prbs_gen dut (.clk, .rst_n, .en, .sym_i, .sym_q);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [14:0] m;
  logic [5:0]  first [4];

  initial begin
    m = 15'h0001;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 32767 + 8; n++) begin
      logic [5:0] bits;
      logic       hold;
      hold = (n % 5 == 4);
      en <= !hold;
      if (!hold)
        for (int b = 0; b < 6; b++) begin
          m = {m[13:0], m[14] ^ m[13]};
        end
      bits = m[5:0];
      @(posedge clk);
      #1;
      checks++;
      if ({sym_i, sym_q} != bits) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d%0d exp %0d", n, sym_i, sym_q, bits);
      end
    end
    en <= 0;
    // period: restart and count symbols until the first four recur
    rst_n <= 0;
    @(posedge clk);
    rst_n <= 1;
    en <= 1;
    for (int n = 0; n < 32767 + 4; n++) begin
      @(posedge clk);
      #1;
      if (n < 4) first[n] = {sym_i, sym_q};
      else if (n >= 32767 && n < 32767 + 4) begin
        checks++;
        if ({sym_i, sym_q} != first[n - 32767]) begin
          failures++;
          $display("sequence does not repeat after 2^15-1 symbols");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
