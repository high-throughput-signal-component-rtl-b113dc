// delay_line: N-stage register chain of width W, used to keep side signals
// (flags, shift counts, supply codes, angles) aligned with the pipelined
// function units. Output equals the input N clocks earlier; registers reset
// to zero. N = 0 is a plain wire.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [N];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int n = 0; n < N; n++) stage[n] <= '0;
      end else begin
        stage[0] <= d;
        for (int n = 1; n < N; n++) stage[n] <= stage[n-1];
      end
    end
    assign q = stage[N-1];
  end

endmodule
