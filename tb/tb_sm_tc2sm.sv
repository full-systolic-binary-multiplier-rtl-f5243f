// tb_sm_tc2sm: self-checking test of the systolic two's complement to
// sign + modulus converter at N = 8.
//
// Every 8-bit value is applied for one cycle, back to back. The sign must
// equal the MSB in the same cycle and modulus bit k must appear exactly k
// cycles later, equal to bit k of |x| computed here with integer arithmetic
// (|-128| = 128 exercises the top modulus bit).
module tb_sm_tc2sm;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N    = 8;
  localparam int NOPS = 1 << N;
  localparam int NCYC = NOPS + N + 2;

  logic [N-1:0] x, mag;
  logic         sgn;
  logic [N-1:0] got [NOPS];
  int checks = 0, failures = 0;

  sm_tc2sm #(.N(N)) dut (.clk(clk), .x(x), .sgn(sgn), .mag(mag));

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NCYC; t++) begin
      x = (t < NOPS) ? N'(t) : N'($urandom);
      #1;
      if (t < NOPS) begin
        checks++;
        if (sgn !== x[N-1]) begin
          failures++;
          $display("x=%h: sgn=%b", x, sgn);
        end
      end
      for (int k = 0; k < N; k++)
        if (t - k >= 0 && t - k < NOPS) got[t-k][k] = mag[k];
      @(posedge clk);
      #1;
    end
    for (int p = 0; p < NOPS; p++) begin
      int v;
      logic [N-1:0] exp;
      v = (p >= NOPS / 2) ? NOPS - p : p;
      exp = N'(v);
      checks++;
      if (got[p] !== exp) begin
        failures++;
        $display("x=%0d: modulus %0d expected %0d", p, got[p], exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
