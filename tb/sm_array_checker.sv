// sm_array_checker: testbench helper that exercises one sm_array of width N.
//
// Streams all 2^(2N) unsigned operand pairs through the array, one new pair
// per cycle, with the bit skew the array requires (a[i] in cycle i, b[j] in
// cycle N-1-j relative to the pair's start). Product bit k of pair p is
// taken in exactly cycle p+k+N+1, and the assembled word is compared with
// the integer product. This checks the arithmetic and the schedule together:
// the last product bit completes after 3N-1 evaluation cycles. The
// processor count is compared with (3N^2+N)/2 - 1. The helper raises done
// when finished and reports its checks and failures.
module sm_array_checker #(
  parameter int N = 4
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int NOPS = 1 << (2 * N);
  localparam int NCYC = NOPS + 3 * N + 4;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] o;
  logic [2*N-1:0] got [NOPS];

  sm_array #(.N(N)) dut (.clk(clk), .a(a), .b(b), .o(o));

  function automatic logic [N-1:0] opa(input int p);
    return (p >= 0 && p < NOPS) ? N'(p) : '0;
  endfunction
  function automatic logic [N-1:0] opb(input int p);
    return (p >= 0 && p < NOPS) ? N'(p >> N) : '0;
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    checks++;
    if (dut.NUM_EP != (3 * N * N + N) / 2 - 1) begin
      failures++;
      $display("N=%0d: processor count %0d, expected %0d", N, dut.NUM_EP, (3 * N * N + N) / 2 - 1);
    end
    for (int t = 0; t < NCYC; t++) begin
      for (int i = 0; i < N; i++) begin
        logic [N-1:0] va, vb;
        va = opa(t - i);
        vb = opb(t - (N - 1 - i));
        a[i] = va[i];
        b[i] = vb[i];
      end
      #1;
      for (int k = 0; k < 2 * N; k++) begin
        int p;
        p = t - (k + N + 1);
        if (p >= 0 && p < NOPS) got[p][k] = o[k];
      end
      @(posedge clk);
      #1;
    end
    for (int p = 0; p < NOPS; p++) begin
      logic [2*N-1:0] exp;
      exp = (2*N)'(int'(opa(p)) * int'(opb(p)));
      checks++;
      if (got[p] !== exp) begin
        failures++;
        if (failures < 10)
          $display("N=%0d: %0d * %0d: got %0d expected %0d", N, opa(p), opb(p), got[p], exp);
      end
    end
    done = 1'b1;
  end
endmodule
