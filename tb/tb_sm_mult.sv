// tb_sm_mult: end-to-end test of the two's complement systolic multiplier
// at its default size (N = 8).
//
// All 2^16 signed operand pairs are streamed through the multiplier, one per
// cycle, with an idle cycle (in_valid low, random operands) inserted every
// 97 cycles. Each output cycle is checked against the cycle LATENCY = 4N-1
// earlier: out_valid must match the earlier in_valid, and a valid product
// must equal the integer product of the two operands. The first out_valid
// after reset must come exactly LATENCY cycles after the first in_valid.
// The test also counts how often each mechanism of the design was exercised
// (each sign combination, the most negative operand, whose modulus needs
// the top bit of the converter, a zero product with a negative sign, idle
// cycles, and back-to-back products at full rate) and counts a failure for
// any that never occurred.
module tb_sm_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N       = 8;
  localparam int LATENCY = 4 * N - 1;
  localparam int NOPS    = 1 << (2 * N);
  localparam int NCYC    = NOPS + NOPS / 96 + LATENCY + 8;

  logic                  rst_n, in_valid, out_valid;
  logic signed [N-1:0]   a_in, b_in;
  logic signed [2*N-1:0] p_out;

  logic signed [N-1:0] ha [NCYC];
  logic signed [N-1:0] hb [NCYC];
  logic                hv [NCYC];

  int checks = 0, failures = 0;
  int n_pp = 0, n_np = 0, n_pn = 0, n_nn = 0, n_minneg = 0, n_zero_neg = 0;
  int n_idle = 0, n_b2b = 0;
  int first_in = -1, first_out = -1;

  sm_mult dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
               .a_in(a_in), .b_in(b_in), .out_valid(out_valid), .p_out(p_out));

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op;
    logic prev_valid;
    op = 0;
    prev_valid = 1'b0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    a_in = '0;
    b_in = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < NCYC; t++) begin
      if (op < NOPS && (t % 97) != 96) begin
        hv[t] = 1'b1;
        ha[t] = N'(op);
        hb[t] = N'(op >> N);
        op++;
        if (first_in < 0) first_in = t;
      end else begin
        hv[t] = 1'b0;
        ha[t] = N'($urandom);
        hb[t] = N'($urandom);
      end
      in_valid = hv[t];
      a_in = ha[t];
      b_in = hb[t];
      #1;
      if (out_valid && first_out < 0) first_out = t;
      if (t >= LATENCY) begin
        int s;
        s = t - LATENCY;
        checks++;
        if (out_valid !== hv[s]) begin
          failures++;
          $display("cycle %0d: out_valid=%b expected %b", t, out_valid, hv[s]);
        end
        if (hv[s]) begin
          logic signed [2*N-1:0] exp;
          exp = (2*N)'(int'(ha[s]) * int'(hb[s]));
          checks++;
          if (p_out !== exp) begin
            failures++;
            if (failures < 10)
              $display("%0d * %0d: got %0d expected %0d", ha[s], hb[s], p_out, exp);
          end
          if (ha[s] >= 0 && hb[s] >= 0) n_pp++;
          if (ha[s] <  0 && hb[s] >= 0) n_np++;
          if (ha[s] >= 0 && hb[s] <  0) n_pn++;
          if (ha[s] <  0 && hb[s] <  0) n_nn++;
          if (ha[s] == -(1 << (N - 1)) || hb[s] == -(1 << (N - 1))) n_minneg++;
          if ((ha[s] < 0) != (hb[s] < 0) && (ha[s] == 0 || hb[s] == 0)) n_zero_neg++;
          if (prev_valid) n_b2b++;
        end else begin
          n_idle++;
        end
        prev_valid = hv[s];
      end else begin
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("cycle %0d: out_valid before the pipeline filled", t);
        end
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (op != NOPS) begin
      failures++;
      $display("only %0d of %0d operand pairs applied", op, NOPS);
    end
    checks++;
    if (first_out - first_in != LATENCY) begin
      failures++;
      $display("latency %0d cycles, expected %0d", first_out - first_in, LATENCY);
    end
    $display("mechanisms: pos*pos=%0d neg*pos=%0d pos*neg=%0d neg*neg=%0d most_negative=%0d zero_with_negative_sign=%0d idle=%0d back_to_back=%0d",
             n_pp, n_np, n_pn, n_nn, n_minneg, n_zero_neg, n_idle, n_b2b);
    if (n_pp == 0)       begin failures++; $display("pos*pos never exercised"); end
    if (n_np == 0)       begin failures++; $display("neg*pos never exercised"); end
    if (n_pn == 0)       begin failures++; $display("pos*neg never exercised"); end
    if (n_nn == 0)       begin failures++; $display("neg*neg never exercised"); end
    if (n_minneg == 0)   begin failures++; $display("most negative operand never exercised"); end
    if (n_zero_neg == 0) begin failures++; $display("zero with negative sign never exercised"); end
    if (n_idle == 0)     begin failures++; $display("idle cycle never exercised"); end
    if (n_b2b == 0)      begin failures++; $display("back-to-back products never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
