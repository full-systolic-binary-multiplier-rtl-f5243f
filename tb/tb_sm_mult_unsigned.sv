// tb_sm_mult_unsigned: end-to-end test of the multiplier in its unsigned
// parallel I/O configuration (SIGNED_OPS = 0, N = 8).
//
// All 2^16 unsigned operand pairs are streamed through, one per cycle, with
// an idle cycle every 89 cycles. Each output cycle is checked against the
// cycle 3N earlier (out_valid and the integer product). The first out_valid
// must come exactly 3N cycles after the first in_valid: the last processor
// evaluates 3N-1 cycles after the operands enter, and its sum passes two
// registers. The chain register count must equal 3N^2-2N and the processor
// count (3N^2+N)/2-1. Operands with the top bit set, idle cycles and
// back-to-back products are counted, and a failure is counted for any that
// never occurred.
module tb_sm_mult_unsigned;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N       = 8;
  localparam int LATENCY = 3 * N;
  localparam int NOPS    = 1 << (2 * N);
  localparam int NCYC    = NOPS + NOPS / 88 + LATENCY + 8;

  logic           rst_n, in_valid, out_valid;
  logic [N-1:0]   a_in, b_in;
  logic [2*N-1:0] p_out;

  logic [N-1:0] ha [NCYC];
  logic [N-1:0] hb [NCYC];
  logic         hv [NCYC];

  int checks = 0, failures = 0;
  int n_top = 0, n_idle = 0, n_b2b = 0, n_max = 0;
  int first_in = -1, first_out = -1;

  sm_mult #(.N(N), .SIGNED_OPS(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a_in(a_in), .b_in(b_in),
    .out_valid(out_valid), .p_out(p_out));

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
    checks++;
    if (dut.NUM_CHAIN_REGS != 3 * N * N - 2 * N) begin
      failures++;
      $display("chain registers %0d, expected %0d", dut.NUM_CHAIN_REGS, 3 * N * N - 2 * N);
    end
    checks++;
    if (dut.u_array.NUM_EP != (3 * N * N + N) / 2 - 1) begin
      failures++;
      $display("processors %0d, expected %0d", dut.u_array.NUM_EP, (3 * N * N + N) / 2 - 1);
    end
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < NCYC; t++) begin
      if (op < NOPS && (t % 89) != 88) begin
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
          logic [2*N-1:0] exp;
          exp = (2*N)'(int'(ha[s]) * int'(hb[s]));
          checks++;
          if (p_out !== exp) begin
            failures++;
            if (failures < 10)
              $display("%0d * %0d: got %0d expected %0d", ha[s], hb[s], p_out, exp);
          end
          if (ha[s][N-1] || hb[s][N-1]) n_top++;
          if (&ha[s] && &hb[s]) n_max++;
          if (prev_valid) n_b2b++;
        end else begin
          n_idle++;
        end
        prev_valid = hv[s];
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (first_out - first_in != LATENCY) begin
      failures++;
      $display("latency %0d cycles, expected %0d", first_out - first_in, LATENCY);
    end
    $display("mechanisms: top_bit_set=%0d largest_product=%0d idle=%0d back_to_back=%0d",
             n_top, n_max, n_idle, n_b2b);
    if (n_top == 0)  begin failures++; $display("top operand bit never exercised"); end
    if (n_max == 0)  begin failures++; $display("largest product never exercised"); end
    if (n_idle == 0) begin failures++; $display("idle cycle never exercised"); end
    if (n_b2b == 0)  begin failures++; $display("back-to-back products never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
