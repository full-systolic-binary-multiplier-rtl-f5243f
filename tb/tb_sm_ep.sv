// tb_sm_ep: self-checking test of the elemental processor.
//
// Drives random bits on si, ci, ai, bi every cycle and compares co, ao, bo
// one cycle later and so two cycles later with a full adder worked out
// here from the integer sum a*b + c + s. All 16 input patterns are also
// walked through once explicitly.
module tb_sm_ep;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic si, ci, ai, bi, so, co, ao, bo;
  int checks = 0, failures = 0;

  sm_ep dut (.clk(clk), .si(si), .ci(ci), .ai(ai), .bi(bi),
             .so(so), .co(co), .ao(ao), .bo(bo));

  localparam int NCYC = 2000;
  logic [3:0] hist [NCYC];   // {s,c,a,b} applied in each cycle

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NCYC; t++) begin
      if (t < 16) hist[t] = 4'(t);
      else        hist[t] = 4'($urandom);
      {si, ci, ai, bi} = hist[t];
      #1;
      if (t >= 1) begin
        int tot;
        tot = int'(hist[t-1][1] & hist[t-1][0]) + int'(hist[t-1][2]) + int'(hist[t-1][3]);
        checks++;
        if (co !== tot[1]) begin
          failures++;
          $display("cycle %0d: co=%b expected %b", t, co, tot[1]);
        end
        checks++;
        if (ao !== hist[t-1][1] || bo !== hist[t-1][0]) begin
          failures++;
          $display("cycle %0d: ao/bo=%b%b expected %b%b", t, ao, bo, hist[t-1][1], hist[t-1][0]);
        end
      end
      if (t >= 2) begin
        int tot;
        tot = int'(hist[t-2][1] & hist[t-2][0]) + int'(hist[t-2][2]) + int'(hist[t-2][3]);
        checks++;
        if (so !== tot[0]) begin
          failures++;
          $display("cycle %0d: so=%b expected %b", t, so, tot[0]);
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
