// tb_sm_delay: self-checking test of the register chain.
//
// Three chains (depth 0, 1 and 7, four bits wide) get random words every
// cycle; each output must equal the word applied DEPTH cycles earlier.
module tb_sm_delay;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCYC = 500;
  logic [3:0] din, d0, d1, d7;
  logic [3:0] hist [NCYC];
  int checks = 0, failures = 0;

  sm_delay #(.WIDTH(4), .DEPTH(0)) u0 (.clk(clk), .din(din), .dout(d0));
  sm_delay #(.WIDTH(4), .DEPTH(1)) u1 (.clk(clk), .din(din), .dout(d1));
  sm_delay #(.WIDTH(4), .DEPTH(7)) u7 (.clk(clk), .din(din), .dout(d7));

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [3:0] got, input logic [3:0] exp,
                           input int depth, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d depth %0d: got %h expected %h", t, depth, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < NCYC; t++) begin
      hist[t] = 4'($urandom);
      din = hist[t];
      #1;
      expect_eq(d0, hist[t], 0, t);
      if (t >= 1) expect_eq(d1, hist[t-1], 1, t);
      if (t >= 7) expect_eq(d7, hist[t-7], 7, t);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
