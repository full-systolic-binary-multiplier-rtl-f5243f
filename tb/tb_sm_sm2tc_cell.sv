// tb_sm_sm2tc_cell: self-checking test of the sign + modulus to two's
// complement cell.
//
// Part 1 drives one cell with random bits and checks dout = di xor ci in
// the same cycle and co = sgni & (di | ci), sgno = sgni one cycle later.
// Part 2 chains 8 cells as the multiplier does, feeds random signed moduli
// least significant bit first (bit k in cycle k), and checks that the
// skewed outputs assemble to +modulus or -modulus (mod 2^8).
module tb_sm_sm2tc_cell;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int W    = 8;
  localparam int NCYC = 1000;
  int checks = 0, failures = 0;

  // ---- single cell
  logic sgni, ci, di, dout, sgno, co;
  sm_sm2tc_cell dut (.clk(clk), .sgni(sgni), .ci(ci), .di(di),
                     .dout(dout), .sgno(sgno), .co(co));

  // ---- chain of W cells
  logic [W-1:0] cd, cdo;
  logic         csg [W+1];
  logic         cc  [W+1];
  assign cc[0] = 1'b0;
  for (genvar k = 0; k < W; k++) begin : g_chain
    sm_sm2tc_cell u (.clk(clk), .sgni(csg[k]), .ci(cc[k]), .di(cd[k]),
                     .dout(cdo[k]), .sgno(csg[k+1]), .co(cc[k+1]));
  end

  logic [2:0]   h1   [NCYC];
  logic [W-1:0] mods [NCYC];
  logic         sgns [NCYC];
  logic [W-1:0] got  [NCYC];

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NCYC; t++) begin
      h1[t] = 3'($urandom);
      {sgni, ci, di} = h1[t];
      mods[t] = W'($urandom);
      sgns[t] = 1'($urandom);
      if (t % 7 == 0) mods[t] = '0;          // zero with either sign
      csg[0] = sgns[t];
      for (int k = 0; k < W; k++)
        cd[k] = (t - k >= 0) ? mods[t-k][k] : 1'b0;
      #1;
      checks++;
      if (dout !== (di ^ ci)) begin
        failures++;
        $display("cycle %0d: dout=%b", t, dout);
      end
      if (t >= 1) begin
        checks++;
        if (co !== (h1[t-1][2] & (h1[t-1][0] | h1[t-1][1])) || sgno !== h1[t-1][2]) begin
          failures++;
          $display("cycle %0d: co=%b sgno=%b", t, co, sgno);
        end
      end
      for (int k = 0; k < W; k++)
        if (t - k >= 0) got[t-k][k] = cdo[k];
      @(posedge clk);
      #1;
    end
    for (int p = 0; p < NCYC - W; p++) begin
      logic [W-1:0] exp;
      exp = sgns[p] ? W'(-int'(mods[p])) : mods[p];
      checks++;
      if (got[p] !== exp) begin
        failures++;
        if (failures < 10)
          $display("sign %b modulus %0d: got %h expected %h", sgns[p], mods[p], got[p], exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
