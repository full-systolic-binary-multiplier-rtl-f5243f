// sm_tc2sm: systolic two's complement to sign + modulus converter.
//
// The multiplier array works on unsigned bits, so a signed operand is first
// split into its sign and its modulus. For a negative number the modulus is
// ~x + 1, computed here as (x xor s) + s with s = x[N-1]: bit 0 passes
// unchanged, and the carry of the "+ s" ripples upwards one bit per clock
// through a register. Each one's-complement bit (x[k] xor s) is delayed k
// cycles so that it meets its carry. The modulus bits therefore leave the
// converter skewed, bit k in cycle k, which is exactly the one-bit-per-cycle
// input skew the array needs for its multiplicand, so the same registers do
// both jobs. The top modulus bit is the last carry: the modulus of the most
// negative number, 2^(N-1), needs all N bits.
//
// The gate network (INV+AND for the first carry, XOR per bit, XOR/AND per
// carry stage, registers between stages) follows the converter diagram of
// the original design, drawn there for four bits and generalised here to N.
// The sign output is this design's addition: the sign bit is taken straight
// from the input, unregistered. No reset.
//
// Interface: x sampled in cycle 0 (held only for that cycle);
//   sgn = x[N-1] in cycle 0 (combinational);
//   mag[k] valid in cycle k (k registers after x).
module sm_tc2sm #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic [N-1:0] x,     // two's complement operand
  output logic         sgn,   // sign, combinational from x[N-1]
  output logic [N-1:0] mag    // modulus, bit k delayed k cycles
);

  logic s;
  // carry[k] is the carry into bit k, valid in cycle k (k = 1..N-1)
  logic car [1:N-1];

  assign s      = x[N-1];
  assign sgn    = s;
  assign mag[0] = x[0];

  // First carry: s and not x[0].
  always_ff @(posedge clk) car[1] <= s & ~x[0];

  for (genvar k = 1; k <= N - 2; k++) begin : g_bit
    logic y;       // one's-complement bit, delayed k cycles
    logic y_in;
    assign y_in = x[k] ^ s;

    sm_delay #(.WIDTH(1), .DEPTH(k)) u_dly (
      .clk  (clk),
      .din  (y_in),
      .dout (y)
    );

    assign mag[k] = y ^ car[k];
    always_ff @(posedge clk) car[k+1] <= y & car[k];
  end

  assign mag[N-1] = car[N-1];

endmodule
