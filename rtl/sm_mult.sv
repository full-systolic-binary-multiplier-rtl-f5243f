// sm_mult: parallel-in, parallel-out systolic multiplier, two's complement
// (default) or unsigned.
//
// Multiplies two N-bit numbers and delivers the 2N-bit product, accepting a
// new operand pair every clock. The core is the bit-skewed systolic array
// (sm_array), which multiplies unsigned numbers; register chains of
// different lengths turn its skewed I/O into parallel words.
//
// With SIGNED_OPS = 1 the operands and the product are two's complement.
// Signed multiplication is done in sign + modulus form: |A*B| = |A|*|B| and
// sgn(A*B) = sgn(A) xor sgn(B). The datapath is
//
//   a_in -> sm_tc2sm -> delay N-1 ----------.
//                                            sm_array -> sm_sm2tc_cell x 2N
//   b_in -> sm_tc2sm -> delay 2(N-1-j) -----'        -> deskew 2N-1-k -> p_out
//   sign(a) xor sign(b) -> delay 2N ----------------'
//
// The array needs its multiplicand least significant bit first and its
// multiplier most significant bit first, one bit per cycle. The systolic
// converters emit the modulus least significant bit first (bit k in cycle
// k), which is the multiplicand's skew already. For the multiplier, whose
// skew runs the other way, every lane is delayed until its bit is due; the
// array therefore starts N-1 cycles after the operands arrive and the
// multiplicand lanes get the same N-1 cycle delay. The array emits product
// modulus bit k in cycle k + 2N; a chain of sign + modulus to two's
// complement cells, one per bit, converts the skewed stream (the sign enters
// the first cell in cycle 2N and moves along with the bits), and output
// register chains of length 2N-1-k line all bits up in cycle 4N-1.
//
// With SIGNED_OPS = 0 the converters and output cells are left out: A_i is
// delayed i cycles, B_j N-1-j cycles, product bit k 2N-1-k cycles, which is
// 3N^2-2N chain registers in all, and the product appears 3N cycles after
// the operands (the last processor evaluates in cycle 3N-2, and its sum
// passes two registers).
//
// The array, the converters, the output cell, the unsigned parallel I/O
// arrangement and the use of register chains follow the original design.
// The way the two converter outputs are aligned to the array (the N-1 cycle
// offset and the multiplier lane delays), the valid flag and its reset are
// this design's choices. The datapath registers have no reset; in_valid and
// out_valid mark which outputs belong to an accepted operand pair.
//
// Interface: a_in, b_in, in_valid sampled at a rising edge of clk;
//   p_out = a_in * b_in and out_valid = in_valid LATENCY rising edges later
//   (4N-1 signed, 3N unsigned). Throughput: one product per cycle.
module sm_mult
  import smul_pkg::*;
#(
  parameter int N          = 8,
  parameter bit SIGNED_OPS = 1'b1   // 1: two's complement, 0: unsigned
) (
  input  logic           clk,
  input  logic           rst_n,     // resets the valid pipeline only
  input  logic           in_valid,
  input  logic [N-1:0]   a_in,      // multiplicand
  input  logic [N-1:0]   b_in,      // multiplier
  output logic           out_valid,
  output logic [2*N-1:0] p_out      // product
);

  // Array start offset after the operands arrive.
  localparam int T0      = SIGNED_OPS ? N - 1 : 0;
  localparam int LATENCY = array_out_delay(N, 2*N-1) + T0;   // 4N-1 or 3N
  // Registers in the skew and deskew chains (3N^2-2N when unsigned).
  localparam int NUM_CHAIN_REGS = SIGNED_OPS ? 2*N*(N-1) + N*(2*N-1)
                                             : N*(N-1) + N*(2*N-1);

  logic [N-1:0]   a_arr, b_arr;   // array inputs in the array's skew
  logic [2*N-1:0] mag_p;          // array output, bit k in cycle k + N + 1 + T0
  logic [2*N-1:0] res_sk;         // result bits, still skewed

  if (SIGNED_OPS) begin : g_signed
    localparam int SGN_DLY = array_out_delay(N, 0) + T0;   // = 2N

    // -------------------------------------------------------------- inputs
    logic [N-1:0] a_mag, b_mag;   // moduli, bit k in cycle k
    logic         a_sgn, b_sgn;

    sm_tc2sm #(.N(N)) u_conv_a (.clk(clk), .x(a_in), .sgn(a_sgn), .mag(a_mag));
    sm_tc2sm #(.N(N)) u_conv_b (.clk(clk), .x(b_in), .sgn(b_sgn), .mag(b_mag));

    for (genvar i = 0; i < N; i++) begin : g_askew
      // a_mag[i] is ready in cycle i and due in cycle i + T0.
      sm_delay #(.WIDTH(1), .DEPTH(T0)) u_dly (
        .clk(clk), .din(a_mag[i]), .dout(a_arr[i]));
    end

    for (genvar j = 0; j < N; j++) begin : g_bskew
      // b_mag[j] is ready in cycle j and due in cycle (N-1-j) + T0.
      sm_delay #(.WIDTH(1), .DEPTH(2 * (N - 1 - j))) u_dly (
        .clk(clk), .din(b_mag[j]), .dout(b_arr[j]));
    end

    // Result sign, due at the first output cell together with modulus bit 0.
    logic sgn_in, sgn_arr;
    assign sgn_in = a_sgn ^ b_sgn;

    sm_delay #(.WIDTH(1), .DEPTH(SGN_DLY)) u_sgn_dly (
      .clk(clk), .din(sgn_in), .dout(sgn_arr));

    // ------------------------------------------ modulus to two's complement
    logic cell_sgn [2*N+1];
    logic cell_c   [2*N+1];

    assign cell_sgn[0] = sgn_arr;
    assign cell_c[0]   = 1'b0;

    for (genvar k = 0; k < 2 * N; k++) begin : g_cell
      sm_sm2tc_cell u_cell (
        .clk  (clk),
        .sgni (cell_sgn[k]),
        .ci   (cell_c[k]),
        .di   (mag_p[k]),
        .dout (res_sk[k]),
        .sgno (cell_sgn[k+1]),
        .co   (cell_c[k+1])
      );
    end
  end else begin : g_unsigned
    // Plain skew chains: A_i delayed i cycles, B_j delayed N-1-j cycles.
    for (genvar i = 0; i < N; i++) begin : g_skew
      sm_delay #(.WIDTH(1), .DEPTH(i)) u_adly (
        .clk(clk), .din(a_in[i]), .dout(a_arr[i]));
      sm_delay #(.WIDTH(1), .DEPTH(N - 1 - i)) u_bdly (
        .clk(clk), .din(b_in[i]), .dout(b_arr[i]));
    end
    assign res_sk = mag_p;
  end

  // ----------------------------------------------------------------- array
  sm_array #(.N(N)) u_array (.clk(clk), .a(a_arr), .b(b_arr), .o(mag_p));

  // ----------------------------------------------------------- output deskew
  for (genvar k = 0; k < 2 * N; k++) begin : g_deskew
    sm_delay #(.WIDTH(1), .DEPTH(2 * N - 1 - k)) u_dly (
      .clk(clk), .din(res_sk[k]), .dout(p_out[k]));
  end

  // ------------------------------------------------------------ valid flag
  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end

  assign out_valid = vpipe[LATENCY-1];

endmodule
