// sm_array: the full systolic array of elemental processors (unsigned).
//
// Processor EP(i,j) sits in column i and row j and forms A_i*B_j plus the
// carry of its western neighbour EP(i-1,j) and the sum of its south-western
// neighbour EP(i-1,j+1). Operand bit A_i enters column i at the bottom row
// and climbs north one row per cycle; B_j enters row j at column 0 and moves
// east one column per cycle. Carries move east (weight i+j+1), sums move
// north-east (same weight i+j), and the sum outputs of the top row are the
// product bits O_k. Row j has 2N-j processors, the bottom row only N (see
// smul_pkg), for (3N^2+N)/2 - 1 processors in all. Inputs of edge
// processors that receive no data are tied to 0; outputs that feed nothing
// (carries out of the last processor of a row, which are provably zero,
// A out of the top row, B out of the last column) are left unconnected.
//
// I/O is bit-skewed, one bit per cycle, as the architecture requires.
// Counting from the cycle in which A_0 and B_{N-1} are applied:
//   a[i] must be applied in cycle i,
//   b[j] must be applied in cycle N-1-j,
//   o[k] is valid in cycle k+N+1.
// A new multiplication may start every cycle. The geometry, connections and
// schedule follow the original design; the parameter N defaults to its main
// eight-bit configuration.
module sm_array
  import smul_pkg::*;
#(
  parameter int N = 8
) (
  input  logic           clk,
  input  logic [N-1:0]   a,   // multiplicand bits, skewed (a[i] in cycle i)
  input  logic [N-1:0]   b,   // multiplier bits, skewed (b[j] in cycle N-1-j)
  output logic [2*N-1:0] o    // product bits, skewed (o[k] in cycle k+N+1)
);

  localparam int W = 2 * N;             // widest row
  localparam int NUM_EP = num_ep(N);    // (3N^2+N)/2 - 1

  // Per-position nets; positions outside the trapezoid are driven to 0.
  logic so_w [N][W];
  logic co_w [N][W];
  logic ao_w [N][W];
  logic bo_w [N][W];

  initial begin
    assert (N >= 2) else $error("sm_array: N must be at least 2");
  end

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < W; i++) begin : g_col
      if (i < row_width(N, j)) begin : g_ep
        logic si, ci, ai, bi;

        // A from below; columns i >= N carry no multiplicand bit.
        if (i >= N) begin : g_a0
          assign ai = 1'b0;
        end else if (j == N - 1) begin : g_ain
          assign ai = a[i];
        end else begin : g_anb
          assign ai = ao_w[j+1][i];
        end

        // B and carry from the west.
        if (i == 0) begin : g_west_edge
          assign bi = b[j];
          assign ci = 1'b0;
        end else begin : g_west
          assign bi = bo_w[j][i-1];
          assign ci = co_w[j][i-1];
        end

        // Sum from the south-west, where such a processor exists.
        if (i == 0 || j == N - 1) begin : g_s0
          assign si = 1'b0;
        end else if (i - 1 < row_width(N, j + 1)) begin : g_snb
          assign si = so_w[j+1][i-1];
        end else begin : g_s0b
          assign si = 1'b0;
        end

        sm_ep u_ep (
          .clk (clk),
          .si  (si),
          .ci  (ci),
          .ai  (ai),
          .bi  (bi),
          .so  (so_w[j][i]),
          .co  (co_w[j][i]),
          .ao  (ao_w[j][i]),
          .bo  (bo_w[j][i])
        );
      end else begin : g_none
        assign so_w[j][i] = 1'b0;
        assign co_w[j][i] = 1'b0;
        assign ao_w[j][i] = 1'b0;
        assign bo_w[j][i] = 1'b0;
      end
    end
  end

  // Product bits are the sums leaving the top row.
  for (genvar k = 0; k < W; k++) begin : g_out
    assign o[k] = so_w[0][k];
  end

endmodule
