// sm_delay: a chain of DEPTH D registers on a WIDTH-bit bus.
//
// These are the register chains of different lengths that turn the
// bit-skewed array into a parallel-in, parallel-out multiplier: on the input
// side they delay each operand bit by the cycle at which the array expects
// it, on the output side they hold back the early product bits until the
// last one arrives. DEPTH = 0 is a plain wire. The registers have no reset,
// like the rest of the datapath.
//
// Interface: dout equals din delayed by DEPTH rising edges of clk. With
// DEPTH = 0 clk is unused, and lint reports it as such; that is intended.
module sm_delay #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= din;
      for (int d = 1; d < DEPTH; d++) stage[d] <= stage[d-1];
    end
    assign dout = stage[DEPTH-1];
  end

endmodule
