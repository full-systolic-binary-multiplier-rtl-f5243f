// sm_ep: elemental processor (EP) of the full systolic multiplier.
//
// Each clock the cell forms A_i*B_j + C_i + S_i with a full adder whose
// partial product is the AND of the two operand bits. The carry goes through
// one register (Co) to the eastern neighbour; the sum goes through two
// registers (So) to the north-eastern neighbour, so that the diagonal path
// has the same delay as one vertical plus one horizontal hop. The operand
// bits are registered once and forwarded: A north (Ao), B east (Bo).
//
// The gate network (AND for the partial product, XOR/XOR for the sum,
// AND/AND/OR for the carry) and the five D flip-flops follow the cell
// diagram of the original design. The registers have no reset, as in that
// diagram: every output is a pure function of the inputs of the previous
// one or two cycles, so the array flushes itself.
//
// Interface: all inputs sampled on the rising edge of clk.
//   co, ao, bo valid one cycle after the inputs; so valid two cycles after.
module sm_ep (
  input  logic clk,
  input  logic si,   // sum in, from the south-west neighbour
  input  logic ci,   // carry in, from the west neighbour
  input  logic ai,   // multiplicand bit, from the south
  input  logic bi,   // multiplier bit, from the west
  output logic so,   // sum out (two registers), to the north-east
  output logic co,   // carry out (one register), to the east
  output logic ao,   // multiplicand bit forwarded north
  output logic bo    // multiplier bit forwarded east
);

  logic pp;      // partial product A*B
  logic hs;      // half sum S xor C
  logic sum_c;   // full-adder sum
  logic car_c;   // full-adder carry
  logic so_q1;   // first of the two sum registers

  always_comb begin
    pp    = ai & bi;
    hs    = si ^ ci;
    sum_c = hs ^ pp;
    car_c = (si & ci) | (hs & pp);
  end

  always_ff @(posedge clk) begin
    co    <= car_c;
    so_q1 <= sum_c;
    so    <= so_q1;
    ao    <= ai;
    bo    <= bi;
  end

endmodule
