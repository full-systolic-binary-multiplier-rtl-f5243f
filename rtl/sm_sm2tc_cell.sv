// sm_sm2tc_cell: one bit of the sign + modulus to two's complement converter.
//
// The array delivers the modulus of the product least significant bit
// first, one bit per cycle. A chain of these cells, one per product bit,
// turns it back into two's complement: for a positive result the bits pass
// unchanged, for a negative one the result is 0 - modulus, whose bit k is
// d_k xor (a one was seen below bit k). ci carries that "sign and a one
// below" flag: do = di xor ci, and the next cell gets
// co = sgn and (di or ci), registered so that it arrives together with the
// next modulus bit. The sign travels along the chain through its own
// register (sgno) for the same reason. In the first cell ci is 0.
//
// The gates (XOR, OR, AND) and the two D flip-flops follow the converter
// cell diagram of the original design. No reset.
//
// Interface: di, ci, sgni in the same cycle; do combinational;
//   co and sgno valid one cycle later, for the next cell.
module sm_sm2tc_cell (
  input  logic clk,
  input  logic sgni,  // sign of the result
  input  logic ci,    // sign and "lower bit was one" flag
  input  logic di,    // modulus bit
  output logic dout,  // two's complement result bit
  output logic sgno,  // sign, one cycle later
  output logic co     // flag for the next bit, one cycle later
);

  always_comb dout = di ^ ci;

  always_ff @(posedge clk) begin
    co   <= sgni & (di | ci);
    sgno <= sgni;
  end

endmodule
