// multiplier: 8 x 8 multiplier for MUL (drives the D bus under Mult_enable).
//
// Multiplies the low bytes of the two operand buses and returns the 16-bit
// product. The control words of MUL leave the ALU operand latches closed and
// enable the register drivers throughout execute and writeback, so this
// unit reads the A and B buses directly. Unsigned operands are this design's
// choice (the specification only says "the lower 8 bits"). Combinational.
module multiplier (
  input  logic [7:0]  a,  // A bus [7:0] (Rs1)
  input  logic [7:0]  b,  // B bus [7:0] (Rs2)
  output logic [15:0] p
);

  assign p = 16'(a) * 16'(b);

endmodule
