// branch_cond: applies the branch condition to PC_Clk.
//
// The PLA asserts PC_Clk in writeback phase J for every conditional branch
// (BEQZ, BNEZ, BC, BO), because REG_zero, ALU_carry and ALU_overflow are not
// PLA inputs; the specification decodes the condition outside the PLA.
// This block drops PC_Clk in phase J when the branch's condition is false,
// so the PC keeps the incremented value loaded in execute. In every other
// phase, and for every other instruction, PC_Clk passes unchanged.
// Combinational.
module branch_cond
  import cpu16_pkg::*;
(
  input  logic [1:0] s,            // {S1, S0}
  input  logic       clk_ph,       // Clk phase level
  input  logic       pc_clk_pla,   // PC_Clk from the control PLA
  input  dec_t       dec,          // decoded instruction
  input  logic       reg_zero,     // REG_zero: register read on port A is zero
  input  logic       alu_carry,    // latched adder carry
  input  logic       alu_overflow, // latched adder overflow
  output logic       pc_clk        // PC_Clk to the PC register
);

  logic in_j, cond_false;

  assign in_j       = ({s, clk_ph} == PH_J);
  assign cond_false = (dec.beqz && !reg_zero) ||
                      (dec.bnez &&  reg_zero) ||
                      (dec.bc   && !alu_carry) ||
                      (dec.bo   && !alu_overflow);
  assign pc_clk     = pc_clk_pla && !(in_j && cond_false);

endmodule
