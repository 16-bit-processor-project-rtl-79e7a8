// imm_gen: immediate operand generator (drives the A bus under Immed_enable).
//
// Extracts and extends the immediate of the instruction in the IR, following
// the instruction set: ADDI 5-bit sign-extended; ORI, ANDI 5-bit
// zero-extended; LBI 8-bit sign-extended; LBIU 8-bit zero-extended; LHI the
// 8-bit immediate in the upper byte with the low byte cleared (the
// specification leaves clearing optional; this design clears);
// BEQZ, BNEZ, JALR 8-bit sign-extended; BC, BO, J 11-bit sign-extended.
// NOT also enables the immediate driver (its operand comes from the B side),
// so it gets the 5-bit zero-extended field, which the BFU then ignores.
// Field placement ([4:0], [7:0], [10:0]) is this design's choice. Combinational.
module imm_gen
  import cpu16_pkg::*;
(
  input  logic [10:0] ir_low,  // IR[10:0]
  input  dec_t        dec,
  output logic [15:0] imm
);

  always_comb begin
    unique case (1'b1)
      dec.addi:                      imm = {{11{ir_low[4]}}, ir_low[4:0]};
      dec.ori, dec.andi, dec.inv:    imm = {11'b0, ir_low[4:0]};
      dec.lbi, dec.beqz, dec.bnez,
      dec.jalr:                      imm = {{8{ir_low[7]}}, ir_low[7:0]};
      dec.lbiu:                      imm = {8'b0, ir_low[7:0]};
      dec.lhi:                       imm = {ir_low[7:0], 8'b0};
      dec.bc, dec.bo, dec.j:         imm = {{5{ir_low[10]}}, ir_low[10:0]};
      default:                       imm = '0;
    endcase
  end

endmodule
