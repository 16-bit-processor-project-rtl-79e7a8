// instr_decode: individual instruction decode outside the control PLA.
//
// The control PLA only sees instruction classes; a few signals need the
// exact instruction: the immediate format (ADDI, ORI, ANDI, NOT, LBI, LBIU,
// LHI, branches, J, JALR), the branch condition to test (BEQZ, BNEZ, BC,
// BO) and the adder mode (SEQ, SGT, SLT, SUB). This list of decoded
// instructions is the specification's. The subtract/compare lines are
// qualified with S1 = 1 so that they only act in execute and writeback and
// never disturb the PC increment of fetch and decode, as the timing charts
// show for "SEQ||SGT||SLT||SUB".
//
// This design decodes each line from all five opcode bits (no don't-cares)
// and also produces the 4-entry truth table of the bitwise function unit
// (ALUBFU_3..0, entry index {a,b}): OR/ORI 1110, AND/ANDI 1000, XOR 0110,
// XNOR 1001, NOT 0101 (NOT b, the source register travels on the B side).
// The BFU code source is this design's choice. Combinational.
module instr_decode
  import cpu16_pkg::*;
(
  input  logic [4:0] opcode,  // OC_4..OC_0 from the IR
  input  logic       s1,      // state bit S1 (execute / writeback)
  output dec_t       dec
);

  opcode_e op;
  assign op = opcode_e'(opcode);

  always_comb begin
    dec      = '0;
    dec.addi = (op == OP_ADDI);
    dec.ori  = (op == OP_ORI);
    dec.andi = (op == OP_ANDI);
    dec.inv  = (op == OP_NOT);
    dec.lbi  = (op == OP_LBI);
    dec.lbiu = (op == OP_LBIU);
    dec.lhi  = (op == OP_LHI);
    dec.beqz = (op == OP_BEQZ);
    dec.bnez = (op == OP_BNEZ);
    dec.bc   = (op == OP_BC);
    dec.bo   = (op == OP_BO);
    dec.j    = (op == OP_J);
    dec.jalr = (op == OP_JALR);
    dec.seq  = s1 && (op == OP_SEQ);
    dec.sgt  = s1 && (op == OP_SGT);
    dec.slt  = s1 && (op == OP_SLT);
    dec.sub  = s1 && (op == OP_SUB);
    unique case (op)
      OP_OR,  OP_ORI:  dec.bfu = 4'b1110;
      OP_AND, OP_ANDI: dec.bfu = 4'b1000;
      OP_XOR:          dec.bfu = 4'b0110;
      OP_XNOR:         dec.bfu = 4'b1001;
      OP_NOT:          dec.bfu = 4'b0101;
      default:         dec.bfu = 4'b0000;
    endcase
  end

endmodule
