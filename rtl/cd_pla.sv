// cd_pla: control PLA of the 16-bit processor.
//
// A two-level AND-OR array. Each product term matches one machine phase
// {S1, S0, Clk}, optionally the RESET input, and a set of opcodes (an
// instruction class); the OR plane adds the term's 24-bit control word to
// the outputs. The terms are the specification's phase/instruction-class
// table (phases A_1..J_15), and every control word is the specification's
// own. Rows J_10..J_13 (conditional branches) assert PC_Clk unconditionally
// here; the branch condition is applied outside the PLA (branch_cond).
// Phases A (RESET=1) and B/C (RESET=0) are the only ones that look at RESET.
// Unused opcodes (00110, 10011) match no term after phase D, so all outputs,
// including the next-state bits, fall to zero and the machine returns to
// fetch: they execute as a short no-operation.
//
// Purely combinational: outputs settle within the phase they belong to.
// Inputs  : s (state S1,S0), clk_ph (the Clk phase level), reset, opcode.
// Outputs : ctrl, the 24 control lines in the specification's order.
module cd_pla
  import cpu16_pkg::*;
(
  input  logic [1:0] s,       // {S1, S0} = {O_1, O_0}
  input  logic       clk_ph,  // Clk phase: 0 first half, 1 second half
  input  logic       reset,   // RESET pad
  input  logic [4:0] opcode,  // OC_4..OC_0
  output ctrl_t      ctrl
);

  typedef struct packed {
    logic [2:0]  phase;  // {S1, S0, Clk}
    logic [1:0]  rst;    // {care, value}
    logic [31:0] ops;    // bit k set: opcode k is in the term's class
    logic [23:0] word;   // control word, PC_Clk first
  } pla_term_t;

  localparam int unsigned NTERMS = 52;

  localparam pla_term_t TERMS [NTERMS] = '{
    '{3'b000, 2'b11, 32'hffffffff, 24'b000000011001000000000000}, // A_1: ALL
    '{3'b001, 2'b11, 32'hffffffff, 24'b100000011001000000000000}, // A_2: ALL
    '{3'b000, 2'b10, 32'hffffffff, 24'b001010011001001001000000}, // B: ALL
    '{3'b001, 2'b10, 32'hffffffff, 24'b001010011001001001000100}, // C: ALL
    '{3'b010, 2'b00, 32'hffffffff, 24'b000000011001001001000100}, // D: ALL
    '{3'b011, 2'b00, 32'h5017dab7, 24'b010000010100101000000010}, // E_1: SEQ ADD SGT SUB SLT OR AND XOR XNOR SW MUL LW NOP JR SRA SRL SLL
    '{3'b011, 2'b00, 32'h00e02508, 24'b010000100100101000100010}, // E_2: ADDI ORI ANDI NOT LBI LBIU LHI
    '{3'b011, 2'b00, 32'h2f000000, 24'b010000101000101000010010}, // E_3: BEQZ BNEZ BC BO J
    '{3'b011, 2'b00, 32'h80000000, 24'b010000101000101000011010}, // E_4: JALR
    '{3'b100, 2'b00, 32'h00001ab7, 24'b101000010100100000000010}, // F_1: SEQ SGT SLT ADD SUB OR AND XOR XNOR
    '{3'b100, 2'b00, 32'h00020000, 24'b100011010100100000000010}, // F_2: SW
    '{3'b100, 2'b00, 32'h00100000, 24'b100010010101000000000010}, // F_3: LW
    '{3'b100, 2'b00, 32'h00040000, 24'b100000010110000000000010}, // F_4: MUL
    '{3'b100, 2'b00, 32'h50000000, 24'b101000010100110000000011}, // F_5: NOP JR
    '{3'b100, 2'b00, 32'h00004000, 24'b101000010100110110000010}, // F_6: SRA
    '{3'b100, 2'b00, 32'h00008000, 24'b101000010100110010000010}, // F_7: SRL
    '{3'b100, 2'b00, 32'h00002508, 24'b101000100100100000100010}, // F_8: ADDI ORI ANDI NOT
    '{3'b100, 2'b00, 32'h00e00000, 24'b101000100100110000000011}, // F_9: LBI LBIU LHI
    '{3'b100, 2'b00, 32'haf000000, 24'b101000101000101000010010}, // F_10: BEQZ BNEZ BC BO J JALR
    '{3'b100, 2'b00, 32'h00010000, 24'b101000010100110000000010}, // F_11: SLL
    '{3'b101, 2'b00, 32'h0000003f, 24'b000000010100101000000110}, // G_1: SEQ SGT SLT ADD SUB ADDI
    '{3'b101, 2'b00, 32'h00003f80, 24'b000000010100100000000110}, // G_2: OR AND XOR XNOR ORI ANDI NOT
    '{3'b101, 2'b00, 32'h00020000, 24'b000011010100100000000000}, // G_3: SW
    '{3'b101, 2'b00, 32'h00100000, 24'b000010010101000000000110}, // G_4: LW
    '{3'b101, 2'b00, 32'h00040000, 24'b000000010110000000000110}, // G_5: MUL
    '{3'b101, 2'b00, 32'h50e00000, 24'b000000010100110000000111}, // G_6: NOP JR LBI LBIU LHI
    '{3'b101, 2'b00, 32'h00004000, 24'b000000010100110110000110}, // G_7: SRA
    '{3'b101, 2'b00, 32'h00008000, 24'b000000010100110010000110}, // G_8: SRL
    '{3'b101, 2'b00, 32'haf000000, 24'b000000010100101000010110}, // G_9: BEQZ BNEZ BC BO J JALR
    '{3'b101, 2'b00, 32'h00010000, 24'b000000010100110000000110}, // G_10: SLL
    '{3'b110, 2'b00, 32'h00000025, 24'b000000010100101000000110}, // H_1: SEQ SGT SLT
    '{3'b110, 2'b00, 32'h0000001a, 24'b000100010100101000000110}, // H_2: ADD SUB ADDI
    '{3'b110, 2'b00, 32'h00003f80, 24'b000000010100100000000110}, // H_3: OR AND XOR XNOR ORI ANDI NOT
    '{3'b110, 2'b00, 32'h00100000, 24'b000010010101000000000110}, // H_4: LW
    '{3'b110, 2'b00, 32'h00040000, 24'b000000010110000000000110}, // H_5: MUL
    '{3'b110, 2'b00, 32'h50e00000, 24'b000000010100110000000111}, // H_6: NOP JR LBI LBIU LHI
    '{3'b110, 2'b00, 32'h00004000, 24'b000000010100110110000110}, // H_7: SRA
    '{3'b110, 2'b00, 32'h00008000, 24'b000000010100110010000110}, // H_8: SRL
    '{3'b110, 2'b00, 32'haf000000, 24'b000000010100101000010110}, // H_9: BEQZ BNEZ BC BO J JALR
    '{3'b110, 2'b00, 32'h00010000, 24'b000000010100110000000110}, // H_10: SLL
    '{3'b111, 2'b00, 32'h0000003f, 24'b000000010100101000001000}, // J_1: SEQ SGT SLT ADD SUB ADDI
    '{3'b111, 2'b00, 32'h00003f80, 24'b000000010100100000001000}, // J_2: OR AND XOR XNOR ORI ANDI NOT
    '{3'b111, 2'b00, 32'h00100000, 24'b000010010101000000001000}, // J_3: LW
    '{3'b111, 2'b00, 32'h00040000, 24'b000000010110000000001000}, // J_4: MUL
    '{3'b111, 2'b00, 32'h10000000, 24'b000000010100110000000001}, // J_5: NOP
    '{3'b111, 2'b00, 32'h40000000, 24'b100000010100110000000001}, // J_6: JR
    '{3'b111, 2'b00, 32'h00e00000, 24'b000000010100110000001001}, // J_7: LBI LBIU LHI
    '{3'b111, 2'b00, 32'h00004000, 24'b000000010100110110001000}, // J_8: SRA
    '{3'b111, 2'b00, 32'h00008000, 24'b000000010100110010001000}, // J_9: SRL
    '{3'b111, 2'b00, 32'h0f000000, 24'b100000010100101000010000}, // J_10_13: BEQZ BNEZ BC BO
    '{3'b111, 2'b00, 32'h00010000, 24'b000000010100110000001000}, // J_14: SLL
    '{3'b111, 2'b00, 32'ha0000000, 24'b100000010100101000000000}  // J_15: J JALR
  };

  logic [2:0]  phase;
  logic [23:0] or_plane;

  assign phase = {s, clk_ph};

  always_comb begin
    or_plane = '0;
    for (int unsigned t = 0; t < NTERMS; t++) begin
      if (TERMS[t].phase == phase &&
          (!TERMS[t].rst[1] || TERMS[t].rst[0] == reset) &&
          TERMS[t].ops[opcode])
        or_plane |= TERMS[t].word;
    end
  end

  assign ctrl = ctrl_t'(or_plane);

endmodule
