// tb_instr_decode: exhaustive check of the individual decode (32 opcodes x
// S1) against expectations written from the instruction table by mnemonic.
module tb_instr_decode;
  import cpu16_pkg::*;

  logic [4:0] opcode;
  logic       s1;
  dec_t       dec;

  instr_decode dut (.*);

  int checks = 0, failures = 0;

  initial begin
    dec_t e;
    string m;
    opcode_e oe;
    for (int k = 0; k < 64; k++) begin
      {s1, opcode} = 6'(k);
      #1;
      e = '0;
      oe = opcode_e'(opcode);
      m = oe.name();
      e.addi = (m == "OP_ADDI"); e.ori  = (m == "OP_ORI");  e.andi = (m == "OP_ANDI");
      e.inv  = (m == "OP_NOT");  e.lbi  = (m == "OP_LBI");  e.lbiu = (m == "OP_LBIU");
      e.lhi  = (m == "OP_LHI");  e.beqz = (m == "OP_BEQZ"); e.bnez = (m == "OP_BNEZ");
      e.bc   = (m == "OP_BC");   e.bo   = (m == "OP_BO");   e.j    = (m == "OP_J");
      e.jalr = (m == "OP_JALR");
      e.seq  = s1 && (m == "OP_SEQ"); e.sgt = s1 && (m == "OP_SGT");
      e.slt  = s1 && (m == "OP_SLT"); e.sub = s1 && (m == "OP_SUB");
      // BFU table entry {a,b}: f(1,1) f(1,0) f(0,1) f(0,0)
      if (m == "OP_OR" || m == "OP_ORI")   e.bfu = {1'b1, 1'b1, 1'b1, 1'b0};
      if (m == "OP_AND" || m == "OP_ANDI") e.bfu = {1'b1, 1'b0, 1'b0, 1'b0};
      if (m == "OP_XOR")                   e.bfu = {1'b0, 1'b1, 1'b1, 1'b0};
      if (m == "OP_XNOR")                  e.bfu = {1'b1, 1'b0, 1'b0, 1'b1};
      if (m == "OP_NOT")                   e.bfu = {1'b0, 1'b1, 1'b0, 1'b1};
      checks++;
      if (dec != e) begin
        failures++;
        $display("FAIL s1=%b op=%05b (%s): got %b expected %b", s1, opcode, m, dec, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
