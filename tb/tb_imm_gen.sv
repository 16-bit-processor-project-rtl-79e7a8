// tb_imm_gen: every opcode with random low instruction bits; the expected
// immediate is built from the instruction table's wording for each format.
module tb_imm_gen;
  import cpu16_pkg::*;

  logic [10:0] ir_low;
  logic [15:0] imm;
  logic [4:0]  opcode;
  dec_t        dec;

  instr_decode u_dec (.opcode, .s1(1'b0), .dec);
  imm_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    logic [15:0] e;
    for (int n = 0; n < 3200; n++) begin
      opcode = 5'(n % 32);
      ir_low = 11'($urandom);
      #1;
      case (opcode)
        5'b00011:                   e = 16'($signed(ir_low[4:0]));   // ADDI
        5'b01000, 5'b01010, 5'b01101: e = 16'(ir_low[4:0]);          // ORI ANDI NOT
        5'b10101, 5'b11000, 5'b11001, 5'b11111: e = 16'($signed(ir_low[7:0]));
        5'b10110:                   e = 16'(ir_low[7:0]);             // LBIU
        5'b10111:                   e = {ir_low[7:0], 8'h00};         // LHI
        5'b11010, 5'b11011, 5'b11101: e = 16'($signed(ir_low));      // BC BO J
        default:                    e = 16'h0000;
      endcase
      checks++;
      if (imm != e) begin
        failures++;
        $display("FAIL op=%05b low=%h imm=%h expected %h", opcode, ir_low, imm, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
