// tb_branch_cond: exhaustive check of the PC_Clk qualification over phase,
// the four conditional branches plus J, and the three condition flags.
module tb_branch_cond;
  import cpu16_pkg::*;

  logic [1:0] s;
  logic       clk_ph, pc_clk_pla, reg_zero, alu_carry, alu_overflow, pc_clk;
  dec_t       dec;

  branch_cond dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int ph = 0; ph < 8; ph++)
      for (int br = 0; br < 5; br++)
        for (int f = 0; f < 16; f++) begin
          logic e;
          {s, clk_ph} = 3'(ph);
          {pc_clk_pla, reg_zero, alu_carry, alu_overflow} = 4'(f);
          dec = '0;
          case (br)
            0: dec.beqz = 1;
            1: dec.bnez = 1;
            2: dec.bc   = 1;
            3: dec.bo   = 1;
            default: dec.j = 1;
          endcase
          #1;
          if (ph != 7) e = pc_clk_pla;
          else case (br)
            0: e = pc_clk_pla & reg_zero;
            1: e = pc_clk_pla & ~reg_zero;
            2: e = pc_clk_pla & alu_carry;
            3: e = pc_clk_pla & alu_overflow;
            default: e = pc_clk_pla;
          endcase
          checks++;
          if (pc_clk != e) begin
            failures++;
            $display("FAIL ph=%0d br=%0d flags=%04b: got %b", ph, br, f, pc_clk);
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
