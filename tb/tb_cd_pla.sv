// tb_cd_pla: exhaustive check of the control PLA against the unminimised
// product-term listing of the specification (one cube per opcode and phase,
// "S1 S0 Clk RESET OC4..OC0" -> 24 outputs, '-' = don't care). The expected
// output for each of the 512 input combinations is the OR of the words of
// all matching cubes; inputs no cube matches must give all zeros.
// Also checks, for every defined opcode, that the next-state bits walk
// B C D E F G H J (SW: back to B after G) and that each bus has at most one
// driver in every phase.
module tb_cd_pla;
  import cpu16_pkg::*;

  logic [1:0] s;
  logic       clk_ph, reset;
  logic [4:0] opcode;
  ctrl_t      ctrl;

  cd_pla dut (.*);

  localparam int NCUBES = 153;
  localparam string CUBES [NCUBES] = '{
    "0001----- 000000011001000000000000",
    "0011----- 100000011001000000000000",
    "0000----- 001010011001001001000000",
    "0010----- 001010011001001001000100",
    "010------ 000000011001001001000100",
    "011-00000 010000010100101000000010",
    "011-00001 010000010100101000000010",
    "011-00010 010000010100101000000010",
    "011-00100 010000010100101000000010",
    "011-00101 010000010100101000000010",
    "011-00111 010000010100101000000010",
    "011-01001 010000010100101000000010",
    "011-01011 010000010100101000000010",
    "011-01100 010000010100101000000010",
    "011-10001 010000010100101000000010",
    "011-10010 010000010100101000000010",
    "011-10100 010000010100101000000010",
    "011-11100 010000010100101000000010",
    "011-11110 010000010100101000000010",
    "011-01110 010000010100101000000010",
    "011-01111 010000010100101000000010",
    "011-10000 010000010100101000000010",
    "011-00011 010000100100101000100010",
    "011-01000 010000100100101000100010",
    "011-01010 010000100100101000100010",
    "011-01101 010000100100101000100010",
    "011-10101 010000100100101000100010",
    "011-10110 010000100100101000100010",
    "011-10111 010000100100101000100010",
    "011-11000 010000101000101000010010",
    "011-11001 010000101000101000010010",
    "011-11010 010000101000101000010010",
    "011-11011 010000101000101000010010",
    "011-11101 010000101000101000010010",
    "011-11111 010000101000101000011010",
    "100-00000 101000010100100000000010",
    "100-00010 101000010100100000000010",
    "100-00101 101000010100100000000010",
    "100-00001 101000010100100000000010",
    "100-00100 101000010100100000000010",
    "100-00111 101000010100100000000010",
    "100-01001 101000010100100000000010",
    "100-01011 101000010100100000000010",
    "100-01100 101000010100100000000010",
    "100-10001 100011010100100000000010",
    "100-10100 100010010101000000000010",
    "100-10010 100000010110000000000010",
    "100-11100 101000010100110000000011",
    "100-11110 101000010100110000000011",
    "100-01110 101000010100110110000010",
    "100-01111 101000010100110010000010",
    "100-00011 101000100100100000100010",
    "100-01000 101000100100100000100010",
    "100-01010 101000100100100000100010",
    "100-01101 101000100100100000100010",
    "100-10101 101000100100110000000011",
    "100-10110 101000100100110000000011",
    "100-10111 101000100100110000000011",
    "100-11000 101000101000101000010010",
    "100-11001 101000101000101000010010",
    "100-11010 101000101000101000010010",
    "100-11011 101000101000101000010010",
    "100-11101 101000101000101000010010",
    "100-11111 101000101000101000010010",
    "100-10000 101000010100110000000010",
    "101-00000 000000010100101000000110",
    "101-00010 000000010100101000000110",
    "101-00101 000000010100101000000110",
    "101-00001 000000010100101000000110",
    "101-00100 000000010100101000000110",
    "101-00011 000000010100101000000110",
    "101-00111 000000010100100000000110",
    "101-01001 000000010100100000000110",
    "101-01011 000000010100100000000110",
    "101-01100 000000010100100000000110",
    "101-01000 000000010100100000000110",
    "101-01010 000000010100100000000110",
    "101-01101 000000010100100000000110",
    "101-10001 000011010100100000000000",
    "101-10100 000010010101000000000110",
    "101-10010 000000010110000000000110",
    "101-11100 000000010100110000000111",
    "101-11110 000000010100110000000111",
    "101-10101 000000010100110000000111",
    "101-10110 000000010100110000000111",
    "101-10111 000000010100110000000111",
    "101-01110 000000010100110110000110",
    "101-01111 000000010100110010000110",
    "101-11000 000000010100101000010110",
    "101-11001 000000010100101000010110",
    "101-11010 000000010100101000010110",
    "101-11011 000000010100101000010110",
    "101-11101 000000010100101000010110",
    "101-11111 000000010100101000010110",
    "101-10000 000000010100110000000110",
    "110-00000 000000010100101000000110",
    "110-00010 000000010100101000000110",
    "110-00101 000000010100101000000110",
    "110-00001 000100010100101000000110",
    "110-00100 000100010100101000000110",
    "110-00011 000100010100101000000110",
    "110-00111 000000010100100000000110",
    "110-01001 000000010100100000000110",
    "110-01011 000000010100100000000110",
    "110-01100 000000010100100000000110",
    "110-01000 000000010100100000000110",
    "110-01010 000000010100100000000110",
    "110-01101 000000010100100000000110",
    "110-10100 000010010101000000000110",
    "110-10010 000000010110000000000110",
    "110-11100 000000010100110000000111",
    "110-11110 000000010100110000000111",
    "110-10101 000000010100110000000111",
    "110-10110 000000010100110000000111",
    "110-10111 000000010100110000000111",
    "110-01110 000000010100110110000110",
    "110-01111 000000010100110010000110",
    "110-11000 000000010100101000010110",
    "110-11001 000000010100101000010110",
    "110-11010 000000010100101000010110",
    "110-11011 000000010100101000010110",
    "110-11101 000000010100101000010110",
    "110-11111 000000010100101000010110",
    "110-10000 000000010100110000000110",
    "111-00000 000000010100101000001000",
    "111-00010 000000010100101000001000",
    "111-00101 000000010100101000001000",
    "111-00001 000000010100101000001000",
    "111-00100 000000010100101000001000",
    "111-00011 000000010100101000001000",
    "111-00111 000000010100100000001000",
    "111-01001 000000010100100000001000",
    "111-01011 000000010100100000001000",
    "111-01100 000000010100100000001000",
    "111-01000 000000010100100000001000",
    "111-01010 000000010100100000001000",
    "111-01101 000000010100100000001000",
    "111-10100 000010010101000000001000",
    "111-10010 000000010110000000001000",
    "111-11100 000000010100110000000001",
    "111-11110 100000010100110000000001",
    "111-10101 000000010100110000001001",
    "111-10110 000000010100110000001001",
    "111-10111 000000010100110000001001",
    "111-01110 000000010100110110001000",
    "111-01111 000000010100110010001000",
    "111-11000 100000010100101000010000",
    "111-11001 100000010100101000010000",
    "111-11010 100000010100101000010000",
    "111-11011 100000010100101000010000",
    "111-10000 000000010100110000001000",
    "111-11101 100000010100101000000000",
    "111-11111 100000010100101000000000"  };

  int checks = 0, failures = 0;

  function automatic bit cube_match(input string c, input logic [8:0] v);
    for (int i = 0; i < 9; i++) begin
      if (c[i] == "1" && !v[8-i]) return 0;
      if (c[i] == "0" &&  v[8-i]) return 0;
    end
    return 1;
  endfunction

  function automatic logic [23:0] cube_word(input string c);
    logic [23:0] w = '0;
    for (int i = 0; i < 24; i++) w[23-i] = (c[10+i] == "1");
    return w;
  endfunction

  initial begin
    logic [23:0] exp_w;
    logic [8:0]  v;
    for (int k = 0; k < 512; k++) begin
      v = 9'(k);
      {s, clk_ph, reset, opcode} = v;
      exp_w = '0;
      foreach (CUBES[c]) if (cube_match(CUBES[c], v)) exp_w |= cube_word(CUBES[c]);
      #1;
      checks++;
      if (ctrl != exp_w) begin
        failures++;
        $display("FAIL in=%09b got %024b expected %024b", v, ctrl, exp_w);
      end
      checks++;
      if (!$onehot0({ctrl.rega_en, ctrl.immed_en}) || !$onehot0({ctrl.regb_en, ctrl.pc_en}) ||
          !$onehot0({ctrl.alu_en, ctrl.mult_en, ctrl.destin_en})) begin
        failures++;
        $display("FAIL bus conflict in=%09b", v);
      end
    end
    // Next-state walk for every defined opcode (RESET low)
    reset = 0;
    for (int op = 0; op < 32; op++) begin
      logic [1:0] st;
      int ph;
      if (op == 6 || op == 19) continue;
      opcode = 5'(op);
      st = 2'b00;
      ph = 0;
      for (int p = 0; p < 8; p++) begin
        s = st; clk_ph = 1'b0; #1;
        s = st; clk_ph = 1'b1; #1;
        ph += 2;
        st = {ctrl.i1, ctrl.i0};
        if (st == 2'b00) break;
      end
      checks++;
      if (ph != ((op == 17) ? 6 : 8)) begin
        failures++;
        $display("FAIL opcode %05b took %0d phases", op, ph);
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
