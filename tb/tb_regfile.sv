// tb_regfile: random reads and writes against an array model, covering the
// Rd_is_Rs1 and Rs1_is_Rs2 port steering and the zero flag of port A.
module tb_regfile;
  logic        clk = 0;
  logic [2:0]  rd, rs1, rs2;
  logic        rd_is_rs1, rs1_is_rs2, reg_write;
  logic [15:0] wdata, rega, regb;
  logic        reg_zero;

  regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] model [8];

  initial begin
    // Initialise every register (zero for some, to exercise reg_zero)
    reg_write = 1; rd_is_rs1 = 0; rs1_is_rs2 = 0; rs1 = 0; rs2 = 0;
    for (int i = 0; i < 8; i++) begin
      rd = 3'(i); wdata = (i % 3 == 0) ? 16'h0 : 16'($urandom);
      model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      rd = 3'($urandom); rs1 = 3'($urandom); rs2 = 3'($urandom);
      rd_is_rs1 = 1'($urandom); rs1_is_rs2 = 1'($urandom);
      reg_write = ($urandom_range(0, 3) == 0);
      wdata = ($urandom_range(0, 4) == 0) ? 16'h0 : 16'($urandom);
      #1;
      checks++;
      if (rega != model[rd_is_rs1 ? rd : rs1] || regb != model[rs1_is_rs2 ? rs1 : rs2] ||
          reg_zero != (model[rd_is_rs1 ? rd : rs1] == 0)) begin
        failures++;
        $display("FAIL n=%0d rega=%h regb=%h z=%b", n, rega, regb, reg_zero);
      end
      @(posedge clk);
      if (reg_write) model[rd] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
