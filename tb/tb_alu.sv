// tb_alu: random operands through the ALU's latch protocol. Each trial
// opens the operand latches for one phase (checking the transparent path),
// closes them and scrambles the buses (checking that the latched operands
// are used), then walks the output select through adder, compares, BFU
// functions and shifts, and opens the flag latch for one phase, checking
// carry and overflow after it closes. Expected values use integer
// arithmetic in the testbench.
module tb_alu;
  import cpu16_pkg::*;

  logic        clk = 0;
  logic        latch_clk, oc_clk, sel_bs, sel_bs_a, shift_la, shift_lr, shift_force, a_con;
  logic [1:0]  shamt;
  dec_t        dec;
  logic [15:0] abus, bbus, y;
  logic        carry, overflow;

  alu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_y(input logic [15:0] e, input string what);
    #1;
    checks++;
    if (y != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s: y=%h expected %h", what, y, e);
    end
  endtask

  function automatic logic [15:0] bitf(input logic [3:0] tt, input logic [15:0] a, input logic [15:0] b);
    logic [15:0] r;
    for (int i = 0; i < 16; i++) r[i] = tt[{a[i], b[i]}];
    return r;
  endfunction

  initial begin
    logic [15:0] a, b;
    int sa, sb, s;
    {latch_clk, oc_clk, sel_bs, sel_bs_a, shift_la, shift_lr, shift_force, a_con} = '0;
    shamt = 0; dec = '0; abus = 0; bbus = 0;
    for (int n = 0; n < 500; n++) begin
      a = (n % 7 == 0) ? 16'h7FFF : 16'($urandom);
      b = (n % 5 == 0) ? a : ((n % 11 == 0) ? 16'h8000 : 16'($urandom));
      // Open the latches; constant on A in some trials
      @(negedge clk);
      latch_clk = 1; oc_clk = 0; a_con = (n % 4 == 0);
      abus = a; bbus = b; dec = '0; sel_bs_a = 1; sel_bs = 0;
      if (a_con) a = PC_STEP;
      expect_y(a + b, "transparent add");
      @(negedge clk);
      latch_clk = 0; a_con = 0; abus = 16'($urandom); bbus = 16'($urandom);
      expect_y(a + b, "latched add");
      // Subtract and compares
      sa = int'($signed(a)); sb = int'($signed(b));
      dec.sub = 1; expect_y(a - b, "sub"); dec.sub = 0;
      dec.seq = 1; expect_y({15'b0, a == b}, "seq"); dec.seq = 0;
      dec.slt = 1; expect_y({15'b0, sa < sb}, "slt"); dec.slt = 0;
      dec.sgt = 1; expect_y({15'b0, sa > sb}, "sgt"); dec.sgt = 0;
      // BFU
      sel_bs_a = 0; sel_bs = 0;
      for (int t = 0; t < 16; t++) begin
        dec.bfu = 4'(t);
        expect_y(bitf(4'(t), a, b), "bfu");
      end
      dec.bfu = 0;
      // Shifter
      sel_bs = 1;
      for (int k = 0; k < 4; k++) begin
        shamt = 2'(k);
        shift_force = 0;
        shift_lr = 0; shift_la = 0; expect_y(a << k, "sll");
        shift_lr = 1; shift_la = 0; expect_y(a >> k, "srl");
        shift_lr = 1; shift_la = 1; expect_y(16'(sa >>> k), "sra");
        shift_force = 1; expect_y(a, "forced zero shift");
      end
      // Flags: open the flag latch for one phase with add or subtract
      sel_bs_a = 1; sel_bs = 0;
      dec.sub = (n % 2 == 1);
      @(negedge clk);
      oc_clk = 1;
      @(negedge clk);
      oc_clk = 0; dec.sub = 0;
      abus = 16'($urandom); bbus = 16'($urandom);
      #1;
      if (n % 2 == 1) begin
        s = sa - sb;
        checks++;
        if (carry != (int'(a) + int'(~b & 16'hFFFF) + 1 > 65535) || overflow != (s > 32767 || s < -32768)) begin
          failures++; $display("FAIL sub flags a=%h b=%h c=%b v=%b", a, b, carry, overflow);
        end
      end else begin
        s = sa + sb;
        checks++;
        if (carry != (int'(a) + int'(b) > 65535) || overflow != (s > 32767 || s < -32768)) begin
          failures++; $display("FAIL add flags a=%h b=%h c=%b v=%b", a, b, carry, overflow);
        end
      end
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
