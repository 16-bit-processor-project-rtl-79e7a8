// tb_state_seq: checks the phase toggle and the state register.
// clk_ph must alternate every cycle; the state must take {i1,i0} only at
// the end of a cycle with clk_ph = 1, hold across clk_ph = 0 cycles, and
// clear to 00 on reset. Random next-state values, compared with a
// cycle-by-cycle model.
module tb_state_seq;
  logic       clk = 0, reset = 1, i0 = 0, i1 = 0;
  logic       clk_ph;
  logic [1:0] s;

  state_seq dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [1:0] exp_s;
  logic       exp_ph;

  initial begin
    @(negedge clk);
    @(negedge clk);
    exp_s  = 2'b00;
    exp_ph = clk_ph;
    checks++; if (s != 2'b00) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 400; n++) begin
      reset = ($urandom_range(0, 19) == 0);
      {i1, i0} = 2'($urandom);
      @(posedge clk);
      if (reset)       exp_s = 2'b00;
      else if (exp_ph) exp_s = {i1, i0};
      exp_ph = ~exp_ph;
      @(negedge clk);
      checks++;
      if (s != exp_s || clk_ph != exp_ph) begin
        failures++;
        $display("FAIL cycle %0d: s=%b ph=%b expected s=%b ph=%b", n, s, clk_ph, exp_s, exp_ph);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
