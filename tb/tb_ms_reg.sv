// tb_ms_reg: random control-line and data sequences against a model of a
// master-slave register: the output shows the last D value seen with
// ctl = 0 from the start of each ctl = 1 phase, and holds it while ctl = 0.
module tb_ms_reg;
  logic        clk = 0, ctl = 0;
  logic [15:0] d = 0, q, m, sl;

  ms_reg #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] last_d, shown;

  initial begin
    // Prime: one ctl=0 phase then one ctl=1 phase
    d = 16'h1234; ctl = 0; @(posedge clk);
    last_d = d;
    #1 ctl = 1; d = 16'hFFFF; #1;
    shown = last_d;
    checks++; if (q != shown) begin failures++; $display("FAIL prime"); end
    @(posedge clk);
    for (int n = 0; n < 1000; n++) begin
      #1;
      ctl = ($urandom_range(0, 2) == 0);
      d   = 16'($urandom);
      #1;
      if (ctl) shown = last_d;
      checks++;
      if (q != shown) begin
        failures++;
        $display("FAIL n=%0d ctl=%b q=%h expected %h", n, ctl, q, shown);
      end
      @(posedge clk);
      if (!ctl) last_d = d;
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
