// state_seq: clock phase and 2-bit state register of the controller.
//
// The machine runs on a two-phase clock "Clk"; one instruction takes four
// Clk periods (fetch, decode, execute, writeback), each split into a low
// and a high half, giving eight phases B C D E F G H J. The control PLA
// reads the state {S1,S0} (pads O_1,O_0) and the Clk level and produces the
// next state {I_1,I_0}. The state register is a master-slave stage that
// follows I while Clk is high and shows it when Clk falls, so I only
// matters in the high half of each period (as in the timing chart of the
// specification, where O changes at the falling edge of Clk).
//
// This implementation derives Clk from a single edge clock `clk` running at
// twice its rate: clk_ph toggles every `clk` cycle (one cycle = one phase),
// and the state takes {i1,i0} at the end of every cycle with clk_ph = 1.
// Holding RESET clears the state to 00 from any phase (a choice of this
// design; the PLA itself only honours RESET in state 00). clk_ph is
// free-running and is not reset, so the reset phases A_1/A_2 alternate
// while RESET is held.
module state_seq (
  input  logic       clk,     // phase clock, twice the machine Clk rate
  input  logic       reset,   // RESET pad, synchronous
  input  logic       i0,      // next state from the PLA (I_0)
  input  logic       i1,      // next state from the PLA (I_1)
  output logic       clk_ph,  // machine Clk level for this phase
  output logic [1:0] s        // {S1, S0} = {O_1, O_0}
);

  always_ff @(posedge clk) clk_ph <= ~clk_ph;

  always_ff @(posedge clk) begin
    if (reset)       s <= 2'b00;
    else if (clk_ph) s <= {i1, i0};
  end

endmodule
