// alu: arithmetic/logic unit with its operand latches and flag latch.
//
// Structure, as named by the control lines of the specification:
//   - two transparent operand latches (ALULatch_Clk = 1: transparent), the A
//     latch fed by the A bus or by the PC increment constant (ALUA_con), the
//     B latch by the B bus. The constant select sits in front of the latch,
//     so once closed the latch keeps the constant whatever ALUA_con does.
//   - an adder ("Adder & Constant"), subtracting for SUB/SEQ/SGT/SLT and
//     returning 0/1 for the three compares (signed two's complement);
//   - a bitwise function unit (BFU) applying a 4-entry truth table
//     (ALUBFU, entry index {a,b}) to every bit pair;
//   - a shifter on the A operand: left or right (ALUShift_lr), logical or
//     arithmetic (ALUShift_la), by IR[1:0] or by 0 (ALUShift_force);
//   - the output select: ALUSel_bs_a picks the adder, else ALUSel_bs picks
//     shifter (1) or BFU (0);
//   - a carry/overflow latch (ALUOC_Clk) feeding BC and BO. Its output is
//     the value held at the end of the open phase: the flags are only read
//     after it closes, and not passing them through while open keeps the
//     flag path out of a combinational loop with PC_Clk.
// The latches are modelled on the phase clock `clk` (one cycle per machine
// phase): while open, the output follows the input combinationally; the
// value at the end of the last open phase is held. The constant (2), the
// compare semantics and where the shift amount and BFU table come from are
// this design's choices.
module alu
  import cpu16_pkg::*;
(
  input  logic        clk,
  input  logic        latch_clk,    // ALULatch_Clk
  input  logic        oc_clk,       // ALUOC_Clk
  input  logic        sel_bs,       // ALUSel_bs
  input  logic        sel_bs_a,     // ALUSel_bs_a
  input  logic        shift_la,     // ALUShift_la
  input  logic        shift_lr,     // ALUShift_lr
  input  logic        shift_force,  // ALUShift_force
  input  logic        a_con,        // ALUA_con
  input  logic [1:0]  shamt,        // IR[1:0]
  input  dec_t        dec,          // sub/seq/sgt/slt and BFU table
  input  logic [15:0] abus,
  input  logic [15:0] bbus,
  output logic [15:0] y,
  output logic        carry,        // ALU_carry (latched)
  output logic        overflow      // ALU_overflow (latched)
);

  // Operand latches
  logic [15:0] a_in, a_q, b_q, a, b;
  assign a_in = a_con ? PC_STEP : abus;

  always_ff @(posedge clk) begin
    if (latch_clk) begin
      a_q <= a_in;
      b_q <= bbus;
    end
  end

  assign a = latch_clk ? a_in : a_q;
  assign b = latch_clk ? bbus : b_q;

  // Adder
  logic        do_sub, c_new, v_new, lt, eq;
  logic [15:0] b_eff, sum, add_y;

  assign do_sub       = dec.sub | dec.seq | dec.sgt | dec.slt;
  assign b_eff        = do_sub ? ~b : b;
  assign {c_new, sum} = 17'(a) + 17'(b_eff) + 17'(do_sub);
  assign v_new        = (a[15] == b_eff[15]) && (sum[15] != a[15]);
  assign lt           = sum[15] ^ v_new;
  assign eq           = (sum == '0);

  always_comb begin
    if      (dec.seq) add_y = {15'b0, eq};
    else if (dec.slt) add_y = {15'b0, lt};
    else if (dec.sgt) add_y = {15'b0, !lt && !eq};
    else              add_y = sum;
  end

  // Bitwise function unit
  logic [15:0] bfu_y;
  always_comb begin
    for (int i = 0; i < 16; i++) bfu_y[i] = dec.bfu[{a[i], b[i]}];
  end

  // Shifter
  logic [1:0]  amt;
  logic [15:0] sh_y;
  assign amt = shift_force ? 2'd0 : shamt;
  always_comb begin
    if (!shift_lr)     sh_y = a << amt;
    else if (shift_la) sh_y = 16'($signed(a) >>> amt);
    else               sh_y = a >> amt;
  end

  assign y = sel_bs_a ? add_y : (sel_bs ? sh_y : bfu_y);

  // Carry / overflow latch
  logic c_q, v_q;
  always_ff @(posedge clk) begin
    if (oc_clk) begin
      c_q <= c_new;
      v_q <= v_new;
    end
  end
  assign carry    = c_q;
  assign overflow = v_q;

endmodule
