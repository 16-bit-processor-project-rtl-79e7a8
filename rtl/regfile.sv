// regfile: eight 16-bit general purpose registers, two read ports, one write.
//
// Read port A drives the A bus (RegA_enable) and is addressed by the Rs1
// field, or by the Rd field when Rd_is_Rs1 is set (BEQZ/BNEZ test the
// register named in the Rd position). Read port B drives the B bus
// (RegB_enable) and is addressed by the Rs2 field, or by the Rs1 field when
// Rs1_is_Rs2 is set (immediate instructions, whose A side carries the
// immediate). Reads are combinational. Reg_write enables the write decoder:
// register Rd takes the D bus at the end of the phase (phase clock `clk`).
// reg_zero (the controller's REG_zero input) flags a zero on port A.
// The steering signals and the register count are the specification's; the
// synchronous write at the end of the phase and all eight registers being
// writable (no hard-wired zero register) are this design's choices.
module regfile (
  input  logic        clk,
  input  logic [2:0]  rd,          // IR Rd field
  input  logic [2:0]  rs1,         // IR Rs1 field
  input  logic [2:0]  rs2,         // IR Rs2 field
  input  logic        rd_is_rs1,
  input  logic        rs1_is_rs2,
  input  logic        reg_write,
  input  logic [15:0] wdata,       // D bus
  output logic [15:0] rega,
  output logic [15:0] regb,
  output logic        reg_zero
);

  logic [15:0] regs [8];
  logic [2:0]  addr_a, addr_b;

  assign addr_a   = rd_is_rs1  ? rd  : rs1;
  assign addr_b   = rs1_is_rs2 ? rs1 : rs2;
  assign rega     = regs[addr_a];
  assign regb     = regs[addr_b];
  assign reg_zero = (rega == '0);

  always_ff @(posedge clk) begin
    if (reg_write) regs[rd] <= wdata;
  end

endmodule
