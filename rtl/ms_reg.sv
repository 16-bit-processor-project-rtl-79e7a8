// ms_reg: master-slave register clocked by a control line (PC and IR).
//
// The specification's PC and IR are master-slave registers whose clock is a
// PLA output: while the control line is 0 the master follows the D bus;
// when it goes to 1 the master holds and the slave (the output) shows it.
// Here the master and the slave are registers on the phase clock `clk`
// (one cycle per machine phase): the master takes `d` at the end of every
// phase with ctl = 0, the slave takes the master at the end of every phase
// with ctl = 1, and during a ctl = 1 phase the output already shows the
// master, as a transparent slave would. The output therefore changes at the
// start of the first ctl = 1 phase and holds the last D-bus value seen
// with ctl = 0. Master (m) and slave (sl) are also brought out so that
// logic which itself produces ctl can pick the value it needs without a
// combinational loop through q. No reset: the PC is loaded through the D bus by the reset
// phases, the IR by every fetch.
module ms_reg #(
  parameter int unsigned W = 16  // register width
) (
  input  logic         clk,  // phase clock
  input  logic         ctl,  // PC_Clk / IR_Clk
  input  logic [W-1:0] d,    // D bus
  output logic [W-1:0] q,
  output logic [W-1:0] m,    // master
  output logic [W-1:0] sl    // slave
);

  logic [W-1:0] master, slave;

  always_ff @(posedge clk) begin
    if (!ctl) master <= d;
    else      slave  <= master;
  end

  assign q = ctl ? master : slave;
  assign m  = master;
  assign sl = slave;

endmodule
