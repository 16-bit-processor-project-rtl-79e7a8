// cpu16: 16-bit multi-cycle processor controlled by a PLA.
//
// Every instruction is one 16-bit word: a 5-bit opcode, 3-bit register
// fields and short immediates. Execution takes four periods of the machine
// clock Clk (fetch, decode, execute, writeback), each split into a low and
// a high half, eight phases B C D E F G H J; SW ends after G. A control PLA
// (cd_pla) turns {state, Clk level, RESET, opcode} into 24 control lines
// that open latches, clock the PC and IR, and choose which unit drives each
// of the three internal buses:
//   A bus ("data"):    register read port A or the immediate generator;
//                      feeds the ALU A latch, the multiplier, memory write data
//   B bus ("address"): register read port B or the PC; feeds the ALU B
//                      latch, the multiplier and the memory address
//   D bus (result):    ALU, multiplier or the memory data-in latch (DestIn);
//                      feeds the PC, the IR and the register write port.
// In fetch the PC addresses memory while the ALU adds the constant 2 to it;
// the instruction arrives through DestIn and is clocked into the IR at the
// start of decode, and the incremented PC, held by the ALU latches, is
// clocked into the PC at the start of execute. Branches add the immediate
// to that incremented PC in execute and clock the target into the PC in
// writeback, where branch_cond drops PC_Clk for an untaken conditional
// branch.
//
// The buses are tri-state in the specification; here each is a multiplexer
// of its enabled drivers, and an assertion checks that at most one driver
// of a bus is enabled. The single clock `clk` runs at twice the machine
// Clk rate, one cycle per phase; an instruction takes 8 cycles (SW 6).
// Reset: hold `reset` for at least two cycles; the PLA's reset phases load
// the PC from the DestIn latch, which reset clears, so execution starts at
// address 0. Memory is external: combinational read of mem_rdata at
// mem_addr while addr_valid && !read_write; a write of mem_wdata to
// mem_addr at the end of each cycle with addr_valid && read_write.
// Addresses are byte addresses; words are 2-byte aligned.
module cpu16
  import cpu16_pkg::*;
(
  input  logic        clk,         // phase clock (2x machine Clk)
  input  logic        reset,       // RESET
  output logic [15:0] mem_addr,    // address pads (B bus)
  output logic [15:0] mem_wdata,   // data out pads (A bus)
  input  logic [15:0] mem_rdata,   // data in pads
  output logic        addr_valid,  // Addr_valid pad
  output logic        read_write   // Read_write pad: 0 read, 1 write
);

  ctrl_t       ctrl;
  dec_t        dec;
  logic [1:0]  s;
  logic        clk_ph, pc_clk;
  logic [15:0] ir, ir_m, ir_s, pc, rega, regb, imm, alu_y, mul_p, destin;
  logic [15:0] abus, bbus, dbus;
  logic        reg_zero, alu_carry, alu_overflow;

  // ---------------- controller ----------------
  // The opcode seen by the PLA and the decoder. IR_Clk is 1 only in phase E
  // (for every defined opcode), where the IR shows its master, and 0
  // elsewhere, where it shows its slave. Selecting by phase rather than by
  // IR_Clk keeps IR_Clk from depending on itself through the IR output.
  logic [4:0] opcode;
  assign opcode = ({s, clk_ph} == PH_E) ? ir_m[15:11] : ir_s[15:11];

  state_seq u_state (
    .clk, .reset, .i0(ctrl.i0), .i1(ctrl.i1), .clk_ph, .s
  );

  cd_pla u_pla (
    .s, .clk_ph, .reset, .opcode, .ctrl
  );

  instr_decode u_dec (
    .opcode, .s1(s[1]), .dec
  );

  branch_cond u_br (
    .s, .clk_ph, .pc_clk_pla(ctrl.pc_clk), .dec, .reg_zero,
    .alu_carry, .alu_overflow, .pc_clk
  );

  // ---------------- datapath ----------------
  ms_reg #(.W(16)) u_pc (.clk, .ctl(pc_clk),      .d(dbus), .q(pc), .m(), .sl());
  ms_reg #(.W(16)) u_ir (.clk, .ctl(ctrl.ir_clk), .d(dbus), .q(ir), .m(ir_m), .sl(ir_s));

  regfile u_rf (
    .clk, .rd(ir[10:8]), .rs1(ir[7:5]), .rs2(ir[4:2]),
    .rd_is_rs1(ctrl.rd_is_rs1), .rs1_is_rs2(ctrl.rs1_is_rs2),
    .reg_write(ctrl.reg_write), .wdata(dbus), .rega, .regb, .reg_zero
  );

  imm_gen u_imm (.ir_low(ir[10:0]), .dec, .imm);

  alu u_alu (
    .clk, .latch_clk(ctrl.alulatch_clk), .oc_clk(ctrl.aluoc_clk),
    .sel_bs(ctrl.alusel_bs), .sel_bs_a(ctrl.alusel_bs_a),
    .shift_la(ctrl.alushift_la), .shift_lr(ctrl.alushift_lr),
    .shift_force(ctrl.alushift_force), .a_con(ctrl.alua_con),
    .shamt(ir[1:0]), .dec, .abus, .bbus, .y(alu_y),
    .carry(alu_carry), .overflow(alu_overflow)
  );

  multiplier u_mul (.a(abus[7:0]), .b(bbus[7:0]), .p(mul_p));

  // DestIn: memory data-in latch, transparent during a memory read.
  logic        mem_read;
  logic [15:0] destin_q;
  assign mem_read = ctrl.addr_valid && !ctrl.read_write;
  always_ff @(posedge clk) begin
    if (reset)         destin_q <= '0;
    else if (mem_read) destin_q <= mem_rdata;
  end
  assign destin = mem_read ? mem_rdata : destin_q;

  // Buses: one driver each, by the PLA's enables.
  assign abus = ({16{ctrl.rega_en}}   & rega)  | ({16{ctrl.immed_en}} & imm);
  assign bbus = ({16{ctrl.regb_en}}   & regb)  | ({16{ctrl.pc_en}}    & pc);
  assign dbus = ({16{ctrl.alu_en}}    & alu_y) | ({16{ctrl.mult_en}}  & mul_p) |
                ({16{ctrl.destin_en}} & destin);

  assign mem_addr   = bbus;
  assign mem_wdata  = abus;
  assign addr_valid = ctrl.addr_valid;
  assign read_write = ctrl.read_write;

  a_bus_one_driver: assert property (@(posedge clk) disable iff (reset)
    $onehot0({ctrl.rega_en, ctrl.immed_en}));
  b_bus_one_driver: assert property (@(posedge clk) disable iff (reset)
    $onehot0({ctrl.regb_en, ctrl.pc_en}));
  d_bus_one_driver: assert property (@(posedge clk) disable iff (reset)
    $onehot0({ctrl.alu_en, ctrl.mult_en, ctrl.destin_en}));

endmodule
