// cpu16_pkg: types and constants shared by the 16-bit PLA-controlled processor.
//
// The opcode values and the order of the 24 control-PLA outputs follow the
// processor's specification; the packed layout of ctrl_t puts the first
// listed output (PC_Clk) in the most significant bit, so a 24-character
// control word written left to right maps directly onto the struct.
// Instruction fields (this design's placement; only the widths are given):
//   [15:11] opcode  [10:8] Rd  [7:5] Rs1  [4:2] Rs2  [1:0] shift amount
//   immediates: [4:0] (5-bit), [7:0] (8-bit), [10:0] (11-bit).
package cpu16_pkg;

  localparam int unsigned XLEN = 16;  // data and address width

  // Constant added to the PC by the "Adder & Constant" path during fetch.
  localparam logic [XLEN-1:0] PC_STEP = 16'd2;

  typedef enum logic [4:0] {
    OP_SEQ  = 5'b00000, OP_ADD  = 5'b00001, OP_SGT  = 5'b00010, OP_ADDI = 5'b00011,
    OP_SUB  = 5'b00100, OP_SLT  = 5'b00101, OP_UNU6 = 5'b00110, OP_OR   = 5'b00111,
    OP_ORI  = 5'b01000, OP_AND  = 5'b01001, OP_ANDI = 5'b01010, OP_XOR  = 5'b01011,
    OP_XNOR = 5'b01100, OP_NOT  = 5'b01101, OP_SRA  = 5'b01110, OP_SRL  = 5'b01111,
    OP_SLL  = 5'b10000, OP_SW   = 5'b10001, OP_MUL  = 5'b10010, OP_UNU19 = 5'b10011,
    OP_LW   = 5'b10100, OP_LBI  = 5'b10101, OP_LBIU = 5'b10110, OP_LHI  = 5'b10111,
    OP_BEQZ = 5'b11000, OP_BNEZ = 5'b11001, OP_BC   = 5'b11010, OP_BO   = 5'b11011,
    OP_NOP  = 5'b11100, OP_J    = 5'b11101, OP_JR   = 5'b11110, OP_JALR = 5'b11111
  } opcode_e;

  // The 24 outputs of the control PLA, in the specification's column order.
  typedef struct packed {
    logic pc_clk;        // PC master-slave clock (0: master follows D bus)
    logic ir_clk;        // IR master-slave clock (0: master follows D bus)
    logic alulatch_clk;  // ALU operand latches (1: transparent)
    logic aluoc_clk;     // ALU carry/overflow latch (1: transparent)
    logic addr_valid;    // memory address valid pad
    logic read_write;    // memory direction pad (0 read, 1 write)
    logic immed_en;      // immediate drives A bus
    logic rega_en;       // register read port A drives A bus
    logic pc_en;         // PC drives B bus
    logic regb_en;       // register read port B drives B bus
    logic mult_en;       // multiplier drives D bus
    logic destin_en;     // memory data-in latch drives D bus
    logic alu_en;        // ALU drives D bus
    logic alusel_bs;     // 0: BFU, 1: shifter
    logic alusel_bs_a;   // 0: BFU/shifter, 1: adder/constant
    logic alushift_la;   // 0: logic, 1: arithmetic
    logic alushift_lr;   // 0: left, 1: right
    logic alua_con;      // ALU A operand: 0 data bus, 1 constant
    logic rs1_is_rs2;    // read port B addressed by the Rs1 field
    logic rd_is_rs1;     // read port A addressed by the Rd field
    logic reg_write;     // enable register write decoder
    logic i0;            // next state, low bit
    logic i1;            // next state, high bit
    logic alushift_force;// force shift amount to 0
  } ctrl_t;

  // Machine phase names: {S1, S0, Clk}.
  typedef enum logic [2:0] {
    PH_B = 3'b000, PH_C = 3'b001, PH_D = 3'b010, PH_E = 3'b011,
    PH_F = 3'b100, PH_G = 3'b101, PH_H = 3'b110, PH_J = 3'b111
  } phase_e;

  // Individually decoded instructions used by the datapath outside the PLA.
  typedef struct packed {
    logic addi, ori, andi, inv, lbi, lbiu, lhi;  // immediate formats (inv = NOT)
    logic beqz, bnez, bc, bo, j, jalr;           // branch immediates and conditions
    logic seq, sgt, slt, sub;                    // adder subtract / set, execute+writeback only
    logic [3:0] bfu;                             // ALUBFU_3..0: BFU truth table, bit {a,b}
  } dec_t;

endpackage
