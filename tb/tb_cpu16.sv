// tb_cpu16: end-to-end test of the processor against an instruction-level
// reference model.
//
// Memory (64 KiB, 16-bit words) is filled with random instructions of every
// defined opcode. The processor runs from reset; at the start of every fetch
// phase the testbench compares PC, all eight registers and the carry and
// overflow flags with the reference model, then lets the model execute the
// instruction at PC, and checks the number of phase-clock cycles the
// processor took for it (8, 6 for SW, and 4 per refetch of an undefined
// opcode, on which the machine does not advance). Within each instruction
// it checks that the IR holds the fetched word from the start of decode and
// the PC holds PC+2 from the start of execute. At the end of each run the
// whole memory is compared with the model's. A second run resets the machine
// from the middle of execution and runs a short directed program (a
// countdown loop, an overflowing add and BO, an untaken BC, JALR) that ends
// on an undefined opcode.
// Events counted and required at least once: every opcode, taken and
// untaken BEQZ/BNEZ/BC/BO, the short SW sequence, the undefined-opcode
// stall, and reset.
module tb_cpu16;
  import cpu16_pkg::*;

  localparam int unsigned N_RANDOM = 30000;  // instructions in run 1

  logic        clk = 1'b0, reset = 1'b1;
  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic        addr_valid, read_write;

  cpu16 dut (.*);

  always #5 clk = ~clk;

  // External memory
  logic [15:0] mem [32768];
  assign mem_rdata = mem[mem_addr[15:1]];
  always_ff @(posedge clk) if (addr_valid && read_write) mem[mem_addr[15:1]] <= mem_wdata;

  // Reference model state
  logic [15:0] mmem [32768];
  logic [15:0] r [8];
  logic [15:0] pc;
  logic        fc, fv;

  int checks = 0, failures = 0;
  int op_count [32];
  int taken [4], untaken [4];
  int short_sw = 0, stalls = 0, resets = 0;
  int cycles = 0;
  int visits [32768];
  int loop_breaks = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [15:0] sx(input logic [15:0] v, input int bits);
    logic [15:0] m = 16'hFFFF << bits;
    return v[bits-1] ? (v | m) : (v & ~m);
  endfunction

  function automatic bit defined_op(input logic [4:0] op);
    return op != 5'b00110 && op != 5'b10011;
  endfunction

  // Execute one instruction in the model; returns expected cycle count.
  function automatic int step();
    logic [15:0] w, a, b, res, npc;
    logic [4:0]  op;
    logic [2:0]  rd, rs1, rs2;
    logic [16:0] s17;
    logic        cond;
    int          cyc = 8;
    w = mmem[pc[15:1]];
    op = w[15:11]; rd = w[10:8]; rs1 = w[7:5]; rs2 = w[4:2];
    npc = pc + 16'd2;
    op_count[op]++;
    case (op)
      5'b00000: r[rd] = {15'b0, r[rs1] == r[rs2]};                          // SEQ
      5'b00010: r[rd] = {15'b0, $signed(r[rs1]) >  $signed(r[rs2])};        // SGT
      5'b00101: r[rd] = {15'b0, $signed(r[rs1]) <  $signed(r[rs2])};        // SLT
      5'b00001, 5'b00100, 5'b00011: begin                                   // ADD SUB ADDI
        if (op == 5'b00011) begin a = sx({11'b0, w[4:0]}, 5); b = r[rs1]; end
        else begin a = r[rs1]; b = (op == 5'b00100) ? ~r[rs2] : r[rs2]; end
        s17 = {1'b0, a} + {1'b0, b} + {16'b0, op == 5'b00100};
        res = s17[15:0];
        fc = s17[16];
        fv = (a[15] == b[15]) && (res[15] != a[15]);
        r[rd] = res;
      end
      5'b00111: r[rd] = r[rs1] | r[rs2];
      5'b01000: r[rd] = r[rs1] | {11'b0, w[4:0]};
      5'b01001: r[rd] = r[rs1] & r[rs2];
      5'b01010: r[rd] = r[rs1] & {11'b0, w[4:0]};
      5'b01011: r[rd] = r[rs1] ^ r[rs2];
      5'b01100: r[rd] = ~(r[rs1] ^ r[rs2]);
      5'b01101: r[rd] = ~r[rs1];
      5'b01110: r[rd] = 16'($signed(r[rs1]) >>> w[1:0]);
      5'b01111: r[rd] = r[rs1] >> w[1:0];
      5'b10000: r[rd] = r[rs1] << w[1:0];
      5'b10001: begin mmem[r[rs2][15:1]] = r[rs1]; cyc = 6; short_sw++; end  // SW
      5'b10010: r[rd] = {8'b0, r[rs1][7:0]} * {8'b0, r[rs2][7:0]};          // MUL
      5'b10100: r[rd] = mmem[r[rs2][15:1]];                                  // LW
      5'b10101: r[rd] = sx({8'b0, w[7:0]}, 8);                              // LBI
      5'b10110: r[rd] = {8'b0, w[7:0]};                                      // LBIU
      5'b10111: r[rd] = {w[7:0], 8'b0};                                      // LHI
      5'b11000, 5'b11001, 5'b11010, 5'b11011: begin
        case (op[1:0])
          2'd0: cond = (r[rd] == 0);
          2'd1: cond = (r[rd] != 0);
          2'd2: cond = fc;
          default: cond = fv;
        endcase
        if (cond) taken[op[1:0]]++; else untaken[op[1:0]]++;
        if (cond) npc = npc + (op[1] ? sx({5'b0, w[10:0]}, 11) : sx({8'b0, w[7:0]}, 8));
      end
      5'b11100: ;                                                            // NOP
      5'b11101: npc = npc + sx({5'b0, w[10:0]}, 11);                         // J
      5'b11110: npc = r[rs1];                                                // JR
      5'b11111: begin r[rd] = npc; npc = npc + sx({8'b0, w[7:0]}, 8); end   // JALR
      default: begin npc = pc; cyc = 4; stalls++; end                        // undefined
    endcase
    pc = npc;
    return cyc;
  endfunction

  task automatic fill_random();
    logic [15:0] w;
    for (int i = 0; i < 32768; i++) begin
      do w = 16'($urandom); while (!defined_op(w[15:11]));
      // Forward-only branch and jump offsets, so that random code cannot
      // spin in a loop whose condition never changes (run 2 goes backwards).
      if (w[15:11] inside {5'b11000, 5'b11001, 5'b11111}) w[7] = 1'b0;
      if (w[15:11] inside {5'b11010, 5'b11011, 5'b11101}) w[10] = 1'b0;
      mem[i] = w;
      mmem[i] = w;
    end
  endtask

  // Reset for a few cycles, releasing it so that the next phase is fetch B.
  task automatic do_reset();
    @(posedge clk) reset <= 1'b1;
    repeat (6) @(posedge clk);
    while (dut.clk_ph !== 1'b0) @(posedge clk);  // now in a phase-1 cycle next
    @(negedge clk);
    @(posedge clk) reset <= 1'b0;
    resets++;
    pc = 16'd0;
  endtask

  // Run n instructions in lockstep with the model.
  task automatic run(input int n, input bit copy_state, input bit break_loops);
    int expect_cyc = 0;
    logic [15:0] fetch_pc, fetch_w;
    int got = 0;
    bit first = 1;
    cycles = 0;
    while (got <= n) begin
      @(negedge clk);
      cycles++;
      if ({dut.s, dut.clk_ph} == 3'b000 && !reset && (first || cycles > 1)) begin
        if (first && copy_state) begin
          for (int i = 0; i < 8; i++) r[i] = dut.u_rf.regs[i];
          fc = dut.u_alu.c_q;
          fv = dut.u_alu.v_q;
        end
        if (!first) check(cycles - 1 == expect_cyc,
                          $sformatf("cycle count %0d, expected %0d", cycles - 1, expect_cyc));
        check(dut.pc == pc, $sformatf("pc %h, expected %h", dut.pc, pc));
        for (int i = 0; i < 8; i++)
          check(dut.u_rf.regs[i] == r[i],
                $sformatf("r%0d %h, expected %h (pc %h)", i, dut.u_rf.regs[i], r[i], pc));
        check(dut.u_alu.c_q == fc && dut.u_alu.v_q == fv, "carry/overflow flags");
        first = 0;
        cycles = 1;
        // Break loops of random code: a word fetched too often is replaced
        // (in both memories, before the processor fetches it) by a random
        // register-setting LBI.
        if (break_loops && ++visits[pc[15:1]] > 8) begin
          visits[pc[15:1]] = 0;
          mem[pc[15:1]]  = {5'b10101, 11'($urandom)};
          mmem[pc[15:1]] = mem[pc[15:1]];
          loop_breaks++;
        end
        fetch_pc = pc;
        fetch_w  = mmem[pc[15:1]];
        expect_cyc = step();
        got++;
      end
      // Within the instruction: the IR shows the fetched word from the start
      // of decode (phase E), and the PC holds PC+2 from the start of execute
      // (phase F), i.e. by the end of the second Clk period.
      if (!reset && !first && {dut.s, dut.clk_ph} == 3'b011 && defined_op(fetch_w[15:11]))
        check(dut.ir == fetch_w, $sformatf("IR %h in decode, expected %h", dut.ir, fetch_w));
      if (!reset && !first && {dut.s, dut.clk_ph} == 3'b100)
        check(dut.pc == fetch_pc + 16'd2, $sformatf("PC %h in execute, expected %h", dut.pc, fetch_pc + 16'd2));
    end
    for (int i = 0; i < 32768; i++)
      if (mem[i] != mmem[i]) check(0, $sformatf("memory word %0d", i));
    checks++;
  endtask

  initial begin
    // Run 1: random program from power-up reset
    fill_random();
    do_reset();
    run(N_RANDOM, 1'b1, 1'b1);
    // Run 2: reset from the middle of execution, then hit an undefined opcode
    // 0: LBI r1,3   2: ADDI r1,r1,-1   4: BNEZ r1,-4 (loop)   6: LHI r4,7Fh
    // 8: ADD r5,r4,r4 (overflow)   10: BO +2   12: LBI r3 (skipped)
    // 14: BC +0 (not taken)   16: JALR r2,+2   18: (skipped)   20: undefined
    mem[0]  = {5'b10101, 3'd1, 8'd3};
    mem[1]  = {5'b00011, 3'd1, 3'd1, 5'b11111};
    mem[2]  = {5'b11001, 3'd1, 8'hFC};
    mem[3]  = {5'b10111, 3'd4, 8'h7F};
    mem[4]  = {5'b00001, 3'd5, 3'd4, 3'd4, 2'b00};
    mem[5]  = {5'b11011, 11'd2};
    mem[6]  = {5'b10101, 3'd3, 8'h55};
    mem[7]  = {5'b11010, 11'd0};
    mem[8]  = {5'b11111, 3'd2, 8'h02};
    mem[9]  = {5'b10101, 3'd3, 8'h66};
    mem[10] = {5'b10011, 11'h155};
    for (int i = 0; i < 11; i++) mmem[i] = mem[i];
    do_reset();
    run(20, 1'b1, 1'b0);
    check(dut.pc == 16'd20 && dut.u_rf.regs[2] == 16'd18 && dut.u_rf.regs[1] == 16'd0 &&
          dut.u_rf.regs[5] == 16'hFE00, "directed program: loop, overflow branch, link, stall");

    for (int k = 0; k < 32; k++)
      if (defined_op(5'(k)) && op_count[k] == 0) check(0, $sformatf("opcode %05b never ran", k));
    for (int k = 0; k < 4; k++) begin
      check(taken[k] > 0,   $sformatf("branch %0d never taken", k));
      check(untaken[k] > 0, $sformatf("branch %0d never untaken", k));
    end
    check(short_sw > 0, "no SW");
    check(stalls > 0, "no undefined-opcode stall");
    check(resets == 2, "resets");
    $display("loop breaks=%0d", loop_breaks);
    $display("events: SW=%0d stalls=%0d resets=%0d BEQZ t/u=%0d/%0d BNEZ %0d/%0d BC %0d/%0d BO %0d/%0d",
             short_sw, stalls, resets, taken[0], untaken[0], taken[1], untaken[1],
             taken[2], untaken[2], taken[3], untaken[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (N_RANDOM * 8 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
