// tb_risc: end-to-end test of the CPU against an instruction-level model.
//
// Each run fills the 32-word memory with a program and data, resets the CPU
// and lets it run until hlt. A reference interpreter of the instruction set
// executes the same memory image; after the run the testbench compares
//   - the clock count at which hlt rises: 8 clocks per executed instruction
//     plus 4 for the HLT itself (8*N+4 after reset is released),
//   - the accumulator, the program counter (left on the HLT word) and all 32
//     memory words.
// Run 0 is a directed program using every instruction, with the SKZ skip
// both taken and not taken; runs 1..NRUNS-1 are random memory images whose
// model run halts within 200 instructions. The testbench counts how often the
// CPU's mechanisms happen (each opcode executed, skip taken, skip not taken,
// jump, store, halt) and counts a failure for any that never happened.
// The CPU is used with its default parameters.
module tb_risc;
  import risc_pkg::*;

  localparam int NRUNS   = 60;
  localparam int MWORDS  = 2**AWIDTH;
  localparam int MAXINST = 200;

  logic clk = 0, rst, hlt;
  int   checks = 0, failures = 0;

  risc dut (.clk, .rst, .hlt);

  always #5 clk = ~clk;

  logic [DWIDTH-1:0] image [MWORDS];
  logic [DWIDTH-1:0] m_mem [MWORDS];
  logic [DWIDTH-1:0] m_acc;
  logic [AWIDTH-1:0] m_pc;
  int                m_steps;

  // Mechanism counters, sampled from the CPU's own control signals.
  int n_op [8];
  int n_skip_taken, n_skip_not_taken, n_jump, n_store, n_halt;
  logic hlt_q;

  function automatic logic [DWIDTH-1:0] ins(opcode_t op, int a);
    return {op, AWIDTH'(a)};
  endfunction

  // Reference interpreter; returns 1 if the program halts within MAXINST.
  function automatic bit run_model();
    logic [DWIDTH-1:0] w;
    logic [AWIDTH-1:0] a;
    foreach (image[i]) m_mem[i] = image[i];
    m_acc = '0; m_pc = '0; m_steps = 0;
    while (m_steps <= MAXINST) begin
      w = m_mem[m_pc];
      a = w[AWIDTH-1:0];
      case (opcode_t'(w[DWIDTH-1 -: OPWIDTH]))
        HLT: return 1'b1;
        SKZ: m_pc = m_pc + ((m_acc == 0) ? 2 : 1);
        ADD: begin m_acc = m_acc + m_mem[a]; m_pc++; end
        AND: begin m_acc = m_acc & m_mem[a]; m_pc++; end
        XOR: begin m_acc = m_acc ^ m_mem[a]; m_pc++; end
        LDA: begin m_acc = m_mem[a];         m_pc++; end
        STO: begin m_mem[a] = m_acc;         m_pc++; end
        JMP: m_pc = a;
      endcase
      m_steps++;
    end
    return 1'b0;
  endfunction

  task automatic directed_image(logic [DWIDTH-1:0] d0, d1, d2, d3);
    foreach (image[i]) image[i] = '0;
    image[0]  = ins(LDA, 24);  // acc = d0
    image[1]  = ins(ADD, 25);  // acc += d1
    image[2]  = ins(STO, 28);
    image[3]  = ins(AND, 26);  // acc &= d2
    image[4]  = ins(XOR, 27);  // acc ^= d3
    image[5]  = ins(SKZ, 0);   // skips image[6] when acc == 0
    image[6]  = ins(STO, 29);
    image[7]  = ins(LDA, 30);  // acc = 0
    image[8]  = ins(SKZ, 0);   // always skips
    image[9]  = ins(HLT, 0);
    image[10] = ins(JMP, 12);
    image[11] = ins(HLT, 0);
    image[12] = ins(LDA, 28);
    image[13] = ins(SKZ, 0);   // not taken unless d0+d1 == 0
    image[14] = ins(STO, 31);
    image[15] = ins(HLT, 0);
    image[24] = d0; image[25] = d1; image[26] = d2; image[27] = d3;
    image[30] = '0;
  endtask

  task automatic random_image();
    for (int i = 0; i < MWORDS; i++) begin
      // keep HLT rarer than the other opcodes so that programs run a while
      int op = $urandom_range(0, 15);
      image[i] = ins(opcode_t'(op < 2 ? 0 : (op % 7) + 1), $urandom_range(0, MWORDS - 1));
      if ($urandom_range(0, 3) == 0) image[i] = DWIDTH'($urandom);
    end
  endtask

  task automatic run_cpu(int run);
    int cycles, expect_cycles;
    foreach (image[i]) dut.memory_inst.array[i] = image[i];
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    cycles = 0;
    expect_cycles = 8 * m_steps + 4;
    while (!hlt && cycles < 8 * (MAXINST + 2)) begin
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("FAIL run %0d: hlt after %0d clocks, expected %0d", run, cycles, expect_cycles);
    end
    checks++;
    if (dut.ac_out !== m_acc || dut.pc_addr !== m_pc) begin
      failures++;
      $display("FAIL run %0d: acc=%h pc=%0d, expected acc=%h pc=%0d", run, dut.ac_out,
               dut.pc_addr, m_acc, m_pc);
    end
    for (int i = 0; i < MWORDS; i++) begin
      checks++;
      if (dut.memory_inst.array[i] !== m_mem[i]) begin
        failures++;
        $display("FAIL run %0d: mem[%0d]=%h, expected %h", run, i, dut.memory_inst.array[i],
                 m_mem[i]);
      end
    end
    // the machine stays halted
    repeat (10) @(negedge clk);
    checks++;
    if (!hlt || dut.pc_addr !== m_pc) begin
      failures++;
      $display("FAIL run %0d: did not stay halted", run);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (dut.phase == ALU_OP) begin
      n_op[dut.opcode]++;
      if (dut.opcode == SKZ) begin
        if (dut.inc_pc) n_skip_taken++;
        else            n_skip_not_taken++;
      end
      if (dut.ld_pc) n_jump++;
    end
    if (dut.wr) n_store++;
    if (hlt && !hlt_q) n_halt++;
  end

  always @(posedge clk) hlt_q <= rst ? 1'b0 : hlt;

  initial begin
    repeat (NRUNS * 8 * (MAXINST + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DWIDTH-1:0] d0, d1, d2;
    foreach (n_op[i]) n_op[i] = 0;
    n_skip_taken = 0; n_skip_not_taken = 0; n_jump = 0; n_store = 0; n_halt = 0;
    rst = 1'b1;
    for (int run = 0; run < NRUNS; run++) begin
      if (run < 4) begin
        d0 = DWIDTH'($urandom); d1 = DWIDTH'($urandom); d2 = DWIDTH'($urandom);
        // runs 0 and 2 make the first SKZ skip; runs 1 and 3 make it fall through
        directed_image(d0, d1, d2, (run % 2 == 0) ? ((d0 + d1) & d2) : ~((d0 + d1) & d2));
        void'(run_model());
      end else begin
        do random_image(); while (!run_model() || m_steps < 3);
      end
      run_cpu(run);
    end
    $display("executed: HLT %0d SKZ %0d ADD %0d AND %0d XOR %0d LDA %0d STO %0d JMP %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("skip taken %0d, skip not taken %0d, jumps %0d, stores %0d, halts %0d",
             n_skip_taken, n_skip_not_taken, n_jump, n_store, n_halt);
    for (int i = 1; i < 8; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL opcode %0d never executed", i); end
    end
    checks++;
    if (n_skip_taken == 0 || n_skip_not_taken == 0 || n_jump == 0 || n_store == 0 ||
        n_halt != NRUNS) begin
      failures++;
      $display("FAIL a mechanism did not happen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
