// tb_controller: exhaustive test of the controller decode.
//
// All 8 phases x 8 opcodes x 2 zero values are applied. The expected nine
// control signals are built per opcode class from the phase table: fetch
// phases, then the execute phases of ALU-type, SKZ, JMP, STO and HLT
// instructions.
module tb_controller;
  import risc_pkg::*;

  phase_t  phase;
  opcode_t opcode;
  logic    zero;
  logic    sel, rd, ld_ir, inc_pc, halt, ld_pc, data_e, ld_ac, wr;
  int      checks = 0, failures = 0;

  controller dut (.phase, .opcode, .zero, .sel, .rd, .ld_ir, .inc_pc, .halt, .ld_pc,
                  .data_e, .ld_ac, .wr);

  // Expected {sel, rd, ld_ir, inc_pc, halt, ld_pc, data_e, ld_ac, wr}.
  function automatic logic [8:0] expected(int ph, int op, logic z);
    logic [8:0] e = '0;
    bit aluop = (op == 2) || (op == 3) || (op == 4) || (op == 5);
    if (ph <= 3) begin
      e[8] = 1'b1;                  // sel
      e[7] = (ph >= 1);             // rd
      e[6] = (ph >= 2);             // ld_ir
    end else if (ph == 4) begin
      e[5] = (op != 0);             // inc_pc
      e[4] = (op == 0);             // halt
    end else begin
      e[7] = aluop;                               // rd in phases 5..7
      if (ph == 6) e[5] = (op == 1) && z;         // SKZ skip
      if (ph >= 6) e[3] = (op == 7);              // JMP
      if (ph >= 6) e[2] = (op == 6);              // STO drive
      if (ph == 7) e[1] = aluop;                  // ld_ac
      if (ph == 7) e[0] = (op == 6);              // wr
    end
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] got, exp;
    for (int ph = 0; ph < 8; ph++)
      for (int op = 0; op < 8; op++)
        for (int z = 0; z < 2; z++) begin
          phase = phase_t'(ph); opcode = opcode_t'(op); zero = z[0];
          #1;
          got = {sel, rd, ld_ir, inc_pc, halt, ld_pc, data_e, ld_ac, wr};
          exp = expected(ph, op, z[0]);
          checks++;
          if (got !== exp) begin
            failures++;
            $display("FAIL phase=%0d op=%0d zero=%0d got=%b exp=%b", ph, op, z, got, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
