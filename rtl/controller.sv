// controller: decodes phase, opcode and the zero flag into the CPU's nine
// control signals.
//
// Every instruction runs through the same eight phases (risc_pkg::phase_t).
// Phases INST_ADDR..IDLE fetch: the PC address is selected (sel), memory is
// read from INST_FETCH on and the instruction register loads in INST_LOAD and
// IDLE. In OP_ADDR the operand address is selected and the PC increments, or
// halt is raised for HLT (the PC then stays on the HLT word). In OP_FETCH,
// ALU_OP and STORE the memory is read for ADD/AND/XOR/LDA and the accumulator
// loads at the end of STORE. SKZ increments the PC a second time in ALU_OP
// when the accumulator is zero; JMP loads the PC in ALU_OP and STORE; STO
// drives the accumulator onto the bus in ALU_OP and STORE and writes memory
// in STORE.
//
// The signal names and their meaning follow the CPU's description; the
// phase-by-phase table is this design's choice. Purely combinational.
module controller
  import risc_pkg::*;
(
  input  phase_t  phase,
  input  opcode_t opcode,
  input  logic    zero,
  output logic    sel,
  output logic    rd,
  output logic    ld_ir,
  output logic    inc_pc,
  output logic    halt,
  output logic    ld_pc,
  output logic    data_e,
  output logic    ld_ac,
  output logic    wr
);

  logic alu_op, is_hlt, is_skz, is_jmp, is_sto;

  always_comb begin
    alu_op = is_alu_op(opcode);
    is_hlt = (opcode == HLT);
    is_skz = (opcode == SKZ);
    is_jmp = (opcode == JMP);
    is_sto = (opcode == STO);

    sel    = 1'b0;
    rd     = 1'b0;
    ld_ir  = 1'b0;
    inc_pc = 1'b0;
    halt   = 1'b0;
    ld_pc  = 1'b0;
    data_e = 1'b0;
    ld_ac  = 1'b0;
    wr     = 1'b0;

    unique case (phase)
      INST_ADDR: begin
        sel = 1'b1;
      end
      INST_FETCH: begin
        sel = 1'b1;
        rd  = 1'b1;
      end
      INST_LOAD, IDLE: begin
        sel   = 1'b1;
        rd    = 1'b1;
        ld_ir = 1'b1;
      end
      OP_ADDR: begin
        inc_pc = !is_hlt;
        halt   = is_hlt;
      end
      OP_FETCH: begin
        rd = alu_op;
      end
      ALU_OP: begin
        rd     = alu_op;
        inc_pc = is_skz && zero;
        ld_pc  = is_jmp;
        data_e = is_sto;
      end
      STORE: begin
        rd     = alu_op;
        ld_ac  = alu_op;
        ld_pc  = is_jmp;
        data_e = is_sto;
        wr     = is_sto;
      end
      default: ;
    endcase
  end

endmodule
