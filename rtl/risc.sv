// risc: multi-cycle accumulator CPU with an 8-bit word.
//
// One instruction is fetched and executed every eight clocks. The phase
// generator counts the phases; the controller turns phase, opcode and the
// ALU's zero flag into nine control signals. The multiplexer puts either the
// program-counter address (sel high, fetch) or the operand address from the
// instruction register on the memory address. Memory read data and the ALU
// accumulator share the data bus through the driver: the instruction register
// and the ALU read the bus, memory writes come from it. The accumulator loads the
// ALU result. HLT raises hlt and freezes the phase generator until rst.
//
// Instruction word: opcode [7:5], operand address [4:0] (risc_pkg). Program
// and data live in the same 32-word memory (instance memory_inst); there is
// no program-load port, the memory array is filled before reset is released.
// After rst the first instruction is fetched from address 0. A HLT after N
// executed instructions raises hlt 8*N+4 clocks after reset is released.
//
// The block structure, the control-signal names and the clk/rst/hlt ports
// follow the CPU's description and block diagram; the instruction set, the
// phase table and the memory timing are this design's choice. The driver is
// fed from the accumulator output ("enable accumulator output") rather than
// from the ALU output: for STO both carry the same value, and this keeps the
// bus free of a combinational loop through the ALU.
module risc
  import risc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  output logic hlt
);

  phase_t              phase;
  opcode_t             opcode;
  logic [AWIDTH-1:0]   ir_addr, pc_addr, addr;
  logic [DWIDTH-1:0]   ir_word, ac_out, alu_out, mem_out, data;
  logic                zero;
  logic                sel, rd, ld_ir, inc_pc, halt, ld_pc, data_e, ld_ac, wr;

  phase_generator phase_gen (
    .clk   (clk),
    .rst   (rst),
    .enab  (!halt),
    .phase (phase)
  );

  controller ctrl (
    .phase  (phase),
    .opcode (opcode),
    .zero   (zero),
    .sel    (sel),
    .rd     (rd),
    .ld_ir  (ld_ir),
    .inc_pc (inc_pc),
    .halt   (halt),
    .ld_pc  (ld_pc),
    .data_e (data_e),
    .ld_ac  (ld_ac),
    .wr     (wr)
  );

  register #(.WIDTH(DWIDTH)) register_ir (
    .clk      (clk),
    .rst      (rst),
    .load     (ld_ir),
    .data_in  (data),
    .data_out (ir_word)
  );

  assign opcode  = opcode_t'(ir_word[DWIDTH-1 -: OPWIDTH]);
  assign ir_addr = ir_word[AWIDTH-1:0];

  register #(.WIDTH(DWIDTH)) register_ac (
    .clk      (clk),
    .rst      (rst),
    .load     (ld_ac),
    .data_in  (alu_out),
    .data_out (ac_out)
  );

  alu #(.WIDTH(DWIDTH)) alu_inst (
    .in_a    (ac_out),
    .in_b    (data),
    .opcode  (opcode),
    .alu_out (alu_out),
    .zero    (zero)
  );

  counter #(.WIDTH(AWIDTH)) counter_pc (
    .clk     (clk),
    .rst     (rst),
    .load    (ld_pc),
    .enab    (inc_pc),
    .data_in (ir_addr),
    .cnt_out (pc_addr)
  );

  mux #(.WIDTH(AWIDTH)) mux_addr (
    .in0     (ir_addr),
    .in1     (pc_addr),
    .sel     (sel),
    .mux_out (addr)
  );

  driver #(.WIDTH(DWIDTH)) driver_ac (
    .clk      (clk),
    .rst      (rst),
    .data_e   (data_e),
    .mem_rd   (rd),
    .drv_in   (ac_out),
    .mem_data (mem_out),
    .data     (data)
  );

  memory #(.AWIDTH(AWIDTH), .DWIDTH(DWIDTH)) memory_inst (
    .clk      (clk),
    .rd       (rd),
    .wr       (wr),
    .addr     (addr),
    .data_in  (data),
    .data_out (mem_out)
  );

  assign hlt = halt;

endmodule
