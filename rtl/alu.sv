// alu: combinational arithmetic/logic unit of the accumulator CPU.
//
// Eight operations selected by the 3-bit opcode act on the accumulator
// (in_a) and the data-bus word (in_b). ADD, AND and XOR combine the two,
// LDA passes the data word and the other four opcodes (HLT, SKZ, STO, JMP)
// pass the accumulator through, so that STO can drive the accumulator onto
// the bus through the ALU. The carry of ADD is dropped. zero is high when
// the accumulator is zero; the controller uses it for SKZ.
//
// The 8-bit width, the 3-bit opcode and the zero output follow the CPU's
// description; the operation assigned to each opcode is this design's choice.
// Purely combinational, no clock.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] in_a,
  input  logic [WIDTH-1:0] in_b,
  input  opcode_t          opcode,
  output logic [WIDTH-1:0] alu_out,
  output logic             zero
);

  always_comb begin
    unique case (opcode)
      ADD:     alu_out = in_a + in_b;
      AND:     alu_out = in_a & in_b;
      XOR:     alu_out = in_a ^ in_b;
      LDA:     alu_out = in_b;
      default: alu_out = in_a;  // HLT, SKZ, STO, JMP
    endcase
  end

  assign zero = (in_a == '0);

endmodule
