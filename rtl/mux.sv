// mux: two-way WIDTH-bit multiplexer selecting the memory address.
//
// mux_out is in1 when sel is high and in0 otherwise. In the CPU in1 is the
// program-counter address and in0 the operand address from the instruction
// register, so sel high means "instruction address", as the controller's
// sel signal is defined. Purely combinational.
module mux #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic             sel,
  output logic [WIDTH-1:0] mux_out
);

  assign mux_out = sel ? in1 : in0;

endmodule
