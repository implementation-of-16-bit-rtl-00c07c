// phase_generator: steps the CPU through the eight phases of an instruction.
//
// A 3-bit counter (instance counter_clk) counts INST_ADDR..STORE and wraps,
// one phase per clock. rst returns it to INST_ADDR. While enab is low the
// phase holds; the CPU drives enab with !halt, so after HLT the machine
// stays in OP_ADDR until reset. The block and its clk/rst/phase connections
// follow the CPU's block diagram; the enable input and the phase count are
// this design's choice.
module phase_generator
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   enab,
  output phase_t phase
);

  logic [PHWIDTH-1:0] cnt;

  counter #(.WIDTH(PHWIDTH)) counter_clk (
    .clk     (clk),
    .rst     (rst),
    .load    (1'b0),
    .enab    (enab),
    .data_in ('0),
    .cnt_out (cnt)
  );

  assign phase = phase_t'(cnt);

endmodule
