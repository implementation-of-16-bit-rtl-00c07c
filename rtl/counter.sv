// counter: WIDTH-bit up-counter with synchronous load and count enable.
//
// On each rising clock edge: rst clears the count, otherwise load takes
// data_in, otherwise enab adds one (wrapping at 2**WIDTH), otherwise the
// count holds. The CPU uses it as the program counter (load = ld_pc,
// enab = inc_pc) and inside the phase generator. The load/count/idle
// behaviour follows the CPU's description; the priority order and the
// synchronous reset to zero are this design's choice.
module counter #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             enab,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] cnt_out
);

  always_ff @(posedge clk) begin
    if (rst)       cnt_out <= '0;
    else if (load) cnt_out <= data_in;
    else if (enab) cnt_out <= cnt_out + 1'b1;
  end

endmodule
