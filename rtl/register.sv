// register: WIDTH-bit register with synchronous load.
//
// On each rising clock edge the register takes data_in when load is high and
// holds its value otherwise. rst (synchronous, active high, priority over
// load) clears it. The CPU uses it as the accumulator (register_ac) and the
// instruction register (register_ir). The load behaviour follows the CPU's
// description; the reset value and its synchronous form are this design's
// choice. data_out changes one clock after load.
module register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  always_ff @(posedge clk) begin
    if (rst)       data_out <= '0;
    else if (load) data_out <= data_in;
  end

endmodule
