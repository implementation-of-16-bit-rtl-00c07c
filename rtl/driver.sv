// driver: places the accumulator path on the CPU's shared data bus.
//
// The data bus has two sources: the memory's read data and the accumulator
// output, which is enabled onto the bus by data_e for STO. The
// CPU's diagram draws a tri-state buffer; here the bus is a select, so that
// no high-impedance value is needed: data is drv_in while data_e is high and
// mem_data otherwise. A concurrent assertion checks the bus rule that the
// memory is never read (mem_rd) while the driver is enabled. The data path
// is combinational; clk and rst serve only the assertion.
module driver #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             data_e,
  input  logic             mem_rd,
  input  logic [WIDTH-1:0] drv_in,
  input  logic [WIDTH-1:0] mem_data,
  output logic [WIDTH-1:0] data
);

  assign data = data_e ? drv_in : mem_data;

  a_one_driver : assert property (@(posedge clk) disable iff (rst) !(data_e && mem_rd))
    else $error("data bus: memory read while the driver is enabled");

endmodule
