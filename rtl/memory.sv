// memory: single-port 2**AWIDTH x DWIDTH memory holding program and data.
//
// Both accesses are synchronous to the rising clock edge: when wr is high
// mem[addr] takes data_in, and when rd is high data_out takes mem[addr] one
// clock later (read-before-write if both were high). data_out holds its value
// while rd is low. The array is not reset; a program is placed in it before
// the CPU leaves reset. The AWIDTH/DWIDTH parameters and the clocked
// operation follow the CPU's description; the 32-word default and the
// registered read are this design's choice.
module memory #(
  parameter int unsigned AWIDTH = 5,
  parameter int unsigned DWIDTH = 8
) (
  input  logic              clk,
  input  logic              rd,
  input  logic              wr,
  input  logic [AWIDTH-1:0] addr,
  input  logic [DWIDTH-1:0] data_in,
  output logic [DWIDTH-1:0] data_out
);

  logic [DWIDTH-1:0] array [2**AWIDTH];

  always_ff @(posedge clk) begin
    if (wr) array[addr] <= data_in;
    if (rd) data_out    <= array[addr];
  end

endmodule
