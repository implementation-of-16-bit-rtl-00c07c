// tb_driver: self-checking test of the data-bus driver.
//
// Random words on both sources; with data_e high the bus must carry drv_in,
// with data_e low mem_data. mem_rd is only raised with data_e low, as the bus
// rule in the driver's assertion requires.
module tb_driver;
  localparam int unsigned W = 8;

  logic         clk = 0, rst, data_e, mem_rd;
  logic [W-1:0] drv_in, mem_data, data;
  int           checks = 0, failures = 0;

  driver #(.WIDTH(W)) dut (.clk, .rst, .data_e, .mem_rd, .drv_in, .mem_data, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; data_e = 0; mem_rd = 0; drv_in = '0; mem_data = '0;
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      data_e   = $urandom_range(0, 1);
      mem_rd   = data_e ? 1'b0 : 1'($urandom_range(0, 1));
      drv_in   = W'($urandom);
      mem_data = W'($urandom);
      if (i == 0) begin drv_in = '1; mem_data = '0; end
      #1;
      checks++;
      if (data !== (data_e ? drv_in : mem_data)) begin
        failures++;
        $display("FAIL data_e=%b drv=%h mem=%h bus=%h", data_e, drv_in, mem_data, data);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
