// tb_register: self-checking test of the load register.
//
// Random load and data for 1000 clocks with occasional resets; a shadow
// value updated on the same clock edges predicts data_out one clock later.
module tb_register;
  localparam int unsigned W = 8;

  logic         clk = 0, rst, load;
  logic [W-1:0] data_in, data_out, model;
  int           checks = 0, failures = 0;

  register #(.WIDTH(W)) dut (.clk, .rst, .load, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; data_in = '0; model = '0;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      rst     = ($urandom_range(0, 49) == 0);
      load    = $urandom_range(0, 1);
      data_in = W'($urandom);
      @(posedge clk);
      if (rst) model = '0;
      else if (load) model = data_in;
      @(negedge clk);
      checks++;
      if (data_out !== model) begin
        failures++;
        $display("FAIL cycle %0d: out=%h exp=%h", i, data_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
