// tb_counter: self-checking test of the load/count counter.
//
// Directed: reset, 2**WIDTH increments wrap back to zero, load beats enab.
// Then 1000 random clocks of rst/load/enab against a shadow model.
module tb_counter;
  localparam int unsigned W = 5;

  logic         clk = 0, rst, load, enab;
  logic [W-1:0] data_in, cnt_out, model;
  int           checks = 0, failures = 0;

  counter #(.WIDTH(W)) dut (.clk, .rst, .load, .enab, .data_in, .cnt_out);

  always #5 clk = ~clk;

  task automatic step(logic r, logic l, logic e, logic [W-1:0] d);
    rst = r; load = l; enab = e; data_in = d;
    @(posedge clk);
    if (r) model = '0;
    else if (l) model = d;
    else if (e) model = model + 1'b1;
    @(negedge clk);
    checks++;
    if (cnt_out !== model) begin
      failures++;
      $display("FAIL rst=%b load=%b enab=%b d=%h: out=%h exp=%h", r, l, e, d, cnt_out, model);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    @(negedge clk);
    step(1, 0, 0, '0);
    for (int i = 0; i < 2**W; i++) step(0, 0, 1, '0);
    checks++;
    if (cnt_out !== '0) begin failures++; $display("FAIL no wrap after 2**W counts"); end
    step(0, 1, 1, W'(19));
    step(0, 0, 0, W'(3));
    for (int i = 0; i < 1000; i++)
      step($urandom_range(0, 29) == 0, $urandom_range(0, 3) == 0, $urandom_range(0, 1),
           W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
