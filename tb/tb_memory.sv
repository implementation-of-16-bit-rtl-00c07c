// tb_memory: self-checking test of the synchronous memory.
//
// Every word is written, then read back (data valid one clock after rd), then
// 2000 random clocks of rd/wr/addr/data run against a shadow array. Also
// checks that data_out holds while rd is low.
module tb_memory;
  localparam int unsigned AW = 5, DW = 8;

  logic          clk = 0, rd, wr;
  logic [AW-1:0] addr;
  logic [DW-1:0] data_in, data_out, expect_out;
  logic [DW-1:0] model [2**AW];
  int            checks = 0, failures = 0;

  memory #(.AWIDTH(AW), .DWIDTH(DW)) dut (.clk, .rd, .wr, .addr, .data_in, .data_out);

  always #5 clk = ~clk;

  task automatic step(logic r, logic w, logic [AW-1:0] a, logic [DW-1:0] d);
    rd = r; wr = w; addr = a; data_in = d;
    @(posedge clk);
    if (r) expect_out = model[a];
    if (w) model[a] = d;
    @(negedge clk);
    checks++;
    if (data_out !== expect_out) begin
      failures++;
      $display("FAIL rd=%b wr=%b a=%0d: out=%h exp=%h", r, w, a, data_out, expect_out);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rd = 0; wr = 1;
    for (int i = 0; i < 2**AW; i++) begin
      addr = AW'(i); data_in = DW'($urandom); model[i] = data_in;
      @(negedge clk);
    end
    wr = 0; rd = 1; addr = '0;
    @(negedge clk);
    expect_out = model[0];
    for (int i = 0; i < 2**AW; i++) step(1, 0, AW'(i), '0);
    step(0, 0, 5'd3, '0);  // holds
    for (int i = 0; i < 2000; i++)
      step($urandom_range(0, 1), $urandom_range(0, 1), AW'($urandom), DW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
