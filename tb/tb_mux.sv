// tb_mux: self-checking test of the address multiplexer.
//
// 500 random input pairs with both select values; sel high must give in1
// (instruction address), sel low in0 (operand address).
module tb_mux;
  localparam int unsigned W = 5;

  logic [W-1:0] in0, in1, mux_out;
  logic         sel;
  int           checks = 0, failures = 0;

  mux #(.WIDTH(W)) dut (.in0, .in1, .sel, .mux_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      in0 = W'($urandom); in1 = W'($urandom);
      if (i < 2) begin in0 = '0; in1 = '1; end
      for (int s = 0; s < 2; s++) begin
        sel = s[0];
        #1;
        checks++;
        if (mux_out !== (s ? in1 : in0)) begin
          failures++;
          $display("FAIL sel=%0d in0=%h in1=%h out=%h", s, in0, in1, mux_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
