// tb_alu: self-checking test of the ALU.
//
// Every opcode is applied with corner operands (0, 1, all ones, sign bit)
// and 500 random operand pairs; alu_out and zero are compared with a
// reference written from the instruction-set table (ADD wraps at 8 bits).
module tb_alu;
  import risc_pkg::*;

  localparam int unsigned W = 8;

  logic [W-1:0] in_a, in_b, alu_out;
  opcode_t      opcode;
  logic         zero;
  int           checks = 0, failures = 0;

  alu #(.WIDTH(W)) dut (.in_a, .in_b, .opcode, .alu_out, .zero);

  function automatic logic [W-1:0] ref_out(opcode_t op, logic [W-1:0] a, logic [W-1:0] b);
    logic [W:0] sum;
    sum = {1'b0, a} + {1'b0, b};
    case (op)
      ADD:     return sum[W-1:0];
      AND:     return a & b;
      XOR:     return a ^ b;
      LDA:     return b;
      default: return a;
    endcase
  endfunction

  task automatic check_one(opcode_t op, logic [W-1:0] a, logic [W-1:0] b);
    opcode = op; in_a = a; in_b = b;
    #1;
    checks++;
    if (alu_out !== ref_out(op, a, b) || zero !== (a == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h out=%h (exp %h) zero=%b", op.name(), a, b, alu_out,
               ref_out(op, a, b), zero);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corners [4] = '{8'h00, 8'h01, 8'hFF, 8'h80};
    for (int o = 0; o < 8; o++) begin
      foreach (corners[i]) foreach (corners[j]) check_one(opcode_t'(o), corners[i], corners[j]);
      for (int k = 0; k < 500; k++) check_one(opcode_t'(o), W'($urandom), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
