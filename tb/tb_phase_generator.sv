// tb_phase_generator: self-checking test of the phase generator.
//
// After reset the phase must walk INST_ADDR..STORE, one phase per clock, and
// wrap to INST_ADDR after exactly eight clocks; with enab low it must hold.
// 300 random clocks of enab and occasional reset run against a model.
module tb_phase_generator;
  import risc_pkg::*;

  logic   clk = 0, rst, enab;
  phase_t phase;
  int     model;
  int     checks = 0, failures = 0;

  phase_generator dut (.clk, .rst, .enab, .phase);

  always #5 clk = ~clk;

  task automatic step(logic r, logic e);
    rst = r; enab = e;
    @(posedge clk);
    if (r) model = 0;
    else if (e) model = (model + 1) % 8;
    @(negedge clk);
    checks++;
    if (int'(phase) != model) begin
      failures++;
      $display("FAIL rst=%b enab=%b phase=%0d exp=%0d", r, e, phase, model);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    model = 0;
    @(negedge clk);
    step(1, 0);
    // one full instruction: count the clocks until the phase returns to INST_ADDR
    cycles = 0;
    do begin step(0, 1); cycles++; end while (phase != INST_ADDR && cycles < 20);
    checks++;
    if (cycles != 8) begin failures++; $display("FAIL period %0d clocks, expected 8", cycles); end
    step(0, 1);
    step(0, 1);
    repeat (4) step(0, 0);
    checks++;
    if (phase != INST_LOAD) begin failures++; $display("FAIL hold: phase %0d", phase); end
    for (int i = 0; i < 300; i++) step($urandom_range(0, 39) == 0, $urandom_range(0, 3) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
