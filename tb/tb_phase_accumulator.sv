// tb_phase_accumulator: self-checking test of phase_accumulator.
// Drives random frequency words and checks that the phase advances by the
// previous word every clock, modulo 2^32, and that reset clears it.
module tb_phase_accumulator;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] inc, phase;
  logic [W-1:0] expected;
  int checks = 0, failures = 0;

  phase_accumulator #(.W(W)) dut (.clk, .rst_n, .inc, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 32'h0123_4567;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (phase !== '0) begin failures++; $display("reset: phase=%h", phase); end
    rst_n = 1;
    expected = '0;
    for (int i = 0; i < 2000; i++) begin
      inc = (i < 1000) ? $urandom : 32'hFFFF_FFF0;   // second half: negative steps
      @(posedge clk);
      expected = expected + inc;
      #1;
      checks++;
      if (phase !== expected) begin
        failures++;
        if (failures < 10) $display("step %0d: phase=%h expected=%h", i, phase, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
