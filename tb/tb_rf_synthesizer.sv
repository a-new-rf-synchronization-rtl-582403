// tb_rf_synthesizer: self-checking test of rf_synthesizer.
// Checks freq = program + correction one clock later, phase advance by freq
// each clock, and that the sine output follows the phase (sign of the sample
// against the phase half-turn, one clock later).
module tb_rf_synthesizer;
  localparam int PW = 32;
  logic clk = 0, rst_n = 0;
  logic [PW-1:0] freq_program, correction, freq, phase;
  logic signed [11:0] sine;
  int checks = 0, failures = 0;

  rf_synthesizer #(.PHASE_W(PW), .SINE_ADDR_W(10), .SINE_W(12)) dut (
    .clk, .rst_n, .freq_program, .correction, .freq, .phase, .sine);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PW-1:0] exp_f, exp_p, prev_phase;
    freq_program = '0; correction = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      logic [PW-1:0] fp, c;
      fp = 32'h0800_0000 + PW'($urandom_range(0, 32'h0100_0000));
      c  = PW'($urandom_range(0, 20000)) - 32'd10000;
      freq_program = fp; correction = c;
      exp_p = phase + freq;
      prev_phase = phase;
      @(posedge clk); #1;
      exp_f = fp + c;
      checks++; if (freq !== exp_f)  begin failures++; if (failures < 10) $display("freq %h exp %h", freq, exp_f); end
      checks++; if (phase !== exp_p) begin failures++; if (failures < 10) $display("phase %h exp %h", phase, exp_p); end
      // sine now shows prev_phase; away from the zero crossings its sign is known
      if (prev_phase[31:22] > 10'd8 && prev_phase[31:22] < 10'd504) begin
        checks++; if (sine <= 0) failures++;
      end else if (prev_phase[31:22] > 10'd520 && prev_phase[31:22] < 10'd1016) begin
        checks++; if (sine >= 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
