// tb_sine_converter: self-checking test of sine_converter.
// For random phases and for every table address, compares the sample one
// clock later with round(2047*sin(2*pi*(a+0.5)/1024)), a = top 10 phase
// bits, computed directly with $sin (allowing 1 LSB for rounding).
module tb_sine_converter;
  localparam int PW = 32, AW = 10, OW = 12;
  logic clk = 0;
  logic [PW-1:0] phase;
  logic signed [OW-1:0] sine;
  int checks = 0, failures = 0;
  int exp_val, diff;

  sine_converter #(.PHASE_W(PW), .ADDR_W(AW), .OUT_W(OW)) dut (.clk, .phase, .sine);

  always #5 clk = ~clk;

  function automatic int ref_sine(logic [PW-1:0] p);
    real a;
    a = real'(p[PW-1 -: AW]) + 0.5;
    return $rtoi($floor((2.0**(OW-1) - 1.0) * $sin(6.283185307179586 * a / 2.0**AW) + 0.5));
  endfunction

  task automatic check_phase(logic [PW-1:0] p);
    phase = p;
    @(posedge clk); #1;
    exp_val = ref_sine(p);
    diff = int'(sine) - exp_val;
    checks++;
    if (diff > 1 || diff < -1) begin
      failures++;
      if (failures < 10) $display("phase=%h sine=%0d expected=%0d", p, sine, exp_val);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) check_phase({a[AW-1:0], {(PW-AW){1'b0}}} | PW'($urandom_range(0, 2**(PW-AW)-1)));
    for (int i = 0; i < 3000; i++) check_phase($urandom);
    // symmetry: quarter-turn points of the table
    phase = 32'h0000_0000; @(posedge clk); #1; checks++; if (sine <= 0) failures++;
    phase = 32'h8000_0000; @(posedge clk); #1; checks++; if (sine >= 0) failures++;
    phase = 32'h4000_0000; @(posedge clk); #1; checks++; if (sine < 2040) failures++;
    phase = 32'hC000_0000; @(posedge clk); #1; checks++; if (sine > -2040) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
