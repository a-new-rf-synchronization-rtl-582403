// tb_digital_pll: self-checking test of digital_pll.
// Part 1 (open loop): random ADC codes and pre-programmed words; checks that
// freq = preprog + (adc << 8) one clock later and that the phase advances by
// freq every clock.
// Part 2 (closed loop): the PLL is closed through the behavioural
// discriminator / filter / ADC model onto an analogue input whose frequency
// is 2^18 phase units per clock above the pre-programmed word. Checks that
// the PLL locks: its frequency word averages to the input frequency, the
// phase difference stops moving and the ADC code settles near 2^18 >> 8.
module tb_digital_pll;
  localparam int PW = 32, AW = 12, SH = 8;
  localparam logic [PW-1:0] F_PRE = 32'h1000_0000;       // 1/16 of the clock
  localparam logic [PW-1:0] F_IN  = F_PRE + 32'h0004_0000;
  logic clk = 0, rst_n = 0;
  logic signed [AW-1:0] adc_code, adc_model, adc_drive;
  logic closed = 0;
  logic [PW-1:0] preprog, freq, phase;
  logic signed [11:0] sine;
  logic [PW-1:0] theta = '0;
  real rf_in = 0.0;
  int checks = 0, failures = 0;

  assign adc_code = closed ? adc_model : adc_drive;

  digital_pll #(.PHASE_W(PW), .ADC_W(AW), .ADC_SHIFT(SH), .SINE_ADDR_W(10), .SINE_W(12)) dut (
    .clk, .rst_n, .adc_code, .preprog, .freq, .phase, .sine);

  pll_frontend_model #(.ADC_W(AW), .SINE_W(12), .ALPHA(0.0625), .GAIN(8000.0)) u_fe (
    .clk, .rf_in, .local_sine(sine), .adc_code(adc_model));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    theta <= theta + F_IN;
    rf_in <= $sin(6.283185307179586 * real'(theta + F_IN) / 4294967296.0);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PW-1:0] exp_f, exp_p;
    logic [PW-1:0] d0, d1;
    longint fsum;
    longint cs;
    adc_drive = '0; preprog = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // ---- open loop
    for (int i = 0; i < 500; i++) begin
      logic signed [AW-1:0] a;
      logic [PW-1:0] pp;
      a = AW'($urandom); pp = $urandom;
      adc_drive = a; preprog = pp;
      exp_p = phase + freq;
      @(posedge clk); #1;
      exp_f = pp + (PW'(a) <<< SH);
      checks++; if (freq !== exp_f)  begin failures++; if (failures < 10) $display("freq %h exp %h", freq, exp_f); end
      checks++; if (phase !== exp_p) begin failures++; if (failures < 10) $display("phase %h exp %h", phase, exp_p); end
    end
    // ---- closed loop
    preprog = F_PRE; closed = 1;
    repeat (30000) @(posedge clk);
    #1 d0 = theta - phase;
    fsum = 0; cs = 0;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1;
      fsum += longint'(freq);
      cs   += longint'(adc_model);
    end
    d1 = theta - phase;
    checks++;
    if ((fsum >>> 12) > longint'(F_IN) + 64 || (fsum >>> 12) < longint'(F_IN) - 64) begin
      failures++; $display("mean freq %0d expected %0d", fsum >>> 12, F_IN);
    end
    checks++;
    if ($signed(d1 - d0) > 32'sd4000000 || $signed(d1 - d0) < -32'sd4000000) begin
      failures++; $display("phase still moving: %0d", $signed(d1 - d0));
    end
    checks++;
    if ((cs >>> 12) < 1000 || (cs >>> 12) > 1048) begin
      failures++; $display("mean adc %0d expected about 1024", cs >>> 12);
    end
    $display("locked: mean adc=%0d phase difference=%0.4f turn", cs >>> 12, real'(d1) / 4294967296.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
