// tb_rf_sync_top: end-to-end test of the synchronization module at its
// default parameters.
//
// Set-up: the reference is an analogue sine at 1/16 of the clock
// (F_REF = 2^28). The rf synthesizer follows a frequency program that starts
// 2^22 below the reference and ramps up by 8 per clock to a flattop 2^14
// below it (so the loop must also absorb a small constant difference). Both
// digital PLLs are closed through the behavioural discriminator / filter /
// ADC model; the rf PLL listens to the synthesizer's own sine samples and is
// given the synthesizer frequency word as its pre-programmed frequency.
//
// Sequence, checked step by step:
//   1. acceleration, loop open: the error phi_MR - phi_ref stays constant;
//   2. Start Synchro: the latch cancels the error, the switch closes two
//      clocks later and nothing moves (no transient on the correction);
//   3. force_freq: F_off ramps to zero, the rf is pulled off its programme
//      up to the reference frequency;
//   4. force_phase: phi_off ramps to -phase_set;
//   5. end, at flattop: the error is zero, phi_rf - phi_ref = phase_set, the synthesizer
//      runs at exactly the reference frequency and its phase relative to the
//      analogue reference is fixed.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_rf_sync_top;
  localparam logic [31:0] F_REF   = 32'h1000_0000;
  localparam logic [31:0] F_START = F_REF - 32'h0040_0000;
  localparam logic [31:0] F_FLAT  = F_REF - 32'h0000_4000;
  localparam logic [31:0] RAMP    = 32'd8;
  localparam logic [31:0] SET     = 32'h2000_0000;          // 1/8 turn
  localparam longint      TOL_E   = 64'd1 << 22;               // 1/1024 turn

  logic clk = 0, rst_n = 0;
  logic signed [11:0] ref_adc, rf_adc;
  logic [31:0] ref_preprog, rf_preprog, freq_program;
  logic start_synchro = 0, force_freq = 0, force_phase = 0;
  logic [31:0] freq_slope, phase_slope, phase_set;
  logic [4:0] kp_shift, ki_shift;
  logic signed [11:0] ref_sine, rf_pll_sine, synth_sine;
  logic [31:0] synth_freq, synth_phase, f_ref, f_rf, phi_ref, phi_rf, f_off, phi_off,
               phi_mr, phi_error, correction;
  logic loop_closed, freq_done, phase_done;

  logic [31:0] theta = '0;
  real ref_in = 0.0, rf_in;
  int checks = 0, failures = 0;
  int n_latch = 0, n_close = 0, n_freq_ramp = 0, n_off_nominal = 0, n_phase_ramp = 0,
      n_freq_done = 0, n_phase_done = 0;
  longint cycle = 0;

  rf_sync_top dut (.*);

  pll_frontend_model #(.ALPHA(0.03125), .GAIN(32000.0)) u_ref_fe (
    .clk, .rf_in(ref_in), .local_sine(ref_sine), .adc_code(ref_adc));
  pll_frontend_model #(.ALPHA(0.03125), .GAIN(32000.0)) u_rf_fe (
    .clk, .rf_in, .local_sine(rf_pll_sine), .adc_code(rf_adc));

  always #5 clk = ~clk;

  // analogue reference and the synthesizer output seen through an ideal DAC
  always @(posedge clk) begin
    theta  <= theta + F_REF;
    ref_in <= $sin(6.283185307179586 * real'(theta + F_REF) / 4294967296.0);
    cycle  <= cycle + 1;
  end
  always_comb rf_in = real'(synth_sine) / 2047.0;
  assign rf_preprog  = synth_freq;
  assign ref_preprog = F_REF - 32'h0002_0000;

  // acceleration programme
  always @(posedge clk) begin
    if (!rst_n)                     freq_program <= F_START;
    else if (freq_program < F_FLAT) freq_program <= (F_FLAT - freq_program < RAMP) ? F_FLAT : freq_program + RAMP;
  end

  // mechanism counters
  logic start_q = 0, closed_q = 0, fdone_q = 0, pdone_q = 0;
  always @(posedge clk) begin
    start_q <= start_synchro; closed_q <= loop_closed; fdone_q <= freq_done; pdone_q <= phase_done;
    if (start_synchro && !start_q) n_latch++;
    if (loop_closed && !closed_q)  n_close++;
    if (freq_done && !fdone_q)     n_freq_done++;
    if (phase_done && !pdone_q)    n_phase_done++;
    if (force_freq && !freq_done)  n_freq_ramp++;
    if (force_phase && !phase_done) n_phase_ramp++;
    if (force_freq && !freq_done && $signed(synth_freq - freq_program) > 32'sd4096) n_off_nominal++;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d %s", cycle, msg); end
  endtask

  function automatic longint sabs(logic [31:0] v);
    longint s = longint'($signed(v));
    return s < 0 ? -s : s;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e0, d0, d1;
    longint emax, cmax, fsum;
    int n;
    freq_slope = '0; phase_slope = '0; phase_set = SET; kp_shift = 5'd9; ki_shift = 5'd20;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;

    // 1. acceleration with the loop open: PLLs lock, error constant
    repeat (12000) @(posedge clk);
    #1 e0 = phi_error; emax = 0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1;
      if (sabs(phi_error - e0) > emax) emax = sabs(phi_error - e0);
    end
    chk(emax < TOL_E, "error constant during acceleration");
    chk(sabs(f_off - (F_REF - synth_freq)) < 64'd400000, "F_off follows F_ref - F_rf");
    $display("acceleration: error %0.4f turn, drift %0d, F_off %0d",
             real'(phi_error) / 4294967296.0, emax, $signed(f_off));

    // 2. Start Synchro: latch, delayed switch, no transient
    start_synchro = 1;
    n = 0;
    while (!loop_closed && n < 10) begin @(posedge clk); #1; n++; end
    chk(n == 3, "loop switch closes two clocks after the latch");
    chk(sabs(phi_error) < TOL_E, "error cancelled when the switch closes");
    emax = 0; cmax = 0;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk); #1;
      if (sabs(phi_error) > emax) emax = sabs(phi_error);
      if (sabs(correction) > cmax) cmax = sabs(correction);
    end
    chk(emax < TOL_E, "zero-gain loop: error stays near zero");
    chk(cmax < 64'd200000, "no transient on the rf frequency");
    $display("loop closed: max error %0d, max correction %0d", emax, cmax);

    // 3. force the offset frequency to zero
    freq_slope = ($signed(f_off) > 0) ? -32'sd16 : 32'sd16;
    force_freq = 1;
    n = 0;
    while (!freq_done && n < 1000000) begin @(posedge clk); #1; n++; end
    chk(freq_done && f_off == '0, "offset frequency cancelled");
    repeat (30000) @(posedge clk);
    #1 fsum = 0;
    for (int i = 0; i < 4096; i++) begin @(posedge clk); #1; fsum += longint'(synth_freq); end
    chk((fsum >>> 12) >= longint'(F_REF) - 16 && (fsum >>> 12) <= longint'(F_REF) + 16,
        "rf at the reference frequency");
    $display("frequency cancelled after %0d clocks, mean rf word %0d (reference %0d)", n, fsum >>> 12, F_REF);

    // 4. force the offset phase to its set value
    phase_slope = ($signed(-SET - phi_off) > 0) ? 32'h0000_4000 : -32'sh0000_4000;
    force_phase = 1;
    n = 0;
    while (!phase_done && n < 1000000) begin @(posedge clk); #1; n++; end
    chk(phase_done && phi_off == -SET, "offset phase at its set value");

    // 5. end of process, at flattop
    while (freq_program != F_FLAT) @(posedge clk);
    repeat (40000) @(posedge clk);
    #1 d0 = synth_phase - theta; emax = 0; fsum = 0;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1;
      if (sabs(phi_error) > emax) emax = sabs(phi_error);
      fsum += longint'(synth_freq);
    end
    d1 = synth_phase - theta;
    chk(emax < TOL_E, "error zero at the end");
    chk(sabs(phi_rf - phi_ref - SET) < 2 * TOL_E, "phi_rf - phi_ref equals the set value");
    chk((fsum >>> 12) >= longint'(F_REF) - 16 && (fsum >>> 12) <= longint'(F_REF) + 16,
        "rf at the reference frequency after the phase stage");
    chk(sabs(d1 - d0) < TOL_E, "rf phase fixed against the analogue reference");
    $display("end: phi_rf - phi_ref = %0.4f turn, rf vs reference %0.4f turn, drift %0d",
             real'(phi_rf - phi_ref) / 4294967296.0, real'(d1) / 4294967296.0, $signed(d1 - d0));

    $display("mechanisms: latch=%0d close=%0d freq_ramp=%0d off_nominal=%0d freq_done=%0d phase_ramp=%0d phase_done=%0d",
             n_latch, n_close, n_freq_ramp, n_off_nominal, n_freq_done, n_phase_ramp, n_phase_done);
    chk(n_latch > 0, "latch used");
    chk(n_close > 0, "loop switch closed");
    chk(n_freq_ramp > 0, "frequency force-to-zero ramp ran");
    chk(n_off_nominal > 0, "rf pulled off its programme");
    chk(n_freq_done > 0, "frequency force-to-zero finished");
    chk(n_phase_ramp > 0, "phase force-to-set ramp ran");
    chk(n_phase_done > 0, "phase force-to-set finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
