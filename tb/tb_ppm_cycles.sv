// tb_ppm_cycles: two consecutive machine cycles with different settings,
// without resetting the synchronization core between them.
//
// Cycle 1 accelerates (frequency program rises towards the reference) and
// synchronizes at phase_set = 1/8 turn. Cycle 2 decelerates (the program
// starts above the reference and falls), so the offset frequency and the
// ramp slopes change sign, and synchronizes at phase_set = 3/8 turn.
// Between the cycles the triggers are released, which re-opens the loop and
// returns the offset path to following F_ref - F_rf.
// Each cycle checks: error constant before Start Synchro, no transient when
// the loop closes, offset frequency and phase reach their targets, final
// error near zero, phi_rf - phi_ref = phase_set and the rf at the reference
// frequency. Across cycles: the rf phase against the analogue reference
// moves by the change of phase_set (1/4 turn), which shows the set value
// acts on the real rf, not only on the internal words.
module tb_ppm_cycles;
  localparam logic [31:0] F_REF = 32'h1000_0000;
  localparam longint      TOL_E = 64'd1 << 22;

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
  int n_cycles = 0, n_neg_offset = 0, n_pos_offset = 0;

  // frequency program: moves by prog_ramp per clock until it reaches prog_end
  logic [31:0] prog_end, prog_ramp;
  logic        prog_up;

  rf_sync_top dut (.*);

  pll_frontend_model #(.ALPHA(0.03125), .GAIN(32000.0)) u_ref_fe (
    .clk, .rf_in(ref_in), .local_sine(ref_sine), .adc_code(ref_adc));
  pll_frontend_model #(.ALPHA(0.03125), .GAIN(32000.0)) u_rf_fe (
    .clk, .rf_in, .local_sine(rf_pll_sine), .adc_code(rf_adc));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    theta  <= theta + F_REF;
    ref_in <= $sin(6.283185307179586 * real'(theta + F_REF) / 4294967296.0);
  end
  always_comb rf_in = real'(synth_sine) / 2047.0;
  assign rf_preprog  = synth_freq;
  assign ref_preprog = F_REF - 32'h0002_0000;

  always @(posedge clk) begin
    if (prog_up && freq_program < prog_end)
      freq_program <= (prog_end - freq_program < prog_ramp) ? prog_end : freq_program + prog_ramp;
    else if (!prog_up && freq_program > prog_end)
      freq_program <= (freq_program - prog_end < prog_ramp) ? prog_end : freq_program - prog_ramp;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL cycle %0d: %s", n_cycles, msg); end
  endtask

  function automatic longint sabs(logic [31:0] v);
    longint s = longint'($signed(v));
    return s < 0 ? -s : s;
  endfunction

  // one machine cycle; returns the final rf phase against the reference
  task automatic run_cycle(input logic [31:0] f_start, input logic [31:0] f_flat,
                           input logic [31:0] set, output logic [31:0] rf_vs_ref);
    logic [31:0] e0, d0;
    longint emax, cmax, fsum;
    int n;
    n_cycles++;
    freq_program = f_start; prog_end = f_flat; prog_up = (f_flat > f_start); prog_ramp = 32'd8;
    phase_set = set;
    repeat (12000) @(posedge clk);
    #1 e0 = phi_error; emax = 0;
    if ($signed(f_off) < 0) n_neg_offset++; else n_pos_offset++;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      if (sabs(phi_error - e0) > emax) emax = sabs(phi_error - e0);
    end
    chk(emax < TOL_E, "error constant before Start Synchro");
    start_synchro = 1;
    repeat (3) @(posedge clk);
    #1 chk(loop_closed, "loop closed");
    emax = 0; cmax = 0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      if (sabs(phi_error) > emax) emax = sabs(phi_error);
      if (sabs(correction) > cmax) cmax = sabs(correction);
    end
    chk(emax < TOL_E && cmax < 64'd200000, "no transient at loop closure");
    freq_slope = ($signed(f_off) > 0) ? -32'sd16 : 32'sd16;
    force_freq = 1;
    n = 0;
    while (!freq_done && n < 1000000) begin @(posedge clk); #1; n++; end
    chk(freq_done && f_off == '0, "offset frequency cancelled");
    repeat (30000) @(posedge clk);
    #1 phase_slope = ($signed(-set - phi_off) > 0) ? 32'h0000_4000 : -32'sh0000_4000;
    force_phase = 1;
    n = 0;
    while (!phase_done && n < 1000000) begin @(posedge clk); #1; n++; end
    chk(phase_done && phi_off == -set, "offset phase at set value");
    while (freq_program != f_flat) @(posedge clk);
    repeat (40000) @(posedge clk);
    #1 emax = 0; fsum = 0; d0 = synth_phase - theta;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1;
      if (sabs(phi_error) > emax) emax = sabs(phi_error);
      fsum += longint'(synth_freq);
    end
    rf_vs_ref = synth_phase - theta;
    chk(emax < TOL_E, "error zero at flattop");
    chk(sabs(phi_rf - phi_ref - set) < 2 * TOL_E, "phi_rf - phi_ref = phase_set");
    chk((fsum >>> 12) >= longint'(F_REF) - 16 && (fsum >>> 12) <= longint'(F_REF) + 16, "rf at reference frequency");
    chk(sabs(rf_vs_ref - d0) < TOL_E, "rf phase fixed against the reference");
    $display("cycle %0d: phi_rf - phi_ref = %0.4f turn, rf vs reference = %0.4f turn",
             n_cycles, real'(phi_rf - phi_ref) / 4294967296.0, real'(rf_vs_ref) / 4294967296.0);
    // end of cycle: release everything
    start_synchro = 0; force_phase = 0; force_freq = 0;
    repeat (10) @(posedge clk);
    #1 chk(!loop_closed && correction == '0, "loop open between cycles");
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p1, p2;
    freq_program = F_REF - 32'h0040_0000; prog_end = freq_program; prog_up = 1; prog_ramp = '0;
    freq_slope = '0; phase_slope = '0; phase_set = '0; kp_shift = 5'd9; ki_shift = 5'd20;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    run_cycle(F_REF - 32'h0040_0000, F_REF - 32'h0000_4000, 32'h2000_0000, p1);   // accelerating
    run_cycle(F_REF + 32'h0040_0000, F_REF + 32'h0000_4000, 32'h6000_0000, p2);   // decelerating
    chk(sabs(p2 - p1 - 32'h4000_0000) < 2 * TOL_E, "rf phase moved by the change of phase_set");
    chk(n_pos_offset > 0 && n_neg_offset > 0, "both signs of offset frequency exercised");
    $display("rf phase shift between cycles: %0.4f turn (expected 0.2500)", real'(p2 - p1) / 4294967296.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
