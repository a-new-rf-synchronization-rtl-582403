// tb_offset_generator: self-checking test of offset_generator.
// With constant F_ref and F_rf, phi_off must advance by F_ref - F_rf each
// clock; a latch change must shift phi_off by minus that amount one clock
// later; force_freq must ramp f_off to zero in steps of the slope and phi_off
// must then stop moving; force_phase must ramp phi_off to -phase_set and hold.
module tb_offset_generator;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] f_ref, f_rf, freq_slope, phase_slope, phase_set, phi_latch;
  logic force_freq = 0, force_phase = 0;
  logic [W-1:0] f_off, phi_off;
  logic freq_done, phase_done;
  int checks = 0, failures = 0;

  offset_generator #(.W(W)) dut (.clk, .rst_n, .f_ref, .f_rf, .force_freq, .freq_slope,
    .force_phase, .phase_slope, .phase_set, .phi_latch, .f_off, .phi_off, .freq_done, .phase_done);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL %s: f_off=%0d phi_off=%h", msg, $signed(f_off), phi_off); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev, prev_f;
    int n;
    f_ref = 32'h1000_0000; f_rf = 32'h0F00_0000;
    freq_slope = -32'sd65536; phase_slope = '0; phase_set = 32'h2000_0000; phi_latch = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk); #1;
    for (int i = 0; i < 100; i++) begin
      prev = phi_off;
      @(posedge clk); #1;
      chk(f_off == 32'h0100_0000, "f_off = F_ref - F_rf");
      chk(phi_off - prev == 32'h0100_0000, "phi_off step = F_off");
    end
    // latch retro-fit
    prev = phi_off;
    phi_latch = 32'h0000_1234;
    @(posedge clk); #1;
    chk(phi_off - prev == 32'h0100_0000 - 32'h0000_1234, "latch subtracted");
    // force frequency to zero: 2^24 / 2^16 = 256 steps
    force_freq = 1;
    n = 0;
    prev_f = f_off;
    while (!freq_done && n < 1000) begin
      prev = phi_off;
      @(posedge clk); #1;
      n++;
      if (!freq_done) chk(f_off == prev_f - 32'd65536, "frequency ramp step");
      prev_f = f_off;
    end
    chk(freq_done && f_off == '0, "offset frequency reached zero");
    chk(n == 256, "frequency ramp length");
    repeat (3) @(posedge clk); #1;
    prev = phi_off;
    repeat (10) @(posedge clk); #1;
    chk(phi_off == prev, "phi_off constant once F_off is zero");
    // force phase to -phase_set
    phase_slope = ($signed(-phase_set - phi_off) > 0) ? 32'h0010_0000 : -32'sh0010_0000;
    force_phase = 1;
    n = 0;
    while (!phase_done && n < 20000) begin
      @(posedge clk); #1; n++;
    end
    chk(phase_done && phi_off == -phase_set, "phi_off reached -phase_set");
    repeat (20) @(posedge clk); #1;
    chk(phi_off == -phase_set && f_off == '0, "held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
