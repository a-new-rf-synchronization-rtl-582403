// tb_force_to_zero: self-checking test of force_to_zero.
// Checks the one-clock pass-through, that forcing memorises the last input
// and ramps it linearly by the slope, that the ramp ends on the target after
// the number of clocks given by the start distance and the slope, that the
// target is then held, and the return to pass-through. Covers a zero target
// (frequency) and a set value reached across the phase wrap.
module tb_force_to_zero;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic force_en = 0, done;
  logic [W-1:0] din, slope, target, dout;
  int checks = 0, failures = 0;

  force_to_zero #(.W(W)) dut (.clk, .rst_n, .force_en, .din, .slope, .target, .dout, .done);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL %s (dout=%0d done=%0b)", msg, $signed(dout), done); end
  endtask

  // start: value held when forcing starts; s: slope; t: target
  task automatic run_ramp(logic [W-1:0] start, logic [W-1:0] s, logic [W-1:0] t);
    longint d0, sa, k;
    logic [W-1:0] prev;
    d0 = longint'($signed(start - t)); if (d0 < 0) d0 = -d0;
    sa = longint'($signed(s));         if (sa < 0) sa = -sa;
    k  = (d0 <= sa) ? 0 : (d0 - sa + sa - 1) / sa;   // ramp steps before the load
    din = start; slope = s; target = t;
    @(posedge clk); #1;
    chk(dout == start, "pass-through of start value");
    din = $urandom;             // must be ignored from now on
    force_en = 1;
    for (longint i = 0; i < k; i++) begin
      prev = dout;
      @(posedge clk); #1;
      chk(dout == prev + s, "linear ramp step");
      chk(!done, "not done during ramp");
    end
    @(posedge clk); #1;
    chk(dout == t && done, "target loaded after expected clocks");
    repeat (5) @(posedge clk);
    #1 chk(dout == t && done, "target held");
    force_en = 0; din = 32'd777;
    @(posedge clk); #1;
    chk(dout == 32'd777 && !done, "back to pass-through");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; slope = '0; target = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // pass-through with one clock delay
    for (int i = 0; i < 50; i++) begin
      logic [W-1:0] v;
      v = $urandom; din = v;
      @(posedge clk); #1;
      chk(dout == v, "one-clock pass-through");
    end
    run_ramp(32'd1000, -32'sd30, '0);                 // positive frequency offset
    run_ramp(-32'sd12345, 32'sd100, '0);              // negative offset
    run_ramp(32'd5, 32'sd7, '0);                      // already within a step
    run_ramp(32'hF000_0000, 32'h0100_0000, 32'h0800_0000); // phase, wraps to set value
    for (int r = 0; r < 10; r++) begin
      int s;
      logic [W-1:0] st;
      st = $urandom_range(0, 200000) - 100000;
      s  = $urandom_range(1, 5000);
      run_ramp(st, $signed(st) > 0 ? -s : s, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
