// tb_loop_filter: self-checking test of loop_filter.
// A reference proportional-integral model (output = minus the sum), evaluated in 64-bit integers,
// is compared with the filter output for random errors and gains; also checks
// that the output is zero and the integrator cleared while disabled.
module tb_loop_filter;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [4:0] kp_shift, ki_shift;
  logic [W-1:0] err, corr;
  longint integ_m;
  logic [W-1:0] exp_c;
  int checks = 0, failures = 0;

  loop_filter #(.W(W), .SHIFT_W(5)) dut (.clk, .rst_n, .enable, .kp_shift, .ki_shift, .err, .corr);

  always #5 clk = ~clk;

  function automatic longint ashr(longint v, int s);
    // floor division by 2^s, independent of the >>> operator
    longint d = longint'(1) << s;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kp_shift = 4; ki_shift = 10; err = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      enable = 0; err = $urandom;
      repeat (3) @(posedge clk); #1;
      checks++; if (corr !== '0) begin failures++; $display("open loop corr=%h", corr); end
      enable = 1; integ_m = 0;
      kp_shift = 5'($urandom_range(0, 12)); ki_shift = 5'($urandom_range(6, 20));
      for (int i = 0; i < 300; i++) begin
        longint e;
        e = longint'($urandom_range(0, 2000000)) - 1000000;
        err = W'(e);
        @(posedge clk); #1;
        integ_m = integ_m + ashr(e, int'(ki_shift));
        exp_c = W'(-(ashr(e, int'(kp_shift)) + integ_m));
        checks++;
        if (corr !== exp_c) begin
          failures++; if (failures < 10) $display("corr=%0d expected=%0d", $signed(corr), $signed(exp_c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
