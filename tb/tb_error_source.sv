// tb_error_source: self-checking test of error_source.
// Part 1: random phases; checks phi_mr = phi_off(t-1) + phi_rf(t-3) and
// phi_error = phi_mr - phi_ref(t-3) (ALIGN = 2 plus the output register).
// Part 2: drives phi_rf and phi_ref from accumulators at ramping frequencies
// and phi_off from an accumulator of F_ref - F_rf delayed by two clocks, as
// the offset generator does; checks the error stays exactly constant.
module tb_error_source;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] phi_off, phi_rf, phi_ref, phi_mr, phi_error;
  logic [W-1:0] h_off[4], h_rf[4], h_ref[4];
  int checks = 0, failures = 0;

  error_source #(.W(W), .ALIGN(2)) dut (.clk, .rst_n, .phi_off, .phi_rf, .phi_ref, .phi_mr, .phi_error);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] f_rf, f_ref, e0;
    logic [W-1:0] fd[3];
    phi_off = '0; phi_rf = '0; phi_ref = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      phi_off = $urandom; phi_rf = $urandom; phi_ref = $urandom;
      for (int k = 3; k > 0; k--) begin h_off[k] = h_off[k-1]; h_rf[k] = h_rf[k-1]; h_ref[k] = h_ref[k-1]; end
      h_off[0] = phi_off; h_rf[0] = phi_rf; h_ref[0] = phi_ref;
      @(posedge clk); #1;
      if (i >= 3) begin
        checks++;
        if (phi_mr !== h_off[0] + h_rf[2]) begin failures++; if (failures < 10) $display("phi_mr %h", phi_mr); end
        checks++;
        if (phi_error !== h_off[0] + h_rf[2] - h_ref[2]) begin failures++; if (failures < 10) $display("phi_error %h", phi_error); end
      end
    end
    // constant error during a frequency ramp
    f_rf = 32'h0800_0000; f_ref = 32'h1000_0000;
    fd[0] = '0; fd[1] = '0; fd[2] = '0;
    phi_off = 32'h1234_5678; phi_rf = 32'h0; phi_ref = 32'h4000_0000;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      phi_rf  = phi_rf + f_rf;
      phi_ref = phi_ref + f_ref;
      phi_off = phi_off + fd[1];
      fd[1] = fd[0]; fd[0] = f_ref - f_rf;
      f_rf = f_rf + 32'd1000;                     // acceleration ramp
      #1;
      if (i == 10) e0 = phi_error;
      if (i > 10) begin
        checks++;
        if (phi_error !== e0) begin failures++; if (failures < 10) $display("error moved %h -> %h", e0, phi_error); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
