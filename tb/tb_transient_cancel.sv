// tb_transient_cancel: self-checking test of transient_cancel.
// With a constant error E at its input the latch must take E on the first
// clock of Start Synchro and the loop switch must close exactly DELAY (=2)
// clocks later; while closed nothing is re-latched; after Start Synchro
// falls the switch opens, and a second Start Synchro adds the new error to
// the latch (retro-fit on top of the first correction).
module tb_transient_cancel;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, start_synchro = 0, loop_closed;
  logic [W-1:0] phi_error, phi_latch;
  int checks = 0, failures = 0;

  transient_cancel #(.W(W), .DELAY(2)) dut (.clk, .rst_n, .start_synchro, .phi_error, .phi_latch, .loop_closed);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: latch=%h closed=%0b", msg, phi_latch, loop_closed); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phi_error = 32'h1111_2222;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk); #1;
    chk(phi_latch == '0 && !loop_closed, "idle after reset");
    start_synchro = 1;                         // seen at the next edge (E0)
    @(posedge clk); #1;
    chk(phi_latch == 32'h1111_2222, "latched at E0");
    chk(!loop_closed, "open after E0");
    phi_error = 32'h0;                         // error cancelled
    @(posedge clk); #1;
    chk(!loop_closed, "open after E1");
    @(posedge clk); #1;
    chk(loop_closed, "closed after E2");
    phi_error = 32'h0000_0500;                 // loop running: no re-latch
    repeat (10) @(posedge clk); #1;
    chk(loop_closed && phi_latch == 32'h1111_2222, "closed and latch kept");
    start_synchro = 0;
    @(posedge clk); #1;
    chk(!loop_closed, "opened when Start Synchro falls");
    phi_error = 32'hFFFF_FF00;
    repeat (4) @(posedge clk);
    #1 start_synchro = 1;
    @(posedge clk); #1;
    chk(phi_latch == 32'h1111_2222 + 32'hFFFF_FF00, "second synchro accumulates");
    @(posedge clk); #1;
    chk(!loop_closed, "open after second E1");
    @(posedge clk); #1;
    chk(loop_closed, "closed after second E2");
    // random errors: each new Start Synchro adds the error present at its edge
    for (int r = 0; r < 30; r++) begin
      logic [W-1:0] e, prev_latch;
      int gap;
      start_synchro = 0;
      gap = $urandom_range(1, 6);
      repeat (gap) @(posedge clk);
      #1 chk(!loop_closed, "open while Start Synchro low");
      e = $urandom; phi_error = e; prev_latch = phi_latch;
      start_synchro = 1;
      @(posedge clk); #1;
      chk(phi_latch == prev_latch + e, "latch accumulates the error");
      phi_error = $urandom;                      // later errors must not be latched
      @(posedge clk); #1;
      chk(!loop_closed && phi_latch == prev_latch + e, "still open after E1, latch kept");
      @(posedge clk); #1;
      chk(loop_closed, "closed after E2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
