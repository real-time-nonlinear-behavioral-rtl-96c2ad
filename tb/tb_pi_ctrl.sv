// Self-checking testbench of pi_ctrl: random error sequences with several
// gain sets are applied and y is compared each update with an integer model
// (round-to-nearest products, integrator and output clamped to +-lim). Also
// checked: y holds while en is low, the clamp is reached (wind-up case) and
// released, and reset clears the state.
module tb_pi_ctrl;
  localparam int W = 32, F = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, clamped = 0;

  logic en;
  logic signed [W-1:0] e, kp, ki_dt, lim, y;
  pi_ctrl #(.W(W), .F(F)) dut (.clk, .rst_n, .en, .e, .kp, .ki_dt, .lim, .y);

  longint s_m;

  function automatic longint mq(input longint a, input longint b);
    return (a * b + (64'sd1 <<< (F - 1))) >>> F;
  endfunction
  function automatic longint cl(input longint v, input longint l);
    return (v > l) ? l : (v < -l) ? -l : v;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic upd(input longint ev);
    longint y_m;
    e = W'(ev);
    @(negedge clk); en = 1;
    @(negedge clk); en = 0;
    s_m = cl(s_m + mq(longint'(ki_dt), ev), longint'(lim));
    y_m = cl(mq(longint'(kp), ev) + s_m, longint'(lim));
    if (y_m == longint'(lim) || y_m == -longint'(lim)) clamped++;
    check("y", longint'(y), y_m);
    e = $urandom;                 // en low: must be ignored
    @(negedge clk);
    check("hold", longint'(y), y_m);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; e = '0; kp = '0; ki_dt = '0; lim = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    s_m = 0;
    for (int g = 0; g < 4; g++) begin
      kp    = W'($urandom_range(4 << F));
      ki_dt = W'($urandom_range(1 << (F - 2)));
      lim   = W'((g == 3 ? 50 : 2000) << F);
      for (int n = 0; n < 200; n++)
        upd(longint'($urandom_range(200 << F)) - (100 << F));
      // constant error: winds up against the clamp, then back off
      for (int n = 0; n < 100; n++) upd(80 << F);
      for (int n = 0; n < 100; n++) upd(-(80 << F));
    end
    checks++;
    if (clamped == 0) begin failures++; $display("FAIL clamp never reached"); end
    rst_n = 0; @(negedge clk); rst_n = 1;
    check("reset", longint'(y), 0);
    s_m = 0;
    upd(1 << F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
