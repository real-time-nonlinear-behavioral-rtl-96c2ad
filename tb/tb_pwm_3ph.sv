// Self-checking testbench of pwm_3ph with HALF_PERIOD = 16. Every clock the
// carrier is compared with an independent model of the triangle (counting
// -1 .. +1 .. -1 in steps of 2/16), and each gate with the rule
// "upper on while v_ref >= carrier * v_dc / 2" one clock later; the lower
// gate must be the complement. The duty cycle over whole carrier periods is
// checked for a few constant references.
module tb_pwm_3ph;
  localparam int W = 32, F = 16, HP = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [W-1:0] v_ref [3];
  logic signed [W-1:0] v_dc, carrier;
  logic [2:0] gate_hi, gate_lo;
  pwm_3ph #(.W(W), .F(F), .HALF_PERIOD(HP)) dut (.clk, .rst_n, .v_ref, .v_dc, .gate_hi, .gate_lo, .carrier);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k; int dir; logic [2:0] exp_g; int on_cnt [3];
    v_dc = W'(1000 << F);
    for (int x = 0; x < 3; x++) v_ref[x] = '0;
    @(negedge clk);
    rst_n = 1;
    k = 0; dir = 1;
    for (int t = 0; t < 2000; t++) begin
      longint c_m;
      c_m = -(1 << F) + k * ((2 << F) / HP);
      check("carrier", longint'(carrier), c_m);
      if (t % 64 == 0)
        for (int x = 0; x < 3; x++) v_ref[x] = W'(longint'($urandom_range(1100 << F)) - (550 << F));
      for (int x = 0; x < 3; x++) exp_g[x] = longint'(v_ref[x]) >= ((c_m * (1000 << F)) >>> (F + 1));
      @(negedge clk);
      check("gate_hi", longint'(gate_hi), longint'(exp_g));
      check("gate_lo", longint'(gate_lo), longint'(3'(~exp_g)));
      if (dir == 1) begin if (k == HP - 1) dir = -1; k++; end
      else          begin if (k == 1) dir = 1;      k--; end
    end
    // duty cycle for constant references (v_dc / 2 = 500 V)
    v_ref[0] = '0; v_ref[1] = W'(250 << F); v_ref[2] = W'(-(400 << F));
    repeat (2 * HP) @(negedge clk);
    on_cnt = '{0, 0, 0};
    repeat (8 * HP) begin
      @(negedge clk);
      for (int x = 0; x < 3; x++) on_cnt[x] += gate_hi[x];
    end
    // per 32-clock period the carrier index k runs 0..16..1; counts over 4 periods
    check("duty 0 V",    on_cnt[0], 4 * 17);   // k <= 8
    check("duty +250 V", on_cnt[1], 4 * 25);   // k <= 12
    check("duty -400 V", on_cnt[2], 4 * 3);    // k <= 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
