// Self-checking testbench of minmax_norm with the five ANN input channels.
// Channel ranges typical of the 1600 V / 300 A device (voltages 0..1600 V,
// currents -300..600 A, gate -15..15 V) are configured; the ends of each range
// must map to -1 and +1 exactly, the midpoint to 0, and random values are
// compared with (x - min) * scale - 1 computed here in integer arithmetic.
// The three padding outputs must be 0, and out_valid must follow in_valid by
// one clock.
module tb_minmax_norm;
  localparam int NI = 5, NO = 8, W = 32, F = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, in_valid, out_valid;
  logic [$clog2(NI)-1:0] cfg_idx;
  logic signed [W-1:0] cfg_min, cfg_scale;
  logic signed [W-1:0] x_raw [NI];
  logic signed [W-1:0] x_norm [NO];

  minmax_norm #(.N_IN(NI), .N_OUT(NO), .W(W), .F(F)) dut (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_min, .cfg_scale, .in_valid, .x_raw,
    .out_valid, .x_norm);

  longint mn [NI], mx [NI], sc [NI];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(input longint xs [NI], output longint got [NO]);
    for (int i = 0; i < NI; i++) x_raw[i] = W'(xs[i]);
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    check("out_valid", longint'(out_valid), 1);
    for (int i = 0; i < NO; i++) got[i] = longint'(x_norm[i]);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs [NI]; longint got [NO];
    cfg_we = 0; in_valid = 0; cfg_idx = '0; cfg_min = '0; cfg_scale = '0;
    for (int i = 0; i < NI; i++) x_raw[i] = '0;
    // ranges: V_start, V_end in 0..1024 V, I_start, I_end in -256..768 A, V_g in -16..16 V
    mn[0] = 0;          mx[0] = 1024 << F;
    mn[1] = 0;          mx[1] = 1024 << F;
    mn[2] = -(256 << F); mx[2] = 768 << F;
    mn[3] = -(256 << F); mx[3] = 768 << F;
    mn[4] = -(16 << F);  mx[4] = 16 << F;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NI; i++) begin
      // ranges are powers of two, so 2/(max-min) is exact in Q16.16
      sc[i] = (longint'(2) << (2 * F)) / (mx[i] - mn[i]);
      @(negedge clk); cfg_we = 1; cfg_idx = i[$clog2(NI)-1:0]; cfg_min = W'(mn[i]); cfg_scale = W'(sc[i]);
    end
    @(negedge clk); cfg_we = 0;
    // range ends and midpoints
    for (int i = 0; i < NI; i++) xs[i] = mn[i];
    apply(xs, got);
    for (int i = 0; i < NI; i++) check($sformatf("min ch%0d", i), got[i], -(1 << F));
    for (int i = 0; i < NI; i++) xs[i] = mx[i];
    apply(xs, got);
    for (int i = 0; i < NI; i++) check($sformatf("max ch%0d", i), got[i], 1 << F);
    for (int i = 0; i < NI; i++) xs[i] = (mn[i] + mx[i]) / 2;
    apply(xs, got);
    for (int i = 0; i < NI; i++) check($sformatf("mid ch%0d", i), got[i], 0);
    // random values inside the ranges
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NI; i++)
        xs[i] = mn[i] + longint'($urandom_range(32'(mx[i] - mn[i])));
      apply(xs, got);
      for (int i = 0; i < NI; i++) begin
        longint e;
        e = (((xs[i] - mn[i]) * sc[i] + (1 << (F - 1))) >>> F) - (1 << F);
        check($sformatf("ch%0d", i), got[i], e);
      end
      for (int i = NI; i < NO; i++) check($sformatf("pad%0d", i), got[i], 0);
    end
    @(negedge clk);
    check("out_valid drops", longint'(out_valid), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
