// Self-checking testbench of col_mac in both layer shapes of the IGBT ANN:
// 32 x 8 (hidden layer) and 80 x 32 (output layer). Random weights, biases and
// inputs are loaded, several runs are made, and every output is compared with
// a reference computed here with exact 64-bit integer arithmetic and the same
// round-to-nearest and saturation rule. Also checked: the run length is
// (ROWS/LANES)*COLS MAC clocks plus the start clock, a saturating case, and that coefficients persist.
module tb_col_mac;
  localparam int W = 32, F = 16, LANES = 8;
  localparam int R1 = 32, C1 = 8;
  localparam int R2 = 80, C2 = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- instance 1: 32 x 8 ----------------
  logic w_we1, b_we1, start1, busy1, done1;
  logic [$clog2(R1)-1:0] w_row1, b_row1;
  logic [$clog2(C1)-1:0] w_col1;
  logic signed [W-1:0] w_d1, b_d1;
  logic signed [W-1:0] x1 [C1];
  logic signed [W-1:0] y1 [R1];
  col_mac #(.ROWS(R1), .COLS(C1), .LANES(LANES), .W(W), .F(F)) dut1 (
    .clk, .rst_n, .w_we(w_we1), .w_row(w_row1), .w_col(w_col1), .w_data(w_d1),
    .b_we(b_we1), .b_row(b_row1), .b_data(b_d1), .start(start1), .x_in(x1),
    .busy(busy1), .done(done1), .y(y1));

  // ---------------- instance 2: 80 x 32 ----------------
  logic w_we2, b_we2, start2, busy2, done2;
  logic [$clog2(R2)-1:0] w_row2, b_row2;
  logic [$clog2(C2)-1:0] w_col2;
  logic signed [W-1:0] w_d2, b_d2;
  logic signed [W-1:0] x2 [C2];
  logic signed [W-1:0] y2 [R2];
  col_mac #(.ROWS(R2), .COLS(C2), .LANES(LANES), .W(W), .F(F)) dut2 (
    .clk, .rst_n, .w_we(w_we2), .w_row(w_row2), .w_col(w_col2), .w_data(w_d2),
    .b_we(b_we2), .b_row(b_row2), .b_data(b_d2), .start(start2), .x_in(x2),
    .busy(busy2), .done(done2), .y(y2));

  // reference copies of the coefficients
  longint wr1 [R1][C1]; longint br1 [R1];
  longint wr2 [R2][C2]; longint br2 [R2];

  function automatic longint rnd(input int range_q);  // uniform in [-range_q, range_q]
    return longint'($urandom_range(2 * range_q)) - range_q;
  endfunction

  function automatic longint ref_word(input longint s);  // s has 2F fractional bits
    longint r;
    r = (s + (64'sd1 <<< (F - 1))) >>> F;
    if (r > 64'sd2147483647) r = 64'sd2147483647;
    if (r < -64'sd2147483648) r = -64'sd2147483648;
    return r;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load1(input int wrange, input int brange);
    for (int r = 0; r < R1; r++) begin
      for (int c = 0; c < C1; c++) begin
        wr1[r][c] = rnd(wrange);
        @(negedge clk); w_we1 = 1; w_row1 = r[$clog2(R1)-1:0]; w_col1 = c[$clog2(C1)-1:0]; w_d1 = W'(wr1[r][c]);
      end
      br1[r] = rnd(brange);
      @(negedge clk); w_we1 = 0; b_we1 = 1; b_row1 = r[$clog2(R1)-1:0]; b_d1 = W'(br1[r]);
      @(negedge clk); b_we1 = 0;
    end
  endtask

  task automatic load2(input int wrange, input int brange);
    for (int r = 0; r < R2; r++) begin
      for (int c = 0; c < C2; c++) begin
        wr2[r][c] = rnd(wrange);
        @(negedge clk); w_we2 = 1; w_row2 = r[$clog2(R2)-1:0]; w_col2 = c[$clog2(C2)-1:0]; w_d2 = W'(wr2[r][c]);
      end
      br2[r] = rnd(brange);
      @(negedge clk); w_we2 = 0; b_we2 = 1; b_row2 = r[$clog2(R2)-1:0]; b_d2 = W'(br2[r]);
      @(negedge clk); b_we2 = 0;
    end
  endtask

  task automatic run1(input int xrange);
    longint xs [C1];
    int cyc;
    for (int c = 0; c < C1; c++) begin xs[c] = rnd(xrange); x1[c] = W'(xs[c]); end
    @(negedge clk); start1 = 1;
    @(negedge clk); start1 = 0;
    cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    check("run length 32x8", cyc, (R1 / LANES) * C1 + 1);
    for (int r = 0; r < R1; r++) begin
      longint s = br1[r] <<< F;
      for (int c = 0; c < C1; c++) s += wr1[r][c] * xs[c];
      check($sformatf("y1[%0d]", r), longint'(y1[r]), ref_word(s));
    end
  endtask

  task automatic run2(input int xrange);
    longint xs [C2];
    int cyc;
    for (int c = 0; c < C2; c++) begin xs[c] = rnd(xrange); x2[c] = W'(xs[c]); end
    @(negedge clk); start2 = 1;
    @(negedge clk); start2 = 0;
    cyc = 1;
    while (!done2) begin @(negedge clk); cyc++; end
    check("run length 80x32", cyc, (R2 / LANES) * C2 + 1);
    for (int r = 0; r < R2; r++) begin
      longint s = br2[r] <<< F;
      for (int c = 0; c < C2; c++) s += wr2[r][c] * xs[c];
      check($sformatf("y2[%0d]", r), longint'(y2[r]), ref_word(s));
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {w_we1, b_we1, start1, w_we2, b_we2, start2} = '0;
    w_row1 = '0; w_col1 = '0; b_row1 = '0; w_d1 = '0; b_d1 = '0;
    w_row2 = '0; w_col2 = '0; b_row2 = '0; w_d2 = '0; b_d2 = '0;
    for (int c = 0; c < C1; c++) x1[c] = '0;
    for (int c = 0; c < C2; c++) x2[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // weights in (-4,4), biases in (-2,2), inputs in (-1,1) (Q16.16)
    load1(4 << F, 2 << F);
    for (int i = 0; i < 5; i++) run1(1 << F);
    load2(4 << F, 2 << F);
    for (int i = 0; i < 3; i++) run2(1 << F);
    // coefficients persist: a second run on new inputs, no reload
    run1(1 << F);
    // large values drive some outputs into saturation
    load1(32'h4000_0000, 32'h4000_0000);
    run1(32'h4000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
