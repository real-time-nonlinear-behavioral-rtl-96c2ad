// Self-checking testbench of igbt_ann at its full size (8 -> 32 -> 80).
// Random coefficients are loaded through the load port, several inference
// passes are run and all 80 outputs are compared with a reference computed
// here in exact integer arithmetic: each layer's sum rounded to nearest and
// saturated to 32 bits, ReLU in between. The pass latency (355 clocks from
// the start edge to done) and the busy flag are checked too.
module tb_igbt_ann;
  import igbt_ann_pkg::*;
  localparam int W = DATA_W, F = FRAC;
  localparam int NI = N_IN_PAD, NH = N_HID, NO = N_OUT;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we, start, busy, done;
  ld_sel_e ld_sel;
  logic [$clog2(NO)-1:0] ld_row;
  logic [$clog2(NH)-1:0] ld_col;
  logic signed [W-1:0] ld_data;
  logic signed [W-1:0] x_in [NI];
  logic signed [W-1:0] y [NO];

  igbt_ann dut (.clk, .rst_n, .ld_we, .ld_sel, .ld_row, .ld_col, .ld_data,
                .start, .x_in, .busy, .done, .y);

  longint w1 [NH][NI]; longint b1 [NH];
  longint w2 [NO][NH]; longint b2 [NO];

  function automatic longint rnd(input longint range_q);
    return longint'($urandom_range(32'(2 * range_q))) - range_q;
  endfunction

  function automatic longint to_word(input longint s);
    longint r = (s + (64'sd1 <<< (F - 1))) >>> F;
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

  task automatic put(input ld_sel_e sel, input int r, input int c, input longint v);
    @(negedge clk);
    ld_we = 1; ld_sel = sel; ld_row = r[$clog2(NO)-1:0]; ld_col = c[$clog2(NH)-1:0];
    ld_data = W'(v);
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic load_all();
    for (int r = 0; r < NH; r++) begin
      for (int c = 0; c < NI; c++) begin w1[r][c] = rnd(2 << F); put(LD_W1, r, c, w1[r][c]); end
      b1[r] = rnd(1 << F); put(LD_B1, r, 0, b1[r]);
    end
    for (int r = 0; r < NO; r++) begin
      for (int c = 0; c < NH; c++) begin w2[r][c] = rnd(1 << F); put(LD_W2, r, c, w2[r][c]); end
      b2[r] = rnd(1 << F); put(LD_B2, r, 0, b2[r]);
    end
  endtask

  task automatic pass(input int n_real);
    longint xs [NI]; longint h [NH];
    int cyc;
    for (int c = 0; c < NI; c++) begin
      xs[c] = (c < n_real) ? rnd(1 << F) : 0;
      x_in[c] = W'(xs[c]);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++; if (!busy) begin failures++; $display("FAIL busy not set"); end
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check("pass latency", cyc, 355);
    for (int r = 0; r < NH; r++) begin
      longint s = b1[r] <<< F;
      for (int c = 0; c < NI; c++) s += w1[r][c] * xs[c];
      h[r] = to_word(s);
      if (h[r] < 0) h[r] = 0;
    end
    for (int r = 0; r < NO; r++) begin
      longint s = b2[r] <<< F;
      for (int c = 0; c < NH; c++) s += w2[r][c] * h[c];
      check($sformatf("y[%0d]", r), longint'(y[r]), to_word(s));
    end
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL busy still set"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; start = 0; ld_sel = LD_W1; ld_row = '0; ld_col = '0; ld_data = '0;
    for (int c = 0; c < NI; c++) x_in[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_all();
    for (int i = 0; i < 6; i++) pass(N_IN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
