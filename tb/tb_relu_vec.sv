// Self-checking testbench of relu_vec (32 x 32-bit): random vectors, including
// zero and the most negative and positive words, are compared with max(x, 0);
// the one-clock latency of out_valid and the hold of out between inputs are
// checked as well.
module tb_relu_vec;
  localparam int N = 32, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  logic signed [W-1:0] in_vec [N];
  logic signed [W-1:0] out_vec [N];
  logic signed [W-1:0] exp_vec [N];

  relu_vec #(.N(N), .W(W)) dut (.clk, .rst_n, .in_valid, .in_vec, .out_valid, .out_vec);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    for (int i = 0; i < N; i++) in_vec[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < N; i++) begin
        case ((t + i) % 9)
          0: in_vec[i] = 32'sh8000_0000;
          1: in_vec[i] = 32'sh7fff_ffff;
          2: in_vec[i] = '0;
          3: in_vec[i] = -32'sd1;
          default: in_vec[i] = $urandom;
        endcase
        exp_vec[i] = (in_vec[i] > 0) ? in_vec[i] : '0;
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check("out_valid after one clock", longint'(out_valid), 1);
      for (int i = 0; i < N; i++) check($sformatf("out[%0d]", i), longint'(out_vec[i]), longint'(exp_vec[i]));
      for (int i = 0; i < N; i++) in_vec[i] = $urandom;   // not valid: must not be taken
      @(negedge clk);
      check("out_valid drops", longint'(out_valid), 0);
      for (int i = 0; i < N; i++) check($sformatf("hold[%0d]", i), longint'(out_vec[i]), longint'(exp_vec[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
