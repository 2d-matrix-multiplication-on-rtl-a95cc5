// tb_operand_skew -- checks that lane l of the skew buffer reproduces its
// input N-1-l cycles later, for random data, with N = 4 and 8-bit lanes.
module tb_operand_skew;
  localparam int N = 4;
  localparam int W = 8;

  logic         clk = 0, rst_n = 0;
  logic [W-1:0] din  [N];
  logic [W-1:0] dout [N];
  logic [W-1:0] hist [$][N];
  int           checks = 0, failures = 0;

  operand_skew #(.N(N), .W(W)) dut (.clk, .rst_n, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < N; l++) din[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int l = 0; l < N; l++) din[l] = W'($urandom);
      hist.push_front(din);
      #1;
      for (int l = 0; l < N; l++) begin
        if (t >= N - 1 - l) begin
          checks++;
          if (dout[l] != hist[N-1-l][l]) begin
            failures++;
            $display("FAIL lane %0d t=%0d got %h want %h", l, t, dout[l], hist[N-1-l][l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
