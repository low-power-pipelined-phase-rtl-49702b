// tb_acc_core: the six pipelined stages against an ideal 24-bit accumulator.
// A random word F(n) is chosen every cycle; stage i is given slice i of
// F(n-i) (the skew the pre-skewing block provides). With P(n) = P(n-1) + F(n)
// the ideal phase, stage i must hold slice i of P(n) after edge n+i. Every
// stage is checked every cycle once the pipeline has filled.
module tb_acc_core;
  localparam int N = 24, M = 4, S = N / M, H = S + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] fcw_skewed, sum;
  logic [N-1:0] f_hist [H];   // f_hist[k] = F(n-k)
  logic [N-1:0] p_hist [H];   // p_hist[k] = P(n-k)
  int checks = 0, failures = 0, wraps = 0;

  acc_core #(.N(N), .M(M)) dut (.clk(clk), .rst_n(rst_n), .fcw_skewed(fcw_skewed), .sum(sum));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fcw_skewed = '0;
    foreach (f_hist[k]) begin f_hist[k] = '0; p_hist[k] = '0; end
    #12 rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      for (int k = H - 1; k > 0; k--) begin f_hist[k] = f_hist[k-1]; p_hist[k] = p_hist[k-1]; end
      f_hist[0] = N'($urandom());
      p_hist[0] = p_hist[1] + f_hist[0];
      if (p_hist[0] < p_hist[1]) wraps++;
      for (int i = 0; i < S; i++) fcw_skewed[M*i +: M] = f_hist[i][M*i +: M];
      @(posedge clk); #1;
      if (n >= S)
        for (int i = 0; i < S; i++) begin
          checks++;
          if (sum[M*i +: M] !== p_hist[i][M*i +: M]) begin
            failures++;
            $display("FAIL n=%0d stage %0d: %h want %h", n, i, sum[M*i +: M], p_hist[i][M*i +: M]);
          end
        end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL accumulator never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
