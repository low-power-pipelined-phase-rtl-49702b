// tb_post_skewing: random stage sums every cycle. The K-bit phase must hold
// the top stage's current slice, the next stage's slice of one cycle ago and
// the third stage's slice of two cycles ago (for N = 24, K = 12, M = 4).
module tb_post_skewing;
  localparam int N = 24, K = 12, M = 4, S = N / M, SO = K / M;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] sum;
  logic [K-1:0] phase, want;
  logic [N-1:0] hist [SO];   // hist[j] = sum applied j cycles ago
  int checks = 0, failures = 0;

  post_skewing #(.N(N), .K(K), .M(M)) dut (.clk(clk), .rst_n(rst_n), .sum(sum), .phase(phase));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sum = '0;
    foreach (hist[j]) hist[j] = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #1;
      for (int j = SO - 1; j > 0; j--) hist[j] = hist[j-1];
      sum = N'($urandom());
      hist[0] = sum;
      #1;
      for (int j = 0; j < SO; j++) want[K-1-M*j -: M] = hist[j][M*(S-1-j) +: M];
      if (n >= SO) begin
        checks++;
        if (phase !== want) begin
          failures++;
          $display("FAIL n=%0d phase=%h want %h", n, phase, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
