// tb_cml_dff4: the post-skewing register must return after each rising edge
// the value applied during the previous cycle, and 0 after reset.
module tb_cml_dff4;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  cml_dff4 #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    repeat (200) begin
      @(negedge clk);
      prev = $urandom();
      d = prev;
      @(posedge clk); #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL q=%h want %h", q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
