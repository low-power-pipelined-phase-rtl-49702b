// tb_acc4: random FCW slices and carry-ins into one 4-bit stage. A reference
// accumulator in the testbench computes {carry, sum} = sum + fcw + ci at each
// edge; the registered sum and carry out must match after every edge.
module tb_acc4;
  localparam int M = 4;
  logic clk = 1'b0, rst_n = 1'b0, ci, co;
  logic [M-1:0] fcw, sum;
  logic [M:0] ref_acc;   // {carry, sum}
  int checks = 0, failures = 0, carries = 0;

  acc4 #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .ci(ci), .sum(sum), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fcw = '0; ci = 1'b0; ref_acc = '0;
    #12 rst_n = 1'b1;
    repeat (1000) begin
      @(negedge clk);
      fcw = M'($urandom());
      ci  = logic'($urandom_range(1));
      ref_acc = (M+1)'(ref_acc[M-1:0]) + (M+1)'(fcw) + (M+1)'(ci);
      if (ref_acc[M]) carries++;
      @(posedge clk); #1;
      checks++;
      if ({co, sum} !== ref_acc) begin
        failures++;
        $display("FAIL co=%b sum=%h want %b %h", co, sum, ref_acc[M], ref_acc[M-1:0]);
      end
    end
    checks++;
    if (carries == 0) begin failures++; $display("FAIL no carry out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
