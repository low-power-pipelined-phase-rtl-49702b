// tb_hybrid_ff4: random LD/HD/data with HD always covering LD. The flip-flop
// must take d at an edge where LD (and HD) are high and hold otherwise; HD
// alone must not load it.
module tb_hybrid_ff4;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b0, ld, hd;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0, loads = 0, hd_only = 0;

  hybrid_ff4 #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .ld(ld), .hd(hd), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 1'b0; hd = 1'b0; d = '0; ref_q = '0;
    #12 rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      ld = ($urandom_range(3) == 0);
      hd = ld | ($urandom_range(1) == 0);
      d  = W'($urandom());
      if (ld) begin ref_q = d; loads++; end
      else if (hd) hd_only++;
      @(posedge clk); #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q=%h want %h ld=%b hd=%b", q, ref_q, ld, hd); end
    end
    checks++;
    if (loads == 0 || hd_only == 0) begin failures++; $display("FAIL loads=%0d hd_only=%0d", loads, hd_only); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
