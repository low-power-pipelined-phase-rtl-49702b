// tb_cmos_dff4: random load and data; the register must take d only at an
// edge where load is high and hold its value otherwise.
module tb_cmos_dff4;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b0, load;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0, loads = 0;

  cmos_dff4 #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; d = '0; ref_q = '0;
    #12 rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      load = ($urandom_range(3) == 0);
      d    = W'($urandom());
      if (load) begin ref_q = d; loads++; end
      @(posedge clk); #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q=%h want %h load=%b", q, ref_q, load); end
    end
    checks++;
    if (loads == 0) begin failures++; $display("FAIL no load happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
