// tb_lsg_register: checks one load-signal-generator cell in both clock halves.
// The input changes just after each rising edge (as a register output does).
// With in(c) the input during cycle c the expected outputs are
//   first (high) half of cycle c:  d = in(c-1), h = in(c-1)
//   second (low) half of cycle c:  d = in(c-1), h = in(c) | in(c-1)
// For an isolated one-cycle pulse, h must be high for exactly three half
// cycles and rise one half cycle before d.
module tb_lsg_register;
  logic clk = 1'b0, rst_n = 1'b0, in, d, h;
  logic in_prev, in_cur;
  int checks = 0, failures = 0;
  int h_half = 0, pulses = 0;
  bit h_before_d;

  lsg_register dut (.clk(clk), .rst_n(rst_n), .in(in), .d(d), .h(h));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic want_d, input logic want_h, input string where);
    checks++;
    if (d !== want_d || h !== want_h) begin
      failures++;
      $display("FAIL %s: d=%b h=%b want d=%b h=%b", where, d, h, want_d, want_h);
    end
  endtask

  // One cycle: drive in, then check both halves.
  task automatic cycle(input logic v);
    @(posedge clk);
    #1 in = v;
    in_prev = in_cur;
    in_cur  = v;
    #1 check(in_prev, in_prev, "high half");
    @(negedge clk);
    #1 check(in_prev, in_cur | in_prev, "low half");
  endtask

  initial begin
    in = 1'b0; in_prev = 1'b0; in_cur = 1'b0;
    #7;
    checks++;
    if (d !== 1'b0 || h !== 1'b0) begin failures++; $display("FAIL reset"); end
    #5 rst_n = 1'b1;
    // Random stream.
    repeat (300) cycle(logic'($urandom_range(1)));
    repeat (3) cycle(1'b0);
    // Isolated pulses: measure the width of h and its lead over d.
    repeat (5) begin
      fork
        begin
          cycle(1'b1);
          repeat (4) cycle(1'b0);
        end
        begin
          automatic int n = 0;
          automatic bit seen_h = 0, lead = 0;
          repeat (10) begin
            @(clk); #1;
            if (h) n++;
            if (h && !d && !seen_h) lead = 1;
            if (h) seen_h = 1;
          end
          h_half = n;
          h_before_d = lead;
        end
      join
      pulses++;
      checks++;
      if (h_half != 3 || !h_before_d) begin
        failures++;
        $display("FAIL pulse: h high for %0d half cycles (want 3), leads d: %0b", h_half, h_before_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
