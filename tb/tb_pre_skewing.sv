// tb_pre_skewing: a new FCW every 6..10 cycles; the testbench makes its own
// LD/HD pulses (LD(i) one cycle after LD(i-1), HD(i) covering LD(i)) and
// expects slice i of fcw_skewed to change to the new word exactly at edge
// t+2+i for a LOAD in cycle t, and to hold its old value until then.
module tb_pre_skewing;
  localparam int N = 24, M = 4, S = N / M;
  logic clk = 1'b0, rst_n = 1'b0, load;
  logic [N-1:0] fcw, fcw_skewed, want;
  logic [S-1:0] ld, hd;
  logic [S:0]   lhist;          // lhist[k]: load k cycles ago (k = 0: this cycle)
  logic [N-1:0] whist [S+2];    // whist[k]: FCW presented k cycles ago on a load
  int checks = 0, failures = 0, updates = 0;

  pre_skewing #(.N(N), .M(M)) dut (.clk(clk), .rst_n(rst_n), .load(load), .fcw(fcw),
                                  .ld(ld), .hd(hd), .fcw_skewed(fcw_skewed));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock cycle: check the edge just passed, then drive this cycle.
  task automatic step(input logic v);
    @(posedge clk);
    #1;
    checks++;
    if (fcw_skewed !== want) begin
      failures++;
      $display("FAIL t=%0t fcw_skewed=%h want %h", $time, fcw_skewed, want);
    end
    load  = v;
    fcw   = N'($urandom());
    lhist = {lhist[S-1:0], v};
    for (int k = S + 1; k > 0; k--) whist[k] = whist[k-1];
    whist[0] = fcw;
    // LD(i) high in cycle t+1+i for a LOAD in cycle t; HD(i) covers it and
    // the cycle before.
    for (int i = 0; i < S; i++) begin
      ld[i] = lhist[i+1];
      hd[i] = lhist[i+1] | lhist[i];
    end
    // Slice i takes, at the coming edge, the word loaded i+1 cycles ago.
    for (int i = 0; i < S; i++)
      if (lhist[i+1]) begin
        want[M*i +: M] = whist[i+1][M*i +: M];
        updates++;
      end
  endtask

  initial begin
    load = 1'b0; fcw = '0; ld = '0; hd = '0; lhist = '0; want = '0;
    foreach (whist[k]) whist[k] = '0;
    #12 rst_n = 1'b1;
    repeat (100) begin
      int unsigned gap;
      gap = $urandom_range(10, S);
      step(1'b1);
      repeat (gap - 1) step(1'b0);
    end
    repeat (S + 2) step(1'b0);
    checks++;
    if (updates != 100 * S) begin failures++; $display("FAIL %0d slice updates", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
