// tb_load_signal_generator: random LOAD stream into the six-cell chain.
// With load(c) the LOAD value during cycle c, stage i (0 = first) must give
//   LD(i) = load(c-1-i)                      in both halves of cycle c
//   HD(i) = load(c-1-i)                      in the high half of cycle c
//   HD(i) = load(c-i) | load(c-1-i)          in the low half of cycle c
// i.e. LD(i) one cycle per stage later than LOAD, and HD(i) starting half a
// cycle before LD(i) and lasting 1.5 cycles for a single LOAD pulse.
module tb_load_signal_generator;
  localparam int S = 6;
  logic clk = 1'b0, rst_n = 1'b0, load;
  logic [S-1:0] ld, hd;
  logic [S:0] hist;      // hist[k] = load during cycle c-k
  int checks = 0, failures = 0, pulses = 0;

  load_signal_generator #(.STAGES(S)) dut (.clk(clk), .rst_n(rst_n), .load(load), .ld(ld), .hd(hd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [S-1:0] want_ld, input logic [S-1:0] want_hd, input string where);
    checks++;
    if (ld !== want_ld || hd !== want_hd) begin
      failures++;
      $display("FAIL %s t=%0t: ld=%b hd=%b want ld=%b hd=%b", where, $time, ld, hd, want_ld, want_hd);
    end
  endtask

  task automatic cycle(input logic v);
    logic [S-1:0] wl, wh;
    @(posedge clk);
    #1 load = v;
    hist = {hist[S-1:0], v};
    if (v) pulses++;
    for (int i = 0; i < S; i++) wl[i] = hist[i+1];
    #1 cmp(wl, wl, "high half");
    for (int i = 0; i < S; i++) wh[i] = hist[i] | hist[i+1];
    @(negedge clk);
    #1 cmp(wl, wh, "low half");
  endtask

  initial begin
    load = 1'b0; hist = '0;
    #7 cmp('0, '0, "reset");
    #5 rst_n = 1'b1;
    // Isolated pulses every eight cycles, then a random stream.
    repeat (10) begin
      cycle(1'b1);
      repeat (7) cycle(1'b0);
    end
    repeat (400) cycle(logic'($urandom_range(3) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
