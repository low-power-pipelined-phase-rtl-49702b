// tb_pacc_top: end-to-end test of the phase accumulator at its default sizes
// (N = 24, K = 12, M = 4).
//
// Reference model: for a LOAD in cycle t, stage 0 first adds the new word at
// edge t+3, so the ideal phase is P(e) = P(e-1) + W(e), where W(e) is the
// word of the last LOAD in a cycle <= e-3 (0 before any). After edge e the
// output must equal bits 23..12 of P(e-5) (S-1 = 5 cycles of pipeline skew).
// ld/hd are checked in both clock halves against the LOAD history:
// LD(i) = load(c-1-i); HD(i) = LD(i) in the high half and
// load(c-i) | load(c-1-i) in the low half of cycle c.
//
// Phases of the run:
//   1. latency: one LOAD of 0x010000 from rest; the phase must stay 0 up to
//      edge t+7 and change at edge t+8;
//   2. the three frequency steps 0x010000, 0x050000, 0x710000, each held for
//      500 cycles (100 ns at a 5 GHz clock);
//   3. random words updated every eight cycles;
//   4. random words updated at the minimum spacing of six cycles.
// Counted and required at least once: LOAD events, LD pulses of every stage,
// HD leading LD by half a cycle, a carry across every stage boundary, a wrap
// of the phase output, cycles in which the pre-skewing block is idle.
module tb_pacc_top;
  localparam int N = 24, K = 12, M = 4, S = N / M;
  localparam int MAXC = 8192;

  logic clk = 1'b0, rst_n = 1'b0, load;
  logic [N-1:0] fcw;
  logic [K-1:0] phase;
  logic [S-1:0] ld, hd;

  pacc_top dut (.clk(clk), .rst_n(rst_n), .load(load), .fcw(fcw), .phase(phase), .ld(ld), .hd(hd));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;                       // index of the current cycle
  logic [N-1:0] p_ref [MAXC];        // ideal phase after each edge
  logic [MAXC-1:0] load_at;          // LOAD value per cycle
  logic [N-1:0] word_at [MAXC];      // FCW per cycle
  int n_load = 0, n_hd_lead = 0, n_wrap_ref = 0, n_wrap_out = 0, n_idle = 0;
  int n_ld [S];
  int n_carry [S-1];
  logic [K-1:0] last_phase;

  initial begin : watchdog
    repeat (MAXC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ld_ref(int c, int i);
    return (c - 1 - i >= 0) ? load_at[c-1-i] : 1'b0;
  endfunction

  function automatic logic [N-1:0] w_ref(int e);
    for (int t = e - 3; t >= 0; t--)
      if (load_at[t]) return word_at[t];
    return '0;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  // One cycle: the edge that starts cycle cyc has just happened.
  task automatic step(input logic v, input logic [N-1:0] w);
    logic [S-1:0] want_ld, want_hd;
    logic [N-1:0] prev;
    @(posedge clk);
    #1;
    // Reference phase for this edge.
    prev = (cyc > 0) ? p_ref[cyc-1] : '0;
    p_ref[cyc] = prev + w_ref(cyc);
    for (int i = 0; i < S - 1; i++) begin
      logic [N-1:0] mask;
      mask = (N'(1) << (M * (i + 1))) - N'(1);   // bits below boundary i
      if ((p_ref[cyc] & mask) < (prev & mask)) n_carry[i]++;
    end
    if (p_ref[cyc] < prev) n_wrap_ref++;
    checks++;
    if (cyc >= S - 1) begin
      if (phase !== p_ref[cyc-(S-1)][N-1:N-K])
        fail($sformatf("phase=%h want %h", phase, p_ref[cyc-(S-1)][N-1:N-K]));
    end else if (phase !== '0) fail($sformatf("phase=%h want 0", phase));
    if (phase < last_phase) n_wrap_out++;
    last_phase = phase;
    // Drive this cycle.
    load = v;
    fcw  = w;
    load_at[cyc] = v;
    word_at[cyc] = w;
    if (v) n_load++;
    // LD/HD, high half.
    for (int i = 0; i < S; i++) want_ld[i] = ld_ref(cyc, i);
    checks++;
    if (ld !== want_ld || hd !== want_ld) fail($sformatf("high half ld=%b hd=%b want %b", ld, hd, want_ld));
    for (int i = 0; i < S; i++) if (want_ld[i]) n_ld[i]++;
    if (want_ld == '0) n_idle++;
    // LD/HD, low half.
    @(negedge clk);
    #1;
    for (int i = 0; i < S; i++)
      want_hd[i] = want_ld[i] | ((i == 0) ? v : ld_ref(cyc, i - 1));
    checks++;
    if (ld !== want_ld || hd !== want_hd) fail($sformatf("low half ld=%b hd=%b want %b %b", ld, hd, want_ld, want_hd));
    for (int i = 0; i < S; i++) if (want_hd[i] && !want_ld[i]) n_hd_lead++;
    cyc++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) fail($sformatf("%s never happened", what));
  endtask

  initial begin
    int t0, wraps_before;
    load = 1'b0; fcw = '0; last_phase = '0; load_at = '0;
    foreach (n_ld[i]) n_ld[i] = 0;
    foreach (n_carry[i]) n_carry[i] = 0;
    #12 rst_n = 1'b1;

    // 1. Latency from rest.
    repeat (10) step(1'b0, '0);
    t0 = cyc;
    step(1'b1, 24'h010000);
    repeat (6) step(1'b0, 24'h010000);   // edges t0+1 .. t0+6 seen
    step(1'b0, 24'h010000);              // edge t0+7
    checks++;
    if (phase !== '0) fail($sformatf("phase moved before edge t+8: %h", phase));
    step(1'b0, 24'h010000);              // edge t0+8
    checks++;
    if (phase !== 12'h010) fail($sformatf("phase at edge t+8 is %h, want 010", phase));

    // 2. Frequency steps of the waveform figure, 500 cycles each.
    for (int k = 0; k < 3; k++) begin
      logic [N-1:0] w;
      w = (k == 0) ? 24'h010000 : (k == 1) ? 24'h050000 : 24'h710000;
      wraps_before = n_wrap_out;
      step(1'b1, w);
      repeat (499) step(1'b0, w);
      $display("  FCW %h: %0d phase wraps in 500 cycles", w, n_wrap_out - wraps_before);
    end

    // 3. Random words every eight cycles.
    repeat (300) begin
      logic [N-1:0] w;
      w = N'($urandom());
      step(1'b1, w);
      repeat (7) step(1'b0, w);
    end

    // 4. Random words at the minimum spacing.
    repeat (300) begin
      logic [N-1:0] w;
      w = N'($urandom());
      step(1'b1, w);
      repeat (S - 1) step(1'b0, N'($urandom()));   // FCW bus may change between loads
    end
    repeat (S + 2) step(1'b0, '0);

    $display("mechanism counts:");
    require("LOAD events", n_load);
    for (int i = 0; i < S; i++) require($sformatf("LD(%0d) pulses", i + 1), n_ld[i]);
    require("HD half-cycle leads", n_hd_lead);
    for (int i = 0; i < S - 1; i++) require($sformatf("carries stage %0d -> %0d", i + 1, i + 2), n_carry[i]);
    require("phase wrap-arounds (reference)", n_wrap_ref);
    require("phase wrap-arounds (output)", n_wrap_out);
    require("pre-skewing idle cycles", n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
