// tb_soc_decomp_top: end-to-end test of the SOC decompression architecture
// at its default size (16 channels, 20 cores of 32 scan chains, 64-bit
// decompressors, q = 4), with no parameter overridden.
//
// The testbench acts as the tester and as the cores.  It sends decompression
// modes and random data slices, and keeps, per core, a behavioural model of
// the scan chains that records every scan-in vector while the core's scan
// enable is high.  Independently of the design, it keeps a reference model
// of every core's decompressor (LFSR, injection and phase shifter written
// out bit by bit) and updates it on the cycles in which the schedule derived
// here from the mode says that core loads.  At each capture strobe the scan
// chain contents of every capturing core are compared with the reference,
// which checks broadcasting, per-core gating, clearing and the retention of
// the last q slices' free variables across core sets.  Strobes, cycle counts
// and the end-of-test marker are checked as well, and every mechanism
// (m = 1, 2, 3, multi-core sets, pre-load, retained state used, core reuse
// in set 3, stalls, end of test) is counted and must occur.
module tb_soc_decomp_top;
  import soc_decomp_pkg::*;
  localparam int unsigned C = DEF_CHANNELS, NC = DEF_CORES, NCH = DEF_CHAINS;
  localparam int unsigned L = DEF_LFSR_LEN, Q = DEF_Q, W = (NC + C - 1) / C;
  localparam int unsigned MAXLEN = 128;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [C-1:0] slice;
  logic [NC-1:0][NCH-1:0] scan_in;
  logic [NC-1:0] scan_en, capture;
  logic mode_start, test_done;
  logic [1:0] cur_m, cur_set;
  ctrl_state_e ctrl_state;

  int checks = 0, failures = 0;
  int n_m[4] = '{0, 0, 0, 0}, n_multi = 0, n_preload = 0, n_retained = 0;
  int n_reuse = 0, n_stall = 0, n_capture_cmp = 0, n_done = 0;

  always #5 clk = ~clk;

  soc_decomp_top dut (
    .clk, .rst_n, .run, .tester_slice(slice), .core_scan_in(scan_in),
    .core_scan_en(scan_en), .core_capture(capture), .mode_start, .cur_m,
    .cur_set, .ctrl_state, .test_done);

  // ---- behavioural scan chains of the cores (what the design delivered) ----
  logic [NCH-1:0] chain_got [NC][MAXLEN];   // [0] = most recent shift
  always_ff @(posedge clk) begin
    for (int i = 0; i < NC; i++)
      if (scan_en[i]) begin
        for (int d = MAXLEN - 1; d > 0; d--) chain_got[i][d] <= chain_got[i][d-1];
        chain_got[i][0] <= scan_in[i];
      end
  end

  // ---- reference model -----------------------------------------------------
  function automatic int slen(int i);
    return 60 + (37 * i) % 61;
  endfunction

  function automatic int set_max_len(logic [NC-1:0] v);
    int mx = 1;
    for (int i = 0; i < NC; i++) if (v[i] && slen(i) > mx) mx = slen(i);
    return mx;
  endfunction

  function automatic logic [L-1:0] ref_next(logic [L-1:0] s, logic [C-1:0] sl, logic clr);
    logic [L-1:0] n;
    logic msb;
    msb = s[L-1];
    for (int i = L - 1; i >= 1; i--) n[i] = s[i-1];
    n[0] = msb;
    n[1] ^= msb; n[3] ^= msb; n[4] ^= msb;
    if (clr) n = '0;
    for (int k = 0; k < C; k++) n[4*k] ^= sl[k];
    return n;
  endfunction

  function automatic int t3(int j);
    int a, b, c;
    a = (2*j) % L; b = (5*j + 17) % L; c = (11*j + 40) % L;
    while (c == a || c == b) c = (c + 1) % L;
    return c;
  endfunction

  function automatic logic [NCH-1:0] ref_out(logic [L-1:0] n);
    logic [NCH-1:0] o;
    for (int j = 0; j < NCH; j++) o[j] = n[(2*j) % L] ^ n[(5*j + 17) % L] ^ n[t3(j)];
    return o;
  endfunction

  logic [L-1:0]   ref_st [NC];
  logic [NCH-1:0] chain_exp [NC][MAXLEN];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int run_cycles;

  // One running cycle.  e_ld/e_cl/e_se/e_cp: this testbench's own schedule.
  task automatic step(input logic [C-1:0] sl, input logic exp_ms,
                      input logic [NC-1:0] e_ld, e_cl, e_se, e_cp);
    while (($urandom % 16) == 0) begin
      @(negedge clk);
      run = 1'b0; slice = C'($urandom); #1;
      check(scan_en == '0 && capture == '0, "no strobes while stalled");
      n_stall++;
      @(posedge clk);
    end
    @(negedge clk);
    run = 1'b1; slice = sl; #1;
    check(mode_start == exp_ms, "mode_start");
    check(scan_en == e_se, "scan enable");
    check(capture == e_cp, "capture");
    for (int i = 0; i < NC; i++) begin
      if (e_cp[i]) begin
        // Capture: the chains hold the last slen(i) shifted vectors.
        logic ok = 1'b1;
        for (int d = 0; d < slen(i); d++) if (chain_got[i][d] != chain_exp[i][d]) ok = 1'b0;
        check(ok, "scan chain contents at capture");
        n_capture_cmp++;
      end
      if (e_ld[i]) begin
        logic [L-1:0] nx = ref_next(ref_st[i], sl, e_cl[i]);
        if (e_se[i]) begin
          check(scan_in[i] == ref_out(nx), "scan-in bits");
          for (int d = MAXLEN - 1; d > 0; d--) chain_exp[i][d] = chain_exp[i][d-1];
          chain_exp[i][0] = ref_out(nx);
        end
        ref_st[i] = nx;
      end
    end
    run_cycles++;
    @(posedge clk);
  endtask

  task automatic do_mode(input int m, input logic [NC-1:0] s0, s1, s2);
    logic [2:0][NC-1:0] sets;
    logic [W*C-1:0] v;
    int expected;
    sets = {s2, s1, s0};
    n_m[m]++;
    run_cycles = 0;
    expected = 1 + m * W;
    for (int k = 0; k < m; k++) expected += set_max_len(sets[k]) + 1;
    step({C'($urandom) & ~C'(3)} | C'(m), 1'b1, '0, '0, '0, '0);
    for (int k = 0; k < m; k++) begin
      v = (W*C)'(sets[k]);
      for (int w = 0; w < W; w++) step(v[w*C +: C], 1'b0, '0, '0, '0, '0);
    end
    for (int k = 0; k < m; k++) begin
      int len = set_max_len(sets[k]);
      int ps = (len > Q) ? len - Q : 0;
      logic [NC-1:0] nxt = (k + 1 < m) ? sets[k+1] : '0;
      if ($countones(sets[k]) > 1) n_multi++;
      if (nxt != '0) n_preload++;
      if (k == 2 && (sets[2] & sets[0]) != '0) n_reuse++;
      if (k > 0) for (int i = 0; i < NC; i++) if (sets[k][i] && ref_st[i] != '0) n_retained++;
      for (int c = 0; c < len; c++)
        step(C'($urandom), 1'b0,
             sets[k] | ((c >= ps) ? nxt : '0),
             ((k == 0 && c == 0) ? sets[k] : '0) | ((c == ps) ? nxt : '0),
             sets[k], '0);
      step(C'($urandom), 1'b0, '0, '0, '0, sets[k]);
    end
    check(run_cycles == expected, "cycles per decompression");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slice = '0;
    for (int i = 0; i < NC; i++) ref_st[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Conventional decompression of one core, then of a core set.
    do_mode(1, 20'h00002, '0, '0);
    do_mode(1, 20'h0a410, '0, '0);
    // Retained free variables: set 2 pre-loaded in the last q slices.
    do_mode(2, 20'h00300, 20'h00041, '0);
    // Three sets; set 3 reuses a core of set 1.
    do_mode(3, 20'h01001, 20'h20020, 20'h00801);
    for (int t = 0; t < 10; t++) begin
      automatic logic [NC-1:0] a, b, c;
      automatic int m = 1 + ($urandom % 3);
      a = NC'($urandom) | 20'h1;
      b = NC'($urandom) & ~a; if (b == '0) b = 20'h80000 & ~a;
      c = NC'($urandom) & ~b; if (c == '0) c = 20'h00001 & ~b;
      do_mode(m, a, (m > 1) ? b : '0, (m > 2) ? c : '0);
    end
    // End of test.
    step(C'(0), 1'b1, '0, '0, '0, '0);
    repeat (2) begin
      @(negedge clk); run = 1'b1; slice = C'($urandom); #1;
      check(test_done && scan_en == '0 && capture == '0, "done after m = 0");
      if (test_done) n_done++;
      @(posedge clk);
    end
    $display("mechanisms: m1=%0d m2=%0d m3=%0d multi_core_sets=%0d preloads=%0d retained_used=%0d",
             n_m[1], n_m[2], n_m[3], n_multi, n_preload, n_retained);
    $display("            core_reuse=%0d stalls=%0d captures_compared=%0d end_of_test=%0d",
             n_reuse, n_stall, n_capture_cmp, n_done);
    check(n_m[1] > 0, "m = 1 seen");
    check(n_m[2] > 0, "m = 2 seen");
    check(n_m[3] > 0, "m = 3 seen");
    check(n_multi > 0, "multi-core set seen");
    check(n_preload > 0, "pre-load seen");
    check(n_retained > 0, "retained state used");
    check(n_reuse > 0, "core reuse in set 3 seen");
    check(n_stall > 0, "stall seen");
    check(n_capture_cmp > 0, "capture compared");
    check(n_done > 0, "end of test seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
