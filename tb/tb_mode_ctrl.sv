// tb_mode_ctrl: self-checking test of the generic decompression-mode
// controller at its default size (16 channels, 20 cores).
//
// The testbench plays the tester: for each decompression it sends m and the
// core vectors, then data slices, and compares every per-core strobe
// (decompressor load and clear, scan enable, capture) in every cycle with a
// schedule worked out here from the mode alone.  Two controllers read the
// same slices: one with q = 4 and one with q = 70, longer than some shift
// phases, so that pre-loading from the first cycle of a phase is covered.
// `run` is dropped at random to check stalls.  The number of running cycles
// per decompression is compared with 1 + m*ceil(NCORES/C) + sum(L_k + 1).
module tb_mode_ctrl;
  import soc_decomp_pkg::*;
  localparam int unsigned C = 16, NC = 20, W = (NC + C - 1) / C;
  localparam int unsigned QA = 4, QB = 70;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [C-1:0] slice;
  logic [NC-1:0] ld_a, cl_a, se_a, cp_a, ld_b, cl_b, se_b, cp_b;
  logic ms_a, ms_b, done_a, done_b;
  logic [1:0] m_a, m_b, set_a, set_b;
  ctrl_state_e st_a, st_b;
  int checks = 0, failures = 0;
  int n_stall = 0, n_m[4] = '{0, 0, 0, 0}, n_early_preload = 0, n_reuse = 0;

  always #5 clk = ~clk;

  mode_ctrl #(.C(C), .NCORES(NC), .Q(QA)) u_a (
    .clk, .rst_n, .run, .slice, .dec_load(ld_a), .dec_clear(cl_a), .scan_en(se_a),
    .capture(cp_a), .mode_start(ms_a), .cur_m(m_a), .cur_set(set_a), .state(st_a),
    .done(done_a));
  mode_ctrl #(.C(C), .NCORES(NC), .Q(QB)) u_b (
    .clk, .rst_n, .run, .slice, .dec_load(ld_b), .dec_clear(cl_b), .scan_en(se_b),
    .capture(cp_b), .mode_start(ms_b), .cur_m(m_b), .cur_set(set_b), .state(st_b),
    .done(done_b));

  function automatic int slen(int i);
    return 60 + (37 * i) % 61;
  endfunction

  function automatic int set_max_len(logic [NC-1:0] v);
    int mx = 1;
    for (int i = 0; i < NC; i++) if (v[i] && slen(i) > mx) mx = slen(i);
    return mx;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int run_cycles;

  // One running cycle: random stalls first, then drive the slice, compare
  // both controllers' strobes with the expected values, clock.
  task automatic step(input logic [C-1:0] sl, input logic exp_ms,
                      input logic [NC-1:0] e_ld_a, e_cl_a, e_ld_b, e_cl_b, e_se, e_cp);
    while (($urandom % 8) == 0) begin
      @(negedge clk);
      run = 1'b0; slice = C'($urandom); #1;
      check(ld_a == '0 && se_a == '0 && cp_a == '0 && ld_b == '0 && !ms_a, "idle while stalled");
      n_stall++;
      @(posedge clk);
    end
    @(negedge clk);
    run = 1'b1; slice = sl; #1;
    check(ms_a == exp_ms && ms_b == exp_ms, "mode_start");
    check(ld_a == e_ld_a, "dec_load q=4");
    check(cl_a == e_cl_a, "dec_clear q=4");
    check(ld_b == e_ld_b, "dec_load q=70");
    check(cl_b == e_cl_b, "dec_clear q=70");
    check(se_a == e_se && se_b == e_se, "scan_en");
    check(cp_a == e_cp && cp_b == e_cp, "capture");
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
    step({C'($urandom) & ~C'(3)} | C'(m), 1'b1, '0, '0, '0, '0, '0, '0);
    for (int k = 0; k < m; k++) begin
      v = (W*C)'(sets[k]);
      for (int w = 0; w < W; w++) step(v[w*C +: C], 1'b0, '0, '0, '0, '0, '0, '0);
    end
    for (int k = 0; k < m; k++) begin
      int len = set_max_len(sets[k]);
      int ps_a = (len > QA) ? len - QA : 0;
      int ps_b = (len > QB) ? len - QB : 0;
      logic [NC-1:0] nxt = (k + 1 < m) ? sets[k+1] : '0;
      if (k > 0 && (sets[k] & (k == 2 ? sets[0] : '0)) != '0) n_reuse++;
      if (nxt != '0 && ps_b == 0) n_early_preload++;
      for (int c = 0; c < len; c++) begin
        logic [NC-1:0] la, ca, lb, cb;
        la = sets[k] | ((c >= ps_a) ? nxt : '0);
        lb = sets[k] | ((c >= ps_b) ? nxt : '0);
        ca = ((k == 0 && c == 0) ? sets[k] : '0) | ((c == ps_a) ? nxt : '0);
        cb = ((k == 0 && c == 0) ? sets[k] : '0) | ((c == ps_b) ? nxt : '0);
        step(C'($urandom), 1'b0, la, ca, lb, cb, sets[k], '0);
      end
      step(C'($urandom), 1'b0, '0, '0, '0, '0, '0, sets[k]);
    end
    check(run_cycles == expected, "cycles per decompression");
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slice = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // m = 1: a single core, then several cores (longest scan length rules).
    do_mode(1, 20'h00001, '0, '0);
    do_mode(1, 20'h00109, '0, '0);
    // m = 2: core 8 (112 cells) then core 0 (60 cells).
    do_mode(2, 20'h00100, 20'h00001, '0);
    // m = 2 with a short first set (core 0, 60 cells < q = 70).
    do_mode(2, 20'h00001, 20'h80010, '0);
    // m = 3, set 3 reuses a core of set 1.
    do_mode(3, 20'h00005, 20'h40002, 20'h00004);
    // Random disjoint modes.
    for (int t = 0; t < 12; t++) begin
      automatic logic [NC-1:0] a, b, c;
      automatic int m = 1 + ($urandom % 3);
      a = NC'($urandom); if (a == '0) a = 20'h1;
      b = NC'($urandom) & ~a; if (b == '0) b = ~a & 20'h80000;
      c = NC'($urandom) & ~b; if (c == '0) c = ~b & 20'h00001;
      do_mode(m, a, (m > 1) ? b : '0, (m > 2) ? c : '0);
    end
    // End of test.
    step(C'(0), 1'b1, '0, '0, '0, '0, '0, '0);
    repeat (3) begin
      @(negedge clk); run = 1'b1; slice = C'($urandom); #1;
      check(done_a && done_b && ld_a == '0 && se_a == '0, "done after m = 0");
      @(posedge clk);
    end
    $display("mechanisms: m1=%0d m2=%0d m3=%0d stalls=%0d early_preload=%0d core_reuse=%0d",
             n_m[1], n_m[2], n_m[3], n_stall, n_early_preload, n_reuse);
    check(n_m[1] > 0 && n_m[2] > 0 && n_m[3] > 0, "all values of m used");
    check(n_stall > 0 && n_early_preload > 0 && n_reuse > 0, "stall, early preload, core reuse seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
