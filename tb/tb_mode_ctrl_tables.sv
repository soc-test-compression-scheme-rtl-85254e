// tb_mode_ctrl_tables: self-checking test of the two table-driven control
// styles of the mode controller (16 channels, 20 cores, q = 4, the example
// mode table).
//
// Instance u_i reads a table index each decompression (CTRL_INDEX, 8
// entries): the testbench sends random indices, then the end flag.  Instance
// u_n reads one "next mode" bit (CTRL_INCREMENT, 4 entries): the testbench
// repeats each entry a random number of times and steps past the last one to
// end the test.  The table contents and the expected per-core strobes of
// every cycle are worked out here from the table formula; each decompression
// must take exactly 1 + sum_k (L_k + 1) running cycles.
module tb_mode_ctrl_tables;
  import soc_decomp_pkg::*;
  localparam int unsigned C = 16, NC = 20, Q = 4;

  logic clk = 1'b0, rst_n = 1'b0, run_i = 1'b0, run_n = 1'b0;
  logic [C-1:0] slice;
  logic [NC-1:0] ld_i, cl_i, se_i, cp_i, ld_n, cl_n, se_n, cp_n;
  logic ms_i, ms_n, done_i, done_n;
  logic [1:0] m_i, m_n, set_i, set_n;
  ctrl_state_e st_i, st_n;
  logic sel_n = 1'b0;   // which instance is being exercised
  int checks = 0, failures = 0, n_m[4] = '{0, 0, 0, 0}, n_stay = 0, n_step = 0;

  always #5 clk = ~clk;

  mode_ctrl #(.C(C), .NCORES(NC), .Q(Q), .CTRL_STYLE(CTRL_INDEX), .NMODES(8)) u_i (
    .clk, .rst_n, .run(run_i), .slice, .dec_load(ld_i), .dec_clear(cl_i), .scan_en(se_i),
    .capture(cp_i), .mode_start(ms_i), .cur_m(m_i), .cur_set(set_i), .state(st_i),
    .done(done_i));
  mode_ctrl #(.C(C), .NCORES(NC), .Q(Q), .CTRL_STYLE(CTRL_INCREMENT), .NMODES(4)) u_n (
    .clk, .rst_n, .run(run_n), .slice, .dec_load(ld_n), .dec_clear(cl_n), .scan_en(se_n),
    .capture(cp_n), .mode_start(ms_n), .cur_m(m_n), .cur_set(set_n), .state(st_n),
    .done(done_n));

  function automatic int slen(int i);
    return 60 + (37 * i) % 61;
  endfunction

  function automatic int set_max_len(logic [NC-1:0] v);
    int mx = 1;
    for (int i = 0; i < NC; i++) if (v[i] && slen(i) > mx) mx = slen(i);
    return mx;
  endfunction

  // Example table: entry j has m = 1 + j%3, set k = cores with (i+j+7k)%5 == 0.
  function automatic int tab_m(int j);
    return 1 + j % 3;
  endfunction
  function automatic logic [NC-1:0] tab_set(int j, int k);
    logic [NC-1:0] v = '0;
    if (k < tab_m(j)) for (int i = 0; i < NC; i++) v[i] = ((i + j + 7 * k) % 5) == 0;
    return v;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int run_cycles;

  task automatic step(input logic [C-1:0] sl, input logic exp_ms,
                      input logic [NC-1:0] e_ld, e_cl, e_se, e_cp);
    @(negedge clk);
    run_i = !sel_n; run_n = sel_n; slice = sl; #1;
    if (!sel_n) begin
      check(ms_i == exp_ms, "mode_start (index)");
      check(ld_i == e_ld && cl_i == e_cl, "load/clear (index)");
      check(se_i == e_se && cp_i == e_cp, "shift/capture (index)");
    end else begin
      check(ms_n == exp_ms, "mode_start (increment)");
      check(ld_n == e_ld && cl_n == e_cl, "load/clear (increment)");
      check(se_n == e_se && cp_n == e_cp, "shift/capture (increment)");
    end
    run_cycles++;
    @(posedge clk);
  endtask

  // One decompression with table entry j; ctl is the control slice.
  task automatic do_entry(input int j, input logic [C-1:0] ctl);
    int m = tab_m(j);
    int expected = 1;
    n_m[m]++;
    for (int k = 0; k < m; k++) expected += set_max_len(tab_set(j, k)) + 1;
    run_cycles = 0;
    step(ctl, 1'b1, '0, '0, '0, '0);
    for (int k = 0; k < m; k++) begin
      logic [NC-1:0] cur = tab_set(j, k);
      logic [NC-1:0] nxt = (k + 1 < m) ? tab_set(j, k + 1) : '0;
      int len = set_max_len(cur);
      int ps = (len > Q) ? len - Q : 0;
      for (int c = 0; c < len; c++)
        step(C'($urandom), 1'b0, cur | ((c >= ps) ? nxt : '0),
             ((k == 0 && c == 0) ? cur : '0) | ((c == ps) ? nxt : '0), cur, '0);
      step(C'($urandom), 1'b0, '0, '0, '0, cur);
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
    // Index style: 3 index bits, bit 3 = end of test, upper bits ignored.
    sel_n = 1'b0;
    for (int t = 0; t < 10; t++) begin
      automatic int j = (t < 3) ? t : int'($urandom % 8);
      do_entry(j, (C'($urandom) & ~C'(4'hf)) | C'(j));
    end
    step(C'(4'h8), 1'b1, '0, '0, '0, '0);
    @(negedge clk); #1;
    check(done_i && !done_n, "index style: done after end flag");
    // Increment style: entry 0 after reset; slice[0] = step to next entry.
    sel_n = 1'b1;
    @(negedge clk); run_i = 1'b0;
    for (int j = 0; j < 4; j++) begin
      automatic int reps = 1 + ($urandom % 2);
      for (int r = 0; r < reps; r++) begin
        automatic logic inc = (j > 0 && r == 0);
        if (inc) n_step++; else n_stay++;
        do_entry(j, (C'($urandom) & ~C'(1)) | C'(inc));
      end
    end
    step(C'(1), 1'b1, '0, '0, '0, '0);
    @(negedge clk); #1;
    check(done_n, "increment style: done after stepping past the last entry");
    $display("mechanisms: m1=%0d m2=%0d m3=%0d stay=%0d step=%0d", n_m[1], n_m[2], n_m[3],
             n_stay, n_step);
    check(n_m[1] > 0 && n_m[2] > 0 && n_m[3] > 0 && n_stay > 0 && n_step > 0,
          "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
