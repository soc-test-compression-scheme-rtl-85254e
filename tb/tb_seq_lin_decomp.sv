// tb_seq_lin_decomp: self-checking test of the per-core sequential linear
// decompressor at its default size (16 channels, 64-bit LFSR, 32 chains).
//
// Three instances share load/clear: one is fed random slice stream A, one
// stream B, one A^B.  Checks: (1) every cycle the scan-in bits of the first
// instance match a bit-level reference model of the LFSR, injection points
// and phase shifter written out here; (2) superposition: scan_in(A) ^
// scan_in(B) == scan_in(A^B), the defining property of a linear
// decompressor; (3) with load low the state is held (retained free
// variables); (4) after clear the output depends only on the current slice.
module tb_seq_lin_decomp;
  localparam int unsigned C = 16, L = 64, N = 32;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, clear = 1'b0;
  logic [C-1:0] sa, sb, sx;
  logic [N-1:0] oa, ob, ox;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign sx = sa ^ sb;

  seq_lin_decomp #(.C(C), .LFSR_LEN(L), .NCHAINS(N)) u_a
    (.clk, .rst_n, .load, .clear, .slice(sa), .scan_in(oa));
  seq_lin_decomp #(.C(C), .LFSR_LEN(L), .NCHAINS(N)) u_b
    (.clk, .rst_n, .load, .clear, .slice(sb), .scan_in(ob));
  seq_lin_decomp #(.C(C), .LFSR_LEN(L), .NCHAINS(N)) u_x
    (.clk, .rst_n, .load, .clear, .slice(sx), .scan_in(ox));

  // Reference model: polynomial x^64 + x^4 + x^3 + x + 1, channel k into
  // stage 4k, chain j = stage 2j ^ stage (5j+17)%64 ^ stage t3(j).
  logic [L-1:0] ref_st;

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

  function automatic logic [N-1:0] ref_out(logic [L-1:0] n);
    logic [N-1:0] o;
    for (int j = 0; j < N; j++) o[j] = n[(2*j) % L] ^ n[(5*j + 17) % L] ^ n[t3(j)];
    return o;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [N-1:0] held_out;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sa = '0; sb = '0;
    ref_st = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Random load/clear/slice traffic.
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      sa    = C'($urandom);
      sb    = C'($urandom);
      load  = ($urandom % 4) != 0;
      clear = load && (($urandom % 40) == 0);
      #1;
      check(oa == ref_out(ref_next(ref_st, sa, clear)), "reference model");
      check((oa ^ ob) == ox, "superposition");
      @(posedge clk);
      if (load) ref_st = ref_next(ref_st, sa, clear);
    end
    // Hold: load low for several cycles must not change the state.
    @(negedge clk);
    load = 1'b0; clear = 1'b0; sa = '0; #1 held_out = oa;
    repeat (5) begin
      @(negedge clk);
      sa = '0; #1;
      check(oa == held_out, "state held while load is low");
    end
    // Clear: outputs of A and B decompressors (different histories) must
    // agree after a clear with the same slice.
    @(negedge clk);
    sa = 16'h5a3c; sb = 16'h5a3c; load = 1'b1; clear = 1'b1; #1;
    check(oa == ob, "clear removes history");
    check(oa == ref_out(ref_next('0, 16'h5a3c, 1'b0)), "clear output value");
    @(negedge clk);
    load = 1'b0; clear = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
