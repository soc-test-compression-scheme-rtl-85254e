// seq_lin_decomp: sequential linear decompressor local to one core.
//
// Each cycle in which `load` is high, the c-bit tester slice is XORed into an
// LFSR (c "free variables" enter the decompressor), and the new LFSR state
// drives the core's scan chain inputs through an XOR phase shifter.  Every
// scan-in bit is therefore a GF(2) linear function of the free variables the
// decompressor has absorbed, which is what lets test cubes be encoded by
// solving linear equations.  When `load` is low the state is held, so the
// free variables already absorbed are retained; this is how a core that is
// pre-loaded during the last q cycles of another core set's decompression
// keeps those free variables for its own test cube.  `clear` (with `load`)
// starts a new dependence chain: the old state is dropped and only the
// current slice enters.
//
// Following the reference scheme: an LFSR-based sequential linear
// decompressor per core that loads broadcast tester slices and holds its
// state when not selected.  This design's own choices: a Galois LFSR with
// polynomial x^64 + x^4 + x^3 + x + 1 (primitive), channel k injected into
// stage floor(k*LFSR_LEN/C), a phase shifter giving each chain the XOR of
// three distinct stages, and scan-in taken from the next state (so the bit
// shifted into a chain in a load cycle already depends on that cycle's slice
// and no warm-up cycles are needed).
//
// Interface: clk, synchronous active-low rst_n (state to zero), load, clear,
// slice[C-1:0] in; scan_in[NCHAINS-1:0] out (combinational from the state
// and the current slice, to be sampled by the core's scan chains at the same
// clock edge that updates the state).
module seq_lin_decomp #(
  parameter int unsigned C        = soc_decomp_pkg::DEF_CHANNELS,
  parameter int unsigned LFSR_LEN = soc_decomp_pkg::DEF_LFSR_LEN,
  parameter int unsigned NCHAINS  = soc_decomp_pkg::DEF_CHAINS,
  // Feedback taps of the Galois LFSR besides x^LFSR_LEN and x^0.
  parameter logic [LFSR_LEN-1:0] POLY = LFSR_LEN'(64'h1A)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               clear,
  input  logic [C-1:0]       slice,
  output logic [NCHAINS-1:0] scan_in
);

  // Stage that tester channel k is XORed into.
  function automatic int unsigned inj_stage(int unsigned k);
    return (k * LFSR_LEN) / C;
  endfunction

  // Three distinct LFSR stages per scan chain.
  function automatic int unsigned ps_tap(int unsigned j, int unsigned t);
    int unsigned a, b, c3;
    a = (2 * j) % LFSR_LEN;
    b = (5 * j + 17) % LFSR_LEN;
    if (b == a) b = (b + 1) % LFSR_LEN;
    c3 = (11 * j + 40) % LFSR_LEN;
    while (c3 == a || c3 == b) c3 = (c3 + 1) % LFSR_LEN;
    case (t)
      0:       return a;
      1:       return b;
      default: return c3;
    endcase
  endfunction

  logic [LFSR_LEN-1:0] state_q, shifted, next_state;

  // Galois step: stage 0 takes the bit leaving stage LFSR_LEN-1, which is
  // also fed back into every tap stage.
  always_comb begin
    shifted = {state_q[LFSR_LEN-2:0], 1'b0};
    if (state_q[LFSR_LEN-1]) shifted = shifted ^ POLY ^ LFSR_LEN'(1);
    if (clear) shifted = '0;
    next_state = shifted;
    for (int unsigned k = 0; k < C; k++)
      next_state[inj_stage(k)] = next_state[inj_stage(k)] ^ slice[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    state_q <= '0;
    else if (load) state_q <= next_state;
  end

  always_comb begin
    for (int unsigned j = 0; j < NCHAINS; j++)
      scan_in[j] = next_state[ps_tap(j, 0)] ^ next_state[ps_tap(j, 1)]
                 ^ next_state[ps_tap(j, 2)];
  end

  initial begin
    assert (C <= LFSR_LEN) else $error("seq_lin_decomp: C must not exceed LFSR_LEN");
    assert (LFSR_LEN >= 8) else $error("seq_lin_decomp: LFSR_LEN too small");
  end

endmodule
