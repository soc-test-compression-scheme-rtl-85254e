// soc_decomp_top: SOC test decompression with retained free variables.
//
// The tester drives a c-bit slice each clock over the test access mechanism
// (TAM).  The slice is broadcast unchanged to a sequential linear
// decompressor placed next to every core; a mode controller decides, per
// cycle, which decompressors absorb the slice, which are cleared, which cores
// shift their scan chains and which capture.  Several cores (a core set) can
// decompress test cubes from the same slices, and the decompressors of the
// next core set are pre-loaded during the last q cycles of the current set
// so that free variables not used by one test cube set help encode the next.
// No buffer is needed for this: the pre-loaded decompressor itself holds the
// retained free variables until its own shift phase starts.
//
// Following the reference scheme: broadcast of every slice to all local
// decompressors, per-decompression mode control sent over the data channels,
// up to three core sets per mode with q-slice overlap.  This design's own
// choices: the sizes of the decompressors and cores (see soc_decomp_pkg),
// the control-slice formats (see mode_ctrl; CTRL_STYLE selects the generic
// format by default or one of the two table-driven ones),
// uniform chain count per core, and ports that expose each core's scan-in
// bits and its shift and capture strobes (the cores, their wrappers and the
// response compaction are outside this block).
//
// Interface: clk, synchronous active-low rst_n, run (slice valid; low stalls
// everything), tester_slice[C-1:0].  Per core i: core_scan_in[i] (one bit per
// scan chain, sampled by the core at the clock edge when core_scan_en[i] is
// high), core_scan_en[i], core_capture[i].  Status: mode_start, cur_m,
// cur_set, ctrl_state, test_done.  Timing as in mode_ctrl; scan-in bits are
// combinational from the slice of the same cycle.
module soc_decomp_top
  import soc_decomp_pkg::*;
#(
  parameter int unsigned C        = DEF_CHANNELS,
  parameter int unsigned NCORES   = DEF_CORES,
  parameter int unsigned NCHAINS  = DEF_CHAINS,
  parameter int unsigned LFSR_LEN = DEF_LFSR_LEN,
  parameter int unsigned Q        = DEF_Q,
  parameter len_table_t  SCAN_LEN = default_scan_len_table(),
  parameter ctrl_style_e CTRL_STYLE = CTRL_GENERIC,
  parameter int unsigned NMODES   = 8,
  parameter mode_table_t MODE_TABLE = default_mode_table()
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             run,
  input  logic [C-1:0]                     tester_slice,
  output logic [NCORES-1:0][NCHAINS-1:0]   core_scan_in,
  output logic [NCORES-1:0]                core_scan_en,
  output logic [NCORES-1:0]                core_capture,
  output logic                             mode_start,
  output logic [1:0]                       cur_m,
  output logic [1:0]                       cur_set,
  output ctrl_state_e                      ctrl_state,
  output logic                             test_done
);

  logic [NCORES-1:0] dec_load, dec_clear;

  mode_ctrl #(
    .C        (C),
    .NCORES   (NCORES),
    .Q        (Q),
    .SCAN_LEN   (SCAN_LEN),
    .CTRL_STYLE (CTRL_STYLE),
    .NMODES     (NMODES),
    .MODE_TABLE (MODE_TABLE)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (run),
    .slice      (tester_slice),
    .dec_load   (dec_load),
    .dec_clear  (dec_clear),
    .scan_en    (core_scan_en),
    .capture    (core_capture),
    .mode_start (mode_start),
    .cur_m      (cur_m),
    .cur_set    (cur_set),
    .state      (ctrl_state),
    .done       (test_done)
  );

  // One decompressor per core, all fed by the same broadcast slice.
  for (genvar i = 0; i < NCORES; i++) begin : g_core
    seq_lin_decomp #(
      .C        (C),
      .LFSR_LEN (LFSR_LEN),
      .NCHAINS  (NCHAINS)
    ) u_dec (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (dec_load[i]),
      .clear   (dec_clear[i]),
      .slice   (tester_slice),
      .scan_in (core_scan_in[i])
    );
  end

endmodule
