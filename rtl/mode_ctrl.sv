// mode_ctrl: generic decompression-mode controller.
//
// A decompression mode is a list of m (1..3) core sets.  At the start of every
// decompression the tester sends the mode in ordinary tester slices: one
// slice whose low two bits hold m (m = 0 ends the test), then, for each core
// set in turn, ceil(NCORES/C) slices holding a vector with one bit per core
// (core i is bit i, least significant slice first).  Because the control
// words arrive over the same channels as the data, no channel is reserved
// for control and the controller works with any schedule.
//
// The controller then runs the core sets one after another.  For core set k
// it holds a shift phase of L_k cycles, L_k being the longest scan length of
// any core in the set: the decompressors of set k load the slice and their
// cores shift.  During the last q cycles of that phase the decompressors of
// set k+1 (if m > k+1) also load the slice, with their cores' scan shifting
// disabled: they are cleared on the first of those cycles and then absorb
// the last q slices, retaining those free variables for set k+1's own test
// cube.  A one-cycle capture for the cores of set k follows, then the next
// set.  Set 1's decompressors are cleared on their first load cycle; sets 2
// and 3 are never cleared when their shift phase starts.  After the last
// capture the next mode is read.
//
// Two cheaper ways of supplying the mode are available through CTRL_STYLE,
// for schedules that use a fixed set of modes held in MODE_TABLE (NMODES
// entries): CTRL_INDEX reads a log2(NMODES)-bit table index from the low
// bits of one slice (the next bit set ends the test); CTRL_INCREMENT reads
// one bit, slice[0], that keeps the current table entry (0 after reset) or
// steps to the next one, stepping past the last entry ending the test.  In
// both the control phase is a single cycle.
//
// Following the reference scheme: per-decompression control, m, one core
// vector per core set, phase length equal to the longest scan length in the
// set, q-cycle preload of the next set with shifting disabled, one capture
// cycle per set.  This design's own choices: the control slice layout, the
// m = 0 end marker, the end markers of the table styles, the example
// table contents, the per-core scan lengths being a build-time table, a
// phase of at least one cycle for an empty set, clearing a decompressor at
// the start of its first load, and the `run` input that stalls everything
// (no slice is consumed while it is low).
//
// Timing: one decompression with m sets takes 1 + m*ceil(NCORES/C) control
// cycles (1 in the table styles) plus sum_k (L_k + 1) cycles.  All outputs are decoded from
// registered state, valid in the same cycle as the slice they refer to.
// Core sets must be pairwise disjoint where consecutive (set k and k+1);
// an assertion flags a violation.
module mode_ctrl
  import soc_decomp_pkg::*;
#(
  parameter int unsigned C       = DEF_CHANNELS,
  parameter int unsigned NCORES  = DEF_CORES,
  parameter int unsigned Q       = DEF_Q,
  parameter len_table_t  SCAN_LEN = default_scan_len_table(),
  // How the mode is supplied; the table is used by the two table styles only.
  parameter ctrl_style_e CTRL_STYLE = CTRL_GENERIC,
  parameter int unsigned NMODES     = 8,
  parameter mode_table_t MODE_TABLE = default_mode_table()
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,          // a tester slice is present this cycle
  input  logic [C-1:0]      slice,
  output logic [NCORES-1:0] dec_load,     // decompressor absorbs the slice
  output logic [NCORES-1:0] dec_clear,    // decompressor drops its old state
  output logic [NCORES-1:0] scan_en,      // core shifts its scan chains
  output logic [NCORES-1:0] capture,      // core capture cycle
  output logic              mode_start,   // first control cycle of a decompression
  output logic [1:0]        cur_m,        // m of the current mode
  output logic [1:0]        cur_set,      // index of the set being shifted (0-based)
  output ctrl_state_e       state,
  output logic              done          // end of test received
);

  localparam int unsigned W      = (NCORES + C - 1) / C;   // slices per core vector
  localparam int unsigned WW     = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned VEC_W  = W * C;
  localparam int unsigned IW     = (NMODES > 1) ? $clog2(NMODES) : 1;  // mode index bits

  ctrl_state_e              state_q;
  logic [1:0]               m_q;
  logic [1:0]               set_q;
  logic [WW-1:0]            word_q;
  logic [LEN_W-1:0]         cnt_q;
  logic [MAX_SETS-1:0][VEC_W-1:0] vec_q;
  logic [IW-1:0]            mode_idx_q;   // table entry in use (increment style)

  // Table lookup for the two table-driven styles.
  logic [IW-1:0]            tab_idx;
  logic                     tab_end;
  mode_t                    tab_mode;
  logic [MAX_SETS-1:0][VEC_W-1:0] tab_vec;
  always_comb begin
    if (CTRL_STYLE == CTRL_INDEX) begin
      tab_idx = slice[IW-1:0];
      tab_end = slice[IW];
    end else begin
      tab_idx = mode_idx_q + IW'(slice[0]);
      tab_end = slice[0] && (mode_idx_q == IW'(NMODES - 1));
    end
    tab_mode = MODE_TABLE[tab_idx];
    for (int unsigned k = 0; k < MAX_SETS; k++)
      tab_vec[k] = VEC_W'(tab_mode.sets[k][NCORES-1:0]);
  end

  // Longest scan length in each core set (at least 1).
  logic [MAX_SETS-1:0][LEN_W-1:0] set_len;
  always_comb begin
    for (int unsigned k = 0; k < MAX_SETS; k++) begin
      set_len[k] = LEN_W'(1);
      for (int unsigned i = 0; i < NCORES; i++)
        if (vec_q[k][i] && SCAN_LEN[i] > set_len[k]) set_len[k] = SCAN_LEN[i];
    end
  end

  logic [LEN_W-1:0] cur_len, pre_start;
  logic             last_shift, has_next, preload;
  logic [VEC_W-1:0] cur_vec, next_vec;
  always_comb begin
    cur_vec    = vec_q[set_q];
    next_vec   = (set_q < 2'(MAX_SETS - 1)) ? vec_q[set_q + 2'd1] : '0;
    cur_len    = set_len[set_q];
    pre_start  = (cur_len > LEN_W'(Q)) ? cur_len - LEN_W'(Q) : '0;
    last_shift = (cnt_q == cur_len - 1'b1);
    has_next   = ({1'b0, set_q} + 3'd1) < {1'b0, m_q};
    preload    = has_next && (cnt_q >= pre_start);
  end

  // Next state.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_CTRL_M;
      m_q     <= '0;
      set_q   <= '0;
      word_q  <= '0;
      cnt_q   <= '0;
      vec_q   <= '0;
      mode_idx_q <= '0;
    end else if (run) begin
      unique case (state_q)
        ST_CTRL_M: begin
          set_q  <= '0;
          word_q <= '0;
          cnt_q  <= '0;
          if (CTRL_STYLE == CTRL_GENERIC) begin
            m_q     <= slice[1:0];
            vec_q   <= '0;
            state_q <= (slice[1:0] == 2'd0) ? ST_DONE : ST_CTRL_VEC;
          end else begin
            // The whole mode comes from the table in this one cycle.
            m_q        <= tab_mode.m;
            vec_q      <= tab_vec;
            mode_idx_q <= tab_idx;
            state_q    <= (tab_end || tab_mode.m == 2'd0) ? ST_DONE : ST_SHIFT;
          end
        end
        ST_CTRL_VEC: begin
          vec_q[set_q][word_q*C +: C] <= slice;
          if (word_q == WW'(W - 1)) begin
            word_q <= '0;
            if (set_q == m_q - 2'd1) begin
              set_q   <= '0;
              cnt_q   <= '0;
              state_q <= ST_SHIFT;
            end else begin
              set_q <= set_q + 2'd1;
            end
          end else begin
            word_q <= word_q + 1'b1;
          end
        end
        ST_SHIFT: begin
          if (last_shift) begin
            cnt_q   <= '0;
            state_q <= ST_CAPTURE;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        ST_CAPTURE: begin
          if (has_next) begin
            set_q   <= set_q + 2'd1;
            state_q <= ST_SHIFT;
          end else begin
            state_q <= ST_CTRL_M;
          end
        end
        ST_DONE: state_q <= ST_DONE;
        default: state_q <= ST_CTRL_M;
      endcase
    end
  end

  // Per-core control decoded from the registered state.
  always_comb begin
    dec_load  = '0;
    dec_clear = '0;
    scan_en   = '0;
    capture   = '0;
    if (run) begin
      for (int unsigned i = 0; i < NCORES; i++) begin
        if (state_q == ST_SHIFT) begin
          if (cur_vec[i]) begin
            dec_load[i]  = 1'b1;
            scan_en[i]   = 1'b1;
            dec_clear[i] = (set_q == 2'd0) && (cnt_q == '0);
          end else if (preload && next_vec[i]) begin
            dec_load[i]  = 1'b1;
            dec_clear[i] = (cnt_q == pre_start);
          end
        end
        if (state_q == ST_CAPTURE) capture[i] = cur_vec[i];
      end
    end
  end

  assign mode_start = run && (state_q == ST_CTRL_M);
  assign cur_m      = m_q;
  assign cur_set    = set_q;
  assign state      = state_q;
  assign done       = (state_q == ST_DONE);

  // Consecutive core sets must be disjoint, or the retained free variables
  // of one set would overwrite the other's decompressor state.
  always_ff @(posedge clk) begin
    if (rst_n && run && state_q == ST_SHIFT && cnt_q == '0 && has_next)
      assert ((cur_vec & next_vec) == '0)
        else $error("mode_ctrl: core sets %0d and %0d overlap", set_q, set_q + 2'd1);
  end

  initial begin
    assert (NMODES >= 1 && NMODES <= MAX_MODES) else $error("mode_ctrl: NMODES out of range");
    assert (CTRL_STYLE != CTRL_INDEX || IW < C) else $error("mode_ctrl: mode index does not fit a slice");
    assert (C >= 2) else $error("mode_ctrl: at least two channels are needed to send m");
    assert (NCORES <= MAX_CORES) else $error("mode_ctrl: NCORES exceeds MAX_CORES");
  end

endmodule
