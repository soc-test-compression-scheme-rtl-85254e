// soc_decomp_pkg: constants, types and table functions shared by the SOC test
// decompression blocks.
//
// The scheme broadcasts every c-bit tester slice to one sequential linear
// decompressor per core.  Tester channel count (16) follows the reference
// experiments; the design-B-like core count (20) and the per-core scan
// lengths are this design's own choices (see the README).  The scan length
// table is produced by a formula rather than stored as a list:
//     len(i) = 60 + (37*i mod 61)        (60 .. 120 cells per chain)
// which, with 32 chains per core and 20 cores, gives 56,448 scan cells,
// close to the 57,923 of the reference design B.
package soc_decomp_pkg;

  // Upper bound on the number of cores a controller can address.  Tables of
  // per-core values are always this long; only the first NCORES are used.
  localparam int unsigned MAX_CORES = 64;

  // Width of a scan-length value (cells per chain).
  localparam int unsigned LEN_W = 16;

  // Defaults of the main configuration.
  localparam int unsigned DEF_CHANNELS = 16;  // tester channels c
  localparam int unsigned DEF_CORES    = 20;  // cores on the SOC
  localparam int unsigned DEF_CHAINS   = 32;  // scan chains per core
  localparam int unsigned DEF_LFSR_LEN = 64;  // decompressor state bits
  localparam int unsigned DEF_Q        = 4;   // retained slices q (q*c = LFSR length)

  // Largest number of core sets in one decompression mode.
  localparam int unsigned MAX_SETS = 3;

  typedef logic [MAX_CORES-1:0][LEN_W-1:0] len_table_t;

  // How the controller is told the mode of each decompression.
  typedef enum logic [1:0] {
    CTRL_GENERIC   = 2'd0,  // m and one core vector per set, sent each time
    CTRL_INDEX     = 2'd1,  // index into an on-chip mode table
    CTRL_INCREMENT = 2'd2   // one bit: stay on the current table entry or step to the next
  } ctrl_style_e;

  // One entry of an on-chip mode table.
  localparam int unsigned MAX_MODES = 16;
  typedef struct packed {
    logic [1:0]                           m;
    logic [MAX_SETS-1:0][MAX_CORES-1:0]   sets;   // [0] = core-set-1
  } mode_t;
  typedef mode_t [MAX_MODES-1:0] mode_table_t;

  // Controller sequencing state.
  typedef enum logic [2:0] {
    ST_CTRL_M   = 3'd0,  // read m (number of core sets) from the slice
    ST_CTRL_VEC = 3'd1,  // read the core vector of each core set
    ST_SHIFT    = 3'd2,  // scan load of the current core set
    ST_CAPTURE  = 3'd3,  // capture cycle of the current core set
    ST_DONE     = 3'd4   // m = 0 received: end of test
  } ctrl_state_e;

  // Default scan length of core i (cells in each of its chains).
  function automatic logic [LEN_W-1:0] default_scan_len(int unsigned i);
    return LEN_W'(60 + (37 * i) % 61);
  endfunction

  // Example mode table, used only by the table-driven control styles: entry j
  // has m = 1 + (j mod 3); its set k holds the cores i with
  // (i + j + 7k) mod 5 == 0, which keeps consecutive sets disjoint.
  function automatic mode_table_t default_mode_table();
    mode_table_t t;
    for (int unsigned j = 0; j < MAX_MODES; j++) begin
      t[j].m    = 2'(1 + j % 3);
      t[j].sets = '0;
      for (int unsigned k = 0; k < MAX_SETS; k++)
        if (k < 1 + j % 3)
          for (int unsigned i = 0; i < MAX_CORES; i++)
            t[j].sets[k][i] = ((i + j + 7 * k) % 5) == 0;
    end
    return t;
  endfunction

  function automatic len_table_t default_scan_len_table();
    len_table_t t;
    for (int unsigned i = 0; i < MAX_CORES; i++) t[i] = default_scan_len(i);
    return t;
  endfunction

endpackage
