// Shared constants and types of the multi-factor Gaussian copula CDO pricer.
//
// Number formats follow the integer variant of the design: Gaussian samples,
// correlation factors, creditworthiness indexes and default barriers are
// signed fixed point with 5 integer and 27 fractional bits; recovery-adjusted
// notionals and pool/tranche losses are unsigned integers in cents, 42 bits
// wide; the per-core path accumulator is 54 bits wide. Memory depths follow
// one 512 x 32-bit block RAM per bank. The host word layout and the
// configuration register map are this design's own choices.
package cdo_pkg;

  // ---- number formats ---------------------------------------------------
  localparam int unsigned FX_W    = 32;  // 5.27 signed fixed point
  localparam int unsigned FX_FRAC = 27;
  localparam int unsigned R_W     = 42;  // notional / loss in cents
  localparam int unsigned ACC_W   = 54;  // Stage 5 accumulator

  typedef logic signed [FX_W-1:0] fx_t;
  typedef logic [R_W-1:0]         money_t;
  typedef logic [ACC_W-1:0]       acc_t;

  // ---- parallelism ------------------------------------------------------
  localparam int unsigned NLANE = 4;     // factors accumulated per cycle
  localparam int unsigned NCMP  = 8;     // comparator replicas (time steps per cycle)

  // ---- memory sizes -----------------------------------------------------
  localparam int unsigned MEM_DEPTH = 512;  // entries of one block RAM
  localparam int unsigned MAX_N     = 512;  // instruments
  localparam int unsigned MAX_T     = 64;   // time steps
  localparam int unsigned MAX_B     = 64;   // default barrier curves
  localparam int unsigned MAX_CC    = MAX_T / NCMP;   // time-step groups
  localparam int unsigned XHALF     = 256;  // X entries per bank per buffer half

  localparam int unsigned IDX_W  = $clog2(MAX_N);     // 9
  localparam int unsigned T_W    = $clog2(MAX_T + 1); // 7
  localparam int unsigned K_W    = $clog2(MAX_T);     // 6
  localparam int unsigned B_W    = $clog2(MAX_B);     // 6
  localparam int unsigned M_W    = $clog2(MAX_CC);    // 3
  localparam int unsigned F_W    = 11;                // up to 1024 factors
  localparam int unsigned MADDR_W = $clog2(MEM_DEPTH); // 9
  localparam int unsigned NPATH_W = 32;

  // ---- simulation configuration ----------------------------------------
  typedef struct packed {
    logic [NPATH_W-1:0] n_paths;    // MC paths for this core (or in total)
    logic [IDX_W:0]     n_instr;    // N, 1..512
    logic [T_W-1:0]     n_steps;    // T, 1..64
    logic [F_W-1:0]     n_factors;  // F, 1..1024
    money_t             attach;     // A, cents
    money_t             width;      // D - A, cents
  } cfg_t;

  // ---- host word ---------------------------------------------------------
  // [63:60] target, [59:44] address, [43:0] data
  localparam int unsigned HOST_W = 64;
  typedef enum logic [3:0] {
    TGT_CFG   = 4'd0,   // address selects a configuration register
    TGT_ALPHA = 4'd1,   // address = {bank[1:0], entry[8:0]}
    TGT_BETA  = 4'd2,   // address = instrument
    TGT_R     = 4'd3,   // address = instrument
    TGT_H     = 4'd4,   // address = {barrier[5:0], step[5:0]}
    TGT_IND   = 4'd5,   // address = instrument
    TGT_START = 4'd15   // swap buffers and start a simulation
  } target_e;

  typedef enum logic [2:0] {
    CFG_PATHS   = 3'd0,
    CFG_INSTR   = 3'd1,
    CFG_STEPS   = 3'd2,
    CFG_FACTORS = 3'd3,
    CFG_ATTACH  = 3'd4,
    CFG_WIDTH   = 3'd5
  } cfg_reg_e;

  // Memory write broadcast from the Distributor to every core.
  typedef struct packed {
    logic        we;
    target_e     tgt;
    logic [15:0] addr;
    logic [43:0] data;
  } memwr_t;

  // Status pulses of the top level, one bit per mechanism.
  typedef struct packed {
    logic start_wait;    // START held until every core is idle
    logic overlap_load;  // a memory word loaded while cores compute
    logic x_wait;        // a FAM waits for the next path's systemic factors
    logic y_starve;      // Stage 2 waits for a Y (factor accumulation slower)
    logic draining;      // Stage 2 stalled while Stage 3 combines partial sums
  } events_t;

  // Signed 5.27 x 5.27 -> 5.27 multiply (truncating).
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FX_FRAC);
  endfunction

  // ceil(x / 4) and ceil(x / 8)
  function automatic logic [F_W-1:0] ceil4(logic [F_W-1:0] x);
    return (x + F_W'(3)) >> 2;
  endfunction
  function automatic logic [T_W-1:0] ceil8(logic [T_W-1:0] x);
    return (x + T_W'(7)) >> 3;
  endfunction

endpackage
