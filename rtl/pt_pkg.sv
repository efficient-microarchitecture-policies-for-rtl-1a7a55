// pt_pkg: types and constants shared by the power-budget manager.
//
// Widths of power tokens, the encoding of the Basic Block Level Manager (BBLM)
// technique level and the DVFS voltage/frequency mode table live here.  The
// 4-wide front end, 128-entry RUU, 8 instruction power groups, 9-bit basic-block
// token field and the five DVFS modes follow the design description; the
// commit width, the PC width and the per-instruction token width are this
// design's own choices.
package pt_pkg;

  localparam int unsigned FETCH_W   = 4;   // fetch/decode width
  localparam int unsigned COMMIT_W  = 4;   // commit width (assumed equal to decode width)
  localparam int unsigned ISSUE_W   = 4;   // issue width
  localparam int unsigned PC_W      = 64;  // Alpha program counter
  localparam int unsigned TOK_W     = 8;   // tokens of one instruction (saturating)
  localparam int unsigned BB_TOK_W  = 9;   // tokens of one basic block (saturating)
  localparam int unsigned PWR_W     = 16;  // tokens of all in-flight instructions
  localparam int unsigned N_GROUPS  = 8;   // base-power groups of instruction types
  localparam int unsigned GRP_W     = 3;
  localparam int unsigned RUU_SIZE  = 128;
  localparam int unsigned RUU_W     = 7;

  typedef logic [PC_W-1:0]     pc_t;
  typedef logic [TOK_W-1:0]    tok_t;
  typedef logic [BB_TOK_W-1:0] bbtok_t;
  typedef logic [PWR_W-1:0]    pwr_t;
  typedef logic [GRP_W-1:0]    grp_t;
  typedef logic [RUU_W-1:0]    ruu_idx_t;

  // Techniques the BBLM can switch on, from least to most aggressive.  A
  // level enables its own technique and every lower one.
  typedef enum logic [1:0] {
    LVL_NONE = 2'd0,
    LVL_CP   = 2'd1,   // delay non-critical instructions
    LVL_JRS  = 2'd2,   // throttle fetch on low-confidence branches
    LVL_DCR  = 2'd3    // throttle fetch on decode/commit ratio
  } bblm_level_e;

  // DVFS working modes, fastest first: supply voltage and frequency in percent
  // of nominal.  The limited set used with the BBLM is the first three.
  localparam int unsigned N_DVFS_MODES = 5;
  localparam int unsigned MODE_W       = 3;
  typedef logic [MODE_W-1:0] mode_t;

  function automatic int unsigned mode_vdd_pct(input int unsigned m);
    case (m)
      0:       return 100;
      1:       return 95;
      default: return 90;
    endcase
  endfunction

  function automatic int unsigned mode_f_pct(input int unsigned m);
    case (m)
      0:       return 100;
      1:       return 95;
      2:       return 90;
      3:       return 75;
      default: return 65;
    endcase
  endfunction

  // Relative dynamic power of a mode, V^2 * f in percent^3 (1e6 = nominal).
  function automatic int unsigned mode_pwr_factor(input int unsigned m);
    return mode_vdd_pct(m) * mode_vdd_pct(m) * mode_f_pct(m);
  endfunction

endpackage
