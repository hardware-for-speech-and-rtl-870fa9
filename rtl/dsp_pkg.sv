// Shared types and saturating arithmetic of the speech-coding accelerator data
// path. The helper functions reproduce the ITU-T fixed-point basic operations
// (L_add, L_mult, L_abs, abs_s) that the speech coders are written in, so the
// hardware stays bit exact with the reference C code.
package dsp_pkg;
  localparam logic signed [31:0] MAX32 = 32'sh7FFF_FFFF;
  localparam logic signed [31:0] MIN32 = 32'sh8000_0000;
  localparam logic signed [15:0] MAX16 = 16'sh7FFF;
  localparam logic signed [15:0] MIN16 = 16'sh8000;

  // MAC operations. The *_L forms accumulate onto an operand supplied with the
  // instruction (acc_in) instead of the accumulator, e.g. L_msu(WrkBlk[l], ..).
  typedef enum logic [2:0] {
    MAC_NOP, MAC_CLR, MAC_LOAD, MAC_MULT, MAC_MAC, MAC_MSU, MAC_MAC_L, MAC_MSU_L
  } mac_op_e;

  // Per-cycle control word of the MP-MLQ search data path (one decoded
  // instruction). All fields refer to the same inner-loop step; the data path
  // delays the parts that act later in its pipeline.
  typedef struct packed {
    // loop counter
    logic        lc_load;
    logic [15:0] lc_start;
    logic [15:0] lc_step;
    logic        lc_adv;
    // address generator
    logic        reg_we;
    logic [15:0] reg_in;
    logic [9:0]  base;
    logic        agu_abs;
    // multiply-accumulate
    mac_op_e     mac_op;
    logic        int_mode;
    logic        auto_mode;
    logic        cond_en;
    logic [15:0] y;
    logic [31:0] acc_in;
    // conditional move with loop index
    logic        cm_init;
    logic        cm_exec;
    logic        cm_abs;
    logic        cm_ge;
    // operand memory fill port
    logic        mem_we;
    logic [9:0]  mem_waddr;
    logic [15:0] mem_wdata;
  } mpmlq_ctl_t;

  // Saturating 32-bit addition (L_add).
  function automatic logic signed [31:0] sat_add32(logic signed [31:0] a, logic signed [31:0] b);
    logic signed [32:0] s;
    s = 33'(a) + 33'(b);
    if (s > 33'(MAX32))      return MAX32;
    else if (s < 33'(MIN32)) return MIN32;
    else                     return s[31:0];
  endfunction

  // Saturating 32-bit subtraction (L_sub).
  function automatic logic signed [31:0] sat_sub32(logic signed [31:0] a, logic signed [31:0] b);
    logic signed [32:0] s;
    s = 33'(a) - 33'(b);
    if (s > 33'(MAX32))      return MAX32;
    else if (s < 33'(MIN32)) return MIN32;
    else                     return s[31:0];
  endfunction

  // 32-bit absolute value with saturation (L_abs).
  function automatic logic signed [31:0] sat_abs32(logic signed [31:0] a);
    if (a == MIN32) return MAX32;
    return (a < 0) ? -a : a;
  endfunction

  // 16-bit absolute value with saturation (abs_s).
  function automatic logic signed [15:0] sat_abs16(logic signed [15:0] a);
    if (a == MIN16) return MAX16;
    return (a < 0) ? -a : a;
  endfunction

  // 16x16 product: fractional (L_mult, doubled and saturated) or integer.
  function automatic logic signed [31:0] mul16(logic signed [15:0] x, logic signed [15:0] y,
                                               logic int_mode);
    logic signed [31:0] p;
    p = 32'(x) * 32'(y);
    if (int_mode)             return p;
    if (p == 32'sh4000_0000)  return MAX32;
    return p <<< 1;
  endfunction
endpackage
