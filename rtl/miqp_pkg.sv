// miqp_pkg: types and constants shared by the MIQP solver chip.
//
// Numbers are signed fixed point with 14 integer bits (sign included) and
// 26 fraction bits, 40 bits in all; this word format is the one the chip
// uses for every calculation. The problem size (50 variables, 10 equality
// and 100 inequality constraints) and the three SRAM capacities (204 kb,
// 109 kb, 109 kb of 40-bit words) are the chip's main configuration.
// The order in which a QP sub-problem is streamed into a core, and hence
// where each part lands in the core's SRAM, is this design's own choice:
//   A_I (MI x N, row major), b_I (MI), H (N x N), g (N),
//   A_E (ME x N), b_E (ME), x0 (N, the starting point)
// All addresses below are word addresses in one flat space that spans
// SRAM0, SRAM1 and SRAM2 in that order.
package miqp_pkg;

  localparam int unsigned INT_W  = 14;
  localparam int unsigned FRAC_W = 26;
  localparam int unsigned WORD_W = INT_W + FRAC_W;   // 40

  typedef logic signed [WORD_W-1:0] fx_t;

  localparam fx_t FX_ONE     = fx_t'(64'sd1 <<< FRAC_W);
  localparam fx_t FX_MAX     = {1'b0, {(WORD_W-1){1'b1}}};
  localparam fx_t FX_MIN     = {1'b1, {(WORD_W-1){1'b0}}};

  // Problem size of the main configuration
  localparam int unsigned N_VAR  = 50;
  localparam int unsigned M_EQ   = 10;
  localparam int unsigned M_INEQ = 100;

  // SRAM capacities in 40-bit words (1 kb = 1000 bits)
  localparam int unsigned SRAM0_WORDS = 5100;   // 204 kb
  localparam int unsigned SRAM1_WORDS = 2725;   // 109 kb
  localparam int unsigned SRAM2_WORDS = 2725;   // 109 kb
  localparam int unsigned MEM_WORDS   = SRAM0_WORDS + SRAM1_WORDS + SRAM2_WORDS;
  localparam int unsigned ADDR_W      = 14;     // covers 10550 words

  typedef logic [ADDR_W-1:0] maddr_t;

  // Words of one streamed QP sub-problem for sizes n, me, mi
  function automatic int unsigned prob_words(int unsigned n, int unsigned me, int unsigned mi);
    return mi*n + mi + n*n + n + me*n + me + n;
  endfunction

  // Start addresses of each part of the problem in the flat space
  function automatic int unsigned base_ai(int unsigned n, int unsigned me, int unsigned mi);
    return 0;
  endfunction
  function automatic int unsigned base_bi(int unsigned n, int unsigned me, int unsigned mi);
    return mi*n;
  endfunction
  function automatic int unsigned base_x(int unsigned n, int unsigned me, int unsigned mi);
    return mi*n + mi + n*n + n + me*n + me;
  endfunction

  // One request from a master of the core's memory bus
  typedef struct packed {
    logic   req;
    logic   we;
    maddr_t addr;
    fx_t    wdata;
  } mem_req_t;

  // Reply of the memory bus to one master
  typedef struct packed {
    logic gnt;      // request taken this cycle
    logic rvalid;   // read data of the request taken last cycle
    fx_t  rdata;
  } mem_rsp_t;

  // Operand ports of the shared arithmetic units, as seen by a user
  typedef struct packed {
    logic valid, first, last;
    fx_t  a, b;
  } mac_req_t;
  typedef struct packed {
    logic valid;
    fx_t  result;
  } mac_rsp_t;
  typedef struct packed {
    logic c;       // request
    fx_t  a;       // divisor
    fx_t  b;       // dividend
  } div_req_t;
  typedef struct packed {
    fx_t  result;
    logic finish;
    logic busy;
  } div_rsp_t;
  typedef struct packed {
    logic valid;
    fx_t  x;
  } sqrt_req_t;
  typedef struct packed {
    logic valid, neg;
    fx_t  root;
  } sqrt_rsp_t;
  typedef struct packed {
    logic valid;
    fx_t  a, b;
  } dist_req_t;
  typedef struct packed {
    logic valid;
    fx_t  d;
  } dist_rsp_t;

  // Everything a core offers to the dual-active-set step units that
  // drive it from outside (memory bus master, MAC, both divider ports,
  // square root, distance)
  typedef struct packed {
    mem_req_t  mem;
    mac_req_t  mac;
    div_req_t  div0;
    div_req_t  div1;
    sqrt_req_t sq;
    dist_req_t hyp;
  } unit_req_t;
  typedef struct packed {
    mem_rsp_t  mem;
    mac_rsp_t  mac;
    div_rsp_t  div;
    sqrt_rsp_t sq;
    dist_rsp_t hyp;
  } unit_rsp_t;

  // One word of a solution leaving the chip, tagged with the index of its
  // sub-problem and with the core's status for that sub-problem
  localparam int unsigned IDX_W = 16;
  localparam int unsigned ROW_W = 7;       // holds a row of up to 128
  typedef struct packed {
    logic [IDX_W-1:0] idx;
    logic             last;
    logic             feasible;
    logic [ROW_W-1:0] p_row;
    fx_t              p_slack;
    fx_t              data;
  } sol_word_t;

  // Saturate a wide signed value to the 40-bit word
  function automatic fx_t sat_fx(input logic signed [127:0] v);
    if (v > 128'(signed'(FX_MAX))) return FX_MAX;
    if (v < 128'(signed'(FX_MIN))) return FX_MIN;
    return fx_t'(v);
  endfunction

endpackage
