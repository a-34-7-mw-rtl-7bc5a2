// miqp_chip: the quad-core MIQP solver chip (top level).
//
// A mixed-integer QP is solved by branch and bound: an external control
// processor splits it into QP sub-problems (the integer variables fixed or
// bounded differently in each) and keeps the search tree, the best
// solution so far and the pending sub-problems in external DRAM. This chip
// solves the sub-problems, NC of them at a time, each on its own QP solver
// core, so that the branch-and-bound tree is explored in parallel.
//
// Data path: problem words enter through the problem buffer (a FIFO), the
// local bus steers each sub-problem to the core that sequence control chose
// for it, and the cores' solutions leave through the solution buffer, each
// word tagged with the index of its sub-problem and the core's status.
// The control processor gives the index of each sub-problem on `idx_*`
// before sending its PROB_WORDS words on `prob_*`; indices are taken only
// while a core is free, so the processor stalls when all cores are busy.
//
// Each core's dual active-set step units (determine s-pair, compute step)
// are outside this RTL; their signals are brought out per core as
// step_req/step_row/step_slack/step_ack/step_ok and ext_req/ext_rsp.
// The clock comes from an on-chip PLL in the real chip; here `clk` is a
// port.
module miqp_chip
  import miqp_pkg::*;
#(
  parameter int unsigned NC          = 4,
  parameter int unsigned N           = N_VAR,
  parameter int unsigned ME          = M_EQ,
  parameter int unsigned MI          = M_INEQ,
  parameter int unsigned S0          = SRAM0_WORDS,
  parameter int unsigned S1          = SRAM1_WORDS,
  parameter int unsigned S2          = SRAM2_WORDS,
  parameter int unsigned MAX_CHECKS  = 2 * N_VAR + M_INEQ,
  parameter int unsigned DIV_CYCLES  = 5,
  parameter int unsigned PROB_DEPTH  = 16,
  parameter int unsigned SOL_DEPTH   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // sub-problem indices
  input  logic             idx_valid,
  output logic             idx_ready,
  input  logic [IDX_W-1:0] idx,
  // sub-problem words
  input  logic             prob_valid,
  output logic             prob_ready,
  input  fx_t              prob_data,
  // solution words
  output logic             sol_valid,
  input  logic             sol_ready,
  output sol_word_t        sol_word,
  // which cores hold a sub-problem
  output logic [NC-1:0]    core_assigned,
  // dual active-set step units, per core
  output logic [NC-1:0]    step_req,
  output logic [ROW_W-1:0] step_row   [NC],   // most violated row of the last check
  output fx_t              step_slack [NC],   // and its slack
  input  logic [NC-1:0]    step_ack,
  input  logic [NC-1:0]    step_ok,
  input  unit_req_t        ext_req [NC],
  output unit_rsp_t        ext_rsp [NC]
);

  localparam int unsigned PW = prob_words(N, ME, MI);
  localparam int unsigned CW = $clog2(NC);

  // ---------------- problem buffer ----------------
  logic pb_valid, pb_ready;
  fx_t  pb_data;
  logic [$clog2(PROB_DEPTH+1)-1:0] pb_count;

  stream_fifo #(.WIDTH(WORD_W), .DEPTH(PROB_DEPTH)) u_prob_buf (
    .clk, .rst_n,
    .in_valid(prob_valid), .in_ready(prob_ready), .in_data(prob_data),
    .out_valid(pb_valid), .out_ready(pb_ready), .out_data(pb_data),
    .count(pb_count)
  );

  // ---------------- sequence control ----------------
  logic          up_active, up_beat, dn_active, dn_last_beat;
  logic [CW-1:0] up_sel, dn_sel;
  logic [IDX_W-1:0] dn_idx;
  logic [NC-1:0] core_idle, core_out_valid;

  sequence_control #(.NC(NC), .PROB_WORDS(PW)) u_seqctl (
    .clk, .rst_n,
    .idx_valid, .idx_ready, .idx,
    .core_idle, .core_out_valid,
    .up_active, .up_sel, .up_beat,
    .dn_active, .dn_sel, .dn_idx, .dn_last_beat,
    .assigned(core_assigned)
  );

  // ---------------- cores ----------------
  logic [NC-1:0]     core_in_valid, core_in_ready, core_out_ready, core_out_last, core_feasible;
  fx_t               core_in_data;
  fx_t               core_out_data [NC];
  logic [ROW_W-1:0]  core_p_row    [NC];
  fx_t               core_p_slack  [NC];

  for (genvar c = 0; c < NC; c++) begin : g_core
    logic [$clog2(MI)-1:0]           p_row;
    logic [$clog2(MAX_CHECKS+1)-1:0] checks;

    qp_core #(
      .N(N), .ME(ME), .MI(MI), .S0(S0), .S1(S1), .S2(S2),
      .MAX_CHECKS(MAX_CHECKS), .DIV_CYCLES(DIV_CYCLES)
    ) u_core (
      .clk, .rst_n,
      .in_valid(core_in_valid[c]), .in_ready(core_in_ready[c]), .in_data(core_in_data),
      .out_valid(core_out_valid[c]), .out_ready(core_out_ready[c]),
      .out_data(core_out_data[c]), .out_last(core_out_last[c]),
      .feasible(core_feasible[c]), .p_row, .p_slack(core_p_slack[c]),
      .idle(core_idle[c]), .checks,
      .step_req(step_req[c]), .step_ack(step_ack[c]), .step_ok(step_ok[c]),
      .ext_req(ext_req[c]), .ext_rsp(ext_rsp[c])
    );
    assign core_p_row[c] = ROW_W'(p_row);
    assign step_row[c]   = core_p_row[c];
    assign step_slack[c] = core_p_slack[c];
  end

  // ---------------- local bus ----------------
  logic      sb_valid, sb_ready;
  sol_word_t sb_word;

  local_bus #(.NC(NC), .RW(ROW_W)) u_lbus (
    .src_valid(pb_valid), .src_ready(pb_ready), .src_data(pb_data),
    .up_active, .up_sel, .up_beat,
    .core_in_valid, .core_in_ready, .core_in_data,
    .core_out_valid, .core_out_ready, .core_out_data, .core_out_last,
    .core_feasible, .core_p_row, .core_p_slack,
    .dn_active, .dn_sel, .dn_idx,
    .dst_valid(sb_valid), .dst_ready(sb_ready), .dst_word(sb_word),
    .dn_last_beat
  );

  // ---------------- solution buffer ----------------
  logic [$clog2(SOL_DEPTH+1)-1:0] sol_count;
  logic [$bits(sol_word_t)-1:0]   sol_bits;

  stream_fifo #(.WIDTH($bits(sol_word_t)), .DEPTH(SOL_DEPTH)) u_sol_buf (
    .clk, .rst_n,
    .in_valid(sb_valid), .in_ready(sb_ready), .in_data(sb_word),
    .out_valid(sol_valid), .out_ready(sol_ready), .out_data(sol_bits),
    .count(sol_count)
  );
  assign sol_word = sol_word_t'(sol_bits);

endmodule
