// local_bus: the on-chip bus between the buffers and the NC cores.
//
// Problem direction: the word stream from the problem buffer goes to the
// one core selected by sequence control (`up_sel` while `up_active`);
// that core's ready goes back to the buffer, and `up_beat` tells sequence
// control that a word passed. Solution direction: the selected core's
// (`dn_sel` while `dn_active`) solution word, last flag and status go to
// the solution buffer, tagged with the sub-problem index; the buffer's
// ready goes back to that core only, and `dn_last_beat` marks the passing
// of its last word. Purely combinational. The chip shows a local bus
// joining the buffer, sequence control and the cores; this routing is this
// design's own.
module local_bus
  import miqp_pkg::*;
#(
  parameter int unsigned NC = 4,
  parameter int unsigned RW = ROW_W
) (
  // problem side
  input  logic             src_valid,
  output logic             src_ready,
  input  fx_t              src_data,
  input  logic             up_active,
  input  logic [$clog2(NC)-1:0] up_sel,
  output logic             up_beat,
  output logic [NC-1:0]    core_in_valid,
  input  logic [NC-1:0]    core_in_ready,
  output fx_t              core_in_data,
  // solution side
  input  logic [NC-1:0]    core_out_valid,
  output logic [NC-1:0]    core_out_ready,
  input  fx_t              core_out_data    [NC],
  input  logic [NC-1:0]    core_out_last,
  input  logic [NC-1:0]    core_feasible,
  input  logic [RW-1:0]    core_p_row       [NC],
  input  fx_t              core_p_slack     [NC],
  input  logic             dn_active,
  input  logic [$clog2(NC)-1:0] dn_sel,
  input  logic [IDX_W-1:0] dn_idx,
  output logic             dst_valid,
  input  logic             dst_ready,
  output sol_word_t        dst_word,
  output logic             dn_last_beat
);

  always_comb begin
    core_in_data  = src_data;
    core_in_valid = '0;
    if (up_active) core_in_valid[up_sel] = src_valid;
    src_ready = up_active && core_in_ready[up_sel];
    up_beat   = src_valid && src_ready;
  end

  always_comb begin
    dst_valid          = dn_active && core_out_valid[dn_sel];
    dst_word.idx       = dn_idx;
    dst_word.last      = core_out_last[dn_sel];
    dst_word.feasible  = core_feasible[dn_sel];
    dst_word.p_row     = ROW_W'(core_p_row[dn_sel]);
    dst_word.p_slack   = core_p_slack[dn_sel];
    dst_word.data      = core_out_data[dn_sel];
    core_out_ready     = '0;
    if (dn_active) core_out_ready[dn_sel] = dst_ready;
    dn_last_beat = dst_valid && dst_ready && core_out_last[dn_sel];
  end

endmodule
