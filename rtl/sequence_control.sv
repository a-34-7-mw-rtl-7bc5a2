// sequence_control: hands QP sub-problems to the cores and their solutions
// back, the sequence control module of the MIQP chip.
//
// The external control processor offers the index of the next sub-problem
// (`idx_valid`/`idx`). When no upload is in progress and some core is free
// (idle and not already holding a sub-problem) the index is taken, the
// lowest-numbered free core is chosen, the index is remembered for that
// core, and the next PROB_WORDS problem words on the local bus are steered
// to it (`up_active`, `up_sel`, counting `up_beat`). Cores then work
// independently. A core with a solution ready (`core_out_valid`) is given
// the solution path of the local bus (`dn_active`, `dn_sel`) in
// round-robin order; its words leave tagged with its index (`dn_idx`), and
// when its last word is taken (`dn_last_beat`) the core becomes free again.
// While every core holds a sub-problem, `idx_ready` stays low: the control
// processor waits.
//
// Timing: an index is taken at an edge and its first word can pass in the
// next cycle; the solution path is granted one cycle after a core offers
// its first word. The chip names this module and says the cores are given
// different sub-problems and solve them asynchronously; the choice of core,
// the round-robin return order and the handshakes are this design's own.
module sequence_control
  import miqp_pkg::*;
#(
  parameter int unsigned NC         = 4,
  parameter int unsigned PROB_WORDS = prob_words(N_VAR, M_EQ, M_INEQ)
) (
  input  logic             clk,
  input  logic             rst_n,
  // problem indices from the control processor
  input  logic             idx_valid,
  output logic             idx_ready,
  input  logic [IDX_W-1:0] idx,
  // cores
  input  logic [NC-1:0]    core_idle,
  input  logic [NC-1:0]    core_out_valid,
  // upload steering
  output logic             up_active,
  output logic [$clog2(NC)-1:0] up_sel,
  input  logic             up_beat,
  // solution steering
  output logic             dn_active,
  output logic [$clog2(NC)-1:0] dn_sel,
  output logic [IDX_W-1:0] dn_idx,
  input  logic             dn_last_beat,
  // which cores hold a sub-problem
  output logic [NC-1:0]    assigned
);

  localparam int unsigned CW = $clog2(NC);
  localparam int unsigned WW = $clog2(PROB_WORDS + 1);

  logic [IDX_W-1:0] tag [NC];
  logic [WW-1:0]    up_count;
  logic [NC-1:0]    free_core;
  logic             have_free;
  logic [CW-1:0]    free_sel;
  logic [CW-1:0]    rr_ptr;       // core after the last one served
  logic             have_dn;
  logic [CW-1:0]    dn_pick;

  assign free_core = core_idle & ~assigned;

  always_comb begin
    have_free = 1'b0;
    free_sel  = '0;
    for (int c = NC - 1; c >= 0; c--) begin
      if (free_core[c]) begin
        have_free = 1'b1;
        free_sel  = CW'(c);
      end
    end
  end

  // Round-robin choice among cores offering a solution
  always_comb begin
    have_dn = 1'b0;
    dn_pick = '0;
    for (int k = NC - 1; k >= 0; k--) begin
      logic [CW-1:0] c;
      c = CW'((int'(rr_ptr) + k) % NC);
      if (core_out_valid[c] && assigned[c]) begin
        have_dn = 1'b1;
        dn_pick = c;
      end
    end
  end

  assign idx_ready = !up_active && have_free;
  assign dn_idx    = tag[dn_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_active <= 1'b0;
      up_sel    <= '0;
      up_count  <= '0;
      dn_active <= 1'b0;
      dn_sel    <= '0;
      rr_ptr    <= '0;
      assigned  <= '0;
      for (int c = 0; c < NC; c++) tag[c] <= '0;
    end else begin
      // upload
      if (idx_valid && idx_ready) begin
        up_active          <= 1'b1;
        up_sel             <= free_sel;
        up_count           <= '0;
        tag[free_sel]      <= idx;
        assigned[free_sel] <= 1'b1;
      end else if (up_active && up_beat) begin
        if (up_count == WW'(PROB_WORDS - 1)) up_active <= 1'b0;
        up_count <= up_count + 1'b1;
      end
      // solutions
      if (!dn_active) begin
        if (have_dn) begin
          dn_active <= 1'b1;
          dn_sel    <= dn_pick;
        end
      end else if (dn_last_beat) begin
        dn_active        <= 1'b0;
        assigned[dn_sel] <= 1'b0;
        rr_ptr           <= CW'((int'(dn_sel) + 1) % NC);
      end
    end
  end

  a_one_upload: assert property (@(posedge clk) disable iff (!rst_n)
    (idx_valid && idx_ready) |-> !up_active);

endmodule
