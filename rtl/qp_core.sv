// qp_core: one QP solver core of the MIQP chip.
//
// A core receives one QP sub-problem of the branch-and-bound search as a
// stream of 40-bit fixed-point words, keeps it in its 422 kb local memory
// (SRAMs of 204, 109 and 109 kb on a shared memory bus), works on it, and
// streams back the point x (N words) with a status. Inside are the units
// the chip gives every core: the I/O control module, the sequencer, the
// compute-inequality unit, a pipelined MAC, the multi-cycled fixed-point
// divider, a square-root unit and a distance calculator.
//
// The sequencer checks x against the inequality constraints. When a
// constraint is violated it asks the step units (determine s-pair and
// compute step of the dual active-set method) to move x, and checks again.
// Those two units are not part of this RTL: they drive the core through
// `ext_req`/`ext_rsp` (a memory-bus master of lowest priority, the MAC
// when compute-inequality is idle, divider ports 0 and 1, the square root
// and the distance unit) and the step_req/step_ack hand-off.
//
// Memory bus masters, highest priority first: I/O control, compute-
// inequality lane A (A_I, b_I in SRAM0), lane X (x in SRAM2), ext.
// Timing: see the sub-blocks; a sub-problem of the default size takes
// PROB_WORDS cycles to load, MI*(N+1)+4 cycles per check and about 3*N
// cycles to send.
module qp_core
  import miqp_pkg::*;
#(
  parameter int unsigned N          = N_VAR,
  parameter int unsigned ME         = M_EQ,
  parameter int unsigned MI         = M_INEQ,
  parameter int unsigned S0         = SRAM0_WORDS,
  parameter int unsigned S1         = SRAM1_WORDS,
  parameter int unsigned S2         = SRAM2_WORDS,
  parameter int unsigned MAX_CHECKS = 2 * N_VAR + M_INEQ,
  parameter int unsigned DIV_CYCLES = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  // QP sub-problem in
  input  logic      in_valid,
  output logic      in_ready,
  input  fx_t       in_data,
  // solution out
  output logic      out_valid,
  input  logic      out_ready,
  output fx_t       out_data,
  output logic      out_last,
  output logic      feasible,
  output logic [$clog2(MI)-1:0] p_row,
  output fx_t       p_slack,
  output logic      idle,
  output logic [$clog2(MAX_CHECKS+1)-1:0] checks,
  // step units (outside this RTL)
  output logic      step_req,
  input  logic      step_ack,
  input  logic      step_ok,
  input  unit_req_t ext_req,
  output unit_rsp_t ext_rsp
);

  localparam int unsigned PW = prob_words(N, ME, MI);
  localparam int unsigned XB = base_x(N, ME, MI);

  // ---------------- memory ----------------
  mem_req_t m_req [4];
  mem_rsp_t m_rsp [4];
  logic     s_en [3], s_we [3];
  maddr_t   s_addr [3];
  fx_t      s_wdata [3], s_rdata [3];

  memory_bus #(.NM(4), .S0(S0), .S1(S1), .S2(S2)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .s_en, .s_we, .s_addr, .s_wdata, .s_rdata
  );

  sram_sp #(.WORDS(S0), .WIDTH(WORD_W)) u_sram0 (
    .clk, .en(s_en[0]), .we(s_we[0]), .addr(s_addr[0][$clog2(S0)-1:0]),
    .wdata(s_wdata[0]), .rdata(s_rdata[0]));
  sram_sp #(.WORDS(S1), .WIDTH(WORD_W)) u_sram1 (
    .clk, .en(s_en[1]), .we(s_we[1]), .addr(s_addr[1][$clog2(S1)-1:0]),
    .wdata(s_wdata[1]), .rdata(s_rdata[1]));
  sram_sp #(.WORDS(S2), .WIDTH(WORD_W)) u_sram2 (
    .clk, .en(s_en[2]), .we(s_we[2]), .addr(s_addr[2][$clog2(S2)-1:0]),
    .wdata(s_wdata[2]), .rdata(s_rdata[2]));

  // ---------------- I/O control ----------------
  logic load_en, loaded, send, sent;

  io_control #(.PROB_WORDS(PW), .N(N), .X_BASE(XB)) u_io (
    .clk, .rst_n,
    .load_en, .in_valid, .in_ready, .in_data, .loaded,
    .send, .out_valid, .out_ready, .out_data, .out_last, .sent,
    .bus_req(m_req[0]), .bus_rsp(m_rsp[0])
  );

  // ---------------- compute inequality + MAC ----------------
  logic     ineq_start, ineq_busy, ineq_done, ineq_feasible;
  logic [$clog2(MI)-1:0] ineq_p_row, s_row;
  fx_t      ineq_p_slack, s_value;
  logic     s_valid;
  mac_req_t ineq_mac_req, mac_req;
  mac_rsp_t mac_rsp;

  compute_inequality #(
    .N(N), .MI(MI), .A_BASE(0), .B_BASE(MI * N), .X_BASE(XB)
  ) u_ineq (
    .clk, .rst_n, .start(ineq_start), .busy(ineq_busy),
    .lane_a_req(m_req[1]), .lane_a_rsp(m_rsp[1]),
    .lane_x_req(m_req[2]), .lane_x_rsp(m_rsp[2]),
    .mac_req(ineq_mac_req), .mac_rsp,
    .s_valid, .s_row, .s_value,
    .done(ineq_done), .feasible(ineq_feasible),
    .p_row(ineq_p_row), .p_slack(ineq_p_slack)
  );

  assign mac_req = ineq_busy ? ineq_mac_req : ext_req.mac;

  mac_unit u_mac (
    .clk, .rst_n,
    .in_valid(mac_req.valid), .in_first(mac_req.first), .in_last(mac_req.last),
    .in_a(mac_req.a), .in_b(mac_req.b),
    .out_valid(mac_rsp.valid), .out_result(mac_rsp.result)
  );

  // ---------------- sequencer ----------------
  core_sequencer #(.MI(MI), .MAX_CHECKS(MAX_CHECKS)) u_seq (
    .clk, .rst_n, .idle,
    .load_en, .loaded, .send, .sent,
    .ineq_start, .ineq_done, .ineq_feasible, .ineq_p_row, .ineq_p_slack,
    .step_req, .step_ack, .step_ok,
    .feasible, .p_row, .p_slack, .checks
  );

  // ---------------- units used by the step logic ----------------
  assign m_req[3] = ext_req.mem;
  assign ext_rsp.mem = m_rsp[3];
  assign ext_rsp.mac = mac_rsp;

  fixed_divider #(.DIV_CYCLES(DIV_CYCLES)) u_div (
    .clk, .rst_n,
    .c0(ext_req.div0.c), .a0(ext_req.div0.a), .b0(ext_req.div0.b),
    .c1(ext_req.div1.c), .a1(ext_req.div1.a), .b1(ext_req.div1.b),
    .result(ext_rsp.div.result), .finish(ext_rsp.div.finish), .busy(ext_rsp.div.busy)
  );

  sqrt_unit u_sqrt (
    .clk, .rst_n, .in_valid(ext_req.sq.valid), .in_x(ext_req.sq.x),
    .out_valid(ext_rsp.sq.valid), .out_neg(ext_rsp.sq.neg), .out_root(ext_rsp.sq.root)
  );

  distance_calc u_hyp (
    .clk, .rst_n, .in_valid(ext_req.hyp.valid), .in_a(ext_req.hyp.a), .in_b(ext_req.hyp.b),
    .out_valid(ext_rsp.hyp.valid), .out_dist(ext_rsp.hyp.d)
  );

endmodule
