// tb_miqp_chip: end-to-end test of the quad-core chip at its default
// size (4 cores, 50 variables, 10 equality and 100 inequality constraints,
// 8210 words per sub-problem, full SRAMs), with one behavioural step-unit
// model per core.
//
// Nine sub-problems (indices 500..508) are generated in three kinds: a
// starting point that is already feasible, one that becomes feasible after
// one step, and one for which no step helps. The testbench plays the
// control processor: it offers each index, then streams the words. The
// solution side is held back at first, so that the solution buffer fills,
// cores keep finished solutions and every core is busy; then it reads at
// random. Each returned solution (50 words of x, tagged with its index)
// and its status are compared with a reference worked out here.
// Counted, and each required at least once: every core used, the control
// processor stalled because all cores were busy, several cores working at
// once, a full solution buffer, each kind of outcome, and the multi-cycle
// divider finishing on both ports of some core.
module tb_miqp_chip;
  import miqp_pkg::*;

  localparam int unsigned NC = 4;
  localparam int unsigned N = N_VAR, ME = M_EQ, MI = M_INEQ;
  localparam int unsigned PW = prob_words(N, ME, MI);
  localparam int unsigned XB = base_x(N, ME, MI);
  localparam int NP = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic idx_valid = 1'b0, idx_ready;
  logic [IDX_W-1:0] idx = '0;
  logic prob_valid = 1'b0, prob_ready;
  fx_t  prob_data = '0;
  logic sol_valid, sol_ready = 1'b0;
  sol_word_t sol_word;
  logic [NC-1:0] core_assigned, step_req, step_ack, step_ok;
  logic [ROW_W-1:0] step_row [NC];
  fx_t  step_slack [NC];
  unit_req_t ext_req [NC];
  unit_rsp_t ext_rsp [NC];
  int errors [NC], steps [NC], div_done [NC], refusals [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  miqp_chip dut (.*);

  for (genvar c = 0; c < NC; c++) begin : g_step
    step_unit_model #(.N(N), .X_BASE(XB)) u_step (
      .clk, .rst_n, .idle(!core_assigned[c]), .step_req(step_req[c]),
      .p_slack(step_slack[c]), .step_ack(step_ack[c]), .step_ok(step_ok[c]),
      .ext_req(ext_req[c]), .ext_rsp(ext_rsp[c]),
      .errors(errors[c]), .steps(steps[c]), .div_done(div_done[c]), .refusals(refusals[c]));
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- problem generator and reference ----
  fx_t  words [PW];
  fx_t  exp_x [NP][N];
  logic exp_feasible [NP];
  int   exp_row [NP], exp_checks [NP];
  fx_t  exp_slack [NP];

  function automatic fx_t rnd_range(int lo_milli, int hi_milli);
    longint v;
    int unsigned r, span;
    span = hi_milli - lo_milli + 1;
    r = $urandom;
    r = r % span;
    v = longint'(lo_milli) + longint'(r);
    return fx_t'((v <<< FRAC_W) / 1000);
  endfunction

  task automatic check_ref(input fx_t x [N], output fx_t mn, output int row);
    mn = FX_MAX;
    row = 0;
    for (int i = 0; i < MI; i++) begin
      logic signed [127:0] acc;
      fx_t s;
      acc = 0;
      for (int j = 0; j < N; j++) acc += 128'(words[i * N + j]) * 128'(x[j]);
      acc -= 128'(words[MI * N + i]) <<< FRAC_W;
      acc = acc >>> FRAC_W;
      if (acc > 128'(FX_MAX)) acc = 128'(FX_MAX);
      if (acc < 128'(FX_MIN)) acc = 128'(FX_MIN);
      s = (fx_t'(acc) == FX_MIN) ? FX_MAX : -fx_t'(acc);
      if (s < mn) begin mn = s; row = i; end
    end
  endtask

  task automatic make_problem(int p, int mode);
    fx_t x0 [N], zero [N];
    fx_t mn;
    int  row, k;
    k = 0;
    for (int i = 0; i < MI * N; i++) words[k++] = rnd_range(-1000, 1000);
    for (int i = 0; i < MI; i++) begin
      case (mode)
        0: words[k++] = rnd_range(100000, 120000);
        1: words[k++] = rnd_range(500, 4000);
        default: words[k++] = rnd_range(-4000, 4000);
      endcase
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) words[k++] = (i == j) ? FX_ONE * 4 : rnd_range(-100, 100);
    for (int i = 0; i < N; i++) words[k++] = rnd_range(-3000, 3000);
    for (int i = 0; i < ME * N; i++) words[k++] = rnd_range(-1000, 1000);
    for (int i = 0; i < ME; i++) words[k++] = rnd_range(-1000, 1000);
    for (int i = 0; i < N; i++) begin
      x0[i] = rnd_range(-2000, 2000);
      zero[i] = '0;
      words[k++] = x0[i];
    end
    check_ref(x0, mn, row);
    exp_checks[p] = 1;
    if (mn >= 0) begin
      exp_feasible[p] = 1'b1;
      exp_x[p] = x0;
    end else begin
      exp_x[p] = zero;
      check_ref(zero, mn, row);
      exp_checks[p] = 2;
      exp_feasible[p] = (mn >= 0);
    end
    exp_row[p] = row;
    exp_slack[p] = mn;
  endtask

  // ---- mechanism counters ----
  int idx_stall = 0, sol_full = 0, busy_overlap = 0;
  int used [NC];
  int n_feasible_first = 0, n_after_step = 0, n_no_step = 0;
  always @(posedge clk) if (rst_n) begin
    if (idx_valid && !idx_ready && core_assigned == '1) idx_stall++;
    if (dut.u_sol_buf.count == 5'(16)) sol_full++;
    if ($countones(core_assigned) >= 2) busy_overlap++;
  end

  // ---- control processor: indices and words ----
  initial begin
    for (int c = 0; c < NC; c++) used[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NP; p++) begin
      int j;
      make_problem(p, p % 3);
      @(negedge clk);
      idx_valid = 1'b1;
      idx = IDX_W'(500 + p);
      @(posedge clk);
      while (!idx_ready) @(posedge clk);
      used[dut.u_seqctl.free_sel]++;
      @(negedge clk);
      idx_valid = 1'b0;
      j = 0;
      while (j < int'(PW)) begin
        prob_valid = ($urandom % 8 != 0);
        prob_data  = words[j];
        @(posedge clk);
        if (prob_valid && prob_ready) j++;
        @(negedge clk);
      end
      prob_valid = 1'b0;
    end
  end

  // ---- solution reader ----
  int got = 0;
  initial begin
    int w [int];
    @(posedge rst_n);
    // hold the solution side back while the first cores finish
    repeat (45000) @(negedge clk);
    while (got < NP) begin
      @(negedge clk);
      sol_ready = ($urandom % 3 != 0);
      @(posedge clk);
      if (sol_valid && sol_ready) begin
        int p, k;
        p = int'(sol_word.idx) - 500;
        if (p < 0 || p >= NP) begin
          checks++; failures++;
          $display("FAIL unknown index %0d", sol_word.idx);
        end else begin
          k = w.exists(p) ? w[p] : 0;
          checks++;
          if (sol_word.data !== exp_x[p][k] || sol_word.last !== (k == int'(N) - 1)) begin
            failures++;
            $display("FAIL index %0d word %0d: %0d expected %0d", sol_word.idx, k,
                     sol_word.data, exp_x[p][k]);
          end
          if (k == 0) begin
            expect_true(sol_word.feasible === exp_feasible[p] &&
                        int'(sol_word.p_row) == exp_row[p] &&
                        sol_word.p_slack === exp_slack[p], "status of a solution");
            if (exp_checks[p] == 1) n_feasible_first++;
            else if (exp_feasible[p]) n_after_step++;
            else n_no_step++;
          end
          w[p] = k + 1;
          if (sol_word.last) got++;
        end
      end
    end
    @(negedge clk);
    sol_ready = 1'b0;
    repeat (20) @(negedge clk);
    begin
      int all_used, errs, both_ports;
      all_used = 1;
      errs = 0;
      both_ports = 0;
      for (int c = 0; c < NC; c++) begin
        if (used[c] == 0) all_used = 0;
        errs += errors[c];
        if (div_done[c] >= 4) both_ports = 1;
      end
      expect_true(all_used == 1, "every core used");
      expect_true(idx_stall > 0, "control processor stalled with all cores busy");
      expect_true(busy_overlap > 0, "several cores working at once");
      expect_true(sol_full > 0, "solution buffer full");
      expect_true(n_feasible_first > 0 && n_after_step > 0 && n_no_step > 0, "each kind of outcome");
      expect_true(both_ports == 1, "multi-cycle divider used on both ports");
      expect_true(errs == 0, "unit answers seen by the step models");
      expect_true(sol_valid == 1'b0 && core_assigned == '0, "chip empty at the end");
      $display("cores used %0d %0d %0d %0d; stall cycles %0d; overlap cycles %0d; full-buffer cycles %0d",
               used[0], used[1], used[2], used[3], idx_stall, busy_overlap, sol_full);
      $display("outcomes: feasible at once %0d, after a step %0d, no step possible %0d",
               n_feasible_first, n_after_step, n_no_step);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
