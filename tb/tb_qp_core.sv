// tb_qp_core: self-checking test of one QP solver core at the full problem
// size (50 variables, 10 equality and 100 inequality constraints, 8210
// words per sub-problem), with the behavioural step-unit model attached.
// Three sub-problems are streamed in with random gaps and their solutions
// read out against random back pressure:
//   mode 0: the starting point already meets every constraint;
//   mode 1: it does not, one step (to the origin) makes it feasible;
//   mode 2: it does not, and the origin does not either: no step possible.
// For each the solution words, the status (feasible, most violated row and
// its slack) and the number of checks are compared with a reference worked
// out here in 128-bit integers; the number of cycles of a check is taken
// from the solution timing and compared with MI*(N+1)+4.
module tb_qp_core;
  import miqp_pkg::*;

  localparam int unsigned N = N_VAR, ME = M_EQ, MI = M_INEQ;
  localparam int unsigned PW = prob_words(N, ME, MI);
  localparam int unsigned XB = base_x(N, ME, MI);
  localparam int unsigned RW = $clog2(MI);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  fx_t  in_data = '0;
  logic out_valid, out_ready = 1'b0, out_last;
  fx_t  out_data;
  logic feasible, idle, step_req, step_ack, step_ok;
  logic [RW-1:0] p_row;
  fx_t  p_slack;
  logic [$clog2(2*N_VAR+M_INEQ+1)-1:0] checks_o;
  unit_req_t ext_req;
  unit_rsp_t ext_rsp;
  int errors, steps, div_done, refusals;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qp_core dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .out_last,
    .feasible, .p_row, .p_slack, .idle, .checks(checks_o),
    .step_req, .step_ack, .step_ok, .ext_req, .ext_rsp);

  step_unit_model #(.N(N), .X_BASE(XB)) u_step (
    .clk, .rst_n, .idle, .step_req, .p_slack, .step_ack, .step_ok,
    .ext_req, .ext_rsp, .errors, .steps, .div_done, .refusals);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- problem generator and reference ----
  fx_t words [PW];
  fx_t exp_x [N];
  logic exp_feasible;
  int   exp_row, exp_checks;
  fx_t  exp_slack;

  function automatic fx_t rnd_range(int lo_milli, int hi_milli);
    longint v;
    int unsigned r, span;
    span = hi_milli - lo_milli + 1;
    r = $urandom;
    r = r % span;
    v = longint'(lo_milli) + longint'(r);
    return fx_t'((v <<< FRAC_W) / 1000);
  endfunction

  // smallest slack of A_I x <= b_I and its row
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

  task automatic make_problem(int mode);
    fx_t x0 [N], zero [N];
    fx_t mn;
    int  row;
    int  k;
    k = 0;
    for (int i = 0; i < MI * N; i++) words[k++] = rnd_range(-1000, 1000);       // A_I
    for (int i = 0; i < MI; i++) begin                                        // b_I
      case (mode)
        0: words[k++] = rnd_range(100000, 120000);
        1: words[k++] = rnd_range(500, 4000);
        default: words[k++] = rnd_range(-4000, 4000);
      endcase
    end
    for (int i = 0; i < N; i++)                                               // H
      for (int j = 0; j < N; j++) words[k++] = (i == j) ? FX_ONE * 4 : rnd_range(-100, 100);
    for (int i = 0; i < N; i++) words[k++] = rnd_range(-3000, 3000);          // g
    for (int i = 0; i < ME * N; i++) words[k++] = rnd_range(-1000, 1000);     // A_E
    for (int i = 0; i < ME; i++) words[k++] = rnd_range(-1000, 1000);         // b_E
    for (int i = 0; i < N; i++) begin                                         // x0
      x0[i] = rnd_range(-2000, 2000);
      zero[i] = '0;
      words[k++] = x0[i];
    end
    // what the core and the step model must do
    check_ref(x0, mn, row);
    exp_checks = 1;
    if (mn >= 0) begin
      exp_feasible = 1'b1;
      exp_x = x0;
    end else begin
      exp_x = zero;
      check_ref(zero, mn, row);
      exp_checks = 2;
      exp_feasible = (mn >= 0);
    end
    exp_row = row;
    exp_slack = mn;
  endtask

  int send_cycle, load_cycle, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3; p++) begin
      int j, steps0, ref0;
      steps0 = steps;
      ref0 = refusals;
      make_problem(p);
      // stream in
      j = 0;
      while (j < int'(PW)) begin
        @(negedge clk);
        in_valid = ($urandom % 8 != 0);
        in_data  = words[j];
        @(posedge clk);
        if (in_valid && in_ready) j++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      load_cycle = cycle;
      // read solution
      for (int w = 0; w < int'(N); w++) begin
        while (1) begin
          out_ready = ($urandom % 3 != 0);
          @(posedge clk);
          if (out_valid && out_ready) break;
          @(negedge clk);
        end
        if (w == 0) send_cycle = cycle;
        checks++;
        if (out_data !== exp_x[w] || out_last !== (w == int'(N) - 1)) begin
          failures++;
          $display("FAIL problem %0d word %0d: %0d expected %0d", p, w, out_data, exp_x[w]);
        end
        if (w == 0) begin
          expect_true(feasible === exp_feasible, "feasible flag");
          expect_true(int'(p_row) == exp_row && p_slack === exp_slack, "violated row and slack");
          expect_true(int'(checks_o) == exp_checks, "number of checks");
        end
        @(negedge clk);
        out_ready = 1'b0;
      end
      if (exp_checks == 1) begin
        // one check (MI*(N+1)+4) plus start/send overhead of a few cycles
        expect_true(send_cycle - load_cycle >= int'(MI * (N + 1) + 4) &&
                    send_cycle - load_cycle <= int'(MI * (N + 1) + 12), "check time");
      end
      expect_true(steps - steps0 == (exp_checks == 2 ? 1 : 0), "steps taken");
      expect_true(refusals - ref0 == (exp_checks == 2 && !exp_feasible ? 1 : 0), "step refused");
      $display("problem %0d: feasible %0d after %0d checks, %0d cycles from load to first solution word",
               p, exp_feasible, exp_checks, send_cycle - load_cycle);
      repeat (3) @(negedge clk);
    end
    expect_true(errors == 0, "unit answers seen by the step model");
    expect_true(div_done == 4, "divider used by both ports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
