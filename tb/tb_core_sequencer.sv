// tb_core_sequencer: self-checking test of the core's outer control loop.
// The I/O control, compute-inequality and step units are played by the
// testbench. Scenarios: feasible at the first check; two steps then
// feasible; a step that reports no possible move; and running into the
// check limit (MAX_CHECKS=3). For each, the order of load_en, ineq_start,
// step_req and send pulses, the number of checks and the reported status
// are compared with what the scenario requires.
module tb_core_sequencer;
  import miqp_pkg::*;

  localparam int unsigned MI = 100, MAX_CHECKS = 3;
  localparam int unsigned RW = $clog2(MI);

  logic clk = 1'b0, rst_n = 1'b0;
  logic idle, load_en, loaded = 1'b0, send, sent = 1'b0;
  logic ineq_start, ineq_done = 1'b0, ineq_feasible = 1'b0;
  logic [RW-1:0] ineq_p_row = '0;
  fx_t  ineq_p_slack = '0;
  logic step_req, step_ack = 1'b0, step_ok = 1'b0;
  logic feasible;
  logic [RW-1:0] p_row;
  fx_t  p_slack;
  logic [$clog2(MAX_CHECKS+1)-1:0] checks_o;
  int checks = 0, failures = 0;
  int n_start = 0, n_step = 0, n_send = 0;

  always #5 clk = ~clk;

  core_sequencer #(.MI(MI), .MAX_CHECKS(MAX_CHECKS)) dut (
    .clk, .rst_n, .idle, .load_en, .loaded, .send, .sent,
    .ineq_start, .ineq_done, .ineq_feasible, .ineq_p_row, .ineq_p_slack,
    .step_req, .step_ack, .step_ok, .feasible, .p_row, .p_slack, .checks(checks_o));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_start += int'(ineq_start);
    n_send  += int'(send);
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one check: wait for the start pulse, answer after a few cycles
  task automatic answer_check(bit feas, int row, int slack);
    int w;
    w = 0;
    while (!ineq_start && w < 50) begin @(negedge clk); w++; end
    expect_true(ineq_start === 1'b1, "ineq_start");
    repeat (1 + $urandom % 5) @(negedge clk);
    expect_true(!ineq_start, "ineq_start is a single pulse");
    ineq_done = 1'b1; ineq_feasible = feas; ineq_p_row = RW'(row); ineq_p_slack = fx_t'(slack);
    @(negedge clk);
    ineq_done = 1'b0; ineq_p_row = '0; ineq_p_slack = '0; ineq_feasible = 1'b0;
  endtask

  task automatic answer_step(bit ok);
    int w;
    w = 0;
    while (!step_req && w < 50) begin @(negedge clk); w++; end
    expect_true(step_req === 1'b1, "step_req");
    n_step++;
    repeat ($urandom % 5) @(negedge clk);
    step_ack = 1'b1; step_ok = ok;
    @(negedge clk);
    step_ack = 1'b0; step_ok = 1'b0;
  endtask

  task automatic finish_send(bit feas, int row, int slack, int nchk);
    int w;
    w = 0;
    while (!send && w < 50) begin @(negedge clk); w++; end
    expect_true(send === 1'b1, "send");
    expect_true(feasible === feas && int'(p_row) == row && p_slack == fx_t'(slack),
                "status at send");
    expect_true(int'(checks_o) == nchk, "number of checks");
    expect_true(!step_req && !load_en, "quiet while sending");
    repeat (3) @(negedge clk);
    sent = 1'b1;
    @(negedge clk);
    sent = 1'b0;
    @(negedge clk);
    expect_true(load_en && idle, "back to loading");
  endtask

  task automatic load();
    expect_true(load_en && idle, "load_en while idle");
    repeat (4) @(negedge clk);
    loaded = 1'b1;
    @(negedge clk);
    loaded = 1'b0;
    expect_true(!idle, "busy after loading");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // 1: feasible at once
    load(); answer_check(1, 7, 100); finish_send(1, 7, 100, 1);
    expect_true(n_step == 0 && n_start == 1 && n_send == 1, "scenario 1 counts");
    // 2: two steps, then feasible
    load(); answer_check(0, 3, -5); answer_step(1); answer_check(0, 9, -2); answer_step(1);
    answer_check(1, 1, 0); finish_send(1, 1, 0, 3);
    expect_true(n_step == 2 && n_start == 4, "scenario 2 counts");
    // 3: no step possible
    load(); answer_check(0, 42, -9); answer_step(0); finish_send(0, 42, -9, 1);
    expect_true(n_step == 3 && n_start == 5, "scenario 3 counts");
    // 4: check limit reached
    load(); answer_check(0, 4, -1); answer_step(1); answer_check(0, 5, -1); answer_step(1);
    answer_check(0, 6, -1); finish_send(0, 6, -1, 3);
    expect_true(n_step == 5 && n_start == 8 && n_send == 4, "scenario 4 counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
