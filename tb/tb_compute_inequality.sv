// tb_compute_inequality: self-checking test of the constraint evaluator at
// the full problem size (N=50 variables, MI=100 inequality rows), with the
// memory bus, the three SRAMs and the MAC around it. A_I, b_I and x are
// written into the SRAMs directly. For each trial every slack b_I[i] -
// A_I[i].x, the most violated row, its slack and the feasible flag are
// compared with values worked out in 128-bit integers. Trials: random
// data (violations), a feasible point, and a run in which another master
// keeps taking the x SRAM so the unit stalls. Without stalls `done` must
// come MI*(N+1)+4 cycles after `start`.
module tb_compute_inequality;
  import miqp_pkg::*;

  localparam int unsigned N  = N_VAR;
  localparam int unsigned MI = M_INEQ;
  localparam int unsigned XB = base_x(N_VAR, M_EQ, M_INEQ);
  localparam int unsigned S0 = SRAM0_WORDS, S1 = SRAM1_WORDS, S2 = SRAM2_WORDS;
  localparam int unsigned RW = $clog2(MI);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, s_valid, done, feasible;
  logic [RW-1:0] s_row, p_row;
  fx_t  s_value, p_slack;
  mem_req_t m_req [3];
  mem_rsp_t m_rsp [3];
  mac_req_t mac_req;
  mac_rsp_t mac_rsp;
  logic     s_en [3], s_we [3];
  maddr_t   s_addr [3];
  fx_t      s_wdata [3], s_rdata [3];
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // bus master 0 is the disturbing master, 1 and 2 the unit's lanes
  compute_inequality #(.N(N), .MI(MI), .A_BASE(0), .B_BASE(MI * N), .X_BASE(XB)) dut (
    .clk, .rst_n, .start, .busy,
    .lane_a_req(m_req[1]), .lane_a_rsp(m_rsp[1]),
    .lane_x_req(m_req[2]), .lane_x_rsp(m_rsp[2]),
    .mac_req, .mac_rsp, .s_valid, .s_row, .s_value, .done, .feasible, .p_row, .p_slack);

  mac_unit u_mac (.clk, .rst_n, .in_valid(mac_req.valid), .in_first(mac_req.first),
    .in_last(mac_req.last), .in_a(mac_req.a), .in_b(mac_req.b),
    .out_valid(mac_rsp.valid), .out_result(mac_rsp.result));

  memory_bus #(.NM(3), .S0(S0), .S1(S1), .S2(S2)) u_bus (.*);
  sram_sp #(.WORDS(S0), .WIDTH(40)) u_s0 (.clk, .en(s_en[0]), .we(s_we[0]),
    .addr(s_addr[0][$clog2(S0)-1:0]), .wdata(s_wdata[0]), .rdata(s_rdata[0]));
  sram_sp #(.WORDS(S1), .WIDTH(40)) u_s1 (.clk, .en(s_en[1]), .we(s_we[1]),
    .addr(s_addr[1][$clog2(S1)-1:0]), .wdata(s_wdata[1]), .rdata(s_rdata[1]));
  sram_sp #(.WORDS(S2), .WIDTH(40)) u_s2 (.clk, .en(s_en[2]), .we(s_we[2]),
    .addr(s_addr[2][$clog2(S2)-1:0]), .wdata(s_wdata[2]), .rdata(s_rdata[2]));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fx_t A [MI][N];
  fx_t b [MI];
  fx_t x [N];
  fx_t slack_ref [MI];
  logic disturb = 1'b0;
  int   stalls = 0;

  always @(negedge clk) begin
    m_req[0] <= '0;
    if (disturb && ($urandom % 2 == 0)) begin
      m_req[0].req  <= 1'b1;
      m_req[0].addr <= maddr_t'(XB + $urandom % N);
    end
  end
  always @(posedge clk) if (m_req[2].req && !m_rsp[2].gnt) stalls++;

  function automatic fx_t rnd(int range_log2);
    // uniform in about +-2^range_log2
    return fx_t'($signed({$urandom, $urandom})) >>> (WORD_W - 1 - FRAC_W - range_log2 + 24);
  endfunction

  function automatic fx_t sat(logic signed [127:0] v);
    if (v > 128'(FX_MAX)) return FX_MAX;
    if (v < 128'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  task automatic fill(bit make_feasible, bit extreme = 1'b0);
    for (int i = 0; i < MI; i++) begin
      for (int j = 0; j < N; j++) begin
        A[i][j] = rnd(1);
        u_s0.mem[i * N + j] = A[i][j];
      end
    end
    for (int j = 0; j < N; j++) begin
      x[j] = rnd(1);
      u_s2.mem[XB - S0 - S1 + j] = x[j];
    end
    for (int i = 0; i < MI; i++) begin
      logic signed [127:0] acc;
      b[i] = make_feasible ? (fx_t'(200) <<< FRAC_W) + rnd(3) : rnd(4);
      // a row whose A_I[i].x - b_I[i] is far below the smallest word
      if (extreme && i == 1) b[i] = FX_MAX;
      if (extreme && i == 2) b[i] = FX_MIN;
      u_s0.mem[MI * N + i] = b[i];
      acc = 0;
      for (int j = 0; j < N; j++) acc += 128'(A[i][j]) * 128'(x[j]);
      acc -= 128'(b[i]) <<< FRAC_W;
      slack_ref[i] = (sat(acc >>> FRAC_W) == FX_MIN) ? FX_MAX : -sat(acc >>> FRAC_W);
    end
  endtask

  task automatic run(bit expect_feasible, bit timed);
    int t0, seen;
    fx_t mn;
    int  mi;
    mn = FX_MAX;
    mi = 0;
    for (int i = 0; i < MI; i++) if (slack_ref[i] < mn) begin mn = slack_ref[i]; mi = i; end
    @(negedge clk);
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    seen = 0;
    while (1) begin
      if (s_valid) begin
        checks++;
        if (s_value !== slack_ref[s_row] || int'(s_row) != seen) begin
          failures++;
          $display("FAIL slack row %0d: %0d expected %0d", s_row, s_value, slack_ref[s_row]);
        end
        seen++;
      end
      if (done) break;
      @(negedge clk);
    end
    checks++;
    if (seen != MI) begin failures++; $display("FAIL %0d slacks seen", seen); end
    checks++;
    if (int'(p_row) != mi || p_slack !== mn || feasible !== (mn >= 0) || feasible !== expect_feasible) begin
      failures++;
      $display("FAIL result row %0d slack %0d feasible %0d, expected row %0d slack %0d",
               p_row, p_slack, feasible, mi, mn);
    end
    if (timed) begin
      checks++;
      if (cycle - t0 != int'(MI * (N + 1) + 4)) begin
        failures++;
        $display("FAIL took %0d cycles, expected %0d", cycle - t0, MI * (N + 1) + 4);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fill(0); run(0, 1);
    fill(0, 1); run(0, 1);
    fill(1); run(1, 1);
    fill(0); disturb = 1'b1; run(0, 0); disturb = 1'b0;
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
