// tb_fixed_divider: self-checking test of the multi-cycled divider.
// Random operand pairs on both request ports, division by zero, extreme
// values, c0 priority when both ports ask, and requests while busy. Each
// quotient is compared with b * 2^26 / a worked out in 128-bit integers,
// and `finish` must come exactly DIV_CYCLES cycles after the request.
module tb_fixed_divider;
  import miqp_pkg::*;

  localparam int unsigned DIV_CYCLES = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic c0 = 1'b0, c1 = 1'b0;
  fx_t  a0 = '0, b0 = '0, a1 = '0, b1 = '0;
  fx_t  result;
  logic finish, busy;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fixed_divider #(.DIV_CYCLES(DIV_CYCLES)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t ref_div(fx_t a, fx_t b);
    logic signed [127:0] ma, mb, q, lim;
    lim = (128'sd1 <<< 39) - 1;
    ma = a < 0 ? -128'(a) : 128'(a);
    mb = b < 0 ? -128'(b) : 128'(b);
    if (ma > lim) ma = lim;
    if (mb > lim) mb = lim;
    if (ma == 0) q = lim;
    else begin
      q = (mb <<< 26) / ma;
      if (q > lim) q = lim;
    end
    return ((a < 0) != (b < 0)) ? -fx_t'(q) : fx_t'(q);
  endfunction

  function automatic fx_t rnd_fx(int mode);
    logic [63:0] r;
    r = {$urandom, $urandom};
    case (mode)
      0: return fx_t'($signed(r[39:0]));                  // any value
      1: return fx_t'($signed({{16{r[23]}}, r[23:0]}));   // small
      default: return fx_t'($signed({{6{r[33]}}, r[33:0]}));
    endcase
  endfunction

  task automatic divide(input bit port, input fx_t a, input fx_t b);
    int   cyc;
    fx_t  exp_q;
    exp_q = ref_div(a, b);
    @(negedge clk);
    if (port) begin c1 = 1'b1; a1 = a; b1 = b; a0 = $urandom; b0 = $urandom; end
    else      begin c0 = 1'b1; a0 = a; b0 = b; a1 = $urandom; b1 = $urandom; end
    @(negedge clk);
    c0 = 1'b0; c1 = 1'b0;
    // a second request while busy must be ignored
    a0 = fx_t'(1); b0 = fx_t'(7); c0 = ($urandom % 4 == 0);
    cyc = 0;
    while (!finish) begin
      @(negedge clk);
      c0 = 1'b0;
      cyc++;
      if (cyc > 50) break;
    end
    checks++;
    if (cyc != DIV_CYCLES) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, DIV_CYCLES);
    end
    checks++;
    if (result !== exp_q) begin
      failures++;
      $display("FAIL %0d / %0d: got %0d expected %0d", b, a, result, exp_q);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // exact cases: 6.0 / 2.0 = 3.0, -1.0 / 4.0 = -0.25
    divide(0, fx_t'(2) <<< 26, fx_t'(6) <<< 26);
    checks++; if (result != (fx_t'(3) <<< 26)) failures++;
    divide(1, fx_t'(4) <<< 26, -(fx_t'(1) <<< 26));
    checks++; if (result != -(fx_t'(1) <<< 24)) failures++;
    // divide by zero, overflow, extremes
    divide(0, '0, fx_t'(12345));
    divide(1, '0, -fx_t'(12345));
    divide(0, fx_t'(1), FX_MAX);
    divide(1, FX_MIN, FX_MIN);
    divide(0, FX_MIN, fx_t'(3));
    for (int i = 0; i < 400; i++) divide(i[0], rnd_fx(i % 3), rnd_fx((i / 3) % 3));
    // both ports at once: port 0 wins
    @(negedge clk);
    c0 = 1'b1; a0 = fx_t'(5) <<< 26; b0 = fx_t'(10) <<< 26;
    c1 = 1'b1; a1 = fx_t'(1) <<< 26; b1 = fx_t'(7) <<< 26;
    @(negedge clk);
    c0 = 1'b0; c1 = 1'b0;
    while (!finish) @(negedge clk);
    checks++;
    if (result != (fx_t'(2) <<< 26)) begin
      failures++;
      $display("FAIL priority: %0d", result);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
