// tb_distance_calc: self-checking test of the pipelined distance unit.
// Random pairs of all magnitudes and signs, the 3-4-5 triangle, zeros and
// saturating pairs, one per cycle; each result is compared with
// floor(sqrt(a^2 + b^2)) on the 26-fraction-bit grid, found by bisection
// in 128-bit integers, and must come out
// 42 cycles after its operands.
module tb_distance_calc;
  import miqp_pkg::*;

  localparam int LATENCY = 42;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  fx_t  in_a = '0, in_b = '0;
  logic out_valid;
  fx_t  out_dist;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  distance_calc dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] isqrt_ref(logic [127:0] v);
    logic [127:0] lo, hi, mid;
    lo = 0;
    hi = 128'd1 << 42;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      if (mid * mid <= v) lo = mid;
      else                hi = mid;
    end
    return lo;
  endfunction

  typedef struct { fx_t d; int cyc; } exp_t;
  exp_t exp_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (out_dist !== e.d || cycle - e.cyc != LATENCY) begin
          failures++;
          $display("FAIL dist %0d after %0d, expected %0d", out_dist, cycle - e.cyc, e.d);
        end
      end
    end
  end

  task automatic push(fx_t a, fx_t b);
    exp_t e;
    logic signed [127:0] sa, sb;
    logic [127:0] r;
    @(negedge clk);
    in_valid = 1'b1;
    in_a     = a;
    in_b     = b;
    sa = 128'(a);
    sb = 128'(b);
    r  = isqrt_ref(128'(sa * sa + sb * sb));
    e.d   = (r > 128'(FX_MAX)) ? FX_MAX : fx_t'(r);
    e.cyc = cycle;
    exp_q.push_back(e);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    push(fx_t'(3) <<< 26, -(fx_t'(4) <<< 26));   // 5.0
    push('0, '0);
    push(FX_MAX, FX_MAX);                        // saturates
    push(FX_MIN, '0);
    for (int i = 0; i < 500; i++) begin
      fx_t a, b;
      a = fx_t'({$urandom, $urandom}) >>> ($urandom % 39);
      b = fx_t'({$urandom, $urandom}) >>> ($urandom % 39);
      push(a, b);
      if ($urandom % 4 == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
