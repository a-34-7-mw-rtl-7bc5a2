// tb_sqrt_unit: self-checking test of the pipelined fixed-point square root.
// One operand per cycle (random magnitudes, exact squares, 0, the largest
// word, negatives); every root is compared with floor(sqrt(x * 2^26))
// found by bisection in 128-bit integers, and
// must come out 33 cycles after its operand.
module tb_sqrt_unit;
  import miqp_pkg::*;

  localparam int LATENCY = 33;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  fx_t  in_x = '0;
  logic out_valid, out_neg;
  fx_t  out_root;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sqrt_unit dut (.*);

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

  typedef struct { fx_t root; logic neg; int cyc; } exp_t;
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
        if (out_root !== e.root || out_neg !== e.neg || cycle - e.cyc != LATENCY) begin
          failures++;
          $display("FAIL root %0d neg %0d after %0d, expected %0d neg %0d",
                   out_root, out_neg, cycle - e.cyc, e.root, e.neg);
        end
      end
    end
  end

  task automatic push(fx_t x);
    exp_t e;
    @(negedge clk);
    in_valid = 1'b1;
    in_x     = x;
    e.neg  = x < 0;
    e.root = (x < 0) ? '0 : fx_t'(isqrt_ref(128'(x) << 26));
    e.cyc  = cycle;
    exp_q.push_back(e);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    push(fx_t'(4) <<< 26);          // sqrt(4) = 2
    push(fx_t'(1) <<< 24);          // sqrt(0.25) = 0.5
    push('0);
    push(FX_MAX);
    push(-fx_t'(9) <<< 26);
    for (int i = 0; i < 500; i++) begin
      fx_t x;
      x = fx_t'({$urandom, $urandom}) & FX_MAX;
      x = x >>> ($urandom % 39);
      if ($urandom % 8 == 0) x = -x;
      push(x);
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
      $display("FAIL %0d roots missing", exp_q.size());
    end
    // exact values
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
