// tb_mac_unit: self-checking test of the pipelined MAC.
// Sends dot products of random length (1..60 terms) back to back, with
// and without gaps, and compares each result with the sum of products
// computed in 128-bit integers, shifted down by 26 and saturated. The
// result must appear 2 cycles after the last pair.
module tb_mac_unit;
  import miqp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  fx_t  in_a = '0, in_b = '0;
  logic out_valid;
  fx_t  out_result;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_unit dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fx_t expect_q[$];
  int  last_cycle_q[$];
  int  cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic fx_t sat(logic signed [127:0] v);
    logic signed [127:0] hi, lo;
    hi = (128'sd1 <<< 39) - 1;
    lo = -(128'sd1 <<< 39);
    if (v > hi) return fx_t'(hi);
    if (v < lo) return fx_t'(lo);
    return fx_t'(v);
  endfunction

  // check outputs
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expect_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        fx_t e;
        int  lc;
        e  = expect_q.pop_front();
        lc = last_cycle_q.pop_front();
        if (out_result !== e) begin
          failures++;
          $display("FAIL result %0d expected %0d", out_result, e);
        end
        checks++;
        if (cycle - lc != 2) begin
          failures++;
          $display("FAIL latency %0d", cycle - lc);
        end
      end
    end
  end

  task automatic dot(int len, int scale, bit gaps);
    logic signed [127:0] sum;
    fx_t a, b;
    sum = 0;
    for (int j = 0; j < len; j++) begin
      a = fx_t'($signed({$urandom, 8'h0})) >>> scale;
      b = fx_t'($signed({$urandom, 8'h0})) >>> scale;
      sum += 128'(a) * 128'(b);
      @(negedge clk);
      in_valid = 1'b1; in_first = (j == 0); in_last = (j == len - 1);
      in_a = a; in_b = b;
      if (j == len - 1) begin
        expect_q.push_back(sat(sum >>> 26));
        last_cycle_q.push_back(cycle);
      end
      if (gaps && ($urandom % 3 == 0)) begin
        @(negedge clk);
        in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
        in_a = $urandom; in_b = $urandom;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 1.5 * 2.0 + (-0.25) * 4.0 = 2.0
    @(negedge clk);
    in_valid = 1; in_first = 1; in_last = 0; in_a = fx_t'(3) <<< 25; in_b = fx_t'(2) <<< 26;
    @(negedge clk);
    in_first = 0; in_last = 1; in_a = -(fx_t'(1) <<< 24); in_b = fx_t'(4) <<< 26;
    expect_q.push_back(fx_t'(2) <<< 26);
    last_cycle_q.push_back(cycle);
    for (int i = 0; i < 300; i++) dot(1 + $urandom % 60, 4 + $urandom % 20, i[1]);
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
