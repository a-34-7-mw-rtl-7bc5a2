// step_unit_model: behavioural stand-in, for testbenches only, for the
// dual active-set step units of one core (determine s-pair and compute
// step), which are not part of the RTL.
//
// It does not solve anything. On `step_req` it exercises every unit port
// the real step logic would use, checks each answer, and then moves the
// point x to the origin through the memory bus:
//   - divider port 0 then port 1: p_slack / 2.0 and 3.0 / -1.5, with the
//     latency of DIV_CYCLES cycles checked;
//   - the square root of 2.25 and the distance of (3, 4);
//   - a two-term dot product on the MAC (1.5*2 + 0.5*4 = 5);
//   - N writes of 0 to x.
// If x was already moved to the origin for this sub-problem (the core has
// not been idle since), it acknowledges with step_ok low: "no step
// possible". Errors are counted in `errors`; `steps`, `div_done` and
// `refusals` count what happened.
module step_unit_model
  import miqp_pkg::*;
#(
  parameter int unsigned N          = N_VAR,
  parameter int unsigned X_BASE     = base_x(N_VAR, M_EQ, M_INEQ),
  parameter int unsigned DIV_CYCLES = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      idle,
  input  logic      step_req,
  input  fx_t       p_slack,
  output logic      step_ack,
  output logic      step_ok,
  output unit_req_t ext_req,
  input  unit_rsp_t ext_rsp,
  output int        errors,
  output int        steps,
  output int        div_done,
  output int        refusals
);

  logic moved;

  initial begin
    ext_req  = '0;
    step_ack = 1'b0;
    step_ok  = 1'b0;
    errors   = 0;
    steps    = 0;
    div_done = 0;
    refusals = 0;
    moved    = 1'b0;
  end

  always @(posedge clk) if (idle) moved <= 1'b0;

  task automatic divide(bit port, fx_t a, fx_t b, fx_t expect_q);
    int cyc;
    @(negedge clk);
    if (port) ext_req.div1 = '{c: 1'b1, a: a, b: b};
    else      ext_req.div0 = '{c: 1'b1, a: a, b: b};
    @(negedge clk);
    ext_req.div0 = '0;
    ext_req.div1 = '0;
    cyc = 0;
    while (!ext_rsp.div.finish && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    div_done++;
    if (cyc != DIV_CYCLES || ext_rsp.div.result !== expect_q) begin
      errors++;
      $display("step model: divider gave %0d after %0d cycles, expected %0d",
               ext_rsp.div.result, cyc, expect_q);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && step_req && !step_ack) begin
      if (moved) begin
        refusals++;
        @(negedge clk);
        step_ack = 1'b1;
        step_ok  = 1'b0;
        @(negedge clk);
        step_ack = 1'b0;
      end else begin
        fx_t half;
        int  w;
        half = p_slack >>> 1;
        // p_slack / 2.0 rounds toward zero in the divider
        if (p_slack < 0 && p_slack[0]) half = half + 1;
        divide(0, FX_ONE <<< 1, p_slack, half);
        divide(1, -(FX_ONE + (FX_ONE >>> 1)), FX_ONE * 3, -(FX_ONE <<< 1));
        // square root and distance
        @(negedge clk);
        ext_req.sq  = '{valid: 1'b1, x: (FX_ONE <<< 1) + (FX_ONE >>> 2)};
        ext_req.hyp = '{valid: 1'b1, a: FX_ONE * 3, b: FX_ONE * 4};
        @(negedge clk);
        ext_req.sq  = '0;
        ext_req.hyp = '0;
        w = 0;
        while (!ext_rsp.sq.valid && w < 100) begin @(negedge clk); w++; end
        if (ext_rsp.sq.root !== FX_ONE + (FX_ONE >>> 1)) begin
          errors++;
          $display("step model: sqrt gave %0d", ext_rsp.sq.root);
        end
        while (!ext_rsp.hyp.valid && w < 100) begin @(negedge clk); w++; end
        if (ext_rsp.hyp.d !== FX_ONE * 5) begin
          errors++;
          $display("step model: distance gave %0d", ext_rsp.hyp.d);
        end
        // MAC
        @(negedge clk);
        ext_req.mac = '{valid: 1'b1, first: 1'b1, last: 1'b0, a: FX_ONE + (FX_ONE >>> 1), b: FX_ONE * 2};
        @(negedge clk);
        ext_req.mac = '{valid: 1'b1, first: 1'b0, last: 1'b1, a: FX_ONE >>> 1, b: FX_ONE * 4};
        @(negedge clk);
        ext_req.mac = '0;
        w = 0;
        while (!ext_rsp.mac.valid && w < 10) begin @(negedge clk); w++; end
        if (ext_rsp.mac.result !== FX_ONE * 5) begin
          errors++;
          $display("step model: MAC gave %0d", ext_rsp.mac.result);
        end
        // move x to the origin
        for (int j = 0; j < int'(N); j++) begin
          @(negedge clk);
          ext_req.mem = '{req: 1'b1, we: 1'b1, addr: maddr_t'(X_BASE + j), wdata: '0};
          @(posedge clk);
          while (!ext_rsp.mem.gnt) @(posedge clk);
        end
        @(negedge clk);
        ext_req.mem = '0;
        moved = 1'b1;
        steps++;
        step_ack = 1'b1;
        step_ok  = 1'b1;
        @(negedge clk);
        step_ack = 1'b0;
        step_ok  = 1'b0;
      end
    end
  end

endmodule
