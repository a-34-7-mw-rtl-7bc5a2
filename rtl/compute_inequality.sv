// compute_inequality: evaluates the inequality constraints at a point and
// finds the most violated one.
//
// For every row i of A_I it forms s_i = b_I[i] - A_I[i] . x, the slack of
// the constraint A_I[i] . x <= b_I[i] (negative means violated), and
// reports the smallest slack and its row. This is the test a dual
// active-set solver runs each iteration: if no slack is below -TOL the
// point is feasible and optimal, otherwise the row with the smallest slack
// is the constraint to add next.
//
// How it works: for each row it streams N+1 operand pairs into the shared
// MAC: (A_I[i][j], x[j]) for j < N, then (b_I[i], -1.0), so the MAC returns
// A_I[i] . x - b_I[i] = -s_i. A_I and b_I are read on memory-bus lane A,
// x on lane X; with A_I and x in different SRAMs both lanes are served in
// the same cycle and a row takes N+1 cycles. When a lane is not granted the
// pair is issued again. Rows are evaluated in order; the first of equal
// smallest slacks wins.
//
// Timing: `start` for one cycle; `done` for one cycle after the last row,
// MI*(N+1) + 4 cycles after `start` when never stalled. `s_valid`/`s_row`/
// `s_value` show each slack as it is finished. The block is named by the
// chip; its method and interface are this design's own.
module compute_inequality
  import miqp_pkg::*;
#(
  parameter int unsigned N      = N_VAR,
  parameter int unsigned MI     = M_INEQ,
  parameter int unsigned A_BASE = 0,
  parameter int unsigned B_BASE = M_INEQ * N_VAR,
  parameter int unsigned X_BASE = base_x(N_VAR, M_EQ, M_INEQ),
  parameter fx_t         TOL    = '0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     busy,
  // memory bus lanes
  output mem_req_t lane_a_req,
  input  mem_rsp_t lane_a_rsp,
  output mem_req_t lane_x_req,
  input  mem_rsp_t lane_x_rsp,
  // shared MAC
  output mac_req_t mac_req,
  input  mac_rsp_t mac_rsp,
  // results
  output logic     s_valid,
  output logic [$clog2(MI)-1:0] s_row,
  output fx_t      s_value,
  output logic     done,
  output logic     feasible,
  output logic [$clog2(MI)-1:0] p_row,
  output fx_t      p_slack
);

  localparam int unsigned RW = $clog2(MI);
  localparam int unsigned JW = $clog2(N + 1);

  logic          issuing;
  logic [RW-1:0] row;        // row being issued
  logic [JW-1:0] term;       // term being issued, N means the b_I term
  logic [RW-1:0] res_row;    // row whose slack comes next from the MAC
  logic          issued_q;   // a pair was issued last cycle
  logic [JW-1:0] term_q;

  logic is_b_term, a_ok, x_ok, fire;
  assign is_b_term = (term == JW'(N));
  assign a_ok      = lane_a_rsp.gnt;
  assign x_ok      = is_b_term || lane_x_rsp.gnt;
  assign fire      = issuing && a_ok && x_ok;

  always_comb begin
    lane_a_req       = '0;
    lane_x_req       = '0;
    lane_a_req.req   = issuing;
    lane_a_req.addr  = is_b_term ? maddr_t'(B_BASE + 32'(row))
                                 : maddr_t'(A_BASE + 32'(row) * N + 32'(term));
    lane_x_req.req   = issuing && !is_b_term;
    lane_x_req.addr  = maddr_t'(X_BASE + 32'(term));
  end

  // Feed the MAC with the words that return one cycle after issue
  always_comb begin
    mac_req       = '0;
    mac_req.valid = issued_q;
    mac_req.first = issued_q && term_q == '0;
    mac_req.last  = issued_q && term_q == JW'(N);
    mac_req.a     = lane_a_rsp.rdata;
    mac_req.b     = (term_q == JW'(N)) ? -FX_ONE : lane_x_rsp.rdata;
  end

  fx_t  slack;
  // -FX_MIN does not exist: saturate
  assign slack = (mac_rsp.result == FX_MIN) ? FX_MAX : -mac_rsp.result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      busy     <= 1'b0;
      row      <= '0;
      term     <= '0;
      res_row  <= '0;
      issued_q <= 1'b0;
      term_q   <= '0;
      s_valid  <= 1'b0;
      s_row    <= '0;
      s_value  <= '0;
      done     <= 1'b0;
      feasible <= 1'b0;
      p_row    <= '0;
      p_slack  <= '0;
    end else begin
      done     <= 1'b0;
      s_valid  <= 1'b0;
      issued_q <= fire;
      term_q   <= term;

      if (start && !busy) begin
        busy     <= 1'b1;
        issuing  <= 1'b1;
        row      <= '0;
        term     <= '0;
        res_row  <= '0;
        p_row    <= '0;
        p_slack  <= FX_MAX;
        feasible <= 1'b0;
      end else if (fire) begin
        if (is_b_term) begin
          term <= '0;
          if (row == RW'(MI - 1)) issuing <= 1'b0;
          else                    row     <= row + 1'b1;
        end else begin
          term <= term + 1'b1;
        end
      end

      if (busy && mac_rsp.valid) begin
        s_valid <= 1'b1;
        s_row   <= res_row;
        s_value <= slack;
        if (slack < p_slack) begin
          p_slack <= slack;
          p_row   <= res_row;
        end
        if (res_row == RW'(MI - 1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          feasible <= ((slack < p_slack) ? slack : p_slack) >= -TOL;
        end
        res_row <= res_row + 1'b1;
      end
    end
  end

endmodule
