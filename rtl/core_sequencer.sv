// core_sequencer: outer control loop of one QP solver core.
//
// A core takes one QP sub-problem at a time. The sequencer
//   1. LOAD:  lets the I/O control module write the problem into SRAM;
//   2. CHECK: starts compute_inequality on the current point x;
//   3. if the point violates a constraint, STEP: hands the most violated
//      row to the step units (determine s-pair / compute step, which drive
//      the core from outside through its unit ports) with `step_req`, and
//      waits for `step_ack`. With `step_ok` high they have moved x and the
//      sequencer checks again; with it low no step is possible and the
//      sub-problem is reported as having no feasible point;
//   4. SEND:  has the I/O control module send x out, with the status
//      (`feasible`, the last violated row and its slack) held steady.
// At most MAX_CHECKS checks are made per sub-problem; after the last the
// point is sent as not feasible. `idle` is high whenever the core holds no
// sub-problem, that is in LOAD.
//
// Timing: every state change takes one clock edge after its cause.
// The chip shows a sequencer over the dual active-set units; that it
// checks feasibility between steps follows the dual active-set method it
// uses. The state machine, the hand-off interface and the check limit are
// this design's own.
module core_sequencer
  import miqp_pkg::*;
#(
  parameter int unsigned MI         = M_INEQ,
  parameter int unsigned MAX_CHECKS = 2 * N_VAR + M_INEQ
) (
  input  logic clk,
  input  logic rst_n,
  output logic idle,
  // I/O control
  output logic load_en,
  input  logic loaded,
  output logic send,
  input  logic sent,
  // compute_inequality
  output logic ineq_start,
  input  logic ineq_done,
  input  logic ineq_feasible,
  input  logic [$clog2(MI)-1:0] ineq_p_row,
  input  fx_t  ineq_p_slack,
  // step units
  output logic step_req,
  input  logic step_ack,
  input  logic step_ok,
  // status of the sub-problem being sent
  output logic feasible,
  output logic [$clog2(MI)-1:0] p_row,
  output fx_t  p_slack,
  output logic [$clog2(MAX_CHECKS+1)-1:0] checks
);

  localparam int unsigned KW = $clog2(MAX_CHECKS + 1);

  typedef enum logic [2:0] {S_LOAD, S_CHECK_GO, S_CHECK, S_STEP, S_SEND_GO, S_SEND} state_e;
  state_e state;

  assign load_en    = (state == S_LOAD);
  assign ineq_start = (state == S_CHECK_GO);
  assign send       = (state == S_SEND_GO);
  assign step_req   = (state == S_STEP);
  assign idle       = (state == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      feasible <= 1'b0;
      p_row    <= '0;
      p_slack  <= '0;
      checks   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (loaded) begin
          checks <= '0;
          state  <= S_CHECK_GO;
        end
        S_CHECK_GO: state <= S_CHECK;
        S_CHECK: if (ineq_done) begin
          checks   <= checks + 1'b1;
          feasible <= ineq_feasible;
          p_row    <= ineq_p_row;
          p_slack  <= ineq_p_slack;
          if (ineq_feasible || checks == KW'(MAX_CHECKS - 1)) state <= S_SEND_GO;
          else                                               state <= S_STEP;
        end
        S_STEP: if (step_ack) begin
          if (step_ok) state <= S_CHECK_GO;
          else         state <= S_SEND_GO;
        end
        S_SEND_GO: state <= S_SEND;
        S_SEND: if (sent) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
