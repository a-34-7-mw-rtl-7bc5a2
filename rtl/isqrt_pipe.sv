// isqrt_pipe: pipelined integer square root, out = floor(sqrt(in)).
//
// Helper of sqrt_unit and distance_calc. It is the digit-by-digit
// (restoring) method: each of the OUT_W stages decides one bit of the root,
// most significant first, by trying to subtract (4*root + 1) << 2k from the
// remainder. Every stage is registered, so one operand is accepted per cycle
// and the root of an operand sampled at edge E0 is on `out_root` with
// `out_valid` in the cycle after edge E0+OUT_W-1 (latency OUT_W). A tag
// travels along with each operand.
module isqrt_pipe #(
  parameter int unsigned IN_W  = 66,
  parameter int unsigned TAG_W = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         in_value,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic [(IN_W+1)/2-1:0]   out_root,
  output logic [TAG_W-1:0]        out_tag
);

  localparam int unsigned OUT_W = (IN_W + 1) / 2;
  localparam int unsigned PAD_W = 2 * OUT_W;     // operand padded to even width
  localparam int unsigned REM_W = OUT_W + 3;     // remainder width

  logic                        v_q   [OUT_W+1];
  logic [PAD_W-1:0]            op_q  [OUT_W+1];
  logic [REM_W-1:0]            rem_q [OUT_W+1];
  logic [OUT_W-1:0]            root_q[OUT_W+1];
  logic [TAG_W-1:0]            tag_q [OUT_W+1];

  // Stage 0 is the input itself
  always_comb begin
    v_q[0]    = in_valid;
    op_q[0]   = PAD_W'(in_value);
    rem_q[0]  = '0;
    root_q[0] = '0;
    tag_q[0]  = in_tag;
  end

  for (genvar k = 0; k < OUT_W; k++) begin : g_stage
    // Bring down the next two operand bits and try the subtraction
    logic [REM_W-1:0] trial_rem;
    logic [REM_W-1:0] trial_sub;
    logic             fits;
    always_comb begin
      trial_rem = {rem_q[k][REM_W-3:0], op_q[k][PAD_W-1 -: 2]};
      trial_sub = REM_W'({root_q[k], 2'b01});
      fits      = trial_rem >= trial_sub;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q[k+1]    <= 1'b0;
        op_q[k+1]   <= '0;
        rem_q[k+1]  <= '0;
        root_q[k+1] <= '0;
        tag_q[k+1]  <= '0;
      end else begin
        v_q[k+1]    <= v_q[k];
        op_q[k+1]   <= op_q[k] << 2;
        rem_q[k+1]  <= fits ? trial_rem - trial_sub : trial_rem;
        root_q[k+1] <= {root_q[k][OUT_W-2:0], fits};
        tag_q[k+1]  <= tag_q[k];
      end
    end
  end

  assign out_valid = v_q[OUT_W];
  assign out_root  = root_q[OUT_W];
  assign out_tag   = tag_q[OUT_W];

endmodule
