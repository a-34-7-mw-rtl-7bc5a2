// sqrt_unit: pipelined fixed-point square root.
//
// Returns sqrt(x) for a 40-bit fixed-point word x (26 fraction bits). The
// root of the real value is the integer root of x * 2^26, so the operand is
// shifted left by the 26 fraction bits and fed to the pipelined integer
// root (isqrt_pipe, one result bit per stage). A negative operand gives 0
// and raises `out_neg`. One operand per cycle; latency 33 cycles from the
// edge that samples `in_valid` to the cycle in which `out_valid` is high.
// The chip names a square-root unit among the core's arithmetic units and
// states that all of them are pipelined; the digit-by-digit method and the
// handling of negative operands are this design's own choices.
module sqrt_unit
  import miqp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  in_x,
  output logic out_valid,
  output logic out_neg,
  output fx_t  out_root
);

  localparam int unsigned IN_W  = WORD_W - 1 + FRAC_W;   // 65: |x| << 26
  localparam int unsigned OUT_W = (IN_W + 1) / 2;         // 33

  logic [IN_W-1:0]  operand;
  logic [OUT_W-1:0] root;

  assign operand = in_x[WORD_W-1] ? '0 : {in_x[WORD_W-2:0], {FRAC_W{1'b0}}};

  isqrt_pipe #(.IN_W(IN_W), .TAG_W(1)) u_isqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_value (operand),
    .in_tag   (in_x[WORD_W-1]),
    .out_valid(out_valid),
    .out_root (root),
    .out_tag  (out_neg)
  );

  assign out_root = fx_t'(root);

endmodule
