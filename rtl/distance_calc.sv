// distance_calc: pipelined distance sqrt(a^2 + b^2) of two fixed-point words.
//
// This is the length of the vector (a, b), the quantity a plane (Givens)
// rotation needs when it zeroes one element of a pair. The squares are
// kept at full precision (52 fraction bits), so the integer root of their
// sum is directly the result with 26 fraction bits; a result above the
// largest 40-bit word saturates. Stage 1 registers a^2 + b^2 (81 bits), the
// integer root (isqrt_pipe) takes 41 more stages: latency 42 cycles from the
// edge that samples `in_valid` to the cycle in which `out_valid` is high,
// one pair per cycle. The chip names a distance calculator among the core's
// pipelined units; its insides here are this design's own.
module distance_calc
  import miqp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  in_a,
  input  fx_t  in_b,
  output logic out_valid,
  output fx_t  out_dist
);

  localparam int unsigned SQ_W   = 2 * WORD_W + 1;    // 81
  localparam int unsigned ROOT_W = (SQ_W + 1) / 2;    // 41

  logic              s1_valid;
  logic [SQ_W-1:0]   s1_sum;
  logic [ROOT_W-1:0] root;
  logic              unused_tag;

  logic signed [2*WORD_W-1:0] sq_a, sq_b;
  assign sq_a = in_a * in_a;
  assign sq_b = in_b * in_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_sum   <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) s1_sum <= SQ_W'(unsigned'(sq_a)) + SQ_W'(unsigned'(sq_b));
    end
  end

  isqrt_pipe #(.IN_W(SQ_W), .TAG_W(1)) u_isqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .in_value (s1_sum),
    .in_tag   (1'b0),
    .out_valid(out_valid),
    .out_root (root),
    .out_tag  (unused_tag)
  );

  assign out_dist = root[ROOT_W-1 -: 2] != 2'b00 ? FX_MAX : fx_t'(root);

endmodule
