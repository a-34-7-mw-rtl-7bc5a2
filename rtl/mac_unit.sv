// mac_unit: pipelined fixed-point multiply-accumulate.
//
// Accumulates the sum of products a*b of 40-bit fixed-point words (26
// fraction bits). `in_first` marks the first pair of a sum and restarts the
// accumulator; `in_last` marks the last pair, after which the sum is
// rounded down to 26 fraction bits, saturated to 40 bits and presented on
// `out_result` with `out_valid` for one cycle. One pair is accepted every
// cycle. The products and the running sum are kept at full precision
// (52 fraction bits), so the only rounding is at the end.
//
// Pipeline: stage 1 registers the 80-bit product; stage 2 adds it to the
// accumulator and, for the last pair, registers the result. A pair sampled
// at edge E0 is in the accumulator after edge E1; a last pair's result is
// valid in the cycle after edge E1 (latency 2). The unit itself is named by
// the chip; its pipeline depth and rounding are this design's own choices.
module mac_unit
  import miqp_pkg::*;
#(
  parameter int unsigned ACC_GUARD = 8   // extra accumulator bits against overflow
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  input  logic in_last,
  input  fx_t  in_a,
  input  fx_t  in_b,
  output logic out_valid,
  output fx_t  out_result
);

  localparam int unsigned PROD_W = 2 * WORD_W;
  localparam int unsigned ACC_W  = PROD_W + ACC_GUARD;

  typedef logic signed [ACC_W-1:0] acc_t;

  // Stage 1
  logic                     s1_valid, s1_first, s1_last;
  logic signed [PROD_W-1:0] s1_prod;

  // Stage 2
  acc_t acc;
  acc_t acc_next;

  always_comb begin
    acc_next = s1_first ? acc_t'(s1_prod) : acc + acc_t'(s1_prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_first   <= 1'b0;
      s1_last    <= 1'b0;
      s1_prod    <= '0;
      acc        <= '0;
      out_valid  <= 1'b0;
      out_result <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_first <= in_first;
      s1_last  <= in_last;
      if (in_valid) s1_prod <= in_a * in_b;

      out_valid <= s1_valid && s1_last;
      if (s1_valid) begin
        acc <= acc_next;
        if (s1_last) out_result <= sat_fx(128'(acc_next >>> FRAC_W));
      end
    end
  end

endmodule
