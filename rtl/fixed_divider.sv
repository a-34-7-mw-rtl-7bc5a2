// fixed_divider: multi-cycled fixed-point divider, result = b / a.
//
// Two requesters share the divider. Request line c0 offers the operand pair
// (a0, b0), c1 offers (a1, b1). On a request the two multiplexers pick the
// pair and load two operand registers: the divisor register holds a (40
// bits) and the dividend register holds |b| already shifted left by the 26
// fraction bits (65 bits). The combinational divider between these
// registers and the 40-bit result register is the slow path of the chip,
// so it is given DIV_CYCLES clock cycles: a 1/DIV_CYCLES counter acts as the
// divided clock and enables the result register once, DIV_CYCLES cycles
// after the request, when it also raises `finish` for one cycle. The
// multiplexers, register widths, the counter and the 5-cycle delay follow
// the chip; the sign handling (magnitude division with the sign kept in a
// flop), saturation, divide-by-zero result, c0 priority and ignoring
// requests while busy are this design's own choices. Here the divided clock
// is a clock enable on the single clock, so a timing tool must be told the
// path from the operand registers to the result register is a
// DIV_CYCLES-cycle path.
//
// Timing: request sampled at edge E0; `finish` is high and `result` valid
// in the cycle after edge E0+DIV_CYCLES. `busy` is high in between.
module fixed_divider
  import miqp_pkg::*;
#(
  parameter int unsigned DIV_CYCLES = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic c0,
  input  fx_t  a0,
  input  fx_t  b0,
  input  logic c1,
  input  fx_t  a1,
  input  fx_t  b1,
  output fx_t  result,
  output logic finish,
  output logic busy
);

  localparam int unsigned DEN_W = WORD_W;            // 40
  localparam int unsigned NUM_W = WORD_W - 1 + FRAC_W; // 65
  localparam int unsigned CNT_W = $clog2(DIV_CYCLES + 1);

  logic [DEN_W-1:0] a_reg;     // divisor magnitude
  logic [NUM_W-1:0] b_reg;     // |dividend| << FRAC_W
  logic             neg_reg;   // sign of the quotient
  logic [CNT_W-1:0] cnt;

  function automatic logic [WORD_W-1:0] mag40(fx_t v);
    logic [WORD_W-1:0] m;
    m = v[WORD_W-1] ? WORD_W'(-v) : WORD_W'(v);
    // |FX_MIN| does not fit 39 bits: saturate it
    if (m[WORD_W-1]) m = {1'b0, {(WORD_W-1){1'b1}}};
    return m;
  endfunction

  // Operand multiplexers
  fx_t  a_sel, b_sel;
  logic start;
  assign start = (c0 || c1) && !busy;
  assign a_sel = c0 ? a0 : a1;
  assign b_sel = c0 ? b0 : b1;

  logic [WORD_W-1:0] b_mag;
  assign b_mag = mag40(b_sel);


  // The long combinational divider (multi-cycle path)
  logic [NUM_W-1:0] q_full;
  fx_t              q_fx;
  always_comb begin
    q_full = (a_reg == '0) ? '1 : b_reg / NUM_W'(a_reg);
    if (q_full > NUM_W'(FX_MAX)) q_fx = neg_reg ? -FX_MAX : FX_MAX;
    else                         q_fx = neg_reg ? -fx_t'(q_full) : fx_t'(q_full);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg   <= '0;
      b_reg   <= '0;
      neg_reg <= 1'b0;
      cnt     <= '0;
      busy    <= 1'b0;
      finish  <= 1'b0;
      result  <= '0;
    end else begin
      finish <= 1'b0;
      if (start) begin
        a_reg   <= mag40(a_sel);
        b_reg   <= {b_mag[WORD_W-2:0], {FRAC_W{1'b0}}};
        neg_reg <= a_sel[WORD_W-1] ^ b_sel[WORD_W-1];
        cnt     <= '0;
        busy    <= 1'b1;
      end else if (busy) begin
        if (cnt == CNT_W'(DIV_CYCLES - 1)) begin
          result <= q_fx;
          finish <= 1'b1;
          busy   <= 1'b0;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
