// io_control: the I/O control module of a QP solver core.
//
// Loading: while `load_en` is high it accepts the words of one QP
// sub-problem on a valid/ready stream and writes them, in arrival order,
// to consecutive word addresses of the core's memory starting at 0 (so the
// stream order fixes where A_I, b_I, H, g, A_E, b_E and x0 land). After
// PROB_WORDS words it raises `loaded` for one cycle and stops accepting.
// A word is taken (`in_ready`) in the cycle the memory bus grants the
// write.
//
// Sending: `send` for one cycle starts the solution, the N words from
// X_BASE on, out on a valid/ready stream with `out_last` on the final
// word. Each word is read over the memory bus and held on the output until
// taken; `sent` is high for one cycle after the last word is taken.
// The block, its input (one QP sub-problem) and output (its solution) are
// the chip's; the stream handshake and memory order are this design's own.
module io_control
  import miqp_pkg::*;
#(
  parameter int unsigned PROB_WORDS = prob_words(N_VAR, M_EQ, M_INEQ),
  parameter int unsigned N          = N_VAR,
  parameter int unsigned X_BASE     = base_x(N_VAR, M_EQ, M_INEQ)
) (
  input  logic     clk,
  input  logic     rst_n,
  // problem stream
  input  logic     load_en,
  input  logic     in_valid,
  output logic     in_ready,
  input  fx_t      in_data,
  output logic     loaded,
  // solution stream
  input  logic     send,
  output logic     out_valid,
  input  logic     out_ready,
  output fx_t      out_data,
  output logic     out_last,
  output logic     sent,
  // memory bus master
  output mem_req_t bus_req,
  input  mem_rsp_t bus_rsp
);

  localparam int unsigned CW = $clog2(PROB_WORDS + 1);
  localparam int unsigned OW = $clog2(N + 1);

  typedef enum logic [1:0] {OUT_IDLE, OUT_READ, OUT_WAIT, OUT_HOLD} out_state_e;

  logic [CW-1:0] wcount;
  out_state_e    ostate;
  logic [OW-1:0] ocount;

  logic loading, reading;
  assign loading = load_en && (wcount != CW'(PROB_WORDS));
  assign reading = (ostate == OUT_READ);

  always_comb begin
    bus_req = '0;
    if (reading) begin
      bus_req.req  = 1'b1;
      bus_req.addr = maddr_t'(X_BASE + 32'(ocount));
    end else if (loading && in_valid) begin
      bus_req.req   = 1'b1;
      bus_req.we    = 1'b1;
      bus_req.addr  = maddr_t'(wcount);
      bus_req.wdata = in_data;
    end
  end
  assign in_ready = loading && !reading && bus_rsp.gnt;

  assign out_valid = (ostate == OUT_HOLD);
  assign out_last  = out_valid && (ocount == OW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcount   <= '0;
      loaded   <= 1'b0;
      ostate   <= OUT_IDLE;
      ocount   <= '0;
      out_data <= '0;
      sent     <= 1'b0;
    end else begin
      loaded <= 1'b0;
      sent   <= 1'b0;
      if (!load_en) begin
        wcount <= '0;
      end else if (in_valid && in_ready) begin
        wcount <= wcount + 1'b1;
        if (wcount == CW'(PROB_WORDS - 1)) loaded <= 1'b1;
      end

      unique case (ostate)
        OUT_IDLE: if (send) begin
          ocount <= '0;
          ostate <= OUT_READ;
        end
        OUT_READ: if (bus_rsp.gnt) ostate <= OUT_WAIT;
        OUT_WAIT: if (bus_rsp.rvalid) begin
          out_data <= bus_rsp.rdata;
          ostate   <= OUT_HOLD;
        end
        OUT_HOLD: if (out_ready) begin
          if (ocount == OW'(N - 1)) begin
            ostate <= OUT_IDLE;
            sent   <= 1'b1;
          end else begin
            ocount <= ocount + 1'b1;
            ostate <= OUT_READ;
          end
        end
        default: ostate <= OUT_IDLE;
      endcase
    end
  end

endmodule
