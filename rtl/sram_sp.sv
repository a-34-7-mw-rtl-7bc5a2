// sram_sp: single-port synchronous SRAM of WORDS words of WIDTH bits.
//
// Model of one local working-memory macro of a QP solver core. Each core
// holds three: 204 kb, 109 kb and 109 kb (422 kb in all), here as 5100,
// 2725 and 2725 words of 40 bits. One access per cycle: with `en` and `we`
// the word is written at the clock edge; with `en` alone the word at
// `addr` appears on `rdata` after the edge (read latency 1) and stays
// there until the next read. The capacities follow the chip; the 40-bit
// word organisation and single port are this design's own choices.
module sram_sp #(
  parameter int unsigned WORDS = 5100,
  parameter int unsigned WIDTH = 40,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
