// memory_bus: connects NM masters of a QP solver core to its three SRAMs.
//
// Masters address one flat word space: SRAM0 first, then SRAM1, then
// SRAM2. Each cycle every SRAM serves at most one master; where several
// ask for the same SRAM, the lowest-numbered master wins (fixed priority)
// and the others see `gnt` low and must hold their request. Masters that
// ask for different SRAMs are all served in the same cycle, so a unit that
// keeps its two operand streams in different SRAMs reads two words per
// cycle. `gnt` is combinational in the request; read data return with
// `rvalid` in the next cycle. The chip shows a memory bus between the
// units and the SRAMs; the flat address map, priority and timing are this
// design's own choices.
module memory_bus
  import miqp_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned S0 = SRAM0_WORDS,
  parameter int unsigned S1 = SRAM1_WORDS,
  parameter int unsigned S2 = SRAM2_WORDS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t m_req [NM],
  output mem_rsp_t m_rsp [NM],
  // SRAM ports
  output logic                  s_en    [3],
  output logic                  s_we    [3],
  output maddr_t                s_addr  [3],
  output fx_t                   s_wdata [3],
  input  fx_t                   s_rdata [3]
);

  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [1:0]    region [NM];
  maddr_t        local_addr [NM];
  logic [NM-1:0] gnt;
  logic [MW-1:0] owner [3];
  logic [2:0]    s_read;

  // Address decode
  always_comb begin
    for (int m = 0; m < NM; m++) begin
      if (m_req[m].addr < maddr_t'(S0)) begin
        region[m]     = 2'd0;
        local_addr[m] = m_req[m].addr;
      end else if (m_req[m].addr < maddr_t'(S0 + S1)) begin
        region[m]     = 2'd1;
        local_addr[m] = m_req[m].addr - maddr_t'(S0);
      end else begin
        region[m]     = 2'd2;
        local_addr[m] = m_req[m].addr - maddr_t'(S0 + S1);
      end
    end
  end

  // Fixed-priority arbitration per SRAM
  always_comb begin
    gnt = '0;
    for (int s = 0; s < 3; s++) begin
      s_en[s]    = 1'b0;
      s_we[s]    = 1'b0;
      s_addr[s]  = '0;
      s_wdata[s] = '0;
      owner[s]   = '0;
      for (int m = NM - 1; m >= 0; m--) begin
        if (m_req[m].req && region[m] == 2'(s)) begin
          owner[s] = MW'(m);
        end
      end
      for (int m = 0; m < NM; m++) begin
        if (m_req[m].req && region[m] == 2'(s) && !s_en[s]) begin
          s_en[s]    = 1'b1;
          s_we[s]    = m_req[m].we;
          s_addr[s]  = local_addr[m];
          s_wdata[s] = m_req[m].wdata;
          gnt[m]     = 1'b1;
        end
      end
    end
  end

  // A master may only address words that exist
  for (genvar m = 0; m < NM; m++) begin : g_chk
    a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
      m_req[m].req |-> int'(m_req[m].addr) < int'(S0 + S1 + S2));
  end

  // Return path: remember which master read which SRAM
  logic [MW-1:0] owner_q [3];
  logic [2:0]    read_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      read_q <= '0;
      for (int s = 0; s < 3; s++) owner_q[s] <= '0;
    end else begin
      for (int s = 0; s < 3; s++) begin
        read_q[s]  <= s_en[s] && !s_we[s];
        owner_q[s] <= owner[s];
      end
    end
  end
  assign s_read = read_q;

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      m_rsp[m].gnt    = gnt[m];
      m_rsp[m].rvalid = 1'b0;
      m_rsp[m].rdata  = '0;
      for (int s = 0; s < 3; s++) begin
        if (s_read[s] && owner_q[s] == MW'(m)) begin
          m_rsp[m].rvalid = 1'b1;
          m_rsp[m].rdata  = s_rdata[s];
        end
      end
    end
  end

endmodule
