// tb_memory_bus: self-checking test of the core's memory bus with three
// small SRAM models behind it. Four masters issue random reads and writes
// anywhere in the flat space; each holds a request until granted. Checks:
// at most one grant per SRAM per cycle, the lowest requesting master wins,
// masters on different SRAMs are served together, read data (compared
// with a shadow memory) return the cycle after the grant, and writes land
// in the right SRAM at the right local address.
module tb_memory_bus;
  import miqp_pkg::*;

  localparam int unsigned NM = 4;
  localparam int unsigned S0 = 40, S1 = 24, S2 = 24;
  localparam int unsigned TOT = S0 + S1 + S2;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t m_req [NM];
  mem_rsp_t m_rsp [NM];
  logic     s_en [3], s_we [3];
  maddr_t   s_addr [3];
  fx_t      s_wdata [3], s_rdata [3];
  int checks = 0, failures = 0;
  int parallel = 0, contended = 0;

  always #5 clk = ~clk;

  memory_bus #(.NM(NM), .S0(S0), .S1(S1), .S2(S2)) dut (.*);

  sram_sp #(.WORDS(S0), .WIDTH(40)) u_s0 (.clk, .en(s_en[0]), .we(s_we[0]),
    .addr(s_addr[0][$clog2(S0)-1:0]), .wdata(s_wdata[0]), .rdata(s_rdata[0]));
  sram_sp #(.WORDS(S1), .WIDTH(40)) u_s1 (.clk, .en(s_en[1]), .we(s_we[1]),
    .addr(s_addr[1][$clog2(S1)-1:0]), .wdata(s_wdata[1]), .rdata(s_rdata[1]));
  sram_sp #(.WORDS(S2), .WIDTH(40)) u_s2 (.clk, .en(s_en[2]), .we(s_we[2]),
    .addr(s_addr[2][$clog2(S2)-1:0]), .wdata(s_wdata[2]), .rdata(s_rdata[2]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fx_t shadow [TOT];
  fx_t pending [NM];
  logic pend_v [NM];
  int   filled = 0;   // masters done with the fill phase

  function automatic int region_of(int a);
    return a < S0 ? 0 : (a < S0 + S1 ? 1 : 2);
  endfunction

  // monitor at each rising edge, before anything changes
  always @(posedge clk) if (rst_n) begin
    int winner [3];
    for (int s = 0; s < 3; s++) winner[s] = -1;
    for (int m = 0; m < NM; m++)
      if (m_req[m].req && winner[region_of(int'(m_req[m].addr))] < 0)
        winner[region_of(int'(m_req[m].addr))] = m;
    for (int m = 0; m < NM; m++) begin
      // read data of last cycle's grant
      checks++;
      if (m_rsp[m].rvalid !== pend_v[m] || (pend_v[m] && m_rsp[m].rdata !== pending[m])) begin
        failures++;
        $display("FAIL read return master %0d", m);
      end
    end
    begin
      int ng;
      ng = 0;
      for (int m = 0; m < NM; m++) begin
        logic exp_g;
        exp_g = m_req[m].req && winner[region_of(int'(m_req[m].addr))] == m;
        checks++;
        if (m_rsp[m].gnt !== exp_g) begin
          failures++;
          $display("FAIL grant master %0d", m);
        end
        ng += exp_g;
        if (m_req[m].req && !exp_g) contended++;
      end
      if (ng > 1) parallel++;
    end
    for (int m = 0; m < NM; m++) begin
      pend_v[m] <= m_req[m].req && m_rsp[m].gnt && !m_req[m].we;
      pending[m] <= shadow[m_req[m].addr];
    end
    for (int m = 0; m < NM; m++)
      if (m_req[m].req && m_rsp[m].gnt && m_req[m].we) shadow[m_req[m].addr] <= m_req[m].wdata;
  end

  // masters: new random request after each grant
  for (genvar m = 0; m < NM; m++) begin : g_m
    initial begin
      m_req[m] = '0;
      @(posedge rst_n);
      // fill phase: master m writes its share of the space
      for (int a = m; a < TOT; a += NM) begin
        @(negedge clk);
        m_req[m] = '{req: 1'b1, we: 1'b1, addr: maddr_t'(a), wdata: fx_t'({$urandom, 8'(a)})};
        @(posedge clk);
        while (!m_rsp[m].gnt) @(posedge clk);
      end
      @(negedge clk);
      m_req[m] = '0;
      // no reads until every word has been written once
      filled++;
      wait (filled == NM);
      repeat (2) @(negedge clk);
      for (int i = 0; i < 1500; i++) begin
        @(negedge clk);
        m_req[m].req   = ($urandom % 4 != 0);
        m_req[m].we    = ($urandom % 3 == 0);
        m_req[m].addr  = maddr_t'($urandom % TOT);
        m_req[m].wdata = fx_t'({$urandom, 8'(i)});
        if (m_req[m].req) begin
          @(posedge clk);
          while (!m_rsp[m].gnt) @(posedge clk);
        end
      end
      @(negedge clk);
      m_req[m] = '0;
    end
  end

  initial begin
    for (int m = 0; m < NM; m++) begin
      pend_v[m] = 0;
      pending[m] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (9000) @(posedge clk);
    checks++;
    if (parallel == 0 || contended == 0) begin
      failures++;
      $display("FAIL parallel=%0d contended=%0d", parallel, contended);
    end
    $display("parallel grants in %0d cycles, %0d waits", parallel, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
