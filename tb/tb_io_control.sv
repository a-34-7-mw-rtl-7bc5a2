// tb_io_control: self-checking test of the I/O control module, with a
// memory bus and three small SRAMs. A higher-priority master keeps taking
// the bus at random so that loading is stalled. The test streams a small
// problem (N=4, ME=1, MI=3: 44 words) in with random gaps, checks `loaded`
// after exactly 44 words and every SRAM word through the other master,
// then has the solution (the 4 words of x) sent against random back
// pressure and checks data, `out_last` and `sent`. Done for 5 problems.
module tb_io_control;
  import miqp_pkg::*;

  localparam int unsigned N = 4, ME = 1, MI = 3;
  localparam int unsigned PW = prob_words(N, ME, MI);
  localparam int unsigned XB = base_x(N, ME, MI);
  localparam int unsigned S0 = 20, S1 = 16, S2 = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_en = 1'b0, in_valid = 1'b0, in_ready, loaded;
  fx_t  in_data = '0;
  logic send = 1'b0, out_valid, out_ready = 1'b0, out_last, sent;
  fx_t  out_data;
  mem_req_t m_req [2];
  mem_rsp_t m_rsp [2];
  logic     s_en [3], s_we [3];
  maddr_t   s_addr [3];
  fx_t      s_wdata [3], s_rdata [3];
  int checks = 0, failures = 0, stalls = 0;
  logic disturb = 1'b0;

  always #5 clk = ~clk;

  io_control #(.PROB_WORDS(PW), .N(N), .X_BASE(XB)) dut (
    .clk, .rst_n, .load_en, .in_valid, .in_ready, .in_data, .loaded,
    .send, .out_valid, .out_ready, .out_data, .out_last, .sent,
    .bus_req(m_req[1]), .bus_rsp(m_rsp[1]));

  memory_bus #(.NM(2), .S0(S0), .S1(S1), .S2(S2)) u_bus (.*);
  sram_sp #(.WORDS(S0), .WIDTH(40)) u_s0 (.clk, .en(s_en[0]), .we(s_we[0]),
    .addr(s_addr[0][$clog2(S0)-1:0]), .wdata(s_wdata[0]), .rdata(s_rdata[0]));
  sram_sp #(.WORDS(S1), .WIDTH(40)) u_s1 (.clk, .en(s_en[1]), .we(s_we[1]),
    .addr(s_addr[1][$clog2(S1)-1:0]), .wdata(s_wdata[1]), .rdata(s_rdata[1]));
  sram_sp #(.WORDS(S2), .WIDTH(40)) u_s2 (.clk, .en(s_en[2]), .we(s_we[2]),
    .addr(s_addr[2][$clog2(S2)-1:0]), .wdata(s_wdata[2]), .rdata(s_rdata[2]));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // disturbing master: reads the whole space at random while `disturb`
  always @(negedge clk) begin
    m_req[0] <= '0;
    if (disturb && ($urandom % 3 == 0)) begin
      m_req[0].req  <= 1'b1;
      m_req[0].addr <= maddr_t'($urandom % (S0 + S1 + S2));
    end
  end
  always @(posedge clk) if (in_valid && !in_ready && load_en) stalls++;

  fx_t words [PW];
  int  n_loaded;
  always @(posedge clk) if (loaded) n_loaded++;

  task automatic read_word(int a, output fx_t d);
    disturb = 1'b0;
    @(negedge clk);
    #1 m_req[0] = '{req: 1'b1, we: 1'b0, addr: maddr_t'(a), wdata: '0};
    @(negedge clk);
    #1 m_req[0] = '0;
    d = m_rsp[0].rdata;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 5; p++) begin
      int k, taken;
      for (int i = 0; i < PW; i++) words[i] = fx_t'({$urandom, 8'(i)});
      n_loaded = 0;
      disturb = 1'b1;
      @(negedge clk);
      load_en = 1'b1;
      k = 0;
      taken = 0;
      while (taken < PW) begin
        in_valid = ($urandom % 4 != 0);
        in_data  = words[k];
        @(posedge clk);
        if (in_valid && in_ready) begin
          taken++;
          k++;
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (3) @(negedge clk);
      checks++;
      if (n_loaded != 1) begin
        failures++;
        $display("FAIL loaded pulses %0d", n_loaded);
      end
      checks++;
      if (in_ready) begin
        failures++;
        $display("FAIL still accepting after the last word");
      end
      load_en = 1'b0;
      // contents
      for (int i = 0; i < PW; i++) begin
        fx_t d;
        read_word(i, d);
        checks++;
        if (d !== words[i]) begin
          failures++;
          $display("FAIL mem[%0d] = %h expected %h", i, d, words[i]);
        end
      end
      // send
      disturb = 1'b1;
      @(negedge clk);
      send = 1'b1;
      @(negedge clk);
      send = 1'b0;
      for (int j = 0; j < N; j++) begin
        out_ready = 1'b0;
        while (1) begin
          out_ready = ($urandom % 2 == 0);
          @(posedge clk);
          if (out_valid && out_ready) break;
          @(negedge clk);
        end
        checks++;
        if (out_data !== words[XB + j] || out_last !== (j == N - 1)) begin
          failures++;
          $display("FAIL solution word %0d = %h expected %h", j, out_data, words[XB + j]);
        end
        @(negedge clk);
        out_ready = 1'b0;
        if (j == N - 1) begin
          checks++;
          if (!sent) begin
            failures++;
            $display("FAIL sent missing");
          end
        end
      end
      repeat (3) @(negedge clk);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL loading was never stalled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
