// tb_sram_sp: self-checking test of the SRAM model at its full 5100-word
// size. Writes every word, then mixes random reads and writes against a
// shadow copy; read data must appear the cycle after the read and hold
// while the SRAM is not enabled.
module tb_sram_sp;
  localparam int unsigned WORDS = 5100;
  localparam int unsigned AW    = $clog2(WORDS);

  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [39:0]   wdata = '0, rdata;
  logic [39:0]   shadow [WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_sp #(.WORDS(WORDS), .WIDTH(40)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(i); wdata = {$urandom, 8'(i)};
      shadow[i] = wdata;
    end
    for (int i = 0; i < 20000; i++) begin
      int unsigned a;
      a = $urandom % WORDS;
      @(negedge clk);
      en = 1; addr = AW'(a);
      we = ($urandom % 3 == 0);
      wdata = {$urandom, 8'($urandom)};
      if (we) shadow[a] = wdata;
      else begin
        @(negedge clk);
        en = ($urandom % 2 == 0); we = 0; addr = AW'($urandom % WORDS);
        checks++;
        if (rdata !== shadow[a]) begin
          failures++;
          $display("FAIL read %0d: %h expected %h", a, rdata, shadow[a]);
        end
        if (!en) begin
          @(negedge clk);
          checks++;
          if (rdata !== shadow[a]) begin
            failures++;
            $display("FAIL hold %0d", a);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
