// tb_stream_fifo: self-checking test of the problem/solution buffer.
// Random valid and ready on both sides push 3000 words through a 16-entry
// FIFO; the words must leave in order, none lost or repeated, and the
// FIFO must be seen both full (in_ready low) and empty.
module tb_stream_fifo;
  localparam int unsigned WIDTH = 40, DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [WIDTH-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, full_seen = 0, sent = 0, got = 0;
  logic [WIDTH-1:0] model [$];

  always #5 clk = ~clk;

  stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (!in_ready) full_seen++;
    checks++;
    if (count != model.size()) begin
      failures++;
      $display("FAIL count %0d expected %0d", count, model.size());
    end
    if (out_valid && out_ready) begin
      checks++;
      if (model.size() == 0 || out_data !== model[0]) begin
        failures++;
        $display("FAIL data %h", out_data);
      end
      void'(model.pop_front());
      got++;
    end
    if (in_valid && in_ready) begin
      model.push_back(in_data);
      sent++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (sent < 3000) begin
      @(negedge clk);
      // phases: fill fast, drain fast, mixed
      case ((sent / 500) % 3)
        0: begin in_valid = ($urandom % 8 != 0); out_ready = ($urandom % 4 == 0); end
        1: begin in_valid = ($urandom % 4 == 0); out_ready = ($urandom % 8 != 0); end
        default: begin in_valid = $urandom; out_ready = $urandom; end
      endcase
      in_data = {$urandom, 8'($urandom)};
    end
    @(negedge clk);
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (DEPTH + 3) @(negedge clk);
    checks++;
    if (got != sent || full_seen == 0 || out_valid) begin
      failures++;
      $display("FAIL got %0d sent %0d full_seen %0d", got, sent, full_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
