// tb_sequence_control: self-checking test of sub-problem dispatch.
// Four simple core models: a core that receives its PROB_WORDS words
// (PROB_WORDS=6 here) works a random time, then offers a 3-word solution.
// The testbench offers 40 indices as fast as they are taken and checks:
// each index goes to a free core (lowest free one first), exactly
// PROB_WORDS beats reach it, only one upload runs at a time, indices are
// refused while all cores are busy, every index comes back exactly once
// tagged correctly, and at some point several solutions wait at once.
module tb_sequence_control;
  import miqp_pkg::*;

  localparam int unsigned NC = 4, PW = 6, SOLW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic idx_valid = 1'b0, idx_ready;
  logic [IDX_W-1:0] idx = '0;
  logic [NC-1:0] core_idle, core_out_valid, assigned;
  logic up_active, up_beat, dn_active, dn_last_beat;
  logic [1:0] up_sel, dn_sel;
  logic [IDX_W-1:0] dn_idx;
  int checks = 0, failures = 0, full_stalls = 0, multi_wait = 0;

  always #5 clk = ~clk;

  sequence_control #(.NC(NC), .PROB_WORDS(PW)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // core models
  int words_in [NC], work [NC], out_left [NC];
  logic [IDX_W-1:0] owner_idx [NC];
  logic beat_ok;
  int  returned [int];
  logic src_valid;

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      core_idle[c]      = (words_in[c] == 0 && work[c] == 0 && out_left[c] == 0);
      core_out_valid[c] = (out_left[c] > 0);
    end
    up_beat      = up_active && src_valid;
    dn_last_beat = dn_active && out_left[dn_sel] == 1;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NC; c++) begin words_in[c] <= 0; work[c] <= 0; out_left[c] <= 0; end
    end else begin
      if (idx_valid && idx_ready) begin
        int lowest;
        lowest = -1;
        for (int c = NC - 1; c >= 0; c--) if (core_idle[c] && !assigned[c]) lowest = c;
        expect_true(!up_active, "one upload at a time");
        owner_idx[lowest] <= idx;
      end
      if (!idx_ready && idx_valid && assigned == '1) full_stalls++;
      if (up_beat) begin
        words_in[up_sel] <= words_in[up_sel] + 1;
        if (words_in[up_sel] == PW - 1) begin
          words_in[up_sel] <= 0;
          work[up_sel]     <= 5 + $urandom % 60;
        end
      end
      for (int c = 0; c < NC; c++) begin
        if (work[c] > 1) work[c] <= work[c] - 1;
        else if (work[c] == 1) begin work[c] <= 0; out_left[c] <= SOLW; end
      end
      if ($countones(core_out_valid) > 1) multi_wait++;
      if (dn_active) begin
        expect_true(core_out_valid[dn_sel], "download from a core with a solution");
        expect_true(dn_idx == owner_idx[dn_sel], "solution tag");
        out_left[dn_sel] <= out_left[dn_sel] - 1;
        if (out_left[dn_sel] == 1) begin
          expect_true(!returned.exists(int'(dn_idx)), "index returned once");
          returned[int'(dn_idx)] = 1;
        end
      end
    end
  end

  // upload word source: a word is available most cycles
  always @(negedge clk) src_valid <= ($urandom % 4 != 0);

  // check steering of the upload against the lowest free core
  logic [1:0] exp_sel;
  always @(posedge clk) if (rst_n && idx_valid && idx_ready) begin
    for (int c = NC - 1; c >= 0; c--) if (core_idle[c] && !assigned[c]) exp_sel = 2'(c);
  end
  always @(posedge clk) if (rst_n && up_active && up_beat && words_in[up_sel] == 0) begin
    expect_true(up_sel == exp_sel, "upload goes to the lowest free core");
  end

  initial begin
    src_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      idx_valid = 1'b1;
      idx = IDX_W'(1000 + i);
      @(posedge clk);
      while (!idx_ready) @(posedge clk);
      @(negedge clk);
      idx_valid = ($urandom % 2 == 0);   // keep offering most of the time
      idx = IDX_W'(1000 + i + 1);
      idx_valid = 1'b0;
    end
    repeat (500) @(negedge clk);
    expect_true(returned.num() == 40, "all solutions returned");
    expect_true(full_stalls > 0, "all cores busy at some point");
    expect_true(multi_wait > 0, "several solutions waiting at some point");
    $display("stalls %0d, cycles with several solutions waiting %0d", full_stalls, multi_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
