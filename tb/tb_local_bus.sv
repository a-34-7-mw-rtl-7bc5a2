// tb_local_bus: self-checking test of the local bus routing. Random
// inputs on every port, 5000 times; the routed valid, ready, data, status
// and beat signals are compared with the routing rules worked out here:
// problem words only to the upload core, solution words only from the
// download core, and nothing while the respective path is inactive.
module tb_local_bus;
  import miqp_pkg::*;

  localparam int unsigned NC = 4;

  logic             src_valid, src_ready, up_active, up_beat;
  fx_t              src_data, core_in_data;
  logic [1:0]       up_sel, dn_sel;
  logic [NC-1:0]    core_in_valid, core_in_ready, core_out_valid, core_out_ready;
  logic [NC-1:0]    core_out_last, core_feasible;
  fx_t              core_out_data [NC];
  logic [ROW_W-1:0] core_p_row [NC];
  fx_t              core_p_slack [NC];
  logic             dn_active, dst_valid, dst_ready, dn_last_beat;
  logic [IDX_W-1:0] dn_idx;
  sol_word_t        dst_word;
  int checks = 0, failures = 0;

  local_bus #(.NC(NC), .RW(ROW_W)) dut (.*);

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      src_valid = $urandom; src_data = {$urandom, 8'($urandom)};
      up_active = $urandom; up_sel = $urandom;
      core_in_ready = $urandom; core_out_valid = $urandom; core_out_last = $urandom;
      core_feasible = $urandom;
      for (int c = 0; c < NC; c++) begin
        core_out_data[c] = {$urandom, 8'(c)};
        core_p_row[c]    = $urandom;
        core_p_slack[c]  = {$urandom, 8'($urandom)};
      end
      dn_active = $urandom; dn_sel = $urandom; dn_idx = $urandom; dst_ready = $urandom;
      #1;
      for (int c = 0; c < NC; c++) begin
        expect_true(core_in_valid[c] === (up_active && up_sel == c && src_valid), "core_in_valid");
        expect_true(core_out_ready[c] === (dn_active && dn_sel == c && dst_ready), "core_out_ready");
      end
      expect_true(core_in_data === src_data, "core_in_data");
      expect_true(src_ready === (up_active && core_in_ready[up_sel]), "src_ready");
      expect_true(up_beat === (src_valid && up_active && core_in_ready[up_sel]), "up_beat");
      expect_true(dst_valid === (dn_active && core_out_valid[dn_sel]), "dst_valid");
      if (dst_valid) begin
        expect_true(dst_word.data === core_out_data[dn_sel] && dst_word.idx === dn_idx &&
                    dst_word.last === core_out_last[dn_sel] &&
                    dst_word.feasible === core_feasible[dn_sel] &&
                    dst_word.p_row === core_p_row[dn_sel] &&
                    dst_word.p_slack === core_p_slack[dn_sel], "dst_word");
      end
      expect_true(dn_last_beat === (dst_valid && dst_ready && core_out_last[dn_sel]), "dn_last_beat");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
