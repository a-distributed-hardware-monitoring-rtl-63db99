// tb_checkpoint_detector: 32 comparators with distinct addresses (some
// disabled, one duplicated); random instruction addresses, half of them
// checkpoints. Checks event, IDs, timestamp and lowest-index priority.
module tb_checkpoint_detector;
  import mon_pkg::*;
  int checks = 0, failures = 0, hits = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  cp_cfg_t cfg [32]; ts_t ts; logic halt, instr_valid; logic [31:0] instr_pc;
  logic ev_valid; trace_t ev_data;
  checkpoint_detector #(.N_CP(32)) dut (.*);
  initial begin
    int exp_k;
    for (int k = 0; k < 32; k++)
      cfg[k] = '{en: (k % 5) != 4, pc: 32'h4000_0000 + 32'(k) * 16, ev: evid_t'(k + 100), cl: clid_t'(k)};
    cfg[20].pc = cfg[7].pc;  // duplicate: entry 7 must win
    for (int i = 0; i < 4000; i++) begin
      ts = ts_t'($urandom); halt = ($urandom % 8) == 0; instr_valid = ($urandom % 4) != 0;
      instr_pc = ($urandom % 2) ? 32'h4000_0000 + 32'($urandom % 40) * 16 : $urandom;
      #1;
      exp_k = -1;
      for (int k = 31; k >= 0; k--) if (cfg[k].en && cfg[k].pc == instr_pc) exp_k = k;
      chk(ev_valid == (exp_k >= 0 && instr_valid && !halt), "valid");
      if (ev_valid && exp_k >= 0) begin
        hits++;
        chk(ev_data == '{ev: cfg[exp_k].ev, ts: ts, cl: cfg[exp_k].cl}, $sformatf("fields k=%0d", exp_k));
      end
      #1;
    end
    chk(hits > 500, "hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
