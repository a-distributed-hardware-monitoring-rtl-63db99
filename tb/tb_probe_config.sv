// tb_probe_config: writes every register class through the configuration
// bus and reads the fields back from the outputs.
module tb_probe_config;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  pcfg_bus_t cfg; logic eop_en; pwr_cfg_t pwr; cp_cfg_t cp [32]; oor_cfg_t oor [32];
  probe_config #(.N_CP(32), .N_OOR(32)) dut (.*);
  task automatic wr(input int a, input logic [31:0] d);
    cfg = '{we: 1, addr: 9'(a), wdata: d}; @(negedge clk); cfg.we = 0;
  endtask
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    chk(!eop_en && !pwr.en && !cp[3].en && !oor[9].en, "reset clears enables");
    rst_n = 1;
    wr(0, 3); wr(1, 32'h2AB); wr(2, 1234); wr(3, 5678);
    chk(eop_en && pwr.en && pwr.ev == 8'hAB && pwr.cl == 2 && pwr.pmin == 1234 && pwr.pmax == 5678, "power");
    for (int k = 0; k < 32; k++) begin wr(9'h40 + k, 32'h1000 + k); wr(9'h60 + k, 32'h10000 | (k << 8 & 32'h300) | k); end
    for (int k = 0; k < 32; k++)
      chk(cp[k] == '{en: 1, pc: 32'h1000 + k, ev: evid_t'(k), cl: clid_t'(k)}, $sformatf("cp %0d", k));
    for (int k = 0; k < 32; k++) begin
      wr(9'h100 + 8*k, 32'h2000 + k); wr(9'h100 + 8*k + 1, 32'h13000 | k);
      wr(9'h100 + 8*k + 2, k); wr(9'h100 + 8*k + 3, 32'hA0 + k);
      wr(9'h100 + 8*k + 4, 32'hFF); wr(9'h100 + 8*k + 5, 32'hB0 + k);
    end
    for (int k = 0; k < 32; k++)
      chk(oor[k] == '{en: 1, pc: 32'h2000 + k, dtype: DT_DOUBLE, rmin: {32'hA0 + k, 32'(k)},
                      rmax: {32'hB0 + k, 32'hFF}, ev: evid_t'(k), cl: 2'd0}, $sformatf("oor %0d", k));
    wr(9'h060 + 5, 0);
    chk(!cp[5].en && cp[6].en, "disable one checkpoint");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
