// tb_automata_processor: programs the example requirement
// "e_exit or (e_opened -> (not e_exit U e_closed))" as a 4-state automaton
// (v0 start, v1 opened, v_t accepted, v_f failed) and runs event sequences
// through it, comparing state and verdict with a reference automaton in the
// testbench after every event, including back-to-back events, ignored EOP
// markers, absorbing verdicts and restart.
module tb_automata_processor;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_fail = 0, n_pass = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  localparam evid_t E_OPEN = 8'd3, E_CLOSE = 8'd4, E_EXIT = 8'd5;
  localparam state_t V0 = 0, V1 = 1, VT = 2, VF = 3;
  logic ev_valid = 0; evid_t ev = '0;
  logic tbl_we = 0; logic [11:0] tbl_addr = '0; state_t tbl_data = '0;
  logic ctrl_we = 0, ctrl_en = 0; state_t ctrl_v0 = V0, ctrl_vt = VT, ctrl_vf = VF;
  state_t state; logic pass, fail, fail_pulse;
  automata_processor dut (.*);

  function automatic state_t ref_next(state_t s, evid_t e);
    case (s)
      V0: return (e == E_OPEN) ? V1 : (e == E_EXIT) ? VT : (e == E_CLOSE) ? VF : V0;
      V1: return (e == E_CLOSE) ? V0 : (e == E_EXIT) ? VF : V1;
      default: return s;
    endcase
  endfunction

  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    state_t rs;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // program the table for the two live states and the events used (1..5)
    for (int s = 0; s < 2; s++)
      for (int e = 1; e <= 5; e++) begin
        tbl_we = 1; tbl_addr = {4'(s), 8'(e)}; tbl_data = ref_next(state_t'(s), evid_t'(e));
        @(negedge clk);
      end
    tbl_we = 0;
    for (int run = 0; run < 200; run++) begin
      ctrl_we = 1; ctrl_en = 1; @(negedge clk); ctrl_we = 0;
      rs = V0;
      chk(state == V0 && !pass && !fail, "restart in v0");
      for (int i = 0; i < 12; i++) begin
        ev_valid = ($urandom % 4) != 0;
        case ($urandom % 8)
          0: ev = E_EXIT; 1, 2, 3: ev = E_OPEN; 4, 5, 6: ev = E_CLOSE; default: ev = EOP_ID;
        endcase
        if (($urandom % 5) == 0) ev = 8'd1 + evid_t'($urandom % 2);
        @(negedge clk);
        if (ev_valid && ev != EOP_ID && rs != VT && rs != VF) begin
          chk(fail_pulse == (ref_next(rs, ev) == VF), "fail pulse");
          rs = ref_next(rs, ev);
        end else chk(!fail_pulse, "no fail pulse");
        chk(state == rs, $sformatf("run %0d step %0d state %0d exp %0d", run, i, state, rs));
        chk(pass == (rs == VT) && fail == (rs == VF), "verdict");
      end
      ev_valid = 0;
      if (rs == VF) n_fail++;
      if (rs == VT) n_pass++;
    end
    // disabled automaton does not move
    ctrl_we = 1; ctrl_en = 0; @(negedge clk); ctrl_we = 0;
    ev_valid = 1; ev = E_OPEN; @(negedge clk); ev_valid = 0;
    chk(state == V0 && !fail && !pass, "disabled");
    chk(n_fail > 10 && n_pass > 10, "both verdicts reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
