// Self-checking testbench for mot_arbitration_switch.
//
// Random requests on both inputs and a random grant from above, checked
// cycle by cycle against a reference round-robin model kept in the
// testbench: a lone request wins, a tie goes to the input holding priority,
// priority passes to the other input after every granted request, and the
// response one cycle later goes back to the input that was granted. It also
// checks that an input that lost a tie wins the next cycle when it asks
// again and the switch is granted.
module tb_mot_arbitration_switch;
  import mot3d_pkg::*;

  int checks = 0, failures = 0;
  int ties = 0, next_cycle_wins = 0;

  logic              clk = 0, rst_n = 0;
  logic              valid0_i, valid1_i, gnt0_o, gnt1_o, rvalid0_o, rvalid1_o;
  mot_req_t          req0_i, req1_i, req_o;
  logic [DATA_W-1:0] rdata0_o, rdata1_o, rdata_i;
  logic              valid_o, gnt_i, rvalid_i;

  mot_arbitration_switch dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m_prio, m_last, m_lost_valid, m_lost_in;

  initial begin
    valid0_i = 0; valid1_i = 0; gnt_i = 0; rvalid_i = 0; rdata_i = 0;
    req0_i = '0; req1_i = '0;
    m_prio = 0; m_last = 0; m_lost_valid = 0; m_lost_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      logic exp_win, exp_rv0, exp_rv1;
      @(negedge clk);
      valid0_i = 1'($urandom);
      valid1_i = 1'($urandom);
      if ($urandom % 3 == 0) begin valid0_i = 1; valid1_i = 1; end
      req0_i   = {$urandom, $urandom, $urandom};
      req1_i   = {$urandom, $urandom, $urandom};
      gnt_i    = ($urandom % 4) != 0;
      rdata_i  = $urandom;
      // the response for last cycle's grant is presented now
      #1;
      exp_win = (valid0_i && valid1_i) ? m_prio : valid1_i;
      check(valid_o == (valid0_i || valid1_i), "valid_o");
      if (valid_o) check(req_o == (exp_win ? req1_i : req0_i), "forwarded packet");
      check(gnt0_o == (gnt_i && valid0_i && !exp_win), "gnt0");
      check(gnt1_o == (gnt_i && valid1_i &&  exp_win), "gnt1");
      exp_rv0 = rvalid_i && !m_last;
      exp_rv1 = rvalid_i &&  m_last;
      check(rvalid0_o == exp_rv0 && rvalid1_o == exp_rv1, "response routing");
      if (rvalid0_o) check(rdata0_o == rdata_i, "rdata0");
      if (rvalid1_o) check(rdata1_o == rdata_i, "rdata1");
      // loser of a granted tie wins the next cycle
      if (m_lost_valid && valid0_i && valid1_i && gnt_i) begin
        next_cycle_wins++;
        check(exp_win == m_lost_in && (m_lost_in ? gnt1_o : gnt0_o), "loser served next cycle");
      end
      m_lost_valid = 0;
      if (valid0_i && valid1_i && gnt_i) begin
        ties++;
        m_lost_valid = 1;
        m_lost_in    = ~exp_win;
      end
      @(posedge clk);
      #1;
      rvalid_i = valid_o && gnt_i;
      if (valid_o && gnt_i) begin
        m_prio = ~exp_win;
        m_last = exp_win;
      end
    end
    check(ties > 0 && next_cycle_wins > 0, "ties happened");
    $display("ties=%0d next-cycle wins=%0d", ties, next_cycle_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
