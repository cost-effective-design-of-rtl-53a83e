// Self-checking testbench for mot_routing_switch.
//
// Drives random requests, steering bits, grants and responses and checks the
// combinational outputs against an independent model: valid goes only to
// the selected side, the packet reaches both sides, the grant comes from the
// selected side and the response is taken from the side that returns one.
module tb_mot_routing_switch;
  import mot3d_pkg::*;

  int checks = 0, failures = 0;

  logic              valid_i, sel_i, gnt_o, rvalid_o;
  mot_req_t          req_i, req0_o, req1_o;
  logic [DATA_W-1:0] rdata_o, rdata0_i, rdata1_i;
  logic              valid0_o, gnt0_i, rvalid0_i;
  logic              valid1_o, gnt1_i, rvalid1_i;

  mot_routing_switch dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (v=%b sel=%b g0=%b g1=%b rv0=%b rv1=%b)", what,
               valid_i, sel_i, gnt0_i, gnt1_i, rvalid0_i, rvalid1_i);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      valid_i   = 1'($urandom);
      sel_i     = 1'($urandom);
      req_i     = {$urandom, $urandom, $urandom};
      gnt0_i    = 1'($urandom);
      gnt1_i    = 1'($urandom);
      // a core has at most one response per cycle
      case ($urandom % 3)
        0: {rvalid1_i, rvalid0_i} = 2'b00;
        1: {rvalid1_i, rvalid0_i} = 2'b01;
        default: {rvalid1_i, rvalid0_i} = 2'b10;
      endcase
      rdata0_i = $urandom;
      rdata1_i = $urandom;
      #1;
      check(valid0_o == (valid_i && !sel_i), "valid0");
      check(valid1_o == (valid_i &&  sel_i), "valid1");
      check(req0_o == req_i && req1_o == req_i, "packet copy");
      check(gnt_o == (sel_i ? gnt1_i : gnt0_i), "grant");
      check(rvalid_o == (rvalid0_i || rvalid1_i), "rvalid");
      if (rvalid0_i) check(rdata_o == rdata0_i, "rdata side 0");
      if (rvalid1_i) check(rdata_o == rdata1_i, "rdata side 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
