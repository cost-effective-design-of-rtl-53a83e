// Self-checking testbench for mod_routing_switch with four bank groups.
//
// Random control signals per group and random requests: the request must
// leave on the MoT that the mapping table of the design assigns to the
// bank's in-group index under its own group's c1..c4, the packet must be
// unchanged, and grant and response must come from that side. The expected
// MoT is taken from a table of which in-group indexes reach MoT_0.
module tb_mod_routing_switch;
  import mot3d_pkg::*;

  localparam int N_GROUP = 4, IDX_LSB = 16;

  int checks = 0, failures = 0;
  int to_mot [2] = '{0, 0};

  tsv_ctrl_t         ctrl_i [N_GROUP];
  logic              valid_i, gnt_o, rvalid_o;
  mot_req_t          req_i, req0_o, req1_o;
  logic [DATA_W-1:0] rdata_o, rdata0_i, rdata1_i;
  logic              valid0_o, gnt0_i, rvalid0_i;
  logic              valid1_o, gnt1_i, rvalid1_i;

  mod_routing_switch #(.N_GROUP(N_GROUP), .IDX_LSB(IDX_LSB)) dut (.*);

  function automatic logic [3:0] mot0_set(tsv_ctrl_t c);
    if (c.c4) return c.c3 ? 4'b0000 : 4'b1111;
    case ({c.c2, c.c1})
      2'b00:   return 4'b0101;
      2'b01:   return 4'b1010;
      2'b10:   return 4'b0011;
      default: return 4'b1100;
    endcase
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s addr=%h", what, req_i.addr);
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
    for (int t = 0; t < 1000; t++) begin
      int g, b;
      logic [3:0] s;
      logic side;
      if (t % 50 == 0)
        for (int k = 0; k < N_GROUP; k++) ctrl_i[k] = tsv_ctrl_t'($urandom);
      valid_i = ($urandom % 4) != 0;
      req_i   = {$urandom, $urandom, $urandom};
      gnt0_i  = 1'($urandom);
      gnt1_i  = 1'($urandom);
      case ($urandom % 3)
        0:       {rvalid1_i, rvalid0_i} = 2'b00;
        1:       {rvalid1_i, rvalid0_i} = 2'b01;
        default: {rvalid1_i, rvalid0_i} = 2'b10;
      endcase
      rdata0_i = $urandom;
      rdata1_i = $urandom;
      #1;
      b = int'(req_i.addr[IDX_LSB +: 2]);
      g = int'(req_i.addr[IDX_LSB+2 +: 2]);
      s = mot0_set(ctrl_i[g]);
      side = ~s[b];
      if (valid_i) to_mot[side]++;
      check(valid0_o == (valid_i && !side) && valid1_o == (valid_i && side), "MoT choice");
      check(req0_o == req_i && req1_o == req_i, "packet");
      check(gnt_o == (side ? gnt1_i : gnt0_i), "grant");
      check(rvalid_o == (rvalid0_i || rvalid1_i), "rvalid");
      if (rvalid0_i) check(rdata_o == rdata0_i, "rdata 0");
      if (rvalid1_i) check(rdata_o == rdata1_i, "rdata 1");
    end
    check(to_mot[0] > 0 && to_mot[1] > 0, "both MoTs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
