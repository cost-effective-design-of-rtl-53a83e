// Self-checking testbench for bank_group (4 banks of 64 words).
//
// The control signals c1..c4 change every 200 cycles through all six rows of
// the bank-to-MoT mapping table. Each cycle every TSV bus may carry a random
// read or byte-masked write to a random bank that the current mapping puts
// on that bus (the rule the cores' routing switches follow). Checked: the
// bus is granted in the same cycle, the right bank counts an access, and one
// cycle later the bus returns a response with the data of a reference
// memory model. Also counted: cycles where both buses serve two different
// banks at once, and cycles where one bus is out of use (c4 high).
module tb_bank_group;
  import mot3d_pkg::*;

  localparam int WORDS = 64, IDX_LSB = 16;

  int checks = 0, failures = 0, dual = 0, single_bus = 0;

  logic              clk = 0, rst_n = 0;
  tsv_ctrl_t         ctrl_i;
  logic [1:0]        bus_valid_i, bus_gnt_o, bus_rvalid_o;
  mot_req_t          bus_req_i   [2];
  logic [DATA_W-1:0] bus_rdata_o [2];
  logic [3:0]        bank_access_o;

  logic [DATA_W-1:0] model [4][WORDS];
  logic [1:0]        exp_v;
  logic              exp_rd [2];
  logic [DATA_W-1:0] exp_d [2];

  bank_group #(.BANK_WORDS(WORDS), .IDX_LSB(IDX_LSB)) dut (.*);

  always #5 clk = ~clk;

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
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam tsv_ctrl_t ROWS [6] = '{4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b1000, 4'b1100};

  initial begin
    bus_valid_i = '0; exp_v = '0;
    bus_req_i[0] = '0; bus_req_i[1] = '0;
    ctrl_i = ROWS[0];
    // fill every bank with known data through bus 0 with all banks on MoT_0
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ctrl_i = 4'b1000;
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        bus_valid_i = 2'b01;
        bus_req_i[0] = '{we: 1'b1, be: 4'hf, addr: 32'(b) << IDX_LSB | 32'(a) << 2, wdata: $urandom};
        model[b][a] = bus_req_i[0].wdata;
      end
    @(negedge clk);
    bus_valid_i = '0;
    @(negedge clk);
    for (int t = 0; t < 1200; t++) begin
      logic [3:0] m0;
      int pick [2];
      logic [1:0] nxt_v;
      if (t % 200 == 0) ctrl_i = ROWS[t / 200];
      m0 = mot0_set(ctrl_i);
      for (int k = 0; k < 2; k++) begin
        int cands [$];
        cands = {};
        for (int b = 0; b < 4; b++) if ((k == 0) ? m0[b] : !m0[b]) cands.push_back(b);
        bus_valid_i[k] = (cands.size() > 0) && (($urandom % 5) != 0);
        pick[k] = (cands.size() > 0) ? cands[$urandom % cands.size()] : 0;
        bus_req_i[k].we    = 1'($urandom);
        bus_req_i[k].be    = 4'($urandom);
        bus_req_i[k].wdata = $urandom;
        bus_req_i[k].addr  = {$urandom} & ~32'h000f_0000 | (32'(pick[k]) << IDX_LSB);
        bus_req_i[k].addr[7:2] = 6'($urandom);
      end
      if (m0 == 4'b0000 || m0 == 4'b1111) single_bus++;
      if (bus_valid_i == 2'b11) dual++;
      #1;
      // response of last cycle
      for (int k = 0; k < 2; k++) begin
        check(bus_rvalid_o[k] == exp_v[k], "response valid");
        if (exp_v[k] && exp_rd[k]) check(bus_rdata_o[k] == exp_d[k], "read data");
      end
      check(bus_gnt_o == bus_valid_i, "grant in request cycle");
      for (int b = 0; b < 4; b++)
        check(bank_access_o[b] == ((bus_valid_i[0] && pick[0] == b) || (bus_valid_i[1] && pick[1] == b)),
              "bank access flag");
      // reference memory: a bank sees at most one request per cycle
      nxt_v = bus_valid_i;
      for (int k = 0; k < 2; k++) begin
        int a;
        a = int'(bus_req_i[k].addr[7:2]);
        exp_rd[k] = !bus_req_i[k].we;
        exp_d[k]  = model[pick[k]][a];
        if (bus_valid_i[k] && bus_req_i[k].we)
          for (int y = 0; y < 4; y++)
            if (bus_req_i[k].be[y]) model[pick[k]][a][8*y +: 8] = bus_req_i[k].wdata[8*y +: 8];
      end
      @(posedge clk);
      #1;
      exp_v = nxt_v;
      @(negedge clk);
    end
    check(dual > 100 && single_bus > 100, "both buses in parallel, and one bus alone");
    $display("dual-bus cycles=%0d single-bus cycles=%0d", dual, single_bus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
