// Traffic-balancing example on a 4-core, 8-bank cluster (one bank group used).
//
// Four threads, one per core, each access their own bank of group 0 (core c
// uses in-group bank c) with request rates of 70, 25, 30 and 80 % per cycle.
//   1. Profile: all four banks on the bus from MoT_0 (c4 = VDD, c3 = GND), at
//      a third of those rates so the bus is not saturated; the access
//      monitor's counts must follow the rates. The banks are sorted by count
//      and the most and least used are paired on one bus; for these rates
//      that is banks 01 and 11 on one bus and 00 and 10 on the other, which
//      the control table gives with c4 = c2 = GND.
//   2. Measure at full rate, first with all banks on one bus, then with the
//      balanced setting. The balanced setting must serve clearly more
//      requests (two buses share the 205 % demand instead of one), keep both
//      buses busy with similar loads, and lose fewer arbitrations.
// Every granted access must be answered exactly one cycle later with the
// data last written to that word.
module tb_traffic_balancing;
  import mot3d_pkg::*;

  localparam int N_CORE = 4, N_BANK = 8, BANK_BYTES = 1024, WORDS = BANK_BYTES / 4;
  localparam int T = 2000;
  localparam int RATE [4] = '{70, 25, 30, 80};

  int checks = 0, failures = 0;

  logic                clk = 0, rst_n = 0, mon_clear = 0;
  logic [N_CORE-1:0]   req_valid, gnt, rvalid;
  mot_req_t            req   [N_CORE];
  logic [DATA_W-1:0]   rdata [N_CORE];
  tsv_ctrl_t           ctrl  [N_BANK/4];
  logic [31:0]         bank_cnt [N_BANK];
  logic [2*N_BANK/4-1:0] bus_active;

  mot3d_spm_cluster #(.N_CORE(N_CORE), .N_BANK(N_BANK), .BANK_BYTES(BANK_BYTES)) dut (
    .clk(clk), .rst_n(rst_n),
    .core_req_valid_i(req_valid), .core_req_i(req), .core_gnt_o(gnt),
    .core_rvalid_o(rvalid), .core_rdata_o(rdata),
    .tsv_ctrl_i(ctrl), .mon_clear_i(mon_clear), .bank_cnt_o(bank_cnt),
    .tsv_bus_active_o(bus_active)
  );

  always #5 clk = ~clk;

  logic [DATA_W-1:0] model [4][WORDS];
  bit                known [4][WORDS];
  logic [N_CORE-1:0] exp_v;
  logic              exp_chk [N_CORE];
  logic [DATA_W-1:0] exp_d [N_CORE];
  int served, lost, load0, load1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(20 * T * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run n cycles of the four threads, each at RATE[c] / div percent
  task automatic run(input int n, input int div);
    served = 0; lost = 0; load0 = 0; load1 = 0;
    for (int t = 0; t < n; t++) begin
      logic [N_CORE-1:0] granted, nxt_v;
      #1;
      nxt_v = '0;
      for (int c = 0; c < N_CORE; c++) begin
        check(rvalid[c] == exp_v[c], "answer one cycle after grant");
        if (exp_v[c] && exp_chk[c]) check(rdata[c] == exp_d[c], "read data");
      end
      granted = gnt & req_valid;
      if (bus_active[0]) load0++;
      if (bus_active[1]) load1++;
      for (int c = 0; c < N_CORE; c++) begin
        if (req_valid[c] && !gnt[c]) lost++;
        if (granted[c]) begin
          int a;
          a = int'(req[c].addr[9:2]);
          served++;
          nxt_v[c]   = 1;
          exp_chk[c] = !req[c].we && known[c][a];
          exp_d[c]   = model[c][a];
          if (req[c].we) begin model[c][a] = req[c].wdata; known[c][a] = 1; end
        end
      end
      @(posedge clk);
      #1;
      exp_v = nxt_v;
      for (int c = 0; c < N_CORE; c++) begin
        if (granted[c]) req_valid[c] = 0;
        if (!req_valid[c] && ($urandom % (100 * div)) < RATE[c]) begin
          req[c].we    = 1'($urandom);
          req[c].be    = 4'hf;
          req[c].wdata = $urandom;
          req[c].addr  = (32'(c) << 16) | (32'($urandom % 16) << 2);
          req_valid[c] = 1;
        end
      end
      @(negedge clk);
    end
  endtask

  task automatic drain();
    while (req_valid != '0 || exp_v != '0) begin
      logic [N_CORE-1:0] granted, nxt_v;
      #1;
      nxt_v = '0;
      for (int c = 0; c < N_CORE; c++) begin
        check(rvalid[c] == exp_v[c], "answer one cycle after grant");
        if (exp_v[c] && exp_chk[c]) check(rdata[c] == exp_d[c], "read data");
      end
      granted = gnt & req_valid;
      for (int c = 0; c < N_CORE; c++)
        if (granted[c]) begin
          int a;
          a = int'(req[c].addr[9:2]);
          nxt_v[c]   = 1;
          exp_chk[c] = !req[c].we && known[c][a];
          exp_d[c]   = model[c][a];
          if (req[c].we) begin model[c][a] = req[c].wdata; known[c][a] = 1; end
        end
      @(posedge clk);
      #1;
      exp_v = nxt_v;
      req_valid = req_valid & ~granted;
      @(negedge clk);
    end
  endtask

  initial begin
    int idx [4];
    int served1, lost1, served2, lost2, l0, l1;
    int hi, lo;
    req_valid = '0; exp_v = '0;
    for (int c = 0; c < N_CORE; c++) begin req[c] = '0; exp_chk[c] = 0; exp_d[c] = '0; end
    for (int b = 0; b < 4; b++) for (int a = 0; a < WORDS; a++) begin model[b][a] = '0; known[b][a] = 0; end
    ctrl[0] = 4'b1000;   // c4 = VDD, c3 = GND: all banks on MoT_0
    ctrl[1] = 4'b1000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);

    // 1. profile
    mon_clear = 1;
    @(negedge clk);
    mon_clear = 0;
    run(5 * T, 3);
    drain();
    for (int b = 0; b < 4; b++) idx[b] = b;
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++)
        if (bank_cnt[idx[j]] > bank_cnt[idx[i]]) begin
          int tmp; tmp = idx[i]; idx[i] = idx[j]; idx[j] = tmp;
        end
    hi = idx[0];
    lo = idx[3];
    $display("profile: %0d %0d %0d %0d -> most used bank %0d, least used bank %0d",
             bank_cnt[0], bank_cnt[1], bank_cnt[2], bank_cnt[3], hi, lo);
    check(hi == 3 && lo == 1, "profile follows the access rates");

    // 2a. all four banks on one bus
    run(T, 1);
    served1 = served; lost1 = lost; l0 = load0; l1 = load1;
    drain();
    check(l1 == 0, "second bus idle when all banks share one bus");

    // 2b. balanced: most and least used bank on one bus
    ctrl[0] = ((hi ^ lo) == 2) ? ((hi % 2 == 0) ? 4'b0000 : 4'b0001)
                               : ((hi < 2) ? 4'b0010 : 4'b0011);
    check(ctrl[0] == 4'b0001 || ctrl[0] == 4'b0000, "pairing {00,10} / {01,11}");
    run(T, 1);
    served2 = served; lost2 = lost;
    drain();
    $display("one bus: served %0d lost %0d | balanced: served %0d lost %0d, bus loads %0d / %0d",
             served1, lost1, served2, lost2, load0, load1);
    check(served2 * 10 > served1 * 15, "balanced setting serves over 1.5x more requests");
    check(lost2 < lost1, "fewer lost arbitrations when balanced");
    check(load0 > T / 2 && load1 > T / 2, "both buses busy when balanced");
    check((load0 > load1 ? load0 - load1 : load1 - load0) * 100 < (load0 + load1) * 15,
          "balanced bus loads within 15 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
