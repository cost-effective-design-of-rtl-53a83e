// End-to-end self-checking testbench for mot3d_spm_cluster, at a reduced size:
// 4 cores, 8 banks of 1 KB (two bank groups of four banks, two 4x2 MoTs).
//
// Every core runs a random stream of reads and byte-masked writes, holding
// each request until it is granted. A reference memory model is updated at
// each grant; each granted access must be answered exactly one cycle later,
// reads with the model's data (words never written are not compared).
// The run goes through these phases:
//   zero load  - one core at a time: grant in the same cycle, answer next;
//   rows 1..6  - all groups set to each row of the mapping table in turn; in
//                the two rows with c4 high the bus that is switched off must
//                never carry a request (routing around a failed bus);
//   mixed      - a random c1..c4 per group;
//   balancing  - bank accesses skewed 70/25/30/80 % inside each group; the
//                access monitor profiles them, the testbench sorts the counts
//                and pairs the most and the least used bank on one bus (when
//                the control logic can express that pairing) and then checks
//                that the two buses of each group carry similar traffic.
// Mechanisms counted (a failure if one never happens): lost arbitration,
// both buses of a group busy in one cycle, use of MoT_0 and of MoT_1, traffic
// under every table row, switched-off bus avoided, balancing applied.
// The monitor's counts are compared with the testbench's own count.
module tb_mot3d_spm_cluster;
  import mot3d_pkg::*;

  localparam int N_CORE = 4, N_BANK = 8, BANK_BYTES = 1024;
  localparam int PHASE  = 400;
  localparam int N_GROUP = N_BANK / 4, WORDS = BANK_BYTES / 4, BANK_LSB = 16;
  localparam int WIN = 32;   // words per bank used by the random traffic
  localparam int CNT_W = 32;

  int checks = 0, failures = 0;
  int n_lost = 0, n_dual = 0, n_mot0 = 0, n_mot1 = 0, n_avoid = 0, n_balanced = 0;
  int n_zero = 0, n_reads = 0, n_grants = 0;
  int row_traffic [6];

  logic                clk = 0, rst_n = 0, mon_clear = 0;
  logic [N_CORE-1:0]   req_valid, gnt, rvalid;
  mot_req_t            req   [N_CORE];
  logic [DATA_W-1:0]   rdata [N_CORE];
  tsv_ctrl_t           ctrl  [N_GROUP];
  logic [CNT_W-1:0]    bank_cnt [N_BANK];
  logic [2*N_GROUP-1:0] bus_active;

  mot3d_spm_cluster #(.N_CORE(N_CORE), .N_BANK(N_BANK), .BANK_BYTES(BANK_BYTES)) dut (
    .clk(clk), .rst_n(rst_n),
    .core_req_valid_i(req_valid), .core_req_i(req), .core_gnt_o(gnt),
    .core_rvalid_o(rvalid), .core_rdata_o(rdata),
    .tsv_ctrl_i(ctrl), .mon_clear_i(mon_clear), .bank_cnt_o(bank_cnt),
    .tsv_bus_active_o(bus_active)
  );

  always #5 clk = ~clk;

  // reference state
  logic [DATA_W-1:0] model [N_BANK][WORDS];
  bit                known [N_BANK][WORDS];
  int                acc_cnt [N_BANK];
  int                bus_load [N_GROUP][2];
  logic [N_CORE-1:0] exp_v;
  logic              exp_chk [N_CORE];
  logic [DATA_W-1:0] exp_d [N_CORE];

  // traffic shape
  int  mode;           // 0: uniform, 1: skewed 70/25/30/80 inside each group
  int  issue_pct;      // request probability per idle core and cycle
  int  cur_row;        // table row applied to all groups, -1: mixed

  localparam tsv_ctrl_t ROWS [6] = '{4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b1000, 4'b1100};
  localparam int SKEW [4] = '{70, 25, 30, 80};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [3:0] mot0_set(tsv_ctrl_t c);
    if (c.c4) return c.c3 ? 4'b0000 : 4'b1111;
    case ({c.c2, c.c1})
      2'b00:   return 4'b0101;
      2'b01:   return 4'b1010;
      2'b10:   return 4'b0011;
      default: return 4'b1100;
    endcase
  endfunction

  function automatic int pick_bank();
    int g, r, acc;
    g = $urandom % N_GROUP;
    if (mode == 0) return 4*g + ($urandom % 4);
    r = $urandom % 205;
    acc = 0;
    for (int b = 0; b < 4; b++) begin
      acc += SKEW[b];
      if (r < acc) return 4*g + b;
    end
    return 4*g + 3;
  endfunction

  function automatic mot_req_t new_req();
    mot_req_t r;
    int b;
    b = pick_bank();
    r.we    = ($urandom % 3) == 0;
    r.be    = ($urandom % 2) ? 4'hf : 4'($urandom);
    r.wdata = $urandom;
    r.addr  = {$urandom} & ~((32'(1) << (BANK_LSB + $clog2(N_BANK))) - 1);
    r.addr |= 32'(b) << BANK_LSB;
    r.addr |= 32'($urandom % WIN) << 2;
    r.addr |= 32'($urandom % 4);
    return r;
  endfunction

  initial begin
    #((64 + 12 * PHASE) * 10 * 40);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock cycle: check outputs against the model, update the model,
  // then release granted requests and issue new ones after the edge.
  task automatic cycle();
    logic [N_CORE-1:0] granted;
    logic [N_CORE-1:0] nxt_v;
    #1;
    for (int c = 0; c < N_CORE; c++) begin
      check(rvalid[c] == exp_v[c], "answer exactly one cycle after grant");
      if (exp_v[c] && exp_chk[c]) begin
        n_reads++;
        check(rdata[c] == exp_d[c], "read data");
      end
      check(!gnt[c] || req_valid[c], "grant without request");
    end
    granted = gnt & req_valid;
    for (int g = 0; g < N_GROUP; g++) begin
      logic [3:0] m0;
      if (bus_active[2*g]) begin n_mot0++; bus_load[g][0]++; end
      if (bus_active[2*g+1]) begin n_mot1++; bus_load[g][1]++; end
      if (bus_active[2*g +: 2] == 2'b11) n_dual++;
      m0 = mot0_set(ctrl[g]);
      if (m0 == 4'b1111) begin
        check(!bus_active[2*g+1], "switched-off bus from MoT_1 unused");
        if (bus_active[2*g]) n_avoid++;
      end
      if (m0 == 4'b0000) begin
        check(!bus_active[2*g], "switched-off bus from MoT_0 unused");
        if (bus_active[2*g+1]) n_avoid++;
      end
    end
    nxt_v = '0;
    for (int c = 0; c < N_CORE; c++) begin
      if (req_valid[c] && !gnt[c]) n_lost++;
      if (granted[c]) begin
        int b, a;
        b = int'(req[c].addr[BANK_LSB +: $clog2(N_BANK)]);
        a = int'(req[c].addr[2 +: $clog2(WORDS)]);
        n_grants++;
        acc_cnt[b]++;
        if (cur_row >= 0) row_traffic[cur_row]++;
        nxt_v[c]   = 1;
        exp_chk[c] = !req[c].we && known[b][a];
        exp_d[c]   = model[b][a];
        if (req[c].we) begin
          for (int y = 0; y < 4; y++)
            if (req[c].be[y]) model[b][a][8*y +: 8] = req[c].wdata[8*y +: 8];
          if (req[c].be == 4'hf) known[b][a] = 1;
        end
      end
    end
    // two grants in a cycle never reach the same bank
    for (int c = 0; c < N_CORE; c++)
      for (int d = c + 1; d < N_CORE; d++)
        if (granted[c] && granted[d])
          check(req[c].addr[BANK_LSB +: $clog2(N_BANK)] != req[d].addr[BANK_LSB +: $clog2(N_BANK)],
                "one access per bank and cycle");
    @(posedge clk);
    #1;
    exp_v = nxt_v;
    for (int c = 0; c < N_CORE; c++) begin
      if (granted[c]) req_valid[c] = 0;
      if (!req_valid[c] && (($urandom % 100) < issue_pct)) begin
        req[c] = new_req();
        req_valid[c] = 1;
      end
    end
    @(negedge clk);
  endtask

  task automatic drain();
    issue_pct = 0;
    repeat (N_CORE + 4) cycle();
  endtask

  initial begin
    req_valid = '0; exp_v = '0; mode = 0; issue_pct = 0; cur_row = -1;
    for (int c = 0; c < N_CORE; c++) begin req[c] = '0; exp_chk[c] = 0; exp_d[c] = '0; end
    for (int g = 0; g < N_GROUP; g++) begin ctrl[g] = ROWS[0]; bus_load[g] = '{0, 0}; end
    for (int b = 0; b < N_BANK; b++) begin
      acc_cnt[b] = 0;
      for (int a = 0; a < WORDS; a++) begin known[b][a] = 0; model[b][a] = '0; end
    end
    for (int r = 0; r < 6; r++) row_traffic[r] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);

    // zero load: one request alone is granted at once and answered next cycle
    for (int c = 0; c < N_CORE; c++) begin
      req[c] = new_req();
      req_valid[c] = 1;
      #1;
      n_zero++;
      check(gnt[c] == 1, "zero-load grant in the request cycle");
      cycle();
      drain();
    end

    // every row of the mapping table, all groups alike
    issue_pct = 60;
    for (int r = 0; r < 6; r++) begin
      drain();
      for (int g = 0; g < N_GROUP; g++) ctrl[g] = ROWS[r];
      cur_row = r;
      issue_pct = 60;
      repeat (PHASE) cycle();
    end
    drain();
    cur_row = -1;

    // mixed: random control per group, changed between bursts
    for (int k = 0; k < 4; k++) begin
      for (int g = 0; g < N_GROUP; g++) ctrl[g] = ROWS[$urandom % 6];
      issue_pct = 80;
      repeat (PHASE / 4) cycle();
      drain();
    end

    // traffic balancing: profile skewed traffic, then rebalance
    for (int g = 0; g < N_GROUP; g++) ctrl[g] = ROWS[4];   // all on MoT_0
    mode = 1;
    mon_clear = 1;
    cycle();
    mon_clear = 0;
    for (int b = 0; b < N_BANK; b++) acc_cnt[b] = 0;
    issue_pct = 50;
    repeat (PHASE) cycle();
    drain();
    for (int b = 0; b < N_BANK; b++)
      check(int'(bank_cnt[b]) == acc_cnt[b], "monitor count");
    for (int g = 0; g < N_GROUP; g++) begin
      int idx [4];
      int hi, lo;
      // sort the four in-group banks by profiled count
      for (int b = 0; b < 4; b++) idx[b] = b;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++)
          if (bank_cnt[4*g + idx[j]] > bank_cnt[4*g + idx[i]]) begin
            int tmp; tmp = idx[i]; idx[i] = idx[j]; idx[j] = tmp;
          end
      hi = idx[0];
      lo = idx[3];
      // most and least used bank share one bus
      if ((hi ^ lo) == 2)      ctrl[g] = ROWS[(hi[0] == 0) ? 0 : 1];  // pairs {0,2}/{1,3}
      else if ((hi ^ lo) == 1) ctrl[g] = ROWS[(hi[1] == 0) ? 2 : 3];  // pairs {0,1}/{2,3}
      else                     ctrl[g] = ROWS[0];  // {0,3}/{1,2} cannot be expressed
      bus_load[g] = '{0, 0};
    end
    issue_pct = 50;
    repeat (PHASE) cycle();
    drain();
    for (int g = 0; g < N_GROUP; g++) begin
      int tot, diff;
      tot  = bus_load[g][0] + bus_load[g][1];
      diff = bus_load[g][0] - bus_load[g][1];
      if (diff < 0) diff = -diff;
      check(tot > 0 && diff * 100 < tot * 25, "balanced load on the two buses of a group");
      if (tot > 0 && diff * 100 < tot * 25) n_balanced++;
    end

    // every mechanism happened
    check(n_zero > 0, "zero-load requests");
    check(n_lost > 0, "lost arbitration");
    check(n_dual > 0, "both buses of a group busy together");
    check(n_mot0 > 0 && n_mot1 > 0, "both MoTs used");
    check(n_avoid > 0, "traffic routed around a switched-off bus");
    check(n_balanced > 0, "traffic balancing");
    check(n_reads > 0, "reads compared");
    for (int r = 0; r < 6; r++) check(row_traffic[r] > 0, "traffic under each table row");
    $display("grants=%0d reads=%0d lost=%0d dual=%0d mot0=%0d mot1=%0d avoid=%0d balanced=%0d",
             n_grants, n_reads, n_lost, n_dual, n_mot0, n_mot1, n_avoid, n_balanced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
