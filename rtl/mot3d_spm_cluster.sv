// Multicore cluster interconnect with a 3-D stacked, multibanked L2
// scratchpad memory and congestion-aware TSV-bus sharing (Dynamic-4:2).
//
// N_CORE cores reach N_BANK SPM banks. The banks form N_BANK/4 bank groups of
// four; each group is served by two TSV buses, one from each of two identical
// N_CORE x (N_BANK/4) mesh-of-trees interconnects, MoT_0 and MoT_1. So there
// are half as many TSV buses as banks (the same count as sharing one bus
// between two banks), yet two banks of a group can be used at once, and which
// bus serves which bank is chosen at run time:
//   core -> mod_routing_switch (MoT_0 or MoT_1, from c1..c4 and the bank's
//           index in its group) -> mot_interconnect (routing tree on the
//           group index, round-robin arbitration tree per TSV bus)
//        -> TSV bus -> bank_group (per-bank bus multiplexer, SPM banks).
// The control signals c1..c4 are supplied per bank group on tsv_ctrl_i; they
// either split a group's banks two and two over its buses (traffic
// balancing) or put all four banks on one bus (a failed TSV bus is then
// unused). They should be changed only while no request is in flight.
//
// Core port protocol: a core holds core_req_valid_i with its packet until it
// sees core_gnt_o in the same cycle; an ungranted request lost arbitration
// and is presented again. Each granted access answers one cycle later with
// core_rvalid_o, and core_rdata_o for a read. Address: byte offset
// addr[BANK_LSB-1:0] inside a bank, bank index above it (two in-group bits
// first, then the group bits); higher address bits are not decoded, the
// cores are expected to send only SPM addresses. bank_cnt_o gives per-bank
// access counts (cleared by mon_clear_i) and tsv_bus_active_o shows which
// TSV buses carry a request this cycle (bit 2*g+k: group g, bus from MoT_k).
//
// The cores themselves (and their L1 caches), the TSVs, the global NoC and
// the off-cluster memory are outside this module. Synchronous active-low
// reset. Only N_SHARE = 4 is supported, the size the control logic is
// defined for.
module mot3d_spm_cluster
  import mot3d_pkg::*;
#(
  parameter int unsigned N_CORE     = 32,
  parameter int unsigned N_BANK     = 64,
  parameter int unsigned N_SHARE    = 4,
  parameter int unsigned BANK_BYTES = 65536,
  parameter int unsigned BANK_LSB   = 16,
  parameter int unsigned CNT_W      = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // core L2-SPM ports
  input  logic [N_CORE-1:0]   core_req_valid_i,
  input  mot_req_t            core_req_i      [N_CORE],
  output logic [N_CORE-1:0]   core_gnt_o,
  output logic [N_CORE-1:0]   core_rvalid_o,
  output logic [DATA_W-1:0]   core_rdata_o    [N_CORE],
  // TSV sharing control, one c1..c4 set per bank group
  input  tsv_ctrl_t           tsv_ctrl_i      [N_BANK/N_SHARE],
  // access monitor
  input  logic                mon_clear_i,
  output logic [CNT_W-1:0]    bank_cnt_o      [N_BANK],
  output logic [2*(N_BANK/N_SHARE)-1:0] tsv_bus_active_o
);

  localparam int unsigned N_GROUP    = N_BANK / N_SHARE;
  localparam int unsigned BANK_WORDS = BANK_BYTES / BE_W;
  localparam int unsigned GRP_LSB    = BANK_LSB + $clog2(N_SHARE);

  if (N_SHARE != 4) begin : g_bad_share
    $error("mot3d_spm_cluster: only N_SHARE = 4 is supported");
  end
  if (BANK_LSB < $clog2(BANK_BYTES)) begin : g_bad_lsb
    $error("mot3d_spm_cluster: BANK_LSB overlaps the bank offset");
  end

  // Core side of each MoT.
  logic [N_CORE-1:0]   m_valid  [2];
  mot_req_t            m_req    [2][N_CORE];
  logic [N_CORE-1:0]   m_gnt    [2];
  logic [N_CORE-1:0]   m_rvalid [2];
  logic [DATA_W-1:0]   m_rdata  [2][N_CORE];
  // TSV bus side of each MoT.
  logic [N_GROUP-1:0]  t_valid  [2];
  mot_req_t            t_req    [2][N_GROUP];
  logic [N_GROUP-1:0]  t_gnt    [2];
  logic [N_GROUP-1:0]  t_rvalid [2];
  logic [DATA_W-1:0]   t_rdata  [2][N_GROUP];

  for (genvar c = 0; c < N_CORE; c++) begin : g_core
    mod_routing_switch #(.N_GROUP(N_GROUP), .IDX_LSB(BANK_LSB)) u_mrsw (
      .ctrl_i   (tsv_ctrl_i),
      .valid_i  (core_req_valid_i[c]),
      .req_i    (core_req_i[c]),
      .gnt_o    (core_gnt_o[c]),
      .rvalid_o (core_rvalid_o[c]),
      .rdata_o  (core_rdata_o[c]),
      .valid0_o (m_valid[0][c]),
      .req0_o   (m_req[0][c]),
      .gnt0_i   (m_gnt[0][c]),
      .rvalid0_i(m_rvalid[0][c]),
      .rdata0_i (m_rdata[0][c]),
      .valid1_o (m_valid[1][c]),
      .req1_o   (m_req[1][c]),
      .gnt1_i   (m_gnt[1][c]),
      .rvalid1_i(m_rvalid[1][c]),
      .rdata1_i (m_rdata[1][c])
    );

    // Core port rule: a request that is not granted stays, unchanged.
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      core_req_valid_i[c] && !core_gnt_o[c] |=> core_req_valid_i[c] && $stable(core_req_i[c]));
    // Every grant is answered in the next cycle.
    a_answer: assert property (@(posedge clk) disable iff (!rst_n)
      core_req_valid_i[c] && core_gnt_o[c] |=> core_rvalid_o[c]);
  end

  for (genvar k = 0; k < 2; k++) begin : g_mot
    mot_interconnect #(.N_IN(N_CORE), .N_OUT(N_GROUP), .SEL_LSB(GRP_LSB)) u_mot (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_valid_i  (m_valid[k]),
      .in_req_i    (m_req[k]),
      .in_gnt_o    (m_gnt[k]),
      .in_rvalid_o (m_rvalid[k]),
      .in_rdata_o  (m_rdata[k]),
      .out_valid_o (t_valid[k]),
      .out_req_o   (t_req[k]),
      .out_gnt_i   (t_gnt[k]),
      .out_rvalid_i(t_rvalid[k]),
      .out_rdata_i (t_rdata[k])
    );
  end

  logic [N_BANK-1:0] bank_access;

  for (genvar g = 0; g < N_GROUP; g++) begin : g_grp
    logic [1:0]        bv;
    mot_req_t          bq [2];
    logic [1:0]        bg;
    logic [1:0]        brv;
    logic [DATA_W-1:0] brd [2];

    assign bv    = {t_valid[1][g], t_valid[0][g]};
    assign bq[0] = t_req[0][g];
    assign bq[1] = t_req[1][g];
    assign t_gnt[0][g]    = bg[0];
    assign t_gnt[1][g]    = bg[1];
    assign t_rvalid[0][g] = brv[0];
    assign t_rvalid[1][g] = brv[1];
    assign t_rdata[0][g]  = brd[0];
    assign t_rdata[1][g]  = brd[1];
    assign tsv_bus_active_o[2*g +: 2] = bv;

    bank_group #(.BANK_WORDS(BANK_WORDS), .IDX_LSB(BANK_LSB)) u_grp (
      .clk          (clk),
      .rst_n        (rst_n),
      .ctrl_i       (tsv_ctrl_i[g]),
      .bus_valid_i  (bv),
      .bus_req_i    (bq),
      .bus_gnt_o    (bg),
      .bus_rvalid_o (brv),
      .bus_rdata_o  (brd),
      .bank_access_o(bank_access[N_SHARE*g +: N_SHARE])
    );
  end

  bank_access_monitor #(.N_BANK(N_BANK), .CNT_W(CNT_W)) u_mon (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (mon_clear_i),
    .access_i(bank_access),
    .cnt_o   (bank_cnt_o)
  );

endmodule
