// Bank group: the N_SHARE = 4 stacked SPM banks that share the group's two
// TSV buses, one bus coming from MoT_0 and one from MoT_1.
//
// Each bank sits behind a bank_tsv_mux whose select is ctr_out of
// tsv_ctrl_logic for that bank's index and the group's control signals
// c1..c4, so the group behaves as the cores' modified routing switches
// expect: with c4 = GND the banks are split two and two over the buses and
// two banks of the group can be accessed in the same cycle, one per bus;
// with c4 = VDD every bank listens to the bus named by c3 and the other bus
// carries nothing (used to route around a failed bus).
//
// A bus is granted in the cycle its request is taken by a bank. Every granted
// access returns a response on that bus one cycle later: rvalid high and, for
// a read, the bank's read data (the bank index is kept in a register per bus
// to pick the data). bank_access_o flags, per bank, the cycles it is accessed.
// Reset (synchronous, active low) clears the response valids. The grant rule
// and the response on writes are this design's choices.
module bank_group
  import mot3d_pkg::*;
#(
  parameter int unsigned BANK_WORDS = 16384,
  parameter int unsigned IDX_LSB    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tsv_ctrl_t         ctrl_i,
  // TSV bus k = 0 (from MoT_0) and k = 1 (from MoT_1)
  input  logic [1:0]        bus_valid_i,
  input  mot_req_t          bus_req_i    [2],
  output logic [1:0]        bus_gnt_o,
  output logic [1:0]        bus_rvalid_o,
  output logic [DATA_W-1:0] bus_rdata_o  [2],
  output logic [3:0]        bank_access_o
);

  localparam int unsigned N_SHARE = 4;
  localparam int unsigned AW      = $clog2(BANK_WORDS);

  logic [N_SHARE-1:0] bank_sel;
  logic [N_SHARE-1:0] take;
  logic [DATA_W-1:0]  bank_rdata [N_SHARE];

  for (genvar b = 0; b < N_SHARE; b++) begin : g_bank
    logic              en;
    logic              we;
    logic [BE_W-1:0]   be;
    logic [AW-1:0]     addr;
    logic [DATA_W-1:0] wdata;

    tsv_ctrl_logic u_ctrl (
      .bank_idx(2'(b)),
      .ctrl    (ctrl_i),
      .ctr_out (bank_sel[b])
    );

    bank_tsv_mux #(.BANK_ID(b), .IDX_LSB(IDX_LSB), .AW(AW)) u_mux (
      .bus_sel_i(bank_sel[b]),
      .valid0_i (bus_valid_i[0]),
      .req0_i   (bus_req_i[0]),
      .valid1_i (bus_valid_i[1]),
      .req1_i   (bus_req_i[1]),
      .take_o   (take[b]),
      .en_o     (en),
      .we_o     (we),
      .be_o     (be),
      .addr_o   (addr),
      .wdata_o  (wdata)
    );

    spm_bank #(.WORDS(BANK_WORDS)) u_bank (
      .clk    (clk),
      .en_i   (en),
      .we_i   (we),
      .be_i   (be),
      .addr_i (addr),
      .wdata_i(wdata),
      .rdata_o(bank_rdata[b])
    );
  end

  assign bank_access_o = take;

  // Response return, one register stage per bus.
  logic [1:0] rsp_v_q;
  logic [1:0] rsp_bank_q [2];

  always_comb begin
    bus_gnt_o = '0;
    for (int b = 0; b < N_SHARE; b++)
      if (take[b]) bus_gnt_o[bank_sel[b]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (!rst_n) rsp_v_q[k] <= 1'b0;
      else        rsp_v_q[k] <= bus_gnt_o[k];
      rsp_bank_q[k] <= bus_req_i[k].addr[IDX_LSB +: 2];
    end
  end

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      bus_rvalid_o[k] = rsp_v_q[k];
      bus_rdata_o[k]  = bank_rdata[rsp_bank_q[k]];
    end
  end

  // A valid request is always taken: the control signals map every bank to
  // exactly one bus, and cores only send a bank's requests on that bus.
  a_taken: assert property (@(posedge clk) disable iff (!rst_n)
    bus_gnt_o == bus_valid_i);

endmodule
