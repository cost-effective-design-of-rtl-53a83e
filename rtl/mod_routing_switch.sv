// Modified routing switch: the first switch behind each core, choosing which
// of the two MoT interconnects (MoT_0 or MoT_1) carries the core's request.
//
// Its datapath is an ordinary routing switch (mot_routing_switch). Only the
// steering bit differs: instead of an address bit it is ctr_out of
// tsv_ctrl_logic, computed from the two bank-index bits that select a bank
// inside its bank group and the control signals c1..c4. Each bank group
// has its own set of control signals in this design (ctrl_i, indexed by the
// group bits of the address), so the mapping chosen for traffic balancing or
// to avoid a failed TSV bus applies group by group; the bank side of the
// group uses the same set, so a bank always listens to the bus its requests
// arrive on.
//
// Address fields: bank index within group = addr[IDX_LSB +: 2], group index
// = addr[IDX_LSB+2 +: log2(N_GROUP)]. Fully combinational; grant in the
// request cycle, response one cycle later, as in mot_routing_switch.
module mod_routing_switch
  import mot3d_pkg::*;
#(
  parameter int unsigned N_GROUP = 16,
  parameter int unsigned IDX_LSB = 16
) (
  input  tsv_ctrl_t         ctrl_i   [N_GROUP],
  // core side
  input  logic              valid_i,
  input  mot_req_t          req_i,
  output logic              gnt_o,
  output logic              rvalid_o,
  output logic [DATA_W-1:0] rdata_o,
  // MoT_0 side
  output logic              valid0_o,
  output mot_req_t          req0_o,
  input  logic              gnt0_i,
  input  logic              rvalid0_i,
  input  logic [DATA_W-1:0] rdata0_i,
  // MoT_1 side
  output logic              valid1_o,
  output mot_req_t          req1_o,
  input  logic              gnt1_i,
  input  logic              rvalid1_i,
  input  logic [DATA_W-1:0] rdata1_i
);

  localparam int unsigned GRP_W = (N_GROUP > 1) ? $clog2(N_GROUP) : 1;

  logic [GRP_W-1:0] grp;
  tsv_ctrl_t        ctrl;
  logic             ctr_out;

  always_comb begin
    grp  = (N_GROUP > 1) ? req_i.addr[IDX_LSB+2 +: GRP_W] : '0;
    ctrl = ctrl_i[grp];
  end

  tsv_ctrl_logic u_ctrl (
    .bank_idx(req_i.addr[IDX_LSB +: 2]),
    .ctrl    (ctrl),
    .ctr_out (ctr_out)
  );

  mot_routing_switch u_sw (
    .valid_i  (valid_i),
    .req_i    (req_i),
    .sel_i    (ctr_out),
    .gnt_o    (gnt_o),
    .rvalid_o (rvalid_o),
    .rdata_o  (rdata_o),
    .valid0_o (valid0_o),
    .req0_o   (req0_o),
    .gnt0_i   (gnt0_i),
    .rvalid0_i(rvalid0_i),
    .rdata0_i (rdata0_i),
    .valid1_o (valid1_o),
    .req1_o   (req1_o),
    .gnt1_i   (gnt1_i),
    .rvalid1_i(rvalid1_i),
    .rdata1_i (rdata1_i)
  );

endmodule
