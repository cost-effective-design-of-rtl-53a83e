// N_IN x N_OUT circuit-switched mesh-of-trees (MoT) interconnect.
//
// Every input (a core side port) owns a binary routing tree of
// log2(N_OUT) levels of mot_routing_switch; every output (a TSV bus towards
// a bank group) owns a binary arbitration tree of log2(N_IN) levels of
// mot_arbitration_switch. Leaf j of routing tree i is wired to leaf i of
// arbitration tree j, so each input reaches each output over exactly one
// path and requests to different outputs never interfere. The output index
// is taken from the address bits addr[SEL_LSB +: log2(N_OUT)]; routing-tree
// level 1 (next to the input) uses the most significant of these bits.
//
// For N_IN = 4, N_OUT = 8 this is 28 routing and 24 arbitration switches,
// the structure of the 4x8 MoT; with N_OUT = 2 it is one of the two 4x2 MoTs
// of the shared-TSV design. Switch counts follow
// N_IN*(N_OUT-1) routing and N_OUT*(N_IN-1) arbitration switches.
//
// Timing: a request is arbitrated and granted in the cycle it is presented
// (combinational path input -> output -> grant). The response (read data and
// a response-valid) offered at an output one cycle after a grant is routed
// back to the granted input in that cycle. N_IN and N_OUT must be powers of
// two (N_OUT = 1 is allowed and leaves the routing tree empty).
//
// Nodes of each tree are numbered as a heap: node 1 is the root, node n has
// children 2n and 2n+1, leaves are nodes N..2N-1.
module mot_interconnect
  import mot3d_pkg::*;
#(
  parameter int unsigned N_IN    = 32,
  parameter int unsigned N_OUT   = 16,
  parameter int unsigned SEL_LSB = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  // input (core) side
  input  logic [N_IN-1:0]   in_valid_i,
  input  mot_req_t          in_req_i    [N_IN],
  output logic [N_IN-1:0]   in_gnt_o,
  output logic [N_IN-1:0]   in_rvalid_o,
  output logic [DATA_W-1:0] in_rdata_o  [N_IN],
  // output (memory) side
  output logic [N_OUT-1:0]  out_valid_o,
  output mot_req_t          out_req_o   [N_OUT],
  input  logic [N_OUT-1:0]  out_gnt_i,
  input  logic [N_OUT-1:0]  out_rvalid_i,
  input  logic [DATA_W-1:0] out_rdata_i [N_OUT]
);

  localparam int unsigned LOG_OUT = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  // Routing tree of input i: node n of the heap is g_rtree[i].g_n[n].
  for (genvar i = 0; i < N_IN; i++) begin : g_rtree
    for (genvar n = 1; n < 2*N_OUT; n++) begin : g_n
      logic              v;
      mot_req_t          q;
      logic              g;
      logic              rv;
      logic [DATA_W-1:0] rd;
    end

    assign g_n[1].v       = in_valid_i[i];
    assign g_n[1].q       = in_req_i[i];
    assign in_gnt_o[i]    = g_n[1].g;
    assign in_rvalid_o[i] = g_n[1].rv;
    assign in_rdata_o[i]  = g_n[1].rd;

    for (genvar n = 1; n < N_OUT; n++) begin : g_sw
      // level 0 at the root; the root uses the most significant index bit
      localparam int unsigned LVL = $clog2(n + 1) - 1;
      logic [LOG_OUT-1:0] dest;
      assign dest = g_n[n].q.addr[SEL_LSB +: LOG_OUT];

      mot_routing_switch u_rsw (
        .valid_i  (g_n[n].v),
        .req_i    (g_n[n].q),
        .sel_i    (dest[LOG_OUT-1-LVL]),
        .gnt_o    (g_n[n].g),
        .rvalid_o (g_n[n].rv),
        .rdata_o  (g_n[n].rd),
        .valid0_o (g_n[2*n].v),
        .req0_o   (g_n[2*n].q),
        .gnt0_i   (g_n[2*n].g),
        .rvalid0_i(g_n[2*n].rv),
        .rdata0_i (g_n[2*n].rd),
        .valid1_o (g_n[2*n+1].v),
        .req1_o   (g_n[2*n+1].q),
        .gnt1_i   (g_n[2*n+1].g),
        .rvalid1_i(g_n[2*n+1].rv),
        .rdata1_i (g_n[2*n+1].rd)
      );
    end
  end

  // Arbitration tree of output j: node n of the heap is g_atree[j].g_n[n].
  for (genvar j = 0; j < N_OUT; j++) begin : g_atree
    for (genvar n = 1; n < 2*N_IN; n++) begin : g_n
      logic              v;
      mot_req_t          q;
      logic              g;
      logic              rv;
      logic [DATA_W-1:0] rd;
    end

    assign out_valid_o[j] = g_n[1].v;
    assign out_req_o[j]   = g_n[1].q;
    assign g_n[1].g       = out_gnt_i[j];
    assign g_n[1].rv      = out_rvalid_i[j];
    assign g_n[1].rd      = out_rdata_i[j];

    for (genvar n = 1; n < N_IN; n++) begin : g_sw
      mot_arbitration_switch u_asw (
        .clk      (clk),
        .rst_n    (rst_n),
        .valid0_i (g_n[2*n].v),
        .req0_i   (g_n[2*n].q),
        .gnt0_o   (g_n[2*n].g),
        .rvalid0_o(g_n[2*n].rv),
        .rdata0_o (g_n[2*n].rd),
        .valid1_i (g_n[2*n+1].v),
        .req1_i   (g_n[2*n+1].q),
        .gnt1_o   (g_n[2*n+1].g),
        .rvalid1_o(g_n[2*n+1].rv),
        .rdata1_o (g_n[2*n+1].rd),
        .valid_o  (g_n[n].v),
        .req_o    (g_n[n].q),
        .gnt_i    (g_n[n].g),
        .rvalid_i (g_n[n].rv),
        .rdata_i  (g_n[n].rd)
      );
    end
  end

  // Leaf j of routing tree i <-> leaf i of arbitration tree j.
  for (genvar i = 0; i < N_IN; i++) begin : g_leaf_i
    for (genvar j = 0; j < N_OUT; j++) begin : g_leaf_j
      assign g_atree[j].g_n[N_IN+i].v   = g_rtree[i].g_n[N_OUT+j].v;
      assign g_atree[j].g_n[N_IN+i].q   = g_rtree[i].g_n[N_OUT+j].q;
      assign g_rtree[i].g_n[N_OUT+j].g  = g_atree[j].g_n[N_IN+i].g;
      assign g_rtree[i].g_n[N_OUT+j].rv = g_atree[j].g_n[N_IN+i].rv;
      assign g_rtree[i].g_n[N_OUT+j].rd = g_atree[j].g_n[N_IN+i].rd;
    end
  end

  // Each input is granted by at most one output in a cycle.
  a_one_path: assert property (@(posedge clk) disable iff (!rst_n)
    (in_gnt_o & ~in_valid_i) == '0);

endmodule
