// Routing switch of a mesh-of-trees routing tree (1 input, 2 outputs).
//
// A request packet arriving at the input is steered to output 0 or 1 by a
// single destination bit (sel_i), which the enclosing tree takes from the
// address bit belonging to this switch's level. The packet itself is copied
// to both outputs; only the selected side sees a valid. The grant coming back
// from the selected side is returned to the requester in the same cycle, so
// the request path is fully combinational, as in a circuit-switched MoT.
//
// The response path is a 2:1 multiplexer. Read data return one cycle after
// the grant, when sel_i may already belong to the next request, so the
// multiplexer is steered by the response-valid of the branch rather than by
// sel_i (this design's choice). At most one branch carries a response in a
// cycle because a requester has at most one request granted per cycle.
// No state, no clock.
module mot_routing_switch
  import mot3d_pkg::*;
(
  // upstream (towards the core)
  input  logic              valid_i,
  input  mot_req_t          req_i,
  input  logic              sel_i,     // 0: output 0, 1: output 1
  output logic              gnt_o,
  output logic              rvalid_o,
  output logic [DATA_W-1:0] rdata_o,
  // downstream side 0
  output logic              valid0_o,
  output mot_req_t          req0_o,
  input  logic              gnt0_i,
  input  logic              rvalid0_i,
  input  logic [DATA_W-1:0] rdata0_i,
  // downstream side 1
  output logic              valid1_o,
  output mot_req_t          req1_o,
  input  logic              gnt1_i,
  input  logic              rvalid1_i,
  input  logic [DATA_W-1:0] rdata1_i
);

  always_comb begin
    valid0_o = valid_i & ~sel_i;
    valid1_o = valid_i &  sel_i;
    req0_o   = req_i;
    req1_o   = req_i;
    gnt_o    = sel_i ? gnt1_i : gnt0_i;
    rvalid_o = rvalid0_i | rvalid1_i;
    rdata_o  = rvalid1_i ? rdata1_i : rdata0_i;
  end

endmodule
