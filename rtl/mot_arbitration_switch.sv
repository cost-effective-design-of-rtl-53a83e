// Arbitration switch of a mesh-of-trees arbitration tree (2 inputs, 1 output).
//
// When both inputs request in the same cycle, the input holding the
// round-robin priority wins and its packet is forwarded; the other input sees
// no grant and keeps its request. The priority moves to the other input each
// time a request passes this switch with a grant from above, so an input that
// lost in one cycle is the first choice of this switch in the next one. A
// lone request passes without waiting. Arbitration and forwarding are
// combinational; the grant from the parent is returned to the winner in the
// same cycle.
//
// The winner of a granted request is stored in a flip-flop so that the
// response, which arrives one cycle later, is routed back to the right input.
// Reset (active low, synchronous) gives input 0 the first priority; the
// reset values are this design's choice.
module mot_arbitration_switch
  import mot3d_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // input 0
  input  logic              valid0_i,
  input  mot_req_t          req0_i,
  output logic              gnt0_o,
  output logic              rvalid0_o,
  output logic [DATA_W-1:0] rdata0_o,
  // input 1
  input  logic              valid1_i,
  input  mot_req_t          req1_i,
  output logic              gnt1_o,
  output logic              rvalid1_o,
  output logic [DATA_W-1:0] rdata1_o,
  // output (towards the memory bank)
  output logic              valid_o,
  output mot_req_t          req_o,
  input  logic              gnt_i,
  input  logic              rvalid_i,
  input  logic [DATA_W-1:0] rdata_i
);

  logic prio_q;   // input that wins a tie
  logic last_q;   // input granted in the previous cycle (response owner)
  logic winner;

  always_comb begin
    if (valid0_i && valid1_i) winner = prio_q;
    else                      winner = valid1_i;
    valid_o = valid0_i | valid1_i;
    req_o   = winner ? req1_i : req0_i;
    gnt0_o  = gnt_i & valid0_i & ~winner;
    gnt1_o  = gnt_i & valid1_i &  winner;
    rvalid0_o = rvalid_i & ~last_q;
    rvalid1_o = rvalid_i &  last_q;
    rdata0_o  = rdata_i;
    rdata1_o  = rdata_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prio_q <= 1'b0;
      last_q <= 1'b0;
    end else if (valid_o && gnt_i) begin
      prio_q <= ~winner;
      last_q <= winner;
    end
  end

  // At most one input is granted, and only an input that asked.
  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    !(gnt0_o && gnt1_o));
  a_gnt_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (!gnt0_o || valid0_i) && (!gnt1_o || valid1_i));

endmodule
