// Control logic of the modified routing switch: decides over which of the two
// MoT interconnects (and so over which of a bank group's two TSV buses) a
// bank is reached.
//
// Inputs are the two bank-index bits that select a bank inside its group
// (bank_idx[1:0]) and the four static control signals c1..c4. The logic is
// a chain of three 2:1 multiplexers and one inverter:
//   c2 picks bank_idx[0] (GND) or bank_idx[1] (VDD),
//   c1 passes that bit (GND) or its complement (VDD),
//   c4 passes the result (GND) or replaces it by c3 (VDD).
// ctr_out = 0 selects MoT_0, 1 selects MoT_1. This reproduces the six rows
// of the mapping table of the design: with c4 = GND the four banks are split
// two and two between the MoTs (traffic balancing), with c4 = VDD all four
// banks use the MoT named by c3, which takes a failed TSV bus out of use.
// Which data input of each multiplexer is taken for GND and for VDD is read
// off that table. Purely combinational.
module tsv_ctrl_logic
  import mot3d_pkg::*;
(
  input  logic [1:0] bank_idx,  // bank index inside the group
  input  tsv_ctrl_t  ctrl,      // c1..c4
  output logic       ctr_out    // 0: MoT_0, 1: MoT_1
);

  logic bit_sel;
  logic bit_pol;

  always_comb begin
    bit_sel = ctrl.c2 ? bank_idx[1] : bank_idx[0];
    bit_pol = ctrl.c1 ? ~bit_sel : bit_sel;
    ctr_out = ctrl.c4 ? ctrl.c3 : bit_pol;
  end

endmodule
