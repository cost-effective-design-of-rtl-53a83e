// Bank-side TSV bus multiplexer: connects one SPM bank to one of the two TSV
// buses of its bank group.
//
// bus_sel_i (0: the bus from MoT_0, 1: the bus from MoT_1) comes from the same
// control logic and control signals that steer the cores' requests, evaluated
// for this bank's own index BANK_ID, so the bank listens exactly to the bus
// its requests are sent on. A request on the selected bus is taken when its
// bank-within-group bits addr[IDX_LSB +: 2] equal BANK_ID; the bank then gets
// an enable, the write enable, the byte enables, the word address
// addr[2 +: AW] and the write data. take_o reports that the request was
// taken, so the bus can be granted. Combinational.
module bank_tsv_mux
  import mot3d_pkg::*;
#(
  parameter int unsigned BANK_ID = 0,
  parameter int unsigned IDX_LSB = 16,
  parameter int unsigned AW      = 14
) (
  input  logic              bus_sel_i,
  input  logic              valid0_i,
  input  mot_req_t          req0_i,
  input  logic              valid1_i,
  input  mot_req_t          req1_i,
  output logic              take_o,
  output logic              en_o,
  output logic              we_o,
  output logic [BE_W-1:0]   be_o,
  output logic [AW-1:0]     addr_o,
  output logic [DATA_W-1:0] wdata_o
);

  logic     v;
  mot_req_t r;

  always_comb begin
    v       = bus_sel_i ? valid1_i : valid0_i;
    r       = bus_sel_i ? req1_i   : req0_i;
    take_o  = v && (r.addr[IDX_LSB +: 2] == 2'(BANK_ID));
    en_o    = take_o;
    we_o    = r.we;
    be_o    = r.be;
    addr_o  = r.addr[2 +: AW];
    wdata_o = r.wdata;
  end

endmodule
