// Shared types for the 3-D mesh-of-trees (MoT) L2 scratchpad interconnect.
//
// A core request travels through the interconnect as one packed packet:
// write enable, byte enables, the full 32-bit byte address and write data.
// Every switch forwards the whole packet; each tree level looks only at the
// address bit that concerns it. The address layout follows the memory map of
// the design: {tag, bank index, offset}, with 64 KB per bank, so the byte
// offset is addr[15:0] and the bank index starts at bit 16. The two lowest
// bank-index bits pick a bank inside a bank group, the bits above pick the
// group (and with it the MoT output and TSV bus). The 32-bit data width and
// the byte enables are this design's choice.
//
// tsv_ctrl_t holds the four static control signals c1..c4 of the modified
// routing switch (one set per bank group in this design).
package mot3d_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned BE_W   = DATA_W / 8;

  typedef struct packed {
    logic              we;     // 1: write, 0: read
    logic [BE_W-1:0]   be;     // byte enables for writes
    logic [ADDR_W-1:0] addr;   // byte address {tag, bank index, offset}
    logic [DATA_W-1:0] wdata;  // write data
  } mot_req_t;

  // Control signals of the modified routing switch, named as in the
  // mapping table: c4 = force, c3 = forced MoT, c2 = which bank-index bit,
  // c1 = invert that bit.
  typedef struct packed {
    logic c4;
    logic c3;
    logic c2;
    logic c1;
  } tsv_ctrl_t;

endpackage
