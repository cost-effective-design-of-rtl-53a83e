// One bank of the stacked L2 scratchpad memory (SPM): a single-port SRAM of
// WORDS x 32 bits, 64 KB at the default size.
//
// The array has only decoding and column logic around it: when en_i is high
// the word at addr_i is written (byte lanes enabled by be_i) if we_i is high,
// and is read otherwise. Read data appear on rdata_o on the clock edge after
// the request and hold until the next read. The SRAM cells are not reset.
// The size is the design's; the 32-bit word, byte enables and the one-cycle
// synchronous read are this design's choices.
module spm_bank
  import mot3d_pkg::*;
#(
  parameter int unsigned WORDS = 16384,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              en_i,
  input  logic              we_i,
  input  logic [BE_W-1:0]   be_i,
  input  logic [AW-1:0]     addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic [DATA_W-1:0] rdata_o
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en_i) begin
      if (we_i) begin
        for (int b = 0; b < BE_W; b++)
          if (be_i[b]) mem[addr_i][8*b +: 8] <= wdata_i[8*b +: 8];
      end else begin
        rdata_o <= mem[addr_i];
      end
    end
  end

endmodule
