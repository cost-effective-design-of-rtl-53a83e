// Self-checking testbench for spm_bank (256-word instance).
//
// Fills the bank, then runs random reads and byte-masked writes against a
// reference array in the testbench. Read data must appear exactly on the
// clock edge after the read and hold while the bank is idle or writing.
module tb_spm_bank;
  import mot3d_pkg::*;

  localparam int WORDS = 256;

  int checks = 0, failures = 0;

  logic              clk = 0, en_i = 0, we_i = 0;
  logic [BE_W-1:0]   be_i = '0;
  logic [7:0]        addr_i = '0;
  logic [DATA_W-1:0] wdata_i = '0, rdata_o;
  logic [DATA_W-1:0] model [WORDS];

  spm_bank #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] last;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      en_i = 1; we_i = 1; be_i = '1; addr_i = 8'(a); wdata_i = $urandom;
      model[a] = wdata_i;
    end
    last = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en_i   = ($urandom % 4) != 0;
      we_i   = 1'($urandom);
      be_i   = 4'($urandom);
      addr_i = 8'($urandom);
      wdata_i = $urandom;
      @(posedge clk);
      #1;
      if (en_i && !we_i) begin
        check(rdata_o == model[addr_i], "read data one cycle later");
        last = rdata_o;
      end else if (t > 0) begin
        check(rdata_o == last, "read data held");
      end
      if (en_i && we_i)
        for (int b = 0; b < BE_W; b++)
          if (be_i[b]) model[addr_i][8*b +: 8] = wdata_i[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
