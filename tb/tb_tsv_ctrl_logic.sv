// Self-checking testbench for tsv_ctrl_logic.
//
// Applies all 16 settings of c1..c4 with all four in-group bank indexes and
// compares ctr_out with the bank-to-MoT mapping table of the design, written
// here as a table of which bank indexes reach MoT_0 (c3 is a don't-care when
// c4 is low, c1/c2 are don't-cares when c4 is high).
module tb_tsv_ctrl_logic;
  import mot3d_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] bank_idx;
  tsv_ctrl_t  ctrl;
  logic       ctr_out;

  tsv_ctrl_logic dut (.bank_idx(bank_idx), .ctrl(ctrl), .ctr_out(ctr_out));

  // Bit b set: bank index b is connected to MoT_0.
  function automatic logic [3:0] mot0_set(tsv_ctrl_t c);
    if (c.c4) return c.c3 ? 4'b0000 : 4'b1111;
    case ({c.c2, c.c1})
      2'b00:   return 4'b0101;  // 00, 10
      2'b01:   return 4'b1010;  // 01, 11
      2'b10:   return 4'b0011;  // 00, 01
      default: return 4'b1100;  // 10, 11
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int b = 0; b < 4; b++) begin
        logic [3:0] s;
        ctrl     = tsv_ctrl_t'(c);
        bank_idx = 2'(b);
        #1;
        s = mot0_set(ctrl);
        checks++;
        if (ctr_out !== ~s[b]) begin
          failures++;
          $display("FAIL c4..c1=%b bank %0d: ctr_out=%b", ctrl, b, ctr_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
