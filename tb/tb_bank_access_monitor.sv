// Self-checking testbench for bank_access_monitor (8 banks, 4-bit counters).
//
// Random per-bank access pulses are counted by a reference model; the
// counters must match it every cycle, stop at their maximum (15) and return
// to zero on clear and on reset.
module tb_bank_access_monitor;

  localparam int N_BANK = 8, CNT_W = 4;

  int checks = 0, failures = 0, saturated = 0;

  logic              clk = 0, rst_n = 0, clear_i = 0;
  logic [N_BANK-1:0] access_i = '0;
  logic [CNT_W-1:0]  cnt_o [N_BANK];
  int                model [N_BANK];

  bank_access_monitor #(.N_BANK(N_BANK), .CNT_W(CNT_W)) dut (.*);

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
    for (int b = 0; b < N_BANK; b++) model[b] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < N_BANK; b++) check(cnt_o[b] == 0, "reset value");
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      access_i = N_BANK'($urandom) & N_BANK'($urandom);
      clear_i  = ($urandom % 60) == 0;
      @(posedge clk);
      #1;
      for (int b = 0; b < N_BANK; b++) begin
        if (clear_i) model[b] = 0;
        else if (access_i[b] && model[b] < 15) model[b]++;
        if (model[b] == 15) saturated++;
        check(int'(cnt_o[b]) == model[b], "count");
      end
    end
    check(saturated > 0, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
