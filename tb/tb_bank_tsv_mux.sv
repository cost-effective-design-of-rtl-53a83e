// Self-checking testbench for bank_tsv_mux (bank 2 of its group).
//
// Random requests on both TSV buses and a random bus select: the bank is
// enabled only for a valid request on the selected bus that carries this
// bank's in-group index, and then receives that request's write enable, byte
// enables, word address and write data.
module tb_bank_tsv_mux;
  import mot3d_pkg::*;

  localparam int BANK_ID = 2, IDX_LSB = 16, AW = 14;

  int checks = 0, failures = 0, takes = 0;

  logic              bus_sel_i, valid0_i, valid1_i, take_o, en_o, we_o;
  mot_req_t          req0_i, req1_i;
  logic [BE_W-1:0]   be_o;
  logic [AW-1:0]     addr_o;
  logic [DATA_W-1:0] wdata_o;

  bank_tsv_mux #(.BANK_ID(BANK_ID), .IDX_LSB(IDX_LSB), .AW(AW)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      mot_req_t r;
      logic v, hit;
      bus_sel_i = 1'($urandom);
      valid0_i  = 1'($urandom);
      valid1_i  = 1'($urandom);
      req0_i    = {$urandom, $urandom, $urandom};
      req1_i    = {$urandom, $urandom, $urandom};
      if ($urandom % 2) req0_i.addr[IDX_LSB +: 2] = 2'(BANK_ID);
      if ($urandom % 2) req1_i.addr[IDX_LSB +: 2] = 2'(BANK_ID);
      #1;
      r   = bus_sel_i ? req1_i : req0_i;
      v   = bus_sel_i ? valid1_i : valid0_i;
      hit = v && (r.addr[17:16] == 2'(BANK_ID));
      if (hit) takes++;
      check(take_o == hit && en_o == hit, "bank enable");
      if (hit) begin
        check(we_o == r.we && be_o == r.be, "control");
        check(addr_o == r.addr[15:2], "word address");
        check(wdata_o == r.wdata, "write data");
      end
    end
    check(takes > 100, "requests taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
