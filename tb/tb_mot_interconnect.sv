// Self-checking testbench for mot_interconnect, at the 4x8 size (4 inputs,
// 8 outputs; 28 routing and 24 arbitration switches).
//
// Each input behaves like a core: it holds a random request (random output
// index in addr[20:18], its own number in the write data) until granted. The
// outputs behave like memory banks that take every request and answer one
// cycle later with data computed from the request. Checked every cycle:
// every output carries a request of an input that asks for it, at most one
// input is granted per output, the granted input's packet is the one on the
// output, every input asking for a busy output other than the winner waits,
// responses come back to the right input exactly one cycle after the grant,
// a request to an idle output is granted in the cycle it is presented, and
// no input waits longer than N_IN-1 cycles (round-robin fairness).
module tb_mot_interconnect;
  import mot3d_pkg::*;

  localparam int N_IN = 4, N_OUT = 8, SEL_LSB = 18;

  int checks = 0, failures = 0;
  int conflicts = 0, zero_load = 0;

  logic              clk = 0, rst_n = 0;
  logic [N_IN-1:0]   in_valid, in_gnt, in_rvalid;
  mot_req_t          in_req   [N_IN];
  logic [DATA_W-1:0] in_rdata [N_IN];
  logic [N_OUT-1:0]  out_valid, out_gnt, out_rvalid;
  mot_req_t          out_req   [N_OUT];
  logic [DATA_W-1:0] out_rdata [N_OUT];

  mot_interconnect #(.N_IN(N_IN), .N_OUT(N_OUT), .SEL_LSB(SEL_LSB)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid_i(in_valid), .in_req_i(in_req), .in_gnt_o(in_gnt),
    .in_rvalid_o(in_rvalid), .in_rdata_o(in_rdata),
    .out_valid_o(out_valid), .out_req_o(out_req), .out_gnt_i(out_gnt),
    .out_rvalid_i(out_rvalid), .out_rdata_i(out_rdata)
  );

  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] answer(mot_req_t r);
    return r.addr ^ {r.wdata[15:0], r.wdata[31:16]} ^ 32'h5a5a_0f0f;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dest_of(mot_req_t r);
    return int'(r.addr[SEL_LSB +: 3]);
  endfunction

  function automatic mot_req_t new_req(int i);
    mot_req_t r;
    r.we    = 1'($urandom);
    r.be    = 4'($urandom);
    r.addr  = $urandom;
    r.wdata = {8'(i), 24'($urandom)};
    return r;
  endfunction

  // banks: answer one cycle after each grant
  logic [N_OUT-1:0]  pend_v;
  logic [DATA_W-1:0] pend_d [N_OUT];
  // inputs: expected response
  logic [N_IN-1:0]   exp_v;
  logic [DATA_W-1:0] exp_d [N_IN];
  int                wait_cnt [N_IN];
  logic [N_IN-1:0]   fresh;
  logic [N_OUT-1:0]  nxt_pend_v;
  logic [N_IN-1:0]   nxt_gnt;

  initial begin
    int lone;
    in_valid = '0; out_gnt = '1; out_rvalid = '0; pend_v = '0; exp_v = '0;
    for (int j = 0; j < N_OUT; j++) begin out_rdata[j] = '0; pend_d[j] = '0; end
    for (int i = 0; i < N_IN; i++) begin in_req[i] = new_req(i); wait_cnt[i] = 0; end
    fresh = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // new requests for idle inputs (sparse phase first, then heavy load)
      for (int i = 0; i < N_IN; i++) begin
        if (!in_valid[i]) begin
          in_valid[i] = (t < 300) ? (($urandom % 6) == 0) : (($urandom % 4) != 0);
          in_req[i]   = new_req(i);
          fresh[i]    = in_valid[i];
          // heavy phase: crowd most requests onto two outputs
          if (t >= 1500) in_req[i].addr[SEL_LSB +: 3] = 3'($urandom % 2);
        end
      end
      out_rvalid = pend_v;
      for (int j = 0; j < N_OUT; j++) out_rdata[j] = pend_d[j];
      #1;
      // responses
      for (int i = 0; i < N_IN; i++) begin
        check(in_rvalid[i] == exp_v[i], $sformatf("response timing in%0d got %b exp %b orv=%b", i, in_rvalid[i], exp_v[i], out_rvalid));
        if (exp_v[i]) check(in_rdata[i] == exp_d[i], "response data");
      end
      // requests
      for (int j = 0; j < N_OUT; j++) begin
        int askers;
        askers = 0;
        for (int i = 0; i < N_IN; i++)
          if (in_valid[i] && dest_of(in_req[i]) == j) askers++;
        check(out_valid[j] == (askers > 0), "output valid");
        if (askers > 1) conflicts++;
        if (out_valid[j]) begin
          int w;
          w = int'(out_req[j].wdata[31:24]);
          check(w < N_IN && in_valid[w] && dest_of(in_req[w]) == j && out_req[j] == in_req[w],
                "output carries a real request");
          for (int i = 0; i < N_IN; i++)
            if (in_valid[i] && dest_of(in_req[i]) == j)
              check(in_gnt[i] == (i == w), "grant goes to the forwarded input");
        end
      end
      // zero-load: alone on its output -> granted at once
      for (int i = 0; i < N_IN; i++) begin
        if (in_valid[i]) begin
          lone = 1;
          for (int k = 0; k < N_IN; k++)
            if (k != i && in_valid[k] && dest_of(in_req[k]) == dest_of(in_req[i])) lone = 0;
          if (lone == 1 && fresh[i]) begin
            zero_load++;
            check(in_gnt[i], "single-cycle grant at zero load");
          end
        end
        check(in_gnt[i] == 0 || in_valid[i], "grant without request");
      end
      // sample grants before the clock edge, apply after it
      nxt_pend_v = '0;
      for (int j = 0; j < N_OUT; j++)
        if (out_valid[j] && out_gnt[j]) begin
          nxt_pend_v[j] = 1;
          pend_d[j] = answer(out_req[j]);
        end
      nxt_gnt = in_gnt & in_valid;
      @(posedge clk);
      #1;
      pend_v = nxt_pend_v;
      exp_v = '0;
      for (int i = 0; i < N_IN; i++) begin
        fresh[i] = 0;
        if (nxt_gnt[i]) begin
          exp_v[i] = 1;
          exp_d[i] = answer(in_req[i]);
          in_valid[i] = 0;
          wait_cnt[i] = 0;
        end else if (in_valid[i]) begin
          wait_cnt[i]++;
          check(wait_cnt[i] < N_IN, "round-robin bound on waiting");
        end
      end
    end
    check(conflicts > 100 && zero_load > 50, "contention and zero-load cases happened");
    $display("conflict cycles=%0d zero-load grants=%0d", conflicts, zero_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
