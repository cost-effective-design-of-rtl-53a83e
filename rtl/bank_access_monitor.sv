// Hardware access monitor: one saturating counter per SPM bank, counting the
// cycles in which the bank performs an access.
//
// The counts are the access-frequency profile from which the control signals
// c1..c4 of each bank group are chosen to balance the traffic on the two TSV
// buses (the choice itself is made by software). clear_i (synchronous)
// restarts profiling; reset clears all counters. Counters are CNT_W bits
// wide and stop at their maximum. Counter width and saturation are this
// design's choices.
module bank_access_monitor #(
  parameter int unsigned N_BANK = 64,
  parameter int unsigned CNT_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear_i,
  input  logic [N_BANK-1:0] access_i,
  output logic [CNT_W-1:0]  cnt_o [N_BANK]
);

  always_ff @(posedge clk) begin
    for (int b = 0; b < N_BANK; b++) begin
      if (!rst_n || clear_i)
        cnt_o[b] <= '0;
      else if (access_i[b] && (cnt_o[b] != '1))
        cnt_o[b] <= cnt_o[b] + 1'b1;
    end
  end

endmodule
