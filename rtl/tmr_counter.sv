// tmr_counter: triplicated scrub address counter ("Triplicated counter",
// "Triple CNT").
//
// Three copies of a W-bit counter. Every copy loads the majority vote of all
// three copies each clock, plus one when its own enable is high, so a copy
// upset by a single event falls back in step with the other two on the next
// clock: the scrub address counters are kept in sync. Each copy has its own
// enable, driven by its own scrub FSM; the FSMs raise it every second clock,
// which makes the scrub address run at half the block RAM clock. The counter
// wraps from 2**W-1 to 0. Synchronous reset to 0 (reset is shared, not
// triplicated). Voting inside the counter is this design's way of keeping
// the copies in sync.
module tmr_counter
  import ftim_pkg::*;
#(
  parameter int unsigned W = ADDR_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [2:0]          en,
  output logic [2:0][W-1:0]   q
);
  logic [2:0][W-1:0] voted;

  for (genvar i = 0; i < 3; i++) begin : g_copy
    tmr_voter #(.W(W)) u_vote (.a(q[0]), .b(q[1]), .c(q[2]), .y(voted[i]));

    always_ff @(posedge clk) begin
      if (rst)        q[i] <= '0;
      else if (en[i]) q[i] <= voted[i] + W'(1);
      else            q[i] <= voted[i];
    end
  end
endmodule
