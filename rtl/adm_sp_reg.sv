// adm_sp_reg: the ADM pulse history register (SP).
//
// A serial shift-right register that keeps the last SP_W ADM pulses. On each
// rising edge with en high the present pulse d enters at the MSB and the
// oldest pulse drops out of the LSB, so q[SP_W-1] is the newest pulse and
// the two MSBs are the two most recent pulses. q_next is the value the
// register takes at the coming edge; the step decision reads it so that
// the present pulse takes part in the decision made at that same edge.
// Reset (asynchronous, active low) clears the history to zeros; the reset
// value is this design's choice.
module adm_sp_reg #(
  parameter int unsigned SP_W = adm_pkg::SP_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            d,
  output logic [SP_W-1:0] q,
  output logic [SP_W-1:0] q_next
);

  assign q_next = en ? {d, q[SP_W-1:1]} : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

endmodule
