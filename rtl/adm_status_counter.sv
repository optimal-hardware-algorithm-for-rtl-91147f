// adm_status_counter: the 2-bit status counter of the step generator.
//
// On each rising edge with en high, an ADM pulse of 1 clears the counter
// (a fresh count starts) and a pulse of 0 increments it. After two
// successive 0 pulses it holds '10', so while the third successive 0 pulse
// is decided the step logic uses all three history bits. The counter is a
// plain binary counter and wraps from '11' to '00'; wrapping rather than
// holding is this design's choice. Reset is asynchronous, active low, to 0.
module adm_status_counter #(
  parameter int unsigned CNT_W = adm_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             d,
  output logic [CNT_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d ? '0 : q + 1'b1;
  end

endmodule
