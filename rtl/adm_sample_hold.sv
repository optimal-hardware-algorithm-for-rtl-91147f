// adm_sample_hold: behavioural model of the input sample-and-hold.
//
// Behavioural model, not synthesizable logic: the real part is an analog
// sample-and-hold. It takes the analog input vin at each rising clock edge
// and holds it on vs until the next edge, giving the sampled signal vi(nT)
// that the comparator sees. Reset (asynchronous, active low) holds 0 V.
// Ideal sampling (no droop, no aperture delay) is this design's choice.
module adm_sample_hold (
  input  logic clk,
  input  logic rst_n,
  input  real  vin,
  output real  vs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vs <= 0.0;
    else        vs <= vin;
  end

endmodule
