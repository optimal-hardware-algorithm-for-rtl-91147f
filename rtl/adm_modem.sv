// adm_modem: adaptive delta modem, transmitter and receiver joined.
//
// The modulator codes the analog input vin into one ADM pulse per clock
// (adm_tx, with adm_valid marking the clocks that carry a pulse); the
// pulse line is wired straight to the demodulator, whose accumulator
// rebuilds the transmitter's accumulated signal and whose DAC
// gives it back as vout. Both ends run the same step algorithm from the
// same reset state, so rx_acc equals tx_acc one clock later, and rx_step
// equals tx_step one clock later. The accumulators and steps are brought
// out for observation. The direct wire between the ends stands for the
// transmission channel, which is outside this design; the valid strobe is
// this design's addition.
module adm_modem
  import adm_pkg::*;
#(
  parameter real VREF = 5.0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               vin,
  output logic              adm_tx,
  output logic              adm_valid,
  output logic [ACC_W-1:0]  tx_acc,
  output logic [STEP_W-1:0] tx_step,
  output logic [ACC_W-1:0]  rx_acc,
  output logic [STEP_W-1:0] rx_step,
  output real               vout
);

  real vacc;

  adm_modulator #(.VREF(VREF)) u_mod (
    .clk, .rst_n, .vin, .adm_out(adm_tx), .adm_valid, .acc(tx_acc), .step(tx_step), .vacc
  );

  adm_demodulator #(.VREF(VREF)) u_demod (
    .clk, .rst_n, .adm_in(adm_tx), .adm_valid, .acc(rx_acc), .step(rx_step), .vout
  );

endmodule
