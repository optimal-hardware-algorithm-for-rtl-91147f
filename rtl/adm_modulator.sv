// adm_modulator: the adaptive delta modulator (transmitter).
//
// A delta loop: the sample-and-hold gives vi(nT); the comparator sets the
// present ADM pulse to 1 when that sample is above the analog equivalent of
// the accumulator, from the DAC. At each rising edge the pulse is
// registered as adm_out (the bit sent), fed to the step generator, and used
// as the ADD/SUB command of the adder/subtracter: 1 adds the new step to
// the accumulator AC, 0 subtracts it. The accumulator thus climbs or falls
// towards the input with a step that doubles while no crossing happens and
// halves at each crossing (see adm_step_gen).
//
// adm_valid is low from reset until the first pulse has been registered, so
// that a receiver does not take the reset value of adm_out for a pulse.
//
// Timing: one pulse per clock. The decision taken at edge n compares the
// sample and the accumulator held since edge n-1; adm_out, acc and step
// all change at edge n. The blocks and their connection follow the
// published transmitter; the clocking of the analog parts and the valid
// strobe are this design's choice.
module adm_modulator
  import adm_pkg::*;
#(
  parameter real VREF = 5.0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               vin,
  output logic              adm_out,
  output logic              adm_valid,
  output logic [ACC_W-1:0]  acc,
  output logic [STEP_W-1:0] step,
  output real               vacc
);

  real               vs;
  logic              pulse;
  logic [STEP_W-1:0] step_apply;
  logic [ACC_W-1:0]  acc_next;
  logic              ovf;
  logic [SP_W-1:0]   sp;
  step_cmd_e         cmd;
  logic              mode3;

  adm_sample_hold u_sh (.clk, .rst_n, .vin, .vs);

  adm_dac #(.W(ACC_W), .VREF(VREF)) u_dac (.code(acc), .vout(vacc));

  adm_comparator u_cmp (.vp(vs), .vn(vacc), .out(pulse));

  adm_step_gen u_step (
    .clk, .rst_n, .en(1'b1), .d(pulse),
    .step_apply, .step, .sp, .cmd, .mode3
  );

  adm_addsub #(.W(ACC_W)) u_as (
    .a(acc), .b(step_apply), .add(pulse), .y(acc_next), .ovf
  );

  adm_accumulator #(.W(ACC_W)) u_ac (
    .clk, .rst_n, .en(1'b1), .d(acc_next), .q(acc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adm_out   <= 1'b0;
      adm_valid <= 1'b0;
    end else begin
      adm_out   <= pulse;
      adm_valid <= 1'b1;
    end
  end

endmodule
