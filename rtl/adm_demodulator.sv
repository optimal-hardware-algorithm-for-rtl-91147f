// adm_demodulator: the adaptive delta demodulator (receiver).
//
// Runs the same step algorithm as the transmitter on the received ADM
// pulses: each pulse shifts into its own step generator and is the ADD/SUB
// command of its adder/subtracter, 1 adding the step to the accumulator and
// 0 subtracting it. Started from the same reset state and fed the same pulse
// train, its accumulator follows exactly the values of the transmitter's,
// and the DAC turns it back into the analog signal vout.
//
// Timing: one received pulse is taken at each rising edge at which
// adm_valid is high (edges with adm_valid low leave all state alone); acc
// and step change at that edge and vout follows at once. No output
// smoothing filter is built. The blocks follow the published receiver;
// reset, the valid strobe and the timing are this design's choice.
module adm_demodulator
  import adm_pkg::*;
#(
  parameter real VREF = 5.0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adm_in,
  input  logic              adm_valid,
  output logic [ACC_W-1:0]  acc,
  output logic [STEP_W-1:0] step,
  output real               vout
);

  logic [STEP_W-1:0] step_apply;
  logic [ACC_W-1:0]  acc_next;
  logic              ovf;
  logic [SP_W-1:0]   sp;
  step_cmd_e         cmd;
  logic              mode3;

  adm_step_gen u_step (
    .clk, .rst_n, .en(adm_valid), .d(adm_in),
    .step_apply, .step, .sp, .cmd, .mode3
  );

  adm_addsub #(.W(ACC_W)) u_as (
    .a(acc), .b(step_apply), .add(adm_in), .y(acc_next), .ovf
  );

  adm_accumulator #(.W(ACC_W)) u_ac (
    .clk, .rst_n, .en(adm_valid), .d(acc_next), .q(acc)
  );

  adm_dac #(.W(ACC_W), .VREF(VREF)) u_dac (.code(acc), .vout);

endmodule
