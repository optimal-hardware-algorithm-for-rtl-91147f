// adm_step_logic: the XOR decision gates that command the step register.
//
// Combinational. sp is the pulse history including the present pulse
// (sp[2] newest); cnt is the status counter before the present pulse
// updates it.
//   Two-bit decision (counter not at '10'): the XOR of the two most recent
//   pulses. If they differ the input was crossed and the step is halved
//   (SR); if they agree the step is doubled (SL).
//   Three-bit decision (counter at '10'): all three bits take part. SR when
//   the two newest differ or all three are equal, SL otherwise.
// The counter only reaches '10' after two successive 0 pulses, so in a long
// run of 0 pulses the step doubles three times, is halved once, and the
// doubling resumes. The exact gate equation of the three-bit case is this
// design's reading of the selective two/three-bit operation.
module adm_step_logic
  import adm_pkg::*;
(
  input  logic [SP_W-1:0]  sp,
  input  logic [CNT_W-1:0] cnt,
  output step_cmd_e        cmd,
  output logic             mode3
);

  logic cross_new;   // the two newest pulses differ
  logic cross_old;   // the two older pulses differ
  logic sr;

  always_comb begin
    cross_new = sp[2] ^ sp[1];
    cross_old = sp[1] ^ sp[0];
    mode3     = (cnt == CNT_MODE3);
    if (mode3) sr = cross_new | ~(cross_new | cross_old);
    else       sr = cross_new;
    cmd = sr ? STEP_SR : STEP_SL;
  end

endmodule
