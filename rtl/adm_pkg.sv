// adm_pkg: types and constants shared by the adaptive delta modem.
//
// The modem follows a 4-bit datapath: a 4-bit accumulator (AC), a 4-bit
// step register (STR) holding a power-of-two step, a 3-bit pulse history
// register (SP) and a 2-bit status counter. The widths here are those
// numbers. The step command type names the two shift commands of the step
// register: SL doubles the step, SR halves it.
package adm_pkg;

  localparam int unsigned ACC_W  = 4;  // accumulator, adder/subtracter and DAC width
  localparam int unsigned STEP_W = 4;  // step register width (one-hot step)
  localparam int unsigned SP_W   = 3;  // ADM pulse history register width
  localparam int unsigned CNT_W  = 2;  // status counter width

  // Status counter state at which the decision starts using all three
  // history bits.
  localparam logic [CNT_W-1:0] CNT_MODE3 = 2'b10;

  typedef enum logic {
    STEP_SL = 1'b0,  // shift left: the step doubles
    STEP_SR = 1'b1   // shift right: the step halves
  } step_cmd_e;

endpackage
