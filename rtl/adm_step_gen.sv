// adm_step_gen: the step generator of the adaptive delta modem.
//
// Turns the stream of ADM pulses into the step to be added to or subtracted
// from the accumulator. It joins the pulse history register (SP), the
// status counter, the XOR decision gates and the step register (STR). On
// each rising edge with en high:
//   - the present pulse d shifts into SP;
//   - the gates look at SP (with d in it) and the counter and issue SL
//     (double the step) or SR (halve it, never below unity);
//   - the counter clears on d = 1 and counts on d = 0.
// step_apply is the step STR takes at this edge; the accumulator adds or
// subtracts it at the same edge, so the halved step is the one applied at
// a crossover. step is the registered STR value and sp the pulse history.
// The structure and the counter follow the published design; the
// single-edge timing is this design's choice.
module adm_step_gen
  import adm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              d,
  output logic [STEP_W-1:0] step_apply,
  output logic [STEP_W-1:0] step,
  output logic [SP_W-1:0]   sp,
  output step_cmd_e         cmd,
  output logic              mode3
);

  logic [SP_W-1:0]  sp_q, sp_next;
  logic [CNT_W-1:0] cnt;

  assign sp = sp_q;

  adm_sp_reg #(.SP_W(SP_W)) u_sp (
    .clk, .rst_n, .en, .d, .q(sp_q), .q_next(sp_next)
  );

  adm_status_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .en, .d, .q(cnt)
  );

  adm_step_logic u_logic (
    .sp(sp_next), .cnt, .cmd, .mode3
  );

  adm_step_reg #(.STEP_W(STEP_W)) u_str (
    .clk, .rst_n, .en, .cmd, .q(step), .q_next(step_apply)
  );

endmodule
