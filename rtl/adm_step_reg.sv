// adm_step_reg: the step register (STR).
//
// Holds the present step as a one-hot power of two (1, 2, 4, 8 for the
// 4-bit register). On a rising edge with en high, the command SL shifts it
// left (the step doubles) and SR shifts it right (the step halves). The
// step never falls below unity: SR at 1 keeps 1. It never shifts out of the
// top either: SL at the largest step keeps it; that end stop is this
// design's choice. q_next is the value taken at the coming edge, which the
// adder/subtracter uses so that a new step is applied at once. Reset
// (asynchronous, active low) sets the step to unity.
module adm_step_reg #(
  parameter int unsigned STEP_W = adm_pkg::STEP_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  adm_pkg::step_cmd_e cmd,
  output logic [STEP_W-1:0] q,
  output logic [STEP_W-1:0] q_next
);

  localparam logic [STEP_W-1:0] UNITY = STEP_W'(1);

  always_comb begin
    q_next = q;
    if (en) begin
      if (cmd == adm_pkg::STEP_SL) begin
        if (!q[STEP_W-1]) q_next = q << 1;
      end else begin
        if (!q[0])        q_next = q >> 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= UNITY;
    else        q <= q_next;
  end

  // The step stays one-hot.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(q));

endmodule
