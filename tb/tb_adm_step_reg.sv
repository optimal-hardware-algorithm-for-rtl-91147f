// tb_adm_step_reg: the step register doubles on SL and halves on SR, stays
// between 1 and 8, holds when not enabled and resets to 1. Random commands
// are compared with an integer step; the end stops are forced and counted.
module tb_adm_step_reg;
  import adm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  step_cmd_e cmd = STEP_SL;
  logic [3:0] q, q_next;
  int checks = 0, failures = 0;
  int model, n_floor = 0, n_top = 0;

  adm_step_reg #(.STEP_W(4)) dut (.clk, .rst_n, .en, .cmd, .q, .q_next);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nxt;
    #12;
    checks++; if (q != 4'd1) begin failures++; $display("FAIL reset q=%0d", q); end
    rst_n = 1; model = 1;
    repeat (1000) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      cmd = ($urandom % 2) ? STEP_SR : STEP_SL;
      #1;
      nxt = model;
      if (en && cmd == STEP_SL) begin if (model < 8) nxt = model * 2; else n_top++; end
      if (en && cmd == STEP_SR) begin if (model > 1) nxt = model / 2; else n_floor++; end
      checks++;
      if (int'(q_next) != nxt) begin failures++; $display("FAIL q_next=%0d exp=%0d", q_next, nxt); end
      @(posedge clk); #1;
      model = nxt;
      checks++;
      if (int'(q) != model) begin failures++; $display("FAIL q=%0d exp=%0d", q, model); end
    end
    checks++;
    if (n_floor == 0 || n_top == 0) begin failures++; $display("FAIL end stops not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
