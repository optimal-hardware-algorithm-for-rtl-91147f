// tb_adm_step_logic: exhaustive truth table of the decision gates.
// Expected command, written as a table: with the counter away from 2, SR
// exactly when the two newest pulses differ; with the counter at 2, SL only
// for histories whose two newest pulses agree and whose oldest differs.
module tb_adm_step_logic;
  import adm_pkg::*;
  logic [2:0] sp;
  logic [1:0] cnt;
  step_cmd_e cmd;
  logic mode3;
  int checks = 0, failures = 0;

  // SR pattern per history value sp = 0..7, bit i of the constant = sp value i
  localparam logic [7:0] SR_2BIT = 8'b0011_1100;  // sp[2] != sp[1]
  localparam logic [7:0] SR_3BIT = 8'b1011_1101;  // not 001 and not 110

  adm_step_logic dut (.sp, .cnt, .cmd, .mode3);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_sr;
    for (int c = 0; c < 4; c++)
      for (int s = 0; s < 8; s++) begin
        sp = 3'(s); cnt = 2'(c);
        #1;
        exp_sr = (c == 2) ? SR_3BIT[s] : SR_2BIT[s];
        checks++;
        if ((cmd == STEP_SR) != exp_sr || mode3 != (c == 2)) begin
          failures++;
          $display("FAIL sp=%b cnt=%0d cmd=%0d mode3=%0d exp_sr=%0d", sp, c, cmd, mode3, exp_sr);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
