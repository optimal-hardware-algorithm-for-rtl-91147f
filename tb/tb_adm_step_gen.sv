// tb_adm_step_gen: the step generator against the integer reference model.
// First a directed run: after a 1 pulse, a long run of 0 pulses must give
// the step sequence 1 (crossing), 2, 1 (three-bit halving), 2, 4, 8, 4, 8,
// ... that is three doublings then one halving, repeating; a long run of
// 1 pulses must double up to 8 and stay there. Then random pulse streams
// with runs of various lengths and random enables.
module tb_adm_step_gen;
  import adm_pkg::*;
  import adm_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, d = 0;
  logic [3:0] step_apply, step;
  logic [2:0] sp;
  step_cmd_e cmd;
  logic mode3;
  int checks = 0, failures = 0;
  int n_mode3_sr = 0;
  adm_ref ref_m;

  adm_step_gen dut (.clk, .rst_n, .en, .d, .step_apply, .step, .sp, .cmd, .mode3);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one enabled or idle clock, checked against the model
  task automatic tick(input logic bit_d, input logic bit_en, input int exp_step = -1);
    @(negedge clk);
    d = bit_d; en = bit_en;
    #1;
    if (bit_en) ref_m.update(int'(bit_d));
    checks++;
    if (int'(step_apply) != ref_m.step || (bit_en && (cmd == STEP_SR) != (ref_m.halved || ref_m.floor_hold))
        || (bit_en && mode3 != ref_m.mode3)) begin
      failures++;
      $display("FAIL d=%0d en=%0d step_apply=%0d exp=%0d cmd=%0d mode3=%0d", bit_d, bit_en, step_apply, ref_m.step, cmd, mode3);
    end
    if (exp_step >= 0) begin
      checks++;
      if (int'(step_apply) != exp_step) begin
        failures++; $display("FAIL directed step=%0d exp=%0d", step_apply, exp_step);
      end
    end
    if (bit_en && mode3 && cmd == STEP_SR && sp_prev_agree()) n_mode3_sr++;
    @(posedge clk); #1;
    checks++;
    if (int'(step) != ref_m.step || sp != {1'(ref_m.h2), 1'(ref_m.h1), 1'(ref_m.h0)}) begin
      failures++; $display("FAIL step=%0d sp=%b exp %0d", step, sp, ref_m.step);
    end
  endtask

  function automatic bit sp_prev_agree();
    return d == sp[2];
  endfunction

  initial begin
    int runlen, b;
    ref_m = new(8, 15);
    #12 rst_n = 1;
    // directed: 1, then 0 run
    tick(1, 1, 1);     // crossing from the reset history, step stays at unity
    tick(0, 1, 1);     // crossing: halve
    tick(0, 1, 2);     // counter 1: double
    tick(0, 1, 1);     // counter 2, three-bit: halve
    tick(0, 1, 2);
    tick(0, 1, 4);
    tick(0, 1, 8);
    tick(0, 1, 4);     // counter 2 again after wrap: halve
    tick(0, 1, 8);
    tick(0, 1, 8);     // end stop
    tick(0, 1, 8);
    tick(0, 1, 4);
    // 1 run: crossing then doubling to the end stop, no halving
    tick(1, 1, 2);
    tick(1, 1, 4);
    tick(1, 1, 8);
    tick(1, 1, 8);
    tick(1, 1, 8);
    tick(1, 1, 8);
    tick(1, 0, 8);     // idle clock keeps state
    // alternating: step falls to unity and stays
    repeat (6) tick(0, 1); tick(1, 1); tick(0, 1); tick(1, 1); tick(0, 1, 1);
    // random runs
    repeat (300) begin
      runlen = 1 + ($urandom % 7);
      b = $urandom % 2;
      repeat (runlen) tick(1'(b), ($urandom % 8) != 0);
    end
    checks++;
    if (n_mode3_sr == 0) begin failures++; $display("FAIL three-bit halving never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
