// tb_adm_modulator: the transmitter loop against the reference model.
// The input is a sequence of constant levels, sudden jumps and a triangle
// wave. Each clock the testbench predicts the pulse from the sample held
// since the previous edge and the model accumulator, advances the model,
// and checks adm_out, adm_valid, the accumulator, the step and the DAC
// voltage. Input levels sit off the DAC grid so that no comparison is a
// floating-point tie.
module tb_adm_modulator;
  import adm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  real vin = 0.0, vacc;
  logic adm_out, adm_valid;
  logic [3:0] acc, step;
  int checks = 0, failures = 0;
  int n_mode3 = 0, n_cross = 0, n_clamp = 0;
  adm_ref ref_m;
  localparam real VREF = 5.0;
  localparam real LSB  = VREF / 16.0;

  adm_modulator #(.VREF(VREF)) dut (.clk, .rst_n, .vin, .adm_out, .adm_valid, .acc, .step, .vacc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ref_vs;
  bit  exp_adm, exp_valid;

  // one clock, entered between a falling and a rising edge: vin_new is
  // applied now and sampled at the coming rising edge
  task automatic tick(input real vin_new);
    bit p;
    p = ref_vs > real'(ref_m.acc) * LSB;
    ref_m.update(int'(p));
    if (ref_m.mode3 && ref_m.halved) n_mode3++;
    if (ref_m.halved && !ref_m.mode3) n_cross++;
    if (ref_m.clamped) n_clamp++;
    exp_adm = p; exp_valid = 1;
    ref_vs = vin_new;
    vin = vin_new;
    @(posedge clk); #1;
    checks++;
    if (adm_out != exp_adm || adm_valid != exp_valid || int'(acc) != ref_m.acc || int'(step) != ref_m.step
        || vacc < ref_m.acc * LSB - 1e-9 || vacc > ref_m.acc * LSB + 1e-9) begin
      failures++;
      $display("FAIL t=%0t adm=%0d/%0d valid=%0d acc=%0d/%0d step=%0d/%0d", $time, adm_out, exp_adm,
               adm_valid, acc, ref_m.acc, step, ref_m.step);
    end
    @(negedge clk);
  endtask

  initial begin
    real lvl;
    ref_m = new(8, 15);
    ref_vs = 0.0;
    #12;
    checks++;
    if (adm_valid != 0 || acc != 0 || step != 1) begin failures++; $display("FAIL reset state"); end
    rst_n = 1;   // between edges: the next rising edge is the first one
    // constant levels and sudden jumps
    repeat (20) tick(2.0 + 0.013);
    repeat (20) tick(4.9);
    repeat (20) tick(0.05);
    repeat (20) tick(3.3 + 0.007);
    // triangle wave: 0.2 V .. 4.8 V, 0.1 V per clock
    repeat (4) begin
      for (int i = 0; i <= 46; i++) tick(0.2 + 0.1 * i + 0.003);
      for (int i = 46; i >= 0; i--) tick(0.2 + 0.1 * i + 0.003);
    end
    checks++;
    if (n_mode3 == 0 || n_cross == 0 || n_clamp == 0) begin
      failures++; $display("FAIL mechanisms mode3=%0d cross=%0d clamp=%0d", n_mode3, n_cross, n_clamp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
