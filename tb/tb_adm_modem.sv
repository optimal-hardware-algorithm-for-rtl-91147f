// tb_adm_modem: end-to-end test of the modem at its default parameters.
//
// Inputs, in order: constant levels; sudden jumps across the range (the
// slope-overload case); a triangle wave inside the range and one driven
// past both ends. Every clock the transmitter's pulse, accumulator and step
// are checked against the reference model, and the receiver against the
// transmitter one clock earlier: same accumulator, same step, and a DAC
// voltage of rx_acc * VREF / 16. The testbench counts each mechanism of the
// step algorithm as it happens in the transmitter: doubling, halving at a
// crossing, halving by the three-bit decision, the unity floor, the top end
// stop, accumulator clamping, the status counter clearing and wrapping, and
// the receiver idling while adm_valid is low. A mechanism never seen counts
// a failure. It also reports the mean tracking error on the triangle.
module tb_adm_modem;
  import adm_pkg::*;
  import adm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  real vin = 0.0, vout;
  logic adm_tx, adm_valid;
  logic [3:0] tx_acc, tx_step, rx_acc, rx_step;
  int checks = 0, failures = 0;
  adm_ref ref_m;
  localparam real VREF = 5.0;   // the modem's default
  localparam real LSB  = VREF / 16.0;

  adm_modem dut (.clk, .rst_n, .vin, .adm_tx, .adm_valid, .tx_acc, .tx_step, .rx_acc, .rx_step, .vout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from the transmitter's own signals
  int n_double = 0, n_cross_half = 0, n_mode3_half = 0, n_floor = 0, n_top = 0;
  int n_clamp = 0, n_clear = 0, n_wrap = 0, n_rx_idle = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mod.u_step.cmd == STEP_SL && dut.u_mod.u_step.step_apply != dut.u_mod.step) n_double++;
    if (dut.u_mod.u_step.cmd == STEP_SR && dut.u_mod.u_step.step_apply != dut.u_mod.step) begin
      if (dut.u_mod.u_step.mode3 && dut.u_mod.u_step.sp_next[2] == dut.u_mod.u_step.sp_next[1]) n_mode3_half++;
      else n_cross_half++;
    end
    if (dut.u_mod.u_step.cmd == STEP_SR && dut.u_mod.step == 4'd1) n_floor++;
    if (dut.u_mod.u_step.cmd == STEP_SL && dut.u_mod.step == 4'd8) n_top++;
    if (dut.u_mod.u_as.ovf) n_clamp++;
    if (dut.u_mod.pulse && dut.u_mod.u_step.u_cnt.q != 2'd0) n_clear++;
    if (!dut.u_mod.pulse && dut.u_mod.u_step.u_cnt.q == 2'd3) n_wrap++;
    if (!adm_valid) n_rx_idle++;
  end

  real ref_vs;
  int  prev_acc, prev_step;
  real err_sum;
  int  err_n;
  bit  measure;

  task automatic tick(input real vin_new);
    bit p;
    real ev;
    p = ref_vs > real'(ref_m.acc) * LSB;
    prev_acc = ref_m.acc; prev_step = ref_m.step;
    ref_m.update(int'(p));
    ref_vs = vin_new;
    vin = vin_new;
    @(posedge clk); #1;
    checks++;
    if (adm_tx != p || !adm_valid || int'(tx_acc) != ref_m.acc || int'(tx_step) != ref_m.step) begin
      failures++;
      $display("FAIL tx t=%0t adm=%0d/%0d acc=%0d/%0d step=%0d/%0d", $time, adm_tx, p, tx_acc, ref_m.acc,
               tx_step, ref_m.step);
    end
    ev = real'(prev_acc) * LSB;
    checks++;
    if (int'(rx_acc) != prev_acc || int'(rx_step) != prev_step || vout < ev - 1e-9 || vout > ev + 1e-9) begin
      failures++;
      $display("FAIL rx t=%0t acc=%0d/%0d step=%0d/%0d vout=%f", $time, rx_acc, prev_acc, rx_step, prev_step, vout);
    end
    if (measure) begin
      err_sum += (vout > vin_new) ? vout - vin_new : vin_new - vout;
      err_n++;
    end
    @(negedge clk);
  endtask

  initial begin
    ref_m = new(8, 15);
    ref_vs = 0.0; prev_acc = 0; prev_step = 1;
    err_sum = 0.0; err_n = 0; measure = 0;
    #12;
    checks++;
    if (adm_valid || tx_acc != 0 || rx_acc != 0 || tx_step != 1 || rx_step != 1) begin
      failures++; $display("FAIL reset state");
    end
    rst_n = 1;
    // first clock: the receiver must idle (adm_valid still low)
    tick(2.0 + 0.013);
    // constant levels and sudden jumps
    repeat (30) tick(2.0 + 0.013);
    repeat (30) tick(4.9);
    repeat (30) tick(0.05);
    repeat (30) tick(3.3 + 0.007);
    repeat (30) tick(1.1 + 0.011);
    // triangle inside the range: 0.4 V .. 4.6 V, 0.05 V per clock
    measure = 1;
    repeat (6) begin
      for (int i = 0; i <= 84; i++) tick(0.4 + 0.05 * i + 0.003);
      for (int i = 84; i >= 0; i--) tick(0.4 + 0.05 * i + 0.003);
    end
    measure = 0;
    // triangle driven past both ends of the range
    repeat (2) begin
      for (int i = 0; i <= 30; i++) tick(-0.5 + 0.2 * i + 0.003);
      for (int i = 30; i >= 0; i--) tick(-0.5 + 0.2 * i + 0.003);
    end
    $display("mechanisms: double=%0d cross_half=%0d mode3_half=%0d floor=%0d top=%0d clamp=%0d clear=%0d wrap=%0d rx_idle=%0d",
             n_double, n_cross_half, n_mode3_half, n_floor, n_top, n_clamp, n_clear, n_wrap, n_rx_idle);
    $display("triangle: mean |vout - vin| = %f V over %0d clocks (LSB %f V)", err_sum / err_n, err_n, LSB);
    checks++; if (n_double == 0)     begin failures++; $display("FAIL no doubling"); end
    checks++; if (n_cross_half == 0) begin failures++; $display("FAIL no halving at a crossing"); end
    checks++; if (n_mode3_half == 0) begin failures++; $display("FAIL no three-bit halving"); end
    checks++; if (n_floor == 0)      begin failures++; $display("FAIL unity floor never reached"); end
    checks++; if (n_top == 0)        begin failures++; $display("FAIL top step never reached"); end
    checks++; if (n_clamp == 0)      begin failures++; $display("FAIL accumulator never clamped"); end
    checks++; if (n_clear == 0)      begin failures++; $display("FAIL counter never cleared"); end
    checks++; if (n_wrap == 0)       begin failures++; $display("FAIL counter never wrapped"); end
    checks++; if (n_rx_idle == 0)    begin failures++; $display("FAIL receiver never idled"); end
    checks++; if (err_sum / err_n > 2.0 * LSB) begin failures++; $display("FAIL triangle tracking error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
