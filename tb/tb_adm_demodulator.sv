// tb_adm_demodulator: random received pulse streams (with clocks where
// adm_valid is low) against the reference model; the accumulator, step and
// DAC voltage are checked after every clock.
module tb_adm_demodulator;
  import adm_ref_pkg::*;
  logic clk = 0, rst_n = 0, adm_in = 0, adm_valid = 0;
  logic [3:0] acc, step;
  real vout;
  int checks = 0, failures = 0, n_clamp = 0;
  adm_ref ref_m;
  localparam real VREF = 5.0;

  adm_demodulator #(.VREF(VREF)) dut (.clk, .rst_n, .adm_in, .adm_valid, .acc, .step, .vout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int runlen, b;
    real ev;
    ref_m = new(8, 15);
    #12 rst_n = 1;
    repeat (600) begin
      runlen = 1 + ($urandom % 8);
      b = $urandom % 2;
      repeat (runlen) begin
        @(negedge clk);
        adm_in = 1'(b); adm_valid = ($urandom % 10) != 0;
        @(posedge clk); #1;
        if (adm_valid) begin ref_m.update(b); if (ref_m.clamped) n_clamp++; end
        ev = ref_m.acc * VREF / 16.0;
        checks++;
        if (int'(acc) != ref_m.acc || int'(step) != ref_m.step || vout < ev - 1e-9 || vout > ev + 1e-9) begin
          failures++;
          $display("FAIL acc=%0d step=%0d vout=%f exp acc=%0d step=%0d", acc, step, vout, ref_m.acc, ref_m.step);
        end
      end
    end
    checks++;
    if (n_clamp == 0) begin failures++; $display("FAIL accumulator clamp never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
