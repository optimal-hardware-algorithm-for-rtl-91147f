// tb_adm_dac: every code of the DAC model gives code * VREF / 16.
module tb_adm_dac;
  logic [3:0] code;
  real vout;
  int checks = 0, failures = 0;
  localparam real VREF = 3.2;

  adm_dac #(.W(4), .VREF(VREF)) dut (.code, .vout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expv;
    for (int i = 0; i < 16; i++) begin
      code = 4'(i);
      #1;
      expv = 0.2 * i;
      checks++;
      if (vout < expv - 1e-9 || vout > expv + 1e-9) begin
        failures++; $display("FAIL code=%0d vout=%f exp=%f", i, vout, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
