// tb_adm_sample_hold: the held value is the input at the last rising edge,
// unaffected by the input at the falling edge or just after the rising
// edge, and 0 during reset.
module tb_adm_sample_hold;
  logic clk = 0, rst_n = 0;
  real vin = 1.5, vs;
  int checks = 0, failures = 0;

  adm_sample_hold dut (.clk, .rst_n, .vin, .vs);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sampled;
    #12;
    checks++; if (vs != 0.0) begin failures++; $display("FAIL reset vs=%f", vs); end
    rst_n = 1;
    @(posedge clk);
    repeat (200) begin
      #1;
      vin = ($urandom % 1000) / 100.0;          // present at the falling edge only
      @(negedge clk); #1;
      vin = ($urandom % 1000) / 100.0 + 20.0;   // present at the rising edge
      sampled = vin;
      @(posedge clk); #1;
      vin = -1.0;                               // a change after the edge must not show
      #1;
      checks++;
      if (vs != sampled) begin failures++; $display("FAIL vs=%f exp=%f", vs, sampled); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
