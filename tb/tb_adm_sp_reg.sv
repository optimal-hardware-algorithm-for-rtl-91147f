// tb_adm_sp_reg: the pulse history register shifts the present pulse in at
// the MSB on enabled edges. A random pulse stream is compared with the
// last three pulses kept by the testbench, and q_next with the value the
// register then takes.
module tb_adm_sp_reg;
  logic clk = 0, rst_n = 0, en = 0, d = 0;
  logic [2:0] q, q_next;
  int checks = 0, failures = 0;
  int p0, p1, p2;   // p2 newest

  adm_sp_reg #(.SP_W(3)) dut (.clk, .rst_n, .en, .d, .q, .q_next);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] pred;
    #12 rst_n = 1;
    p0 = 0; p1 = 0; p2 = 0;
    repeat (500) begin
      @(negedge clk);
      en = ($urandom % 4) != 0; d = 1'($urandom);
      #1;
      pred = en ? {d, 1'(p2), 1'(p1)} : {1'(p2), 1'(p1), 1'(p0)};
      checks++;
      if (q_next != pred) begin failures++; $display("FAIL q_next=%b exp=%b", q_next, pred); end
      @(posedge clk); #1;
      if (en) begin p0 = p1; p1 = p2; p2 = int'(d); end
      checks++;
      if (q != {1'(p2), 1'(p1), 1'(p0)}) begin
        failures++; $display("FAIL q=%b exp=%0d%0d%0d", q, p2, p1, p0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
