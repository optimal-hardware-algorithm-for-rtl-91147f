// adm_accumulator: the accumulator register (AC).
//
// A W-bit register loaded in parallel from the adder/subtracter on each
// rising clock edge while en is high. Its value is the digital form of the
// accumulated (tracking) signal and drives the DAC. Reset is asynchronous
// and active low and clears the register to zero (this design's choice of
// starting level).
module adm_accumulator #(
  parameter int unsigned W = adm_pkg::ACC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
