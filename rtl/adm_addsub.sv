// adm_addsub: the 4-bit adder/subtracter (4AS) of the modem.
//
// Adds the step b to the accumulator value a when add = 1, subtracts it
// when add = 0; the ADD/SUB command is the present ADM pulse. Purely
// combinational. The result is clamped to 0 .. 2^W-1 instead of wrapping
// round, so that a large step near the ends of the range cannot fold the
// rebuilt signal over to the other end; ovf flags a clamped result. The
// clamping is this design's choice: only the add/subtract function is
// given for this unit.
module adm_addsub #(
  parameter int unsigned W = adm_pkg::ACC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         add,
  output logic [W-1:0] y,
  output logic         ovf
);

  logic [W:0] sum;   // one extra bit holds the carry (add) or borrow (subtract)

  always_comb begin
    if (add) sum = {1'b0, a} + {1'b0, b};
    else     sum = {1'b0, a} - {1'b0, b};
    ovf = sum[W];
    if (!sum[W])  y = sum[W-1:0];
    else if (add) y = '1;   // carry out: clamp at full scale
    else          y = '0;   // borrow out: clamp at zero
  end

endmodule
