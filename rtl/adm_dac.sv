// adm_dac: behavioural model of the 4-bit digital-to-analog converter.
//
// Behavioural model, not synthesizable logic: the real part is an analog
// converter. It turns the accumulator code into its analog equivalent, an
// ideal linear binary DAC with vout = code * VREF / 2^W, updating as soon as
// the code changes. The reference voltage VREF is this design's choice; the
// converter's circuit is not specified, only its 4-bit width.
module adm_dac #(
  parameter int unsigned W    = adm_pkg::ACC_W,
  parameter real         VREF = 5.0
) (
  input  logic [W-1:0] code,
  output real          vout
);

  localparam real LSB = VREF / real'(2 ** W);

  assign vout = real'(code) * LSB;

endmodule
