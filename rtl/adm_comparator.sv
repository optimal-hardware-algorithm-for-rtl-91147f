// adm_comparator: behavioural model of the analog comparator C.
//
// Behavioural model, not synthesizable logic: the real part is an analog
// comparator. out is 1 while the sampled input vp is above the analog
// equivalent vn of the accumulator, and 0 otherwise (ties give 0). It is
// ideal: no offset, hysteresis or delay, which is this design's choice.
module adm_comparator (
  input  real  vp,
  input  real  vn,
  output logic out
);

  assign out = (vp > vn);

endmodule
