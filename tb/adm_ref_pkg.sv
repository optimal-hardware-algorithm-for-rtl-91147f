// adm_ref_pkg: reference model of the adaptive delta step algorithm, for
// the testbenches only.
//
// Written as plain integer arithmetic, independent of the RTL structure:
//   history h2 (newest), h1, h0; a run counter of 0 pulses (0..3, wrapping);
//   a step 1..MAX_STEP; an accumulator 0..ACC_MAX.
// For each pulse d: the step halves (never below 1) when the newest two
// pulses differ, or, while the counter is at 2, when all three pulses are
// equal; otherwise it doubles (never above MAX_STEP). The accumulator then
// adds (d = 1) or subtracts (d = 0) the new step, clamped to its range.
package adm_ref_pkg;

  class adm_ref;
    int h0, h1, h2;
    int cnt;
    int step;
    int acc;
    int max_step;
    int acc_max;
    // what the last update did
    bit halved, doubled, mode3, floor_hold, top_hold, clamped, cleared, wrapped;

    function new(int max_step = 8, int acc_max = 15);
      this.max_step = max_step;
      this.acc_max  = acc_max;
      reset();
    endfunction

    function void reset();
      h0 = 0; h1 = 0; h2 = 0; cnt = 0; step = 1; acc = 0;
    endfunction

    function void update(int d);
      bit halve;
      int sum;
      h0 = h1; h1 = h2; h2 = d;
      mode3 = (cnt == 2);
      halve = (h2 != h1) || (mode3 && h2 == h1 && h1 == h0);
      halved = 0; doubled = 0; floor_hold = 0; top_hold = 0;
      if (halve) begin
        if (step > 1) begin step = step / 2; halved = 1; end
        else floor_hold = 1;
      end else begin
        if (step < max_step) begin step = step * 2; doubled = 1; end
        else top_hold = 1;
      end
      sum = d ? acc + step : acc - step;
      clamped = (sum < 0) || (sum > acc_max);
      acc = sum < 0 ? 0 : (sum > acc_max ? acc_max : sum);
      cleared = d && cnt != 0;
      wrapped = !d && cnt == 3;
      cnt = d ? 0 : (cnt + 1) % 4;
    endfunction
  endclass

endpackage
