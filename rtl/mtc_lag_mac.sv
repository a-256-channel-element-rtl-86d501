// mtc_lag_mac: one sum-of-products unit of the time-shared correlator, the
// arithmetic of one lag for one channel.
//
// Given the stage's current sample din and the delayed sample tap, it adds
// din*tap to the lag's G sum, tap to its intp sum and din to its intf sum,
// but only when both samples are valid (hit). With first set the old sums
// are taken as zero, which clears them at the start of a measurement. It is
// purely combinational: the caller reads the three sums from RAM, passes them
// through this unit and writes them back in the same clock.
//
// The three sums per lag and the valid rule are the same as in the parallel
// element (mtc8_core / mtc4_core); one multiplier per unit is what the
// time-shared array counts as one DSP.
module mtc_lag_mac
  import cor_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic         first,
  input  logic         hit,
  input  logic [W-1:0] din,
  input  logic [W-1:0] tap,
  input  acc_t         g_in,
  input  acc_t         p_in,
  input  acc_t         f_in,
  output acc_t         g_out,
  output acc_t         p_out,
  output acc_t         f_out
);

  acc_t g_b, p_b, f_b;

  always_comb begin
    g_b   = first ? '0 : g_in;
    p_b   = first ? '0 : p_in;
    f_b   = first ? '0 : f_in;
    g_out = hit ? g_b + acc_t'(din) * acc_t'(tap) : g_b;
    p_out = hit ? p_b + acc_t'(tap) : p_b;
    f_out = hit ? f_b + acc_t'(din) : f_b;
  end

endmodule
