// mtc8_core: first stage of the multi-tau correlator element, the
// "8 lags correlator" (linear part, one tap per sample period tau).
//
// Datapath only: the 8-entry delay line and the 24 accumulators (8 sums of
// products, 8 intp and 8 intf sums) are held by the caller and passed in;
// the module returns their next values. This lets the same datapath serve one
// element with its own registers (mtc_all_core_readout) and 256 channels whose
// state lives in RAM and is swept past it one channel per clock (mtc_array).
//
// When `due` is high the new sample `din` is shifted into register 1 and, for
// every lag whose delayed operand is valid, din*tap, tap and din are added to
// G, intp and intf. `first` clears the accumulators instead of adding to their
// old value (start of a measurement). The outputs of registers 7 and 8 leave
// as dq_odd/dq_even; the next stage adds them, as in the document's Fig. 2.
//
// Lag numbering: with LAG_BASE=1 (default) the taps are registers 1..8 and the
// lags are 1..8 tau, as the document's text specifies. With LAG_BASE=0 the taps
// are the incoming sample and registers 1..7 (lags 0..7 tau), which is the
// numbering the document's printed result memory dump follows.
// Purely combinational; all timing comes from `due` (see mtc_enable_chain).
module mtc8_core
  import cor_pkg::*;
#(
  parameter int unsigned W        = 5,
  parameter int unsigned LAG_BASE = 1
) (
  input  logic                 due,
  input  logic                 first,
  input  logic                 in_vld,
  input  logic [W-1:0]         din,
  input  logic [7:0]           slot_vld,
  input  logic [7:0][W-1:0]    pipe_in,
  input  acc_t [7:0]           g_in,
  input  acc_t [7:0]           p_in,
  input  acc_t [7:0]           f_in,
  output logic [7:0][W-1:0]    pipe_out,
  output acc_t [7:0]           g_out,
  output acc_t [7:0]           p_out,
  output acc_t [7:0]           f_out,
  output logic [W-1:0]         dq_odd,
  output logic [W-1:0]         dq_even
);

  assign dq_odd  = pipe_in[6];
  assign dq_even = pipe_in[7];

  always_comb begin
    pipe_out = due ? {pipe_in[6:0], din} : pipe_in;
    for (int j = 0; j < 8; j++) begin
      logic [W-1:0] tap;
      logic         tap_vld, hit;
      acc_t         g_b, p_b, f_b;
      if (LAG_BASE == 0) begin
        tap     = (j == 0) ? din : pipe_in[(j == 0) ? 0 : j - 1];
        tap_vld = (j == 0) ? in_vld : slot_vld[(j == 0) ? 0 : j - 1];
      end else begin
        tap     = pipe_in[j];
        tap_vld = slot_vld[j];
      end
      hit = in_vld && tap_vld;
      g_b = first ? '0 : g_in[j];
      p_b = first ? '0 : p_in[j];
      f_b = first ? '0 : f_in[j];
      g_out[j] = (due && hit) ? g_b + acc_t'(din) * acc_t'(tap) : g_b;
      p_out[j] = (due && hit) ? p_b + acc_t'(tap) : p_b;
      f_out[j] = (due && hit) ? f_b + acc_t'(din) : f_b;
    end
  end

endmodule
