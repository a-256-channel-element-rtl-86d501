// mtc4_core: stage 2..8 of the multi-tau correlator element, the
// "4 lags correlator".
//
// The stage's sample is the sum of two adjacent samples of the previous stage
// (odd_in + even_in, taken from that stage's registers 7 and 8), so the data
// is one bit wider (W = 4 + stage number) and one stage sample spans
// 2^(s-1) tau. The sum is shifted into an 8-entry delay line; lags are taken
// at registers 5..8, i.e. (5..8) * 2^(s-1) tau = 2^(s+1)+2^(s-1) .. 2^(s+2) tau
// as in the document's text (LAG_BASE=1). With LAG_BASE=0 the taps move one
// register towards the input (lags 4..7 stage samples), the numbering of the
// document's printed result dump.
//
// Like mtc8_core this is combinational: delay line and the 12 accumulators
// (4 G, 4 intp, 4 intf) are held outside. `due` marks the stage's own sample
// period (every 2^(s-1) tau), `in_vld` that the pair of upstream samples is
// valid, `first` clears the sums.
module mtc4_core
  import cor_pkg::*;
#(
  parameter int unsigned W        = 6,
  parameter int unsigned LAG_BASE = 1
) (
  input  logic                 due,
  input  logic                 first,
  input  logic                 in_vld,
  input  logic [W-2:0]         odd_in,
  input  logic [W-2:0]         even_in,
  input  logic [7:0]           slot_vld,
  input  logic [7:0][W-1:0]    pipe_in,
  input  acc_t [3:0]           g_in,
  input  acc_t [3:0]           p_in,
  input  acc_t [3:0]           f_in,
  output logic [7:0][W-1:0]    pipe_out,
  output acc_t [3:0]           g_out,
  output acc_t [3:0]           p_out,
  output acc_t [3:0]           f_out,
  output logic [W-1:0]         dq_odd,
  output logic [W-1:0]         dq_even
);

  localparam int unsigned TAP0 = 3 + LAG_BASE;  // register index of the first tap

  logic [W-1:0] din;

  assign din     = {1'b0, odd_in} + {1'b0, even_in};
  assign dq_odd  = pipe_in[6];
  assign dq_even = pipe_in[7];

  always_comb begin
    pipe_out = due ? {pipe_in[6:0], din} : pipe_in;
    for (int j = 0; j < 4; j++) begin
      logic [W-1:0] tap;
      logic         hit;
      acc_t         g_b, p_b, f_b;
      tap = pipe_in[TAP0 + j];
      hit = in_vld && slot_vld[TAP0 + j];
      g_b = first ? '0 : g_in[j];
      p_b = first ? '0 : p_in[j];
      f_b = first ? '0 : f_in[j];
      g_out[j] = (due && hit) ? g_b + acc_t'(din) * acc_t'(tap) : g_b;
      p_out[j] = (due && hit) ? p_b + acc_t'(tap) : p_b;
      f_out[j] = (due && hit) ? f_b + acc_t'(din) : f_b;
    end
  end

endmodule
