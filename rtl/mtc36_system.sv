// mtc36_system: datapath of one 36-lag multi-tau correlator element.
//
// One mtc8_core (stage 1, lags 1..8 tau) and seven mtc4_core instances
// (stage s = 2..8, lags 5..8 stage samples of 2^(s-1) tau each, so
// 10..16, 20..32, ... 640..1024 tau), chained through their dq_odd/dq_even
// outputs: stage s adds registers 7 and 8 of stage s-1. Beside the 36 lags it
// counts the samples (term) and sums them (intc) for normalisation.
//
// Combinational: the delay lines of all stages (one flat vector, stage s
// 4+s bits wide) and the 110 result words (in the result-memory order of
// cor_pkg) come in, their values after this tick go out. The stage timing
// (due, first, valid flags) comes from mtc_enable_chain. The caller registers
// the state, either per element (mtc_all_core_readout) or per channel in RAM
// (mtc_array).
module mtc36_system
  import cor_pkg::*;
#(
  parameter int unsigned LAG_BASE = 1
) (
  input  logic [NSTAGE-1:0]               due,
  input  logic                            first,
  input  logic [NSTAGE-1:0]               in_vld,
  input  logic [NSTAGE-1:0][PIPE_LEN-1:0] slot_vld,
  input  logic [DIN_W-1:0]                din,
  input  pipe_vec_t                       pipe_in,
  input  acc_vec_t                        acc_in,
  output pipe_vec_t                       pipe_out,
  output acc_vec_t                        acc_out
);

  // dq outputs of each stage, padded to the widest stage
  logic [NSTAGE-1:0][stage_w(NSTAGE)-1:0] dq_odd, dq_even;

  for (genvar s = 1; s <= NSTAGE; s++) begin : g_stage
    localparam int unsigned W  = stage_w(s);
    localparam int unsigned NL = stage_nlag(s);
    localparam int unsigned PO = pipe_off(s);

    acc_t [NL-1:0]      g_in, p_in, f_in, g_out, p_out, f_out;
    logic [W-1:0]       odd, even;

    for (genvar j = 0; j < NL; j++) begin : g_lag
      assign g_in[j] = acc_in[addr_g(s, j)];
      assign p_in[j] = acc_in[addr_intp(s, j)];
      assign f_in[j] = acc_in[addr_intf(s, j)];
      assign acc_out[addr_g(s, j)]    = g_out[j];
      assign acc_out[addr_intp(s, j)] = p_out[j];
      assign acc_out[addr_intf(s, j)] = f_out[j];
    end

    if (s == 1) begin : g_first
      mtc8_core #(.W(W), .LAG_BASE(LAG_BASE)) u_core (
        .due      (due[0]),
        .first    (first),
        .in_vld   (in_vld[0]),
        .din      (din),
        .slot_vld (slot_vld[0]),
        .pipe_in  (pipe_in[PO +: PIPE_LEN*W]),
        .g_in     (g_in),
        .p_in     (p_in),
        .f_in     (f_in),
        .pipe_out (pipe_out[PO +: PIPE_LEN*W]),
        .g_out    (g_out),
        .p_out    (p_out),
        .f_out    (f_out),
        .dq_odd   (odd),
        .dq_even  (even)
      );
    end else begin : g_rest
      mtc4_core #(.W(W), .LAG_BASE(LAG_BASE)) u_core (
        .due      (due[s-1]),
        .first    (first),
        .in_vld   (in_vld[s-1]),
        .odd_in   (dq_odd[s-2][W-2:0]),
        .even_in  (dq_even[s-2][W-2:0]),
        .slot_vld (slot_vld[s-1]),
        .pipe_in  (pipe_in[PO +: PIPE_LEN*W]),
        .g_in     (g_in),
        .p_in     (p_in),
        .f_in     (f_in),
        .pipe_out (pipe_out[PO +: PIPE_LEN*W]),
        .g_out    (g_out),
        .p_out    (p_out),
        .f_out    (f_out),
        .dq_odd   (odd),
        .dq_even  (even)
      );
    end

    assign dq_odd[s-1]  = (stage_w(NSTAGE))'(odd);
    assign dq_even[s-1] = (stage_w(NSTAGE))'(even);
  end

  // term: number of samples, intc: their sum
  assign acc_out[WORD_TERM] = (first ? '0 : acc_in[WORD_TERM]) + acc_t'(in_vld[0]);
  assign acc_out[WORD_INTC] = (first ? '0 : acc_in[WORD_INTC]) +
                              (in_vld[0] ? acc_t'(din) : '0);

endmodule
