// mtc_enable_chain: measurement control and stage timing of the multi-tau
// correlator: the enable "token" that is passed from stage to stage.
//
// `tick` marks one sample period tau. A measurement starts at the first tick
// with en_in=1 while idle: all eight stages are enabled at once and the sums
// are cleared (`first`). Stage s takes a new sample at every 2^(s-1)-th tick
// (`due`): at the ticks c (counted from 0 at the start) with
// (c + 8) mod 2^(s-1) = 0. Stage s+1 reads registers 7 and 8 of stage s, whose
// contents are 8 stage-s samples old; this phase makes every pair it adds up
// two adjacent stage-s samples that together cover one complete bin of
// 2^s input samples, bins being counted from the first sample.
//
// Each delay-line register of each stage carries a valid flag (slot_vld).
// Stage 1's input is valid while en_in=1; stage s's input is valid when both
// registers 7 and 8 of stage s-1 hold valid data. A product only counts when
// both of its operands are valid. When en_in drops, stage 1 stops, but the
// delay lines keep shifting until every valid sample has been passed on and
// used: stage s stays enabled (en_stage[s-1]) while any valid data is left in
// stages 1..s-1, so the stages switch off one after another, stage 8 last,
// as the document describes for its enable signals. busy falls and `done`
// pulses when the last stage is off. en_in is ignored during that flush.
//
// Outputs due/first/in_vld/slot_vld describe the current tick and are
// combinational; the state advances at the clock edge of a tick.
module mtc_enable_chain
  import cor_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          tick,
  input  logic                          en_in,
  output logic [NSTAGE-1:0]             due,
  output logic                          first,
  output logic [NSTAGE-1:0]             in_vld,
  output logic [NSTAGE-1:0][PIPE_LEN-1:0] slot_vld,
  output logic [NSTAGE-1:0]             en_stage,
  output logic                          busy,
  output logic                          done
);

  typedef enum logic [1:0] {IDLE, RUN, FLUSH} state_t;

  state_t                           state;
  logic [NSTAGE-2:0]                cnt;      // tick count modulo 2^(NSTAGE-1)
  logic [NSTAGE-1:0][PIPE_LEN-1:0]  vld;
  logic                             starting;
  logic [NSTAGE-2:0]                c_eff;
  logic                             upstream_empty;

  assign starting = tick && (state == IDLE) && en_in;
  assign c_eff    = starting ? '0 : cnt;
  assign first    = starting;
  assign busy     = (state != IDLE);

  always_comb begin
    upstream_empty = 1'b1;
    for (int s = 0; s < NSTAGE - 1; s++)
      if (|vld[s]) upstream_empty = 1'b0;
  end

  assign done = (state == FLUSH) && upstream_empty;

  always_comb begin
    logic [NSTAGE-2:0] mask;
    logic              live;  // valid data still upstream of the stage
    for (int s = 0; s < NSTAGE; s++) begin
      // stage s+1 is due when the low s bits of the tick count are zero
      mask   = ((NSTAGE-1)'(1) << s) - (NSTAGE-1)'(1);
      due[s] = tick && (busy || starting) &&
               (((c_eff + (NSTAGE-1)'(PIPE_LEN)) & mask) == '0);
      slot_vld[s] = starting ? '0 : vld[s];
    end
    in_vld[0] = tick && (starting || (state == RUN && en_in));
    for (int s = 1; s < NSTAGE; s++)
      in_vld[s] = !starting && vld[s-1][6] && vld[s-1][7];
    live = (state == RUN);
    for (int s = 0; s < NSTAGE; s++) begin
      en_stage[s] = live;
      live = live || (|vld[s]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      vld   <= '0;
    end else if (starting) begin
      state <= RUN;
      cnt   <= (NSTAGE-1)'(1);
      vld   <= '0;
      vld[0][0] <= 1'b1;
    end else if (done) begin
      state <= IDLE;
    end else if (tick && busy) begin
      cnt <= cnt + 1'b1;
      for (int s = 0; s < NSTAGE; s++)
        if (due[s]) vld[s] <= {vld[s][PIPE_LEN-2:0], in_vld[s]};
      if (state == RUN && !en_in) state <= FLUSH;
    end
  end

  // A later stage is never switched off before an earlier one.
  for (genvar s = 1; s < NSTAGE; s++) begin : g_order
    a_order: assert property (@(posedge clk) disable iff (!rst_n)
                              en_stage[s-1] |-> en_stage[s]);
  end

endmodule
