// mtc_slow_lane: one time-shared lane of the 13-multiplier correlator array,
// serving one or more of stages 2..8 for all channels.
//
// What it does: when started for one of its stages (local index start_k), it
// walks the channels 0..NCH-1 and, for each, the stage's 4 lags NMAC at a
// time (4/NMAC clocks per channel), updating G, intp and intf of every lag
// exactly as one mtc4_core would for that channel and tick. It then shifts
// the new sample into the stage's delay line and, when the next stage is
// due at the same tick, hands that stage its input (the sum of delay-line
// registers 7 and 8, taken before the shift).
//
// How it works:
//  * Delay line: 8 RAMs of NSTG*NCH entries used as a ring. All channels of
//    a stage shift together, so one write pointer per stage is enough:
//    register r (1..8) of a channel is RAM (wp-r) mod 8, and a shift is a
//    single write of the new sample into RAM wp followed by wp+1 once the
//    whole sweep is done. This replaces 8 x NCH shift registers by RAM.
//  * Input latch: one RAM of NSTG*NCH entries holding the stage's next
//    input per channel. The first stage's part is written through the in_*
//    port by the lane in front; the others are written by this lane itself.
//  * Results: per multiplier one RAM each for G, intp and intf, with
//    NSTG*(4/NMAC)*NCH words, addressed {stage, step, channel}.
//  * All RAM reads are asynchronous and each clock does a complete
//    read-compute-write, so one channel step takes exactly one clock.
//
// Interface and timing: start is a one-clock request taken only while the
// lane is idle; the rec_* fields (clear-first, input valid, register valid
// flags, next stage due) apply to the whole sweep. active is high for
// exactly NCH*4/NMAC clocks. nx_* writes the following lane's input latch
// on the first step of each channel. The rd_* port reads one lag's sums at
// any time, combinationally.
//
// From the source design: the per-stage multiplier counts (2 for stage 2,
// 1 each for stages 3 and 4, one shared by stages 5..8), the delay lines as
// 8 RAMs of NCH entries per stage and the result RAM sizes (512, 1024 and
// 4096 words). This design's own choices: the ring pointer, the input latch,
// the order of the walk, storing all stages of a shared lane at the width
// of its widest stage, and 64-bit intp/intf words next to each G word.
module mtc_slow_lane
  import cor_pkg::*;
#(
  parameter int unsigned NCH      = 256,
  parameter int unsigned S0       = 2,     // first stage served (2..8)
  parameter int unsigned NSTG     = 1,     // stages served: S0 .. S0+NSTG-1
  parameter int unsigned NMAC     = 1,     // multipliers (1, 2 or 4)
  parameter int unsigned LAG_BASE = 1,
  localparam int unsigned CH_W  = $clog2(NCH),
  localparam int unsigned K_W   = (NSTG > 1) ? $clog2(NSTG) : 1,
  localparam int unsigned NSTEP = 4 / NMAC,
  localparam int unsigned T_W   = (NSTEP > 1) ? $clog2(NSTEP) : 1,
  localparam int unsigned WI    = stage_w(S0),
  localparam int unsigned WO    = stage_w(S0 + NSTG - 1),
  localparam int unsigned PDEP  = NSTG * NCH,
  localparam int unsigned ADEP  = NSTG * NSTEP * NCH,
  localparam int unsigned PA_W  = $clog2(PDEP),
  localparam int unsigned AA_W  = $clog2(ADEP)
) (
  input  logic            clk,
  input  logic            rst_n,
  // input latch of stage S0, written by the lane in front
  input  logic            in_we,
  input  logic [CH_W-1:0] in_addr,
  input  logic [WI-1:0]   in_data,
  // sweep request
  input  logic            start,
  input  logic [K_W-1:0]  start_k,
  input  logic            rec_first,
  input  logic            rec_in_vld,
  input  logic [7:0]      rec_slot_vld,
  input  logic            rec_nxt_due,
  output logic            active,
  output logic [K_W-1:0]  cur_k,
  // input latch of the stage after the lane's last one
  output logic            nx_we,
  output logic [CH_W-1:0] nx_addr,
  output logic [WO:0]     nx_data,
  // result read port
  input  logic [K_W-1:0]  rd_k,
  input  logic [1:0]      rd_lag,
  input  logic [CH_W-1:0] rd_ch,
  output acc_t            rd_g,
  output acc_t            rd_p,
  output acc_t            rd_f
);

  localparam int unsigned TAP0 = 3 + LAG_BASE;  // register index of lag 0

  logic [K_W-1:0]  k;
  logic [CH_W-1:0] ch;
  logic [T_W-1:0]  t;
  logic            first_q, in_vld_q, nxt_due_q;
  logic [7:0]      slot_vld_q;
  logic [2:0]      wp [NSTG];

  logic            last_step, int_we;
  logic [PA_W-1:0] pa;
  logic [AA_W-1:0] aa;
  logic [WO-1:0]   din;
  logic [WO:0]     sum78;
  logic [7:0][WO-1:0] slot_q, regs;
  logic [WO-1:0]   in_mem [PDEP];

  assign last_step = (t == T_W'(NSTEP - 1));
  assign pa        = PA_W'(int'(k) * NCH + int'(ch));
  assign aa        = AA_W'((int'(k) * NSTEP + int'(t)) * NCH + int'(ch));
  assign din       = in_mem[pa];
  assign cur_k     = k;

  // delay-line registers 1..8 of the current stage and channel
  always_comb begin
    for (int r = 0; r < 8; r++) regs[r] = slot_q[3'(wp[k] - 3'(r) - 3'd1)];
  end

  assign sum78   = {1'b0, regs[6]} + {1'b0, regs[7]};
  assign int_we  = active && (t == '0) && nxt_due_q && (int'(k) + 1 < int'(NSTG));
  assign nx_we   = active && (t == '0) && nxt_due_q && (int'(k) + 1 == int'(NSTG));
  assign nx_addr = ch;
  assign nx_data = sum78;

  // input latch: one write port, the lane's own writes first
  always_ff @(posedge clk) begin
    if (int_we)      in_mem[PA_W'(int'(pa) + NCH)] <= WO'(sum78);
    else if (in_we)  in_mem[PA_W'(in_addr)]        <= WO'(in_data);
  end

  // the 8 delay-line RAMs
  for (genvar i = 0; i < 8; i++) begin : g_ring
    logic [WO-1:0] ring [PDEP];
    assign slot_q[i] = ring[pa];
    always_ff @(posedge clk) begin
      if (active && last_step && wp[k] == 3'(i)) ring[pa] <= din;
    end
  end

  // multipliers with their result RAMs
  acc_t [NMAC-1:0] rg, rp, rf;
  logic [AA_W-1:0] ra;
  assign ra = AA_W'((int'(rd_k) * NSTEP + int'(rd_lag) / NMAC) * NCH + int'(rd_ch));

  for (genvar m = 0; m < NMAC; m++) begin : g_mac
    acc_t          g_mem [ADEP];
    acc_t          p_mem [ADEP];
    acc_t          f_mem [ADEP];
    acc_t          g_o, p_o, f_o;
    logic [2:0]    r;
    logic          hit;

    assign r   = 3'(TAP0 + int'(t) * NMAC + m);
    assign hit = in_vld_q && slot_vld_q[r];

    mtc_lag_mac #(.W(WO)) u_mac (
      .first (first_q),
      .hit   (hit),
      .din   (din),
      .tap   (regs[r]),
      .g_in  (g_mem[aa]),
      .p_in  (p_mem[aa]),
      .f_in  (f_mem[aa]),
      .g_out (g_o),
      .p_out (p_o),
      .f_out (f_o)
    );

    always_ff @(posedge clk) begin
      if (active) begin
        g_mem[aa] <= g_o;
        p_mem[aa] <= p_o;
        f_mem[aa] <= f_o;
      end
    end

    assign rg[m] = g_mem[ra];
    assign rp[m] = p_mem[ra];
    assign rf[m] = f_mem[ra];
  end

  assign rd_g = rg[int'(rd_lag) % NMAC];
  assign rd_p = rp[int'(rd_lag) % NMAC];
  assign rd_f = rf[int'(rd_lag) % NMAC];

  // sweep sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      k          <= '0;
      ch         <= '0;
      t          <= '0;
      first_q    <= 1'b0;
      in_vld_q   <= 1'b0;
      nxt_due_q  <= 1'b0;
      slot_vld_q <= '0;
      for (int i = 0; i < NSTG; i++) wp[i] <= '0;
    end else if (!active) begin
      if (start) begin
        active     <= 1'b1;
        k          <= start_k;
        ch         <= '0;
        t          <= '0;
        first_q    <= rec_first;
        in_vld_q   <= rec_in_vld;
        nxt_due_q  <= rec_nxt_due;
        slot_vld_q <= rec_slot_vld;
      end
    end else if (last_step) begin
      t <= '0;
      if (ch == CH_W'(NCH - 1)) begin
        active <= 1'b0;
        wp[k]  <= wp[k] + 3'd1;
      end else begin
        ch <= ch + 1'b1;
      end
    end else begin
      t <= t + 1'b1;
    end
  end

  a_latch_port: assert property (@(posedge clk) disable iff (!rst_n) !(int_we && in_we))
    else $error("input latch written by two stages in one clock");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && active))
    else $error("lane started while busy");

endmodule
