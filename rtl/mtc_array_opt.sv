// mtc_array_opt: the 256-channel multi-tau correlator array built with 13
// multipliers in total, the resource-optimised form of the shared design.
//
// What it does: the same job as mtc_array, with the same ports and the same
// 110 result words per channel, but with the lags of each stage spread in
// time over that stage's longer sample period instead of computed 36 at a
// time:
//   stage 1      8 multipliers  1 clock per channel    (NCH clocks per tau)
//   stage 2      2 multipliers  2 clocks per channel   (2*NCH per 2 tau)
//   stage 3      1 multiplier   4 clocks per channel   (4*NCH per 4 tau)
//   stage 4      1 multiplier   4 clocks per channel   (4*NCH per 8 tau)
//   stages 5..8  1 multiplier   4 clocks per channel and stage, in turn
//                               (at most 16*NCH per 16 tau)
//
// How it works: mtc_enable_chain gives, at each frame_ready, which stages
// are due and the valid flags. Stage 1 (mtc8_core, delay line in 8 RAMs of
// NCH x 5 bits used as a ring, 8 result RAMs per sum) sweeps the channels
// right away, reading and clearing the frame buffer, and writes stage 2's
// input latch from its delay-line registers 7 and 8 when stage 2 is due.
// Each later stage keeps a pending record of its tick and starts its sweep
// in its lane (mtc_slow_lane) once the stage in front has finished the same
// tick, so its input latch is complete; stages 5..8 take their turns in the
// shared lane. Sums of a stage that has not been due since the start of a
// measurement are treated as zero (a per-stage "fresh" flag) instead of
// being cleared word by word. With NCH=256 and 500 clocks per tau (50 MHz,
// 10 us) stage 1 ends after 256 clocks, stage 2 after 768, stage 3 after
// 1792, stage 4 after 2816 and stages 5..8 after at most 6912, each well
// inside its own sample period.
//
// Interface and timing: frame_ready is one clock per tau; fb_rd_en and
// fb_rd_addr read the frame buffer combinationally during stage 1's sweep
// (sweeping, NCH clocks). stage_busy shows each stage's sweep. busy covers
// the measurement, the drain and the last sweeps; done pulses once all
// sweeps after the drain have ended. ro_data returns word ro_word of
// channel ro_ch one clock after ro_rd. overrun is set (and an assertion
// fires) if a stage is due again before its previous sweep has ended.
//
// From the source design: the multiplier count per stage, the 50 MHz clock
// against the 10 us tau, delay lines in RAM instead of registers, and the
// result RAM sizes (8 of 256 words for stage 1, 2 of 512 for stage 2, 1024
// for stages 3 and 4, 4096 for stages 5..8). Its schedule is not given; the
// sweep order, the stage-after-stage start rule, the input latches, the
// fresh flags and 64-bit intp/intf words kept next to each G word are this
// design's own.
module mtc_array_opt
  import cor_pkg::*;
#(
  parameter int unsigned NCH      = 256,
  parameter int unsigned LAG_BASE = 1,
  localparam int unsigned CH_W    = $clog2(NCH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_ready,
  input  logic              en_in,
  output logic              fb_rd_en,
  output logic [CH_W-1:0]   fb_rd_addr,
  input  logic [DIN_W-1:0]  fb_rd_data,
  input  logic              ro_rd,
  input  logic [CH_W-1:0]   ro_ch,
  input  logic [6:0]        ro_word,
  output logic [ACC_W-1:0]  ro_data,
  output logic              busy,
  output logic              done,
  output logic              sweeping,
  output logic              overrun,
  output logic [NSTAGE-1:0] en_stage,
  output logic [NSTAGE-1:0] stage_busy
);

  // ------------------------------------------------------------------
  // timing and valid flags, one set for all channels
  logic [NSTAGE-1:0]               c_due, c_in_vld;
  logic [NSTAGE-1:0][PIPE_LEN-1:0] c_slot_vld;
  logic                            c_first, c_busy, c_done;

  mtc_enable_chain u_ctrl (
    .clk, .rst_n, .tick(frame_ready), .en_in,
    .due(c_due), .first(c_first), .in_vld(c_in_vld), .slot_vld(c_slot_vld),
    .en_stage, .busy(c_busy), .done(c_done)
  );

  // ------------------------------------------------------------------
  // stage 1: 8 multipliers, one channel per clock
  logic             act1, r1_due, r1_first, r1_in_vld, r1_nxt;
  logic [7:0]       r1_slot;
  logic [CH_W-1:0]  ch1;
  logic [2:0]       wp1;
  logic [7:0][DIN_W-1:0] s1_slot_q, s1_pipe, s1_pipe_out;
  acc_t [7:0]       g1_in, p1_in, f1_in, g1_out, p1_out, f1_out;
  acc_t [7:0]       g1_rd, p1_rd, f1_rd;
  logic [DIN_W-1:0] s1_odd, s1_even;
  acc_t             term_mem [NCH];
  acc_t             intc_mem [NCH];

  for (genvar i = 0; i < 8; i++) begin : g_s1
    logic [DIN_W-1:0] ring [NCH];
    acc_t             g_mem [NCH];
    acc_t             p_mem [NCH];
    acc_t             f_mem [NCH];

    assign s1_slot_q[i] = ring[ch1];
    assign g1_in[i]     = g_mem[ch1];
    assign p1_in[i]     = p_mem[ch1];
    assign f1_in[i]     = f_mem[ch1];
    assign g1_rd[i]     = g_mem[ro_ch];
    assign p1_rd[i]     = p_mem[ro_ch];
    assign f1_rd[i]     = f_mem[ro_ch];

    always_ff @(posedge clk) begin
      if (act1 && r1_due && wp1 == 3'(i)) ring[ch1] <= s1_pipe_out[0];
      if (act1) begin
        g_mem[ch1] <= g1_out[i];
        p_mem[ch1] <= p1_out[i];
        f_mem[ch1] <= f1_out[i];
      end
    end
  end

  always_comb begin
    for (int r = 0; r < 8; r++) s1_pipe[r] = s1_slot_q[3'(wp1 - 3'(r) - 3'd1)];
  end

  mtc8_core #(.W(DIN_W), .LAG_BASE(LAG_BASE)) u_s1 (
    .due      (r1_due),
    .first    (r1_first),
    .in_vld   (r1_in_vld),
    .din      (fb_rd_data),
    .slot_vld (r1_slot),
    .pipe_in  (s1_pipe),
    .g_in     (g1_in),
    .p_in     (p1_in),
    .f_in     (f1_in),
    .pipe_out (s1_pipe_out),
    .g_out    (g1_out),
    .p_out    (p1_out),
    .f_out    (f1_out),
    .dq_odd   (s1_odd),
    .dq_even  (s1_even)
  );

  always_ff @(posedge clk) begin
    if (act1) begin
      term_mem[ch1] <= (r1_first ? '0 : term_mem[ch1]) + acc_t'(r1_in_vld);
      intc_mem[ch1] <= (r1_first ? '0 : intc_mem[ch1]) +
                       (r1_in_vld ? acc_t'(fb_rd_data) : '0);
    end
  end

  assign fb_rd_en   = act1;
  assign fb_rd_addr = ch1;
  assign sweeping   = act1;

  // ------------------------------------------------------------------
  // stages 2..8 in four lanes: {2}, {3}, {4}, {5,6,7,8}
  // index of the per-stage arrays below: stage s -> s-1
  logic [NSTAGE-1:0]        st_act, launch, late;
  logic [NSTAGE-1:1]        pend, fresh, p_first, p_in_vld, p_nxt;
  logic [NSTAGE-1:1][7:0]   p_slot;

  logic        l2_act, l3_act, l4_act, l5_act;
  logic [0:0]  l2_k, l3_k, l4_k;
  logic [1:0]  l5_k, l5_start_k, l5_rd_k;
  logic        l5_start;
  int unsigned l5_s;
  logic            w3_we, w4_we, w5_we;
  logic [CH_W-1:0] w3_addr, w4_addr, w5_addr;
  logic [6:0]      w3_data;
  logic [7:0]      w4_data;
  logic [8:0]      w5_data;
  acc_t l2_g, l2_p, l2_f, l3_g, l3_p, l3_f, l4_g, l4_p, l4_f, l5_g, l5_p, l5_f;
  logic [1:0]      rd_lag;

  assign st_act[0] = act1;
  assign st_act[1] = l2_act;
  assign st_act[2] = l3_act;
  assign st_act[3] = l4_act;
  for (genvar s = 4; s < NSTAGE; s++) begin : g_shared_act
    assign st_act[s] = l5_act && (l5_k == 2'(s - 4));
  end
  assign stage_busy = st_act;

  // a stage may start once the stage in front has no tick left to process
  always_comb begin
    launch = '0;
    for (int s = 1; s < 4; s++) begin
      launch[s] = pend[s] && !((s > 1) && pend[(s > 1) ? s - 1 : s]) && !st_act[s-1] && !st_act[s];
    end
    l5_start = 1'b0;
    l5_s     = 4;
    for (int s = NSTAGE - 1; s >= 4; s--) begin
      if (pend[s] && !pend[s-1] && !st_act[s-1] && !l5_act) begin
        l5_start = 1'b1;
        l5_s     = s;
      end
    end
    if (l5_start) launch[l5_s] = 1'b1;
    l5_start_k = 2'(l5_s - 4);
  end

  mtc_slow_lane #(.NCH(NCH), .S0(2), .NSTG(1), .NMAC(2), .LAG_BASE(LAG_BASE)) u_lane2 (
    .clk, .rst_n,
    .in_we (act1 && r1_nxt), .in_addr(ch1), .in_data({1'b0, s1_odd} + {1'b0, s1_even}),
    .start (launch[1]), .start_k(1'b0),
    .rec_first(p_first[1]), .rec_in_vld(p_in_vld[1]), .rec_slot_vld(p_slot[1]), .rec_nxt_due(p_nxt[1]),
    .active(l2_act), .cur_k(l2_k),
    .nx_we(w3_we), .nx_addr(w3_addr), .nx_data(w3_data),
    .rd_k(1'b0), .rd_lag, .rd_ch(ro_ch), .rd_g(l2_g), .rd_p(l2_p), .rd_f(l2_f)
  );

  mtc_slow_lane #(.NCH(NCH), .S0(3), .NSTG(1), .NMAC(1), .LAG_BASE(LAG_BASE)) u_lane3 (
    .clk, .rst_n,
    .in_we (w3_we), .in_addr(w3_addr), .in_data(w3_data),
    .start (launch[2]), .start_k(1'b0),
    .rec_first(p_first[2]), .rec_in_vld(p_in_vld[2]), .rec_slot_vld(p_slot[2]), .rec_nxt_due(p_nxt[2]),
    .active(l3_act), .cur_k(l3_k),
    .nx_we(w4_we), .nx_addr(w4_addr), .nx_data(w4_data),
    .rd_k(1'b0), .rd_lag, .rd_ch(ro_ch), .rd_g(l3_g), .rd_p(l3_p), .rd_f(l3_f)
  );

  mtc_slow_lane #(.NCH(NCH), .S0(4), .NSTG(1), .NMAC(1), .LAG_BASE(LAG_BASE)) u_lane4 (
    .clk, .rst_n,
    .in_we (w4_we), .in_addr(w4_addr), .in_data(w4_data),
    .start (launch[3]), .start_k(1'b0),
    .rec_first(p_first[3]), .rec_in_vld(p_in_vld[3]), .rec_slot_vld(p_slot[3]), .rec_nxt_due(p_nxt[3]),
    .active(l4_act), .cur_k(l4_k),
    .nx_we(w5_we), .nx_addr(w5_addr), .nx_data(w5_data),
    .rd_k(1'b0), .rd_lag, .rd_ch(ro_ch), .rd_g(l4_g), .rd_p(l4_p), .rd_f(l4_f)
  );

  // stage 8 feeds nothing: the shared lane's next-stage port stays open
  logic            l5_nx_we;
  logic [CH_W-1:0] l5_nx_addr;
  logic [12:0]     l5_nx_data;

  mtc_slow_lane #(.NCH(NCH), .S0(5), .NSTG(4), .NMAC(1), .LAG_BASE(LAG_BASE)) u_lane5 (
    .clk, .rst_n,
    .in_we (w5_we), .in_addr(w5_addr), .in_data(w5_data),
    .start (l5_start), .start_k(l5_start_k),
    .rec_first(p_first[l5_s]), .rec_in_vld(p_in_vld[l5_s]), .rec_slot_vld(p_slot[l5_s]),
    .rec_nxt_due(p_nxt[l5_s]),
    .active(l5_act), .cur_k(l5_k),
    .nx_we(l5_nx_we), .nx_addr(l5_nx_addr), .nx_data(l5_nx_data),
    .rd_k(l5_rd_k), .rd_lag, .rd_ch(ro_ch), .rd_g(l5_g), .rd_p(l5_p), .rd_f(l5_f)
  );

  // ------------------------------------------------------------------
  // tick records, sweep starts, fresh flags, overrun, busy and done
  logic done_pending;

  always_comb begin
    late = '0;
    late[0] = frame_ready && act1;
    for (int s = 1; s < NSTAGE; s++) late[s] = frame_ready && c_due[s] && (pend[s] || st_act[s]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act1         <= 1'b0;
      ch1          <= '0;
      wp1          <= '0;
      r1_due       <= 1'b0;
      r1_first     <= 1'b0;
      r1_in_vld    <= 1'b0;
      r1_nxt       <= 1'b0;
      r1_slot      <= '0;
      pend         <= '0;
      fresh        <= '0;
      p_first      <= '0;
      p_in_vld     <= '0;
      p_nxt        <= '0;
      p_slot       <= '0;
      overrun      <= 1'b0;
      done_pending <= 1'b0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      if (|late) overrun <= 1'b1;

      // stage 1 sweeps every frame, if only to empty the frame buffer
      if (frame_ready) begin
        act1      <= 1'b1;
        ch1       <= '0;
        r1_due    <= c_due[0];
        r1_first  <= c_first;
        r1_in_vld <= c_in_vld[0];
        r1_nxt    <= c_due[1];
        r1_slot   <= c_slot_vld[0];
      end else if (act1) begin
        ch1 <= ch1 + 1'b1;
        if (ch1 == CH_W'(NCH - 1)) begin
          act1 <= 1'b0;
          if (r1_due) wp1 <= wp1 + 3'd1;
        end
      end

      for (int s = 1; s < NSTAGE; s++) begin
        if (launch[s]) pend[s] <= 1'b0;
        if (frame_ready) begin
          if (c_due[s]) begin
            pend[s]     <= 1'b1;
            p_first[s]  <= c_first || fresh[s];
            p_in_vld[s] <= c_in_vld[s];
            p_slot[s]   <= c_slot_vld[s];
            p_nxt[s]    <= (s < NSTAGE - 1) ? c_due[(s < NSTAGE - 1) ? s + 1 : s] : 1'b0;
            fresh[s]    <= 1'b0;
          end else if (c_first) begin
            fresh[s] <= 1'b1;
          end
        end
      end

      if (c_done) begin
        done_pending <= 1'b1;
      end else if (done_pending && !frame_ready && !act1 && pend == '0 &&
                   !l2_act && !l3_act && !l4_act && !l5_act) begin
        done_pending <= 1'b0;
        done         <= 1'b1;
      end
    end
  end

  assign busy = c_busy || done_pending;

  // ------------------------------------------------------------------
  // result read port: word -> stage, lag, sum
  int unsigned ro_s, ro_j, ro_f;  // stage 1..8, lag, 0=G 1=intp 2=intf 3=term 4=intc 5=none

  always_comb begin
    int unsigned w;
    w = int'(ro_word);
    ro_s = 1; ro_j = 0; ro_f = 5;
    if (w < 8) begin
      ro_s = 1; ro_j = w; ro_f = 0;
    end else if (w < 36) begin
      ro_s = 2 + (w - 8) / 4; ro_j = (w - 8) % 4; ro_f = 0;
    end else if (w < 44) begin
      ro_s = 1; ro_j = w - 36; ro_f = 1;
    end else if (w < 52) begin
      ro_s = 1; ro_j = w - 44; ro_f = 2;
    end else if (w < 108) begin
      ro_s = 2 + (w - 52) / 8; ro_j = (w - 52) % 4; ro_f = ((w - 52) % 8 < 4) ? 1 : 2;
    end else if (w == WORD_TERM) begin
      ro_f = 3;
    end else if (w == WORD_INTC) begin
      ro_f = 4;
    end
  end

  assign rd_lag  = 2'(ro_j);
  assign l5_rd_k = 2'((ro_s >= 5) ? ro_s - 5 : 0);

  always_ff @(posedge clk) begin
    if (ro_rd) begin
      acc_t g, p, f, v;
      case (ro_s)
        1:       begin g = g1_rd[3'(ro_j)]; p = p1_rd[3'(ro_j)]; f = f1_rd[3'(ro_j)]; end
        2:       begin g = l2_g; p = l2_p; f = l2_f; end
        3:       begin g = l3_g; p = l3_p; f = l3_f; end
        4:       begin g = l4_g; p = l4_p; f = l4_f; end
        default: begin g = l5_g; p = l5_p; f = l5_f; end
      endcase
      case (ro_f)
        0:       v = g;
        1:       v = p;
        2:       v = f;
        3:       v = term_mem[ro_ch];
        4:       v = intc_mem[ro_ch];
        default: v = '0;
      endcase
      if (ro_f < 3 && ro_s > 1 && fresh[(ro_s > 1) ? ro_s - 1 : 1]) v = '0;
      ro_data <= v;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) late == '0)
    else $error("a stage became due again before its previous sweep ended");

endmodule
