// mtc_array: NCH (256) correlator elements of 36 lags each, sharing one
// element datapath that is swept over the channels ("barrel shifter DSP"
// structure).
//
// Each channel's state, its 8 delay lines (5..12 bits wide) and its 110
// 64-bit result words, lives in two RAMs indexed by channel, in place of
// per-element registers. One mtc36_system datapath (36 multiply-accumulate
// lanes) serves all channels: after each frame_ready (one tau) the array
// sweeps ch = 0..NCH-1, one channel per clock. In each clock it reads the
// channel's count from the frame buffer (clearing it there), reads the
// channel's state, computes the next state and writes it back, so a sweep
// takes NCH clocks and must end before the next frame_ready (10 us = 500
// clocks at 50 MHz, 1000 at 100 MHz). A frame_ready during a sweep sets the
// sticky overrun flag.
//
// All channels share one mtc_enable_chain: they take samples at the same
// ticks, so one set of stage timing and valid flags serves them all. Its
// outputs for the tick are latched at frame_ready and held for the sweep.
// Results are read through the ro_* port: word ro_word (map in cor_pkg) of
// channel ro_ch, one clock after ro_rd; words 110..127 read as 0.
// Using one 36-lane datapath is this design's reading of the 256-channel
// system with 36 shared DSP sets; the further step to 13 shared multipliers
// with stages 2..8 spread over their longer sample periods is not built.
module mtc_array
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
  // frame buffer read port
  output logic              fb_rd_en,
  output logic [CH_W-1:0]   fb_rd_addr,
  input  logic [DIN_W-1:0]  fb_rd_data,
  // result read port
  input  logic              ro_rd,
  input  logic [CH_W-1:0]   ro_ch,
  input  logic [6:0]        ro_word,
  output logic [ACC_W-1:0]  ro_data,
  // status
  output logic              busy,
  output logic              done,
  output logic              sweeping,
  output logic              overrun,
  output logic [NSTAGE-1:0] en_stage
);

  logic [NSTAGE-1:0]               due, in_vld;
  logic [NSTAGE-1:0][PIPE_LEN-1:0] slot_vld;
  logic                            first;

  // tick controls held for the sweep
  logic [NSTAGE-1:0]               sw_due, sw_in_vld;
  logic [NSTAGE-1:0][PIPE_LEN-1:0] sw_slot_vld;
  logic                            sw_first;
  logic [CH_W-1:0]                 ch;

  pipe_vec_t pipe_mem [NCH];
  acc_vec_t  acc_mem  [NCH];
  pipe_vec_t pipe_next;
  acc_vec_t  acc_next;

  mtc_enable_chain u_ctrl (
    .clk, .rst_n, .tick(frame_ready), .en_in,
    .due, .first, .in_vld, .slot_vld, .en_stage, .busy, .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweeping    <= 1'b0;
      ch          <= '0;
      overrun     <= 1'b0;
      sw_due      <= '0;
      sw_in_vld   <= '0;
      sw_slot_vld <= '0;
      sw_first    <= 1'b0;
    end else begin
      if (frame_ready) begin
        if (sweeping) overrun <= 1'b1;
        sweeping    <= 1'b1;
        ch          <= '0;
        sw_due      <= due;
        sw_in_vld   <= in_vld;
        sw_slot_vld <= slot_vld;
        sw_first    <= first;
      end else if (sweeping) begin
        ch <= ch + 1'b1;
        if (ch == CH_W'(NCH - 1)) sweeping <= 1'b0;
      end
    end
  end

  assign fb_rd_en   = sweeping;
  assign fb_rd_addr = ch;

  // the shared datapath
  mtc36_system #(.LAG_BASE(LAG_BASE)) u_dsp (
    .due      (sw_due),
    .first    (sw_first),
    .in_vld   (sw_in_vld),
    .slot_vld (sw_slot_vld),
    .din      (fb_rd_data),
    .pipe_in  (pipe_mem[ch]),
    .acc_in   (acc_mem[ch]),
    .pipe_out (pipe_next),
    .acc_out  (acc_next)
  );

  always_ff @(posedge clk) begin
    if (sweeping) begin
      pipe_mem[ch] <= pipe_next;
      acc_mem[ch]  <= acc_next;
    end
  end

  // result read port
  always_ff @(posedge clk) begin
    if (ro_rd) begin
      acc_vec_t w;
      w = acc_mem[ro_ch];
      ro_data <= (ro_word < 7'(NWORDS)) ? w[ro_word] : '0;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(frame_ready && sweeping))
    else $error("frame_ready arrived before the channel sweep ended");

endmodule
