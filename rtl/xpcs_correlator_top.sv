// xpcs_correlator_top: real-time multi-tau autocorrelator for one 256-pixel
// readout group of a 64x64-pixel X-ray photon correlation detector.
//
// Data path: the group's serial hit stream (16-bit records: start code,
// 5-bit count, 8-bit pixel address) enters vipic_deser, which fills a
// double-buffered 256-entry frame. At every frame_tick (one tau, 10 us) the
// closed frame is handed to the correlator array, which accumulates, per
// pixel, 36 lag sums with their normalisation sums (lags 1 tau .. 1024 tau).
// With OPT_ARRAY=1 (default) that is mtc_array_opt, 13 multipliers shared
// over channels and lags, each stage sweeping the channels in its own lane
// (stage_busy shows which); with OPT_ARRAY=0 it is mtc_array, one 36-lag
// datapath that sweeps the channels once per frame. A measurement
// runs while en_in=1; after en_in drops the stages drain one after another
// and busy falls. result_readout then streams all 256 x 110 result words on
// the 64-bit ro_data bus, one per ro_next strobe (ro_start first).
//
// Beside it, with its own ports (el_*), stands the single correlator element
// with its 128-word result RAM (mtc_all_core_readout): one pixel's 5-bit
// sample per el_tick, results readable at el_rd_addr after el_ready.
//
// One clock domain: clk runs the serial input (one bit per ser_valid), the
// sweep and the readout. With a 100 MHz clk and one bit per clock, a 10 us
// frame has 1000 clocks. Stage 1's sweep, which empties the frame buffer,
// takes NCH of them (sweeping); in the 13-multiplier array the later stages
// go on in the background, which needs frames of at least about 2*NCH
// clocks (overrun reports a frame that came too early).
module xpcs_correlator_top
  import cor_pkg::*;
#(
  parameter int unsigned NCH      = 256,
  parameter int unsigned LAG_BASE = 1,
  parameter bit          OPT_ARRAY = 1'b1,  // 1: 13-multiplier array, 0: 36-lag swept array
  localparam int unsigned CH_W    = $clog2(NCH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // detector readout group
  input  logic              ser_valid,
  input  logic              ser_data,
  input  logic              frame_tick,
  // measurement control and status
  input  logic              en_in,
  output logic              busy,
  output logic              done,
  output logic              overrun,
  output logic              sweeping,
  output logic [NSTAGE-1:0] en_stage,
  output logic [NSTAGE-1:0] stage_busy,
  output logic [15:0]       hit_count,
  // result bus
  input  logic              ro_start,
  input  logic              ro_next,
  output logic              ro_active,
  output logic [ACC_W-1:0]  ro_data,
  output logic              ro_valid,
  output logic              ro_last,
  // single element
  input  logic              el_tick,
  input  logic              el_en_in,
  input  logic [DIN_W-1:0]  el_din,
  input  logic [6:0]        el_rd_addr,
  output logic [ACC_W-1:0]  el_rd_data,
  output logic              el_busy,
  output logic              el_ready,
  output logic [NSTAGE-1:0] el_en_stage
);

  logic              frame_ready;
  logic              fb_rd_en;
  logic [CH_W-1:0]   fb_rd_addr;
  logic [DIN_W-1:0]  fb_rd_data;
  logic              arr_rd;
  logic [CH_W-1:0]   arr_ch;
  logic [6:0]        arr_word;
  logic [ACC_W-1:0]  arr_data;

  vipic_deser #(.NCH(NCH), .CNT_W(DIN_W)) u_deser (
    .clk, .rst_n, .ser_valid, .ser_data, .frame_tick, .frame_ready,
    .rd_en(fb_rd_en), .rd_addr(fb_rd_addr), .rd_data(fb_rd_data), .hit_count
  );

  if (OPT_ARRAY) begin : g_opt
    mtc_array_opt #(.NCH(NCH), .LAG_BASE(LAG_BASE)) u_array (
      .clk, .rst_n, .frame_ready, .en_in,
      .fb_rd_en, .fb_rd_addr, .fb_rd_data,
      .ro_rd(arr_rd), .ro_ch(arr_ch), .ro_word(arr_word), .ro_data(arr_data),
      .busy, .done, .sweeping, .overrun, .en_stage, .stage_busy
    );
  end else begin : g_par
    mtc_array #(.NCH(NCH), .LAG_BASE(LAG_BASE)) u_array (
      .clk, .rst_n, .frame_ready, .en_in,
      .fb_rd_en, .fb_rd_addr, .fb_rd_data,
      .ro_rd(arr_rd), .ro_ch(arr_ch), .ro_word(arr_word), .ro_data(arr_data),
      .busy, .done, .sweeping, .overrun, .en_stage
    );
    // all stages are computed together during the one channel sweep
    assign stage_busy = {NSTAGE{sweeping}};
  end

  result_readout #(.NCH(NCH)) u_readout (
    .clk, .rst_n, .start(ro_start), .next(ro_next), .active(ro_active),
    .arr_rd, .arr_ch, .arr_word, .arr_data,
    .ro_data, .ro_valid, .ro_last
  );

  mtc_all_core_readout #(.LAG_BASE(LAG_BASE)) u_element (
    .clk, .rst_n, .tick(el_tick), .en_in(el_en_in), .din(el_din),
    .rd_addr(el_rd_addr), .rd_data(el_rd_data),
    .busy(el_busy), .results_ready(el_ready), .en_stage(el_en_stage)
  );

endmodule
