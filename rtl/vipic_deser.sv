// vipic_deser: serial-to-parallel converter for one VIPIC readout group
// (256 pixels), turning the serial hit stream into one photon count per
// pixel per frame.
//
// The detector sends, per hit pixel, a 16-bit record on one serial line, one
// bit per ser_valid strobe (10 ns per bit in the target system), most
// significant bit first: a 3-bit start code, the 5-bit photon count and the
// 8-bit pixel address. The parser hunts for the start code, then collects the
// 13 payload bits and writes the count into the frame buffer at the address.
// In sparse readout only hit pixels are sent; in imaging readout all pixels
// are, with the same record format. Both work unchanged.
//
// The frame buffer is double-buffered. frame_tick (every 10 us) swaps the
// banks and pulses frame_ready one clock later: the bank just closed holds the
// frame's counts and is read by the correlator at rd_addr (combinational
// read, rd_data). Reading with rd_en=1 also clears the entry, so each pixel
// that had no hit in the next frame reads 0. A per-entry written flag, reset
// by rst_n, stands in for clearing the whole RAM. A pixel hit twice in one
// frame keeps its last count. The start code value (START_CODE), the bit
// order and the double buffering are this design's choices: only the record
// fields and their widths are given for the detector.
module vipic_deser #(
  parameter int unsigned NCH        = 256,
  parameter int unsigned CNT_W      = 5,
  parameter int unsigned START_W    = 3,
  parameter logic [START_W-1:0] START_CODE = 3'b101,
  localparam int unsigned ADDR_W    = $clog2(NCH),
  localparam int unsigned PAY_W     = CNT_W + ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ser_valid,
  input  logic              ser_data,
  input  logic              frame_tick,
  output logic              frame_ready,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [CNT_W-1:0]  rd_data,
  output logic [15:0]       hit_count   // records received in the current frame
);

  typedef enum logic {HUNT, PAYLOAD} pstate_t;

  pstate_t                 pstate;
  logic [START_W-2:0]      win;            // last START_W-1 bits
  logic [PAY_W-2:0]        pay;
  logic [$clog2(PAY_W)-1:0] nbits;
  logic                    wbank;          // bank being filled
  logic [CNT_W-1:0]        mem0 [NCH];
  logic [CNT_W-1:0]        mem1 [NCH];
  logic [1:0][NCH-1:0]     written;

  logic                    rec_done;
  logic [PAY_W-1:0]        rec;
  logic [CNT_W-1:0]        rec_cnt;
  logic [ADDR_W-1:0]       rec_addr;

  assign rec_done = ser_valid && (pstate == PAYLOAD) && (nbits == ($clog2(PAY_W))'(PAY_W - 1));
  assign rec      = {pay, ser_data};
  assign rec_cnt  = rec[PAY_W-1 -: CNT_W];
  assign rec_addr = rec[ADDR_W-1:0];

  // record parser
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate <= HUNT;
      win    <= '0;
      pay    <= '0;
      nbits  <= '0;
    end else if (ser_valid) begin
      if (pstate == HUNT) begin
        if ({win, ser_data} == START_CODE) begin
          pstate <= PAYLOAD;
          nbits  <= '0;
          win    <= '0;
        end else begin
          win <= (START_W-1)'({win, ser_data});
        end
      end else begin
        pay   <= {pay[PAY_W-3:0], ser_data};
        nbits <= nbits + 1'b1;
        if (rec_done) pstate <= HUNT;
      end
    end
  end

  // bank control and written flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank       <= 1'b0;
      frame_ready <= 1'b0;
      written     <= '0;
      hit_count   <= '0;
    end else begin
      frame_ready <= frame_tick;
      if (frame_tick) begin
        wbank     <= ~wbank;
        hit_count <= '0;
      end else if (rec_done) begin
        hit_count <= hit_count + 1'b1;
      end
      if (rec_done) written[wbank][rec_addr] <= 1'b1;
      if (rd_en) written[~wbank][rd_addr] <= 1'b0;
    end
  end

  // count memories, one write port each
  always_ff @(posedge clk) begin
    if (rec_done && wbank == 1'b0) mem0[rec_addr] <= rec_cnt;
    if (rec_done && wbank == 1'b1) mem1[rec_addr] <= rec_cnt;
  end

  always_comb begin
    if (!written[~wbank][rd_addr]) rd_data = '0;
    else if (wbank)                rd_data = mem0[rd_addr];
    else                           rd_data = mem1[rd_addr];
  end

endmodule
