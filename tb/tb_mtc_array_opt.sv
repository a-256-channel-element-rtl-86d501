// tb_mtc_array_opt: test of the 13-multiplier correlator array with 8
// channels, for both lag numberings (two instances fed the same frames).
//
// Each tick the testbench loads a new random frame (0..31 per channel) into
// its model of the frame buffer and pulses frame_ready, one tick every
// FRAME = 2*NCH+4 clocks (the ratio of 500 clocks per tau to 256 channels).
// It checks the sweep lengths of every stage (NCH clocks for stage 1, 2*NCH
// for stage 2, 4*NCH for stages 3..8), that stage 1 reads the channels in
// order, that the shared lane never runs two stages at once, and that no
// overrun occurs. After each measurement and its drain all 128 words of
// every channel are read and compared with corr_ref_pkg. Two measurements
// are run, the second one short enough that stages 7 and 8 get no sample.
// Last, frames only NCH+3 clocks apart (too short for stage 2) must raise
// overrun; the array's overrun assertions are switched off for that part.
module tb_mtc_array_opt;
  import cor_pkg::*;
  import corr_ref_pkg::*;
  localparam int NCH   = 8;
  localparam int FRAME = 2 * NCH + 4;

  logic clk = 1'b0, rst_n = 1'b0, frame_ready = 1'b0, en_in = 1'b0;
  logic fb_rd_en, fb_rd_en0;
  logic [2:0] fb_rd_addr, fb_rd_addr0;
  logic [DIN_W-1:0] fb_rd_data;
  logic ro_rd = 1'b0;
  logic [2:0] ro_ch = '0;
  logic [6:0] ro_word = '0;
  logic [ACC_W-1:0] ro_data, ro_data0;
  logic busy, done, sweeping, overrun, busy0, done0, sweeping0, overrun0;
  logic [NSTAGE-1:0] en_stage, en_stage0, stage_busy, stage_busy0;

  int checks = 0, failures = 0;
  int unsigned fb [NCH];
  int unsigned xs [NCH][$];
  int next_ch = 0, order_err = 0, overlap = 0, n_done = 0;
  int len [NSTAGE];
  int nsweep [NSTAGE];
  int bad_len [NSTAGE];

  mtc_array_opt #(.NCH(NCH)) dut (.*);

  mtc_array_opt #(.NCH(NCH), .LAG_BASE(0)) dut0 (
    .clk, .rst_n, .frame_ready, .en_in,
    .fb_rd_en(fb_rd_en0), .fb_rd_addr(fb_rd_addr0), .fb_rd_data,
    .ro_rd, .ro_ch, .ro_word, .ro_data(ro_data0),
    .busy(busy0), .done(done0), .sweeping(sweeping0), .overrun(overrun0),
    .en_stage(en_stage0), .stage_busy(stage_busy0)
  );

  assign fb_rd_data = DIN_W'(fb[fb_rd_addr]);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (fb_rd_en) begin
        if (int'(fb_rd_addr) != next_ch) order_err++;
        next_ch++;
      end
      if (done) n_done++;
      if ($countones(stage_busy[7:4]) > 1) overlap++;
      for (int s = 0; s < NSTAGE; s++) begin
        if (stage_busy[s]) begin
          len[s]++;
        end else if (len[s] != 0) begin
          if (len[s] != ((s == 0) ? NCH : (s == 1) ? 2 * NCH : 4 * NCH)) bad_len[s]++;
          nsweep[s]++;
          len[s] = 0;
        end
      end
    end
  end

  task automatic chk(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic frame(input logic en);
    for (int c = 0; c < NCH; c++) begin
      fb[c] = $urandom_range(31, 0);
    end
    @(negedge clk);
    en_in = en;
    frame_ready = 1'b1;
    next_ch = 0;
    @(negedge clk);
    frame_ready = 1'b0;
    repeat (FRAME - 2) @(negedge clk);
    chk("stage 1 read every channel", next_ch, NCH);
  endtask

  task automatic run(input int m);
    int d0;
    for (int c = 0; c < NCH; c++) xs[c].delete();
    d0 = n_done;
    for (int i = 0; i < m; i++) begin
      frame(1'b1);
      for (int c = 0; c < NCH; c++) xs[c].push_back(fb[c]);
    end
    while (busy || busy0) frame(1'b0);
    chk("done pulses", n_done - d0, 1);
    for (int c = 0; c < NCH; c++) begin
      words_t w, w0;
      w  = ref_words(xs[c], 1);
      w0 = ref_words(xs[c], 0);
      for (int a = 0; a < 128; a++) begin
        @(negedge clk);
        ro_rd = 1'b1; ro_ch = 3'(c); ro_word = 7'(a);
        @(negedge clk);
        ro_rd = 1'b0;
        chk($sformatf("ch %0d word %0d", c, a), ro_data, (a < NWORDS) ? w[a] : 0);
        chk($sformatf("base0 ch %0d word %0d", c, a), ro_data0, (a < NWORDS) ? w0[a] : 0);
      end
    end
    chk("overrun", overrun, 0);
    chk("overrun base0", overrun0, 0);
  endtask

  initial begin
    for (int s = 0; s < NSTAGE; s++) begin
      len[s] = 0; nsweep[s] = 0; bad_len[s] = 0;
    end
    order_err = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run(1030);
    run(90);
    chk("stage 1 order errors", order_err, 0);
    // too-fast frames must be reported as an overrun (assertions muted here)
    $assertoff(0, tb_mtc_array_opt.dut);
    $assertoff(0, tb_mtc_array_opt.dut0);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      en_in = 1'b1;
      frame_ready = 1'b1;
      @(negedge clk);
      frame_ready = 1'b0;
      repeat (NCH + 2) @(negedge clk);
    end
    chk("overrun on frames of NCH+3 clocks", overrun, 1);
    chk("shared lane overlaps", overlap, 0);
    for (int s = 0; s < NSTAGE; s++) begin
      chk($sformatf("stage %0d sweep length errors", s + 1), bad_len[s], 0);
      checks++;
      if (nsweep[s] == 0) begin
        failures++;
        $display("FAIL stage %0d never swept", s + 1);
      end
    end
    $display("sweeps per stage: %0d %0d %0d %0d %0d %0d %0d %0d", nsweep[0], nsweep[1],
             nsweep[2], nsweep[3], nsweep[4], nsweep[5], nsweep[6], nsweep[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
