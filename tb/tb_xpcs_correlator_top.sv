// tb_xpcs_correlator_top: end-to-end test of the whole correlator at its
// default size (256 channels, all parameters at their defaults).
//
// One complete measurement: M frames of detector data are sent as serial
// records (mostly sparse frames with about one pixel in ten hit, every 100th
// frame an imaging frame with all 256 pixels), each closed by frame_tick
// with en_in=1; then en_in drops and empty frames are ticked until the array
// has drained. The single element on the el_* ports is fed channel EL_CH's
// counts at the same ticks. Then all 256 x 110 result words are streamed
// over the 64-bit result bus and compared with corr_ref_pkg, and the
// element's RAM is compared too.
//
// Mechanisms that must each occur at least once (counted, and a failure if
// never seen): sparse frames, imaging frames, a pixel read as 0 after a hit
// in the previous frame (frame buffer clear), every stage of the array and
// of the element switching off in order after en_in drops, the done pulse,
// the final word flag on the result bus, a sweep of every stage (in the
// 13-multiplier array each stage has its own), and never two of stages 5..8
// at once in their shared lane. Frames last at least FRAME = 1000 clocks
// (10 us at 100 MHz); a stage must never be overrun by its next tick.
module tb_xpcs_correlator_top;
  import cor_pkg::*;
  import corr_ref_pkg::*;

  localparam int NCH   = 256;
  localparam int M     = 1100;    // samples (frames) per measurement
  localparam int EL_CH = 77;
  localparam int FRAME = 1000;    // clocks per tau: 10 us at 100 MHz

  logic clk = 1'b0, rst_n = 1'b0;
  logic ser_valid = 1'b0, ser_data = 1'b0, frame_tick = 1'b0, en_in = 1'b0;
  logic busy, done, overrun, sweeping;
  logic [NSTAGE-1:0] en_stage, el_en_stage, stage_busy, sb_prev;
  logic [15:0] hit_count;
  logic ro_start = 1'b0, ro_next = 1'b0, ro_active, ro_valid, ro_last;
  logic [ACC_W-1:0] ro_data, el_rd_data;
  logic el_tick = 1'b0, el_en_in = 1'b0, el_busy, el_ready;
  logic [DIN_W-1:0] el_din = '0;
  logic [6:0] el_rd_addr = '0;

  xpcs_correlator_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned xs [NCH][$];
  int unsigned prev [NCH];
  int n_sparse = 0, n_imaging = 0, n_cleared = 0, n_done = 0, n_last = 0;
  int fall [NSTAGE], el_fall [NSTAGE];
  int cyc = 0, last_tick = 0;
  int n_sweep [NSTAGE];
  int n_shared_busy = 0;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [NSTAGE-1:0] en_prev = '0, el_prev = '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_prev <= en_stage;
    sb_prev <= stage_busy;
    if (rst_n) begin
      for (int s = 0; s < NSTAGE; s++) if (stage_busy[s] && !sb_prev[s]) n_sweep[s]++;
      if ($countones(stage_busy[7:4]) > 1) n_shared_busy++;
    end
    el_prev <= el_en_stage;
    if (rst_n && done) n_done++;
    for (int s = 0; s < NSTAGE; s++) begin
      if (en_prev[s] && !en_stage[s]) fall[s] = cyc;
      if (el_prev[s] && !el_en_stage[s]) el_fall[s] = cyc;
    end
  end

  // send one frame's records; returns the counts of all pixels
  task automatic send_frame(input bit imaging, output int unsigned cnt [NCH]);
    logic [15:0] rec;
    for (int p = 0; p < NCH; p++) begin
      cnt[p] = 0;
      if (imaging || $urandom_range(9, 0) == 0) begin
        cnt[p] = imaging ? $urandom_range(31, 0) : $urandom_range(31, 1);
        rec = {3'b101, 5'(cnt[p]), 8'(p)};
        for (int i = 15; i >= 0; i--) begin
          @(negedge clk);
          ser_valid = 1'b1;
          ser_data  = rec[i];
        end
      end
    end
    @(negedge clk);
    ser_valid = 1'b0;
    ser_data  = 1'b0;
  endtask

  // close the frame: wait for the previous sweep and until the frame has
  // lasted FRAME clocks, then pulse frame_tick
  task automatic close_frame(input logic en, input int unsigned el_x);
    while (sweeping || cyc - last_tick < FRAME) @(negedge clk);
    last_tick = cyc;
    @(negedge clk);
    frame_tick = 1'b1;
    en_in      = en;
    el_tick    = 1'b1;
    el_en_in   = en;
    el_din     = DIN_W'(el_x);
    @(negedge clk);
    frame_tick = 1'b0;
    el_tick    = 1'b0;
  endtask

  initial begin
    int unsigned cnt [NCH];
    for (int s = 0; s < NSTAGE; s++) n_sweep[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // measurement
    for (int k = 0; k < M; k++) begin
      bit imaging;
      imaging = (k % 100 == 50);
      send_frame(imaging, cnt);
      if (imaging) n_imaging++; else n_sparse++;
      for (int p = 0; p < NCH; p++) begin
        xs[p].push_back(cnt[p]);
        if (k > 0 && prev[p] != 0 && cnt[p] == 0) n_cleared++;
        prev[p] = cnt[p];
      end
      close_frame(1'b1, cnt[EL_CH]);
    end
    // stop and drain
    while (busy || el_busy) begin
      repeat (NCH + 4) @(negedge clk);
      close_frame(1'b0, 0);
    end
    while (sweeping || !el_ready) @(negedge clk);
    chk("overrun", overrun, 0);

    // stream out every result word
    begin
      int nword = 0;
      words_t w;
      @(negedge clk); ro_start = 1'b1;
      @(negedge clk); ro_start = 1'b0;
      while (ro_active || ro_valid) begin
        ro_next = ro_active;
        @(posedge clk);
        #1;
        if (ro_valid) begin
          int ch, a;
          ch = nword / NWORDS;
          a  = nword % NWORDS;
          if (a == 0) w = ref_words(xs[ch], 1);
          chk($sformatf("ch %0d word %0d", ch, a), ro_data, w[a]);
          if (ro_last) begin
            n_last++;
            chk("last word index", nword, NCH * NWORDS - 1);
          end
          nword++;
        end
        @(negedge clk);
      end
      ro_next = 1'b0;
      chk("words streamed", nword, NCH * NWORDS);
    end

    // the single element, fed with channel EL_CH
    begin
      words_t w;
      w = ref_words(xs[EL_CH], 1);
      for (int a = 0; a < NWORDS; a++) begin
        @(negedge clk); el_rd_addr = 7'(a);
        @(negedge clk);
        chk($sformatf("element word %0d", a), el_rd_data, w[a]);
      end
    end

    // mechanisms
    for (int s = 1; s < NSTAGE; s++) begin
      checks++;
      if (!(fall[s] > fall[s-1]) || !(el_fall[s] > el_fall[s-1])) begin
        failures++;
        $display("FAIL stage %0d did not switch off after stage %0d", s + 1, s);
      end
    end
    $display("mechanisms: sparse frames %0d, imaging frames %0d, cleared pixels %0d, done %0d, last-word %0d",
             n_sparse, n_imaging, n_cleared, n_done, n_last);
    $display("stage sweeps: %0d %0d %0d %0d %0d %0d %0d %0d", n_sweep[0], n_sweep[1], n_sweep[2],
             n_sweep[3], n_sweep[4], n_sweep[5], n_sweep[6], n_sweep[7]);
    for (int s = 0; s < NSTAGE; s++) begin
      checks++;
      if (n_sweep[s] == 0) begin failures++; $display("FAIL stage %0d never swept", s + 1); end
    end
    chk("shared lane running two stages", n_shared_busy, 0);
    checks++; if (n_sparse == 0)  begin failures++; $display("FAIL no sparse frame"); end
    checks++; if (n_imaging == 0) begin failures++; $display("FAIL no imaging frame"); end
    checks++; if (n_cleared == 0) begin failures++; $display("FAIL no frame buffer clear"); end
    chk("done pulses", n_done, 1);
    chk("last-word flags", n_last, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
