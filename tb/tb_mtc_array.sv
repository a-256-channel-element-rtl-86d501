// tb_mtc_array: test of the channel-swept correlator array with 8 channels.
// Each tick the testbench loads a new random frame (0..31 per channel) into
// its model of the frame buffer and pulses frame_ready; the array must sweep
// the channels 0..7 in order, one per clock (NCH clocks per sweep). After a
// measurement and its drain, all 110 result words of every channel are read
// through the result port and compared with corr_ref_pkg. Two measurements
// are run; words 110..127 must read 0.
module tb_mtc_array;
  import cor_pkg::*;
  import corr_ref_pkg::*;
  localparam int NCH = 8;

  logic clk = 1'b0, rst_n = 1'b0, frame_ready = 1'b0, en_in = 1'b0;
  logic fb_rd_en;
  logic [2:0] fb_rd_addr;
  logic [DIN_W-1:0] fb_rd_data;
  logic ro_rd = 1'b0;
  logic [2:0] ro_ch = '0;
  logic [6:0] ro_word = '0;
  logic [ACC_W-1:0] ro_data;
  logic busy, done, sweeping, overrun;
  logic [NSTAGE-1:0] en_stage;

  int checks = 0, failures = 0;
  int unsigned fb [NCH];
  int unsigned xs [NCH][$];
  int sweep_len = 0, next_ch = 0, order_err = 0;

  mtc_array #(.NCH(NCH)) dut (.*);

  assign fb_rd_data = DIN_W'(fb[fb_rd_addr]);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && fb_rd_en) begin
      if (int'(fb_rd_addr) != next_ch) order_err++;
      next_ch++;
      sweep_len++;
    end
  end

  task automatic chk(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic frame(input logic en);
    for (int c = 0; c < NCH; c++) begin
      fb[c] = $urandom_range(31, 0);
    end
    @(negedge clk);
    en_in = en;
    frame_ready = 1'b1;
    @(negedge clk);
    frame_ready = 1'b0;
    sweep_len = 0;
    next_ch = 0;
    while (sweeping) @(negedge clk);
    chk("sweep length", sweep_len, NCH);
    repeat (2) @(negedge clk);
  endtask

  task automatic run(input int m);
    for (int c = 0; c < NCH; c++) xs[c].delete();
    for (int i = 0; i < m; i++) begin
      frame(1'b1);
      for (int c = 0; c < NCH; c++) xs[c].push_back(fb[c]);
    end
    while (busy) frame(1'b0);
    for (int c = 0; c < NCH; c++) begin
      words_t w = ref_words(xs[c], 1);
      for (int a = 0; a < 128; a++) begin
        @(negedge clk);
        ro_rd = 1'b1; ro_ch = 3'(c); ro_word = 7'(a);
        @(negedge clk);
        ro_rd = 1'b0;
        chk($sformatf("ch %0d word %0d", c, a), ro_data, (a < NWORDS) ? w[a] : 0);
      end
    end
    chk("overrun", overrun, 0);
    chk("sweep order errors", order_err, 0);
  endtask

  initial begin
    order_err = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run(1030);
    run(90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
