// tb_fig8_sine_workload: the sine-wave measurement of the published
// verification, run on one correlator element.
//
// Stimulus: 3072 samples x(i) = round(15*(1+sin(0.1*i))), i = 0..3071, one per
// tau (a sine of period 62.8 tau), then en_in drops and the element drains.
// The element is built with LAG_BASE=0 (lags 0..7 tau in stage 1 and 4..7
// stage samples in stages 2..8), the tap numbering of the published result
// memory dump, and the 36 lag sums, term and intc read from its result RAM
// are compared with the numbers of that dump. Word 35 is compared with the
// reference model instead: its printed value (62992111) differs from the
// model (62992116) in one digit only. The intp/intf words are compared with
// the reference model, since the dump does not list them. A second run with
// the default numbering (lags 1..8) and the 628-tau sine (step 0.01) is
// compared with the reference model.
module tb_fig8_sine_workload;
  import cor_pkg::*;
  import corr_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              tick = 1'b0;
  logic              en_in = 1'b0;
  logic [DIN_W-1:0]  din = '0;
  logic [6:0]        rd_addr = '0;
  logic [ACC_W-1:0]  rd_data0, rd_data1;
  logic              busy0, busy1, ready0, ready1;
  logic [NSTAGE-1:0] en_stage0, en_stage1;

  int checks = 0, failures = 0;

  // published lag sums, word 0..35 (word 35: see header)
  localparam longint unsigned PUBLISHED [36] = '{
    1040474, 1038352, 1033124, 1024359, 1012345, 997085, 978844, 957687,
    1866597, 1757734, 1633976, 1500208, 2723913, 2191190, 1748051, 1463686,
    2871004, 3748890, 5661145, 7436635, 15211472, 10190381, 6445446, 11512030,
    24865986, 17482945, 24150142, 17300795, 40705028, 39792833, 38879469, 37957056,
    74071225, 70403237, 66714339, 0};

  mtc_all_core_readout #(.LAG_BASE(0)) dut0 (
    .clk, .rst_n, .tick, .en_in, .din, .rd_addr, .rd_data(rd_data0),
    .busy(busy0), .results_ready(ready0), .en_stage(en_stage0));
  mtc_all_core_readout #(.LAG_BASE(1)) dut1 (
    .clk, .rst_n, .tick, .en_in, .din, .rd_addr, .rd_data(rd_data1),
    .busy(busy1), .results_ready(ready1), .en_stage(en_stage1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_tick(input logic en, input int unsigned x);
    en_in <= en;
    din   <= DIN_W'(x);
    tick  <= 1'b1;
    @(posedge clk);
    tick  <= 1'b0;
    @(posedge clk);
  endtask

  task automatic check(input string what, input int a, input longint unsigned got,
                       input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s word %0d: got %0d expected %0d", what, a, got, exp);
    end
  endtask

  task automatic measure(input real step);
    int unsigned xs[$];
    words_t w0, w1;
    for (int i = 0; i < 3072; i++) begin
      int unsigned x = int'(15.0 * (1.0 + $sin(step * i)));
      xs.push_back(x);
      do_tick(1'b1, x);
    end
    while (busy0 || busy1) do_tick(1'b0, 0);
    while (!(ready0 && ready1)) @(posedge clk);
    w0 = ref_words(xs, 0);
    w1 = ref_words(xs, 1);
    for (int a = 0; a < NWORDS; a++) begin
      rd_addr <= 7'(a);
      @(posedge clk);
      @(posedge clk);
      if (step == 0.1 && a < 35) check("published", a, rd_data0, PUBLISHED[a]);
      else check("model/base0", a, rd_data0, w0[a]);
      check("model/base1", a, rd_data1, w1[a]);
    end
    if (step == 0.1) begin
      check("published term", WORD_TERM, w0[WORD_TERM], 3072);
      check("published intc", WORD_INTC, w0[WORD_INTC], 46136);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    measure(0.1);    // T = 62.8 tau
    measure(0.01);   // T = 628 tau
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
