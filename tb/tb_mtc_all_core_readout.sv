// tb_mtc_all_core_readout: self-checking test of one correlator element.
//
// Two measurements with random photon counts (0..31): one long enough to
// reach stage 8 (1100 samples, not a multiple of the bin sizes, so partial
// bins at the end must be dropped) and a short one that checks that a new
// start clears the sums. The 110 result words read from the RAM are compared
// with corr_ref_pkg. Also checked: the stages switch off in order after
// en_in drops (stage 1 first, stage 8 last), and results_ready rises exactly
// 110 clocks after busy falls.
module tb_mtc_all_core_readout;
  import cor_pkg::*;
  import corr_ref_pkg::*;

  localparam int TICK_DIV = 3;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              tick = 1'b0;
  logic              en_in = 1'b0;
  logic [DIN_W-1:0]  din = '0;
  logic [6:0]        rd_addr = '0;
  logic [ACC_W-1:0]  rd_data;
  logic              busy, results_ready;
  logic [NSTAGE-1:0] en_stage;

  int checks = 0, failures = 0;

  mtc_all_core_readout dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // order in which the stage enables fall
  int fall_time [NSTAGE];
  logic [NSTAGE-1:0] en_prev = '0;
  int cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    en_prev <= en_stage;
    for (int s = 0; s < NSTAGE; s++)
      if (en_prev[s] && !en_stage[s]) fall_time[s] = cycle;
  end

  task automatic do_tick(input logic en, input int unsigned x);
    en_in <= en;
    din   <= DIN_W'(x);
    tick  <= 1'b1;
    @(posedge clk);
    tick  <= 1'b0;
    repeat (TICK_DIV - 1) @(posedge clk);
  endtask

  task automatic run(input int unsigned m, input bit check_order);
    int unsigned xs[$];
    words_t exp_w;
    int t_busy, t_ready;
    for (int i = 0; i < m; i++) begin
      int unsigned x = $urandom_range(31, 0);
      xs.push_back(x);
      do_tick(1'b1, x);
    end
    // stop, keep ticking until the pipes are drained
    while (1) begin
      do_tick(1'b0, $urandom_range(31, 0));
      if (!busy) break;
    end
    t_busy = cycle;
    while (!results_ready) @(posedge clk);
    t_ready = cycle;
    checks++;
    if (t_ready - t_busy > NWORDS + TICK_DIV + 1 || t_ready - t_busy < NWORDS) begin
      failures++;
      $display("FAIL ready latency %0d", t_ready - t_busy);
    end
    exp_w = ref_words(xs, 1);
    for (int a = 0; a < NWORDS; a++) begin
      rd_addr <= 7'(a);
      @(posedge clk);
      @(posedge clk);
      checks++;
      if (rd_data !== exp_w[a]) begin
        failures++;
        $display("FAIL word %0d: got %0d expected %0d", a, rd_data, exp_w[a]);
      end
    end
    if (check_order) begin
      for (int s = 1; s < NSTAGE; s++) begin
        checks++;
        if (!(fall_time[s] > fall_time[s-1])) begin
          failures++;
          $display("FAIL stage %0d enable fell at %0d, stage %0d at %0d",
                   s + 1, fall_time[s], s, fall_time[s-1]);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run(1100, 1'b1);
    run(37, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
