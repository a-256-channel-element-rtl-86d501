// tb_mtc_enable_chain: test of the stage timing and enable token chain.
// Measurements of random length m are run. Checked at every tick: stage s
// is due exactly when (c + 8) mod 2^(s-1) = 0 (c counted from the start),
// `first` only at the start tick; over a measurement stage s must receive
// exactly floor(m / 2^(s-1)) valid inputs (its complete bins); after en_in
// drops the stage enables fall in order 1..8, and busy falls with a done pulse.
module tb_mtc_enable_chain;
  import cor_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, en_in = 1'b0;
  logic [NSTAGE-1:0] due, in_vld, en_stage;
  logic [NSTAGE-1:0][PIPE_LEN-1:0] slot_vld;
  logic first, busy, done;

  int checks = 0, failures = 0;

  mtc_enable_chain dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int c;
  int nvld [NSTAGE];
  int fall [NSTAGE];
  int ndone;

  task automatic one_tick(input logic en);
    en_in <= en;
    tick  <= 1'b1;
    #1;
    @(negedge clk);
    for (int s = 0; s < NSTAGE; s++) begin
      if (busy || first) chk($sformatf("due s%0d c%0d", s + 1, c), due[s], ((c + 8) % (1 << s)) == 0);
      if (in_vld[s] && due[s]) nvld[s]++;
    end
    chk("first", first, (c == 0));
    @(posedge clk);
    tick <= 1'b0;
    c++;
    @(posedge clk);
  endtask

  task automatic run(input int m);
    c = 0;
    ndone = 0;
    for (int s = 0; s < NSTAGE; s++) begin nvld[s] = 0; fall[s] = -1; end
    for (int i = 0; i < m; i++) one_tick(1'b1);
    while (busy) one_tick(1'b0);
    for (int s = 0; s < NSTAGE; s++) chk($sformatf("valid inputs of stage %0d", s + 1), nvld[s], m / (1 << s));
    for (int s = 1; s < NSTAGE; s++) begin
      checks++;
      // a stage that received data switches off strictly after the one before
      if (!(fall[s] > fall[s-1] || (fall[s] == fall[s-1] && nvld[s] == 0))) begin
        failures++;
        $display("FAIL enable order stage %0d", s + 1);
      end
    end
    chk("done pulses", ndone, 1);
    chk("enables off", en_stage, 0);
  endtask

  int cyc = 0;
  logic [NSTAGE-1:0] en_prev = '0;
  always @(posedge clk) begin
    cyc++;
    en_prev <= en_stage;
    if (done) ndone++;
    for (int s = 0; s < NSTAGE; s++) if (en_prev[s] && !en_stage[s]) fall[s] = cyc;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(300);
    run(1029);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
