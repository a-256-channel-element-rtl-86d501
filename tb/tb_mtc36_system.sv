// tb_mtc36_system: test of the 36-lag element datapath. The testbench holds
// the element's state (delay lines and 110 result words) in its own
// registers, times it with mtc_enable_chain and feeds random samples; after
// the drain the 110 words are compared with corr_ref_pkg, for two
// measurement lengths (the second checks that a new start clears the sums).
module tb_mtc36_system;
  import cor_pkg::*;
  import corr_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, en_in = 1'b0;
  logic [NSTAGE-1:0] due, in_vld, en_stage;
  logic [NSTAGE-1:0][PIPE_LEN-1:0] slot_vld;
  logic first, busy, done;
  logic [DIN_W-1:0] din = '0;
  pipe_vec_t pipe_q = '0, pipe_d;
  acc_vec_t acc_q = '0, acc_d;

  int checks = 0, failures = 0;

  mtc_enable_chain u_ctrl (.*);
  mtc36_system dut (.due, .first, .in_vld, .slot_vld, .din, .pipe_in(pipe_q), .acc_in(acc_q),
                    .pipe_out(pipe_d), .acc_out(acc_d));

  always #5 clk = ~clk;
  always @(posedge clk) if (tick) begin pipe_q <= pipe_d; acc_q <= acc_d; end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_tick(input logic en, input int unsigned x);
    en_in <= en; din <= DIN_W'(x); tick <= 1'b1;
    @(posedge clk);
    tick <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run(input int m);
    int unsigned xs[$];
    words_t w;
    for (int i = 0; i < m; i++) begin
      int unsigned x = $urandom_range(31, 0);
      xs.push_back(x);
      do_tick(1'b1, x);
    end
    while (busy) do_tick(1'b0, 7);
    w = ref_words(xs, 1);
    for (int a = 0; a < NWORDS; a++) begin
      checks++;
      if (acc_q[a] !== w[a]) begin
        failures++;
        $display("FAIL word %0d got %0d expected %0d", a, acc_q[a], w[a]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(1500);
    run(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
