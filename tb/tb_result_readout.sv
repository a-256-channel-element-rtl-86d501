// tb_result_readout: test of the result read-out sequencer against a model
// of the array's registered result port (4 channels). Random `next` strobes
// are applied after `start`; every word on the bus must be the next one of
// the sequence ch 0 word 0..109, ch 1 ..., ro_last only on the final word,
// and active must fall after it. A restart must begin again at word 0.
module tb_result_readout;
  import cor_pkg::*;
  localparam int NCH = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, next = 1'b0;
  logic active, arr_rd, ro_valid, ro_last;
  logic [1:0] arr_ch;
  logic [6:0] arr_word;
  logic [63:0] arr_data, ro_data;

  int checks = 0, failures = 0;

  result_readout #(.NCH(NCH)) dut (.*);

  // model of the array's result port: word value encodes ch and word
  always_ff @(posedge clk) if (arr_rd) arr_data <= {32'hC0DE0000 | 32'(arr_ch), 32'(arr_word)};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nword;
  always @(posedge clk) begin
    if (ro_valid) begin
      logic [63:0] exp;
      exp = {32'hC0DE0000 | 32'(nword / NWORDS), 32'(nword % NWORDS)};
      checks++;
      if (ro_data !== exp || ro_last !== (nword == NCH * NWORDS - 1)) begin
        failures++;
        $display("FAIL word %0d: %h last=%0d", nword, ro_data, ro_last);
      end
      nword++;
    end
  end

  task automatic pass(input int stop_after);
    nword = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (active && (stop_after < 0 || nword < stop_after)) begin
      next = ($urandom_range(2, 0) != 0);
      @(negedge clk);
    end
    next = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    pass(37);     // abandoned part-way
    pass(-1);
    checks++;
    if (nword != NCH * NWORDS || active) begin
      failures++;
      $display("FAIL words=%0d active=%0d", nword, active);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
