// tb_result_ram: writes random words to all 128 addresses, reads them back
// in random order and checks data and the one-clock read latency.
module tb_result_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [63:0] wdata = '0, rdata;
  logic [63:0] model [128];
  int checks = 0, failures = 0;

  result_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++) begin
      model[a] = {$urandom, $urandom};
      @(negedge clk);
      we = 1'b1; waddr = 7'(a); wdata = model[a];
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(127, 0);
      @(negedge clk);
      raddr = 7'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d", a);
      end
      // the output must not change before the next clock edge
      raddr = 7'(a ^ 1);
      #2;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL latency"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
