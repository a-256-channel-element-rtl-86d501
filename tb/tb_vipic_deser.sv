// tb_vipic_deser: test of the serial-to-parallel converter. Frames of
// records are sent bit by bit with random gaps between ser_valid strobes:
// sparse frames (a random subset of pixels) and imaging frames (all 256
// pixels). While the next frame is being received, the previous one is read
// back through the read-and-clear port and every pixel is compared with the
// count sent (0 for a pixel without a record). Also checked: frame_ready one
// clock after frame_tick, hit_count, and that a second read of an entry
// returns 0.
module tb_vipic_deser;
  localparam int NCH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ser_valid = 1'b0, ser_data = 1'b0, frame_tick = 1'b0;
  logic frame_ready, rd_en = 1'b0;
  logic [7:0] rd_addr = '0;
  logic [4:0] rd_data;
  logic [15:0] hit_count;

  int checks = 0, failures = 0;
  int exp_cnt [2][NCH];

  vipic_deser dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // drives on the falling edge; each call ends with the bit on the line
  task automatic send_bit(input logic b);
    repeat ($urandom_range(2, 0)) begin
      @(negedge clk);
      ser_valid = 1'b0;
    end
    @(negedge clk);
    ser_valid = 1'b1;
    ser_data  = b;
  endtask

  task automatic send_frame(input int k, input bit imaging, output int nrec);
    logic [15:0] rec;
    nrec = 0;
    for (int p = 0; p < NCH; p++) exp_cnt[k%2][p] = 0;
    for (int p = 0; p < NCH; p++) begin
      if (imaging || $urandom_range(9, 0) == 0) begin
        int c = imaging ? $urandom_range(31, 0) : $urandom_range(31, 1);
        exp_cnt[k%2][p] = c;
        rec = {3'b101, 5'(c), 8'(p)};
        for (int i = 15; i >= 0; i--) send_bit(rec[i]);
        nrec++;
        repeat ($urandom_range(3, 0)) send_bit(1'b0);   // idle line
      end
    end
    @(negedge clk);
    ser_valid = 1'b0;
  endtask

  task automatic read_frame(input int k);
    for (int p = 0; p < NCH; p++) begin
      @(negedge clk);
      rd_addr = 8'(p);
      rd_en   = 1'b1;
      #1;
      chk($sformatf("frame %0d pixel %0d", k, p), rd_data, exp_cnt[k%2][p]);
      @(posedge clk);
      #1;
      chk("cleared after read", rd_data, 0);
      rd_en = 1'b0;
    end
  endtask

  initial begin
    int nrec;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    send_frame(0, 1'b0, nrec);
    for (int k = 1; k <= 6; k++) begin
      chk("hit_count", hit_count, nrec);
      @(negedge clk); frame_tick = 1'b1;
      @(negedge clk); frame_tick = 1'b0;
      chk("frame_ready", frame_ready, 1);
      fork
        send_frame(k, (k % 3 == 0), nrec);
        read_frame(k - 1);
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
