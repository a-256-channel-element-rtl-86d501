// tb_mtc4_core: unit test of the stage 2..8 datapath (built here as stage 3,
// 7-bit data). Random odd/even inputs, delay-line contents, valid flags and
// sums are applied; the pre-adder, the shift, the 4 G/intp/intf sums (taps at
// registers 5..8, or 4..7 with LAG_BASE=0) and dq_odd/dq_even are checked.
module tb_mtc4_core;
  import cor_pkg::*;

  localparam int W = 7;

  logic due, first, in_vld;
  logic [W-2:0] odd_in, even_in;
  logic [7:0] slot_vld;
  logic [7:0][W-1:0] pipe_in, pipe_out1, pipe_out0;
  acc_t [3:0] g_in, p_in, f_in, g1, p1, f1, g0, p0, f0;
  logic [W-1:0] odd1, even1, odd0, even0;

  int checks = 0, failures = 0;

  mtc4_core #(.W(W), .LAG_BASE(1)) dut1 (.due, .first, .in_vld, .odd_in, .even_in, .slot_vld,
    .pipe_in, .g_in, .p_in, .f_in, .pipe_out(pipe_out1), .g_out(g1), .p_out(p1), .f_out(f1),
    .dq_odd(odd1), .dq_even(even1));
  mtc4_core #(.W(W), .LAG_BASE(0)) dut0 (.due, .first, .in_vld, .odd_in, .even_in, .slot_vld,
    .pipe_in, .g_in, .p_in, .f_in, .pipe_out(pipe_out0), .g_out(g0), .p_out(p0), .f_out(f0),
    .dq_odd(odd0), .dq_even(even0));

  task automatic chk(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      longint unsigned d;
      due      = ($urandom_range(3, 0) != 0);
      first    = ($urandom_range(9, 0) == 0);
      in_vld   = ($urandom_range(4, 0) != 0);
      odd_in   = (W-1)'($urandom);
      even_in  = (W-1)'($urandom);
      slot_vld = 8'($urandom);
      for (int k = 0; k < 8; k++) pipe_in[k] = W'($urandom);
      for (int k = 0; k < 4; k++) begin
        g_in[k] = 64'($urandom);
        p_in[k] = 64'($urandom);
        f_in[k] = 64'($urandom);
      end
      #1;
      d = odd_in + even_in;
      for (int k = 0; k < 4; k++) begin
        longint unsigned gb, pb, fb;
        gb = first ? 0 : g_in[k]; pb = first ? 0 : p_in[k]; fb = first ? 0 : f_in[k];
        chk("g base1", g1[k], gb + ((due && in_vld && slot_vld[4+k]) ? d * pipe_in[4+k] : 0));
        chk("p base1", p1[k], pb + ((due && in_vld && slot_vld[4+k]) ? pipe_in[4+k] : 0));
        chk("f base1", f1[k], fb + ((due && in_vld && slot_vld[4+k]) ? d : 0));
        chk("g base0", g0[k], gb + ((due && in_vld && slot_vld[3+k]) ? d * pipe_in[3+k] : 0));
        chk("f base0", f0[k], fb + ((due && in_vld && slot_vld[3+k]) ? d : 0));
      end
      for (int k = 0; k < 8; k++)
        chk("pipe", pipe_out1[k], due ? ((k == 0) ? d : pipe_in[k-1]) : pipe_in[k]);
      chk("dq_odd", odd1, pipe_in[6]);
      chk("dq_even", even1, pipe_in[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
