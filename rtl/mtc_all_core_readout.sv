// mtc_all_core_readout: one complete 36-lag correlator element with its
// result memory, the single-element design of the document (its
// MTC_all_core_readout: MTC36 system plus Ram).
//
// One sample (din, 0..31 photons) is taken per `tick` (one tau, 10 us in the
// target system). mtc_enable_chain times the stages; mtc36_system computes
// the next state, which is held here in registers: the delay lines of the 8
// stages and the 110 64-bit result words. A measurement runs while en_in=1.
// After en_in drops the stages are drained one after another; when the last
// stage is off the 110 result words are copied into result_ram, one word per
// clock, and results_ready rises 110 clocks after busy fell. They can then be
// read at rd_addr with one clock of latency (word map in cor_pkg). Starting a
// new measurement clears results_ready. Copying into the RAM after the
// measurement, rather than writing it continuously, is this design's choice.
module mtc_all_core_readout
  import cor_pkg::*;
#(
  parameter int unsigned LAG_BASE = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              en_in,
  input  logic [DIN_W-1:0]  din,
  input  logic [6:0]        rd_addr,
  output logic [ACC_W-1:0]  rd_data,
  output logic              busy,
  output logic              results_ready,
  output logic [NSTAGE-1:0] en_stage
);

  logic [NSTAGE-1:0]               due, in_vld;
  logic [NSTAGE-1:0][PIPE_LEN-1:0] slot_vld;
  logic                            first, done;
  pipe_vec_t                       pipe_q, pipe_d;
  acc_vec_t                        acc_q, acc_d;
  logic                            dumping;
  logic [6:0]                      dump_addr;

  mtc_enable_chain u_ctrl (
    .clk, .rst_n, .tick, .en_in,
    .due, .first, .in_vld, .slot_vld, .en_stage, .busy, .done
  );

  mtc36_system #(.LAG_BASE(LAG_BASE)) u_sys (
    .due, .first, .in_vld, .slot_vld, .din,
    .pipe_in (pipe_q), .acc_in (acc_q),
    .pipe_out(pipe_d), .acc_out(acc_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe_q        <= '0;
      acc_q         <= '0;
      dumping       <= 1'b0;
      dump_addr     <= '0;
      results_ready <= 1'b0;
    end else begin
      if (tick) begin
        pipe_q <= pipe_d;
        acc_q  <= acc_d;
      end
      if (first) results_ready <= 1'b0;
      if (done) begin
        dumping   <= 1'b1;
        dump_addr <= '0;
      end else if (dumping) begin
        dump_addr <= dump_addr + 1'b1;
        if (dump_addr == 7'(NWORDS - 1)) begin
          dumping       <= 1'b0;
          results_ready <= 1'b1;
        end
      end
    end
  end

  result_ram #(.DEPTH(RAM_DEPTH), .W(ACC_W)) u_ram (
    .clk,
    .we    (dumping),
    .waddr (dump_addr),
    .wdata (acc_q[dump_addr]),
    .raddr (rd_addr),
    .rdata (rd_data)
  );

endmodule
