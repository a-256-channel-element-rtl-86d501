// result_readout: read-out control for the result memories of all channels
// (the "MEM read out control circuit" feeding the 64-bit output bus).
//
// After `start` it walks through all results in order: channel 0 words
// 0..109, channel 1 words 0..109, and so on (word map in cor_pkg). Each
// `next` strobe (the external read clock, synchronised to clk) reads one
// word from the array's result port; the word appears on ro_data one clock
// later with ro_valid, and ro_last marks the final word of the final channel.
// `active` is high from start until the last word has been requested.
module result_readout
  import cor_pkg::*;
#(
  parameter int unsigned NCH  = 256,
  localparam int unsigned CH_W = $clog2(NCH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             next,
  output logic             active,
  // to the array's result port
  output logic             arr_rd,
  output logic [CH_W-1:0]  arr_ch,
  output logic [6:0]       arr_word,
  input  logic [ACC_W-1:0] arr_data,
  // 64-bit output bus
  output logic [ACC_W-1:0] ro_data,
  output logic             ro_valid,
  output logic             ro_last
);

  logic final_word;

  assign arr_rd     = active && next;
  assign final_word = (arr_ch == CH_W'(NCH - 1)) && (arr_word == 7'(NWORDS - 1));
  assign ro_data    = arr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      arr_ch   <= '0;
      arr_word <= '0;
      ro_valid <= 1'b0;
      ro_last  <= 1'b0;
    end else begin
      ro_valid <= arr_rd;
      ro_last  <= arr_rd && final_word;
      if (start) begin
        active   <= 1'b1;
        arr_ch   <= '0;
        arr_word <= '0;
      end else if (arr_rd) begin
        if (final_word) begin
          active <= 1'b0;
        end else if (arr_word == 7'(NWORDS - 1)) begin
          arr_word <= '0;
          arr_ch   <= arr_ch + 1'b1;
        end else begin
          arr_word <= arr_word + 1'b1;
        end
      end
    end
  end

endmodule
