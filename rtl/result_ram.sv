// result_ram: result memory of one correlator element, 128 words of 64 bits
// (the document's Ram block). Simple dual port: one synchronous write port
// and one read port with a registered output (one clock of read latency).
// The word order is the result map of cor_pkg: 36 lag sums, intp/intf sums
// per stage, term and intc; words 110..127 are unused. Not initialised.
module result_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
