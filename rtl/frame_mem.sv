// frame_mem - single-port synchronous RAM holding one image frame.
//
// DEPTH words of WIDTH bits. One access per clock: a write when we is
// high, otherwise a read when re is high, whose data appears on rdata one
// clock later. The array has no reset; whatever is read must have been
// written first.
//
// The document gives each processing element its own image memory; this
// single-port organisation with one 16-bit coefficient per word, so that
// the transform can work in place, is this design's choice.
module frame_mem #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512 * 512,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic             re,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata     <= mem[addr];
  end

endmodule
