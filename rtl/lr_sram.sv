// Synchronous two-port (one read, one write) memory used as the range-table
// memory of a search unit and as one level of the binary range search.
//
// The document only says that the search unit memory is synchronous; the port
// arrangement is this design's choice. A read issued with re=1 returns its
// word on rdata in the next cycle and rdata holds until the next read. A read
// and a write to the same address in the same cycle return the new word
// (write-first), so a token always sees the writes of the tokens ahead of it.
// The array has no reset, like an SRAM macro: the user writes every word
// that is read.
module lr_sram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = 50,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= (we && (waddr == raddr)) ? wdata : mem[raddr];
  end

endmodule
