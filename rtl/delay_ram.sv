// delay_ram: simple dual-port RAM, the storage that holds the delay lines of
// a folded branch.
//
// The folded branch of the original architecture keeps its delayed and temporary values in
// D flip-flop delay lines and, on the FPGA, moves them into Block RAM. This
// module is that Block RAM: one write port and one read port on the same
// clock, DEPTH words of WIDTH bits, no reset (contents are cleared by the
// controller after reset). The read is synchronous: rdata shows the word at
// raddr one clock after raddr is presented. When the same address is written
// and read on one edge, rdata returns the new data (write-first), so a value
// written by the arithmetic unit can be read back on the next tick. Port
// layout and write-first behaviour are this design's choices.
module delay_ram #(
  parameter int unsigned DEPTH = 800,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[waddr] <= wdata;
    end
    if (we && (waddr == raddr)) begin
      rdata <= wdata;
    end else begin
      rdata <= mem[raddr];
    end
  end

endmodule
