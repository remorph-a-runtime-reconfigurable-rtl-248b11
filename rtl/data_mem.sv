// data_mem: the data memory ("register file") of a grain, DEPTH words of WIDTH bits.
//
// Two synchronous read ports serve the grain's own sequencer (two operands per
// cycle; data one edge after the address). Two write ports: port A is the grain's
// own write-back (shared with host programming inside the grain), port B is the
// near-neighbour link through which the neighbour selected by the link switch
// writes into this memory. If both write the same address in the same cycle the
// own write wins. A read of an address written in the same cycle returns the old
// word (read-first).
//
// That a grain reads only its local memory and that its own grain and a neighbour
// both write it follows the architecture; the collision rule and read-first
// behaviour are this design's choice. On the FPGA the two read ports and two
// write ports map to two block RAMs holding the same contents.
module data_mem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 48,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // own write port
  input  logic             wea,
  input  logic [AW-1:0]    waddra,
  input  logic [WIDTH-1:0] wdataa,
  // neighbour write port
  input  logic             web,
  input  logic [AW-1:0]    waddrb,
  input  logic [WIDTH-1:0] wdatab,
  // read ports
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (web && !(wea && waddra == waddrb)) mem[waddrb] <= wdatab;
    if (wea) mem[waddra] <= wdataa;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end

endmodule
