// instr_mem: the instruction memory of a grain, DEPTH words of WIDTH bits.
//
// One synchronous write port, used by the host to download the code of an epoch,
// and one synchronous read port, used by the sequencer: the instruction at raddr
// appears on rdata one clock edge after raddr is presented, as from a block RAM.
// Depth 512 and width 72 are the architecture's; on the FPGA the 72-bit word comes
// from using both read ports of one block RAM side by side. Contents are not
// initialised: a grain must be programmed before it is started.
module instr_mem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 72,
  localparam int unsigned AW   = $clog2(DEPTH)
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
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
