// link_switch: the fast programmable near-neighbour interconnect of the array.
//
// Grains sit on a ROWS x COLS mesh, numbered row by row (index = row*COLS + col,
// row 0 at the north edge). Every grain drives one outgoing link (link_t: write
// enable, 9-bit address, 48-bit word). For every grain the switch holds a
// configuration register, in_sel_e, naming the one neighbour (north, east, south
// or west) whose outgoing link is connected to this grain's memory write port,
// or none. Changing these registers between epochs is the "link
// reconfiguration" of the architecture: the grains keep their code and data, only
// the communication pattern changes. A neighbour beyond the edge of the mesh
// reads as an idle link.
//
// Because each memory listens to exactly one neighbour, two grains can never
// write the same memory through links in the same cycle; one grain's link may
// however be routed to several neighbours at once.
//
// Timing: the link path is combinational from a grain's nb_out to its neighbour's
// memory write port, so a write-back reaches the neighbour memory at the same
// clock edge as an own write-back. A configuration write (cfg_we, cfg_idx,
// cfg_sel) takes effect at the next clock edge. Reset leaves every link open.
//
// Near-neighbour connectivity and runtime link changes follow the architecture;
// the per-destination input-select form of the switch is this design's choice.
module link_switch
  import remorph_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  localparam int unsigned N   = ROWS * COLS,
  localparam int unsigned IDXW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [IDXW-1:0] cfg_idx,
  input  in_sel_e         cfg_sel,
  output in_sel_e         sel [N],
  input  link_t           out_links [N],
  output link_t           in_links [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) sel[i] <= IN_NONE;
    end else if (cfg_we && 32'(cfg_idx) < N) begin
      sel[cfg_idx] <= cfg_sel;
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned I = r * COLS + c;
      link_t north, east, south, west;
      if (r > 0) begin : g_north_on assign north = out_links[I - COLS]; end
      else begin : g_north_off assign north = '0; end
      if (c < COLS - 1) begin : g_east_on assign east = out_links[I + 1]; end
      else begin : g_east_off assign east = '0; end
      if (r < ROWS - 1) begin : g_south_on assign south = out_links[I + COLS]; end
      else begin : g_south_off assign south = '0; end
      if (c > 0) begin : g_west_on assign west = out_links[I - 1]; end
      else begin : g_west_off assign west = '0; end

      always_comb begin
        unique case (sel[I])
          IN_NORTH: in_links[I] = north;
          IN_EAST:  in_links[I] = east;
          IN_SOUTH: in_links[I] = south;
          IN_WEST:  in_links[I] = west;
          default:  in_links[I] = '0;
        endcase
      end
    end
  end

endmodule
