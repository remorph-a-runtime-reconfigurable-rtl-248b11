// remorph_top: the reMORPH array, a ROWS x COLS mesh of grains joined by the
// programmable near-neighbour link switch.
//
// Work is organised in epochs. Between epochs the host (an external controller)
// downloads code and data into the grains, rewires the links and starts the
// grains that take part; during an epoch each grain runs its own program (MIMD)
// and moves results to a neighbour by writing straight into that neighbour's data
// memory over its link. An epoch ends when the participating grains have halted.
//
// Host interface (all synchronous to clk):
//   prog_we, prog_grain, prog_tgt, prog_addr, prog_data
//       PT_IMEM  write the 72-bit instruction prog_data at prog_addr of grain
//                prog_grain
//       PT_DMEM  write prog_data[47:0] at prog_addr of the grain's data memory
//       PT_LINK  set the link-switch input of grain prog_grain to prog_data[2:0]
//                (remorph_pkg::in_sel_e: none, north, east, south, west)
//   rd_grain, rd_addr -> rd_data   data memory readback, one cycle latency, for an
//                                  idle grain
//   start, start_mask, start_pc    start the masked grains at start_pc
//   busy[i], halt_pulse[i]         per-grain status
// Grain i sits at row i / COLS, column i % COLS; row 0 is north.
//
// The mesh of grains, near-neighbour links that change at runtime, and
// code/data download per epoch follow the architecture. The default 4 x 4 size
// is the sixteen-grain arrangement the architecture uses to illustrate epochs;
// the host interface is this design's own.
module remorph_top
  import remorph_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  localparam int unsigned N    = ROWS * COLS,
  localparam int unsigned IDXW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // programming
  input  logic            prog_we,
  input  logic [IDXW-1:0] prog_grain,
  input  logic [1:0]      prog_tgt,
  input  logic [AW-1:0]   prog_addr,
  input  logic [IW-1:0]   prog_data,
  // readback
  input  logic [IDXW-1:0] rd_grain,
  input  logic [AW-1:0]   rd_addr,
  output logic [DW-1:0]   rd_data,
  // run control
  input  logic            start,
  input  logic [N-1:0]    start_mask,
  input  logic [AW-1:0]   start_pc,
  output logic [N-1:0]    busy,
  output logic [N-1:0]    halt_pulse
);

  link_t   out_links [N];
  link_t   in_links  [N];
  in_sel_e link_sel  [N];
  word_t   grain_rd  [N];
  logic [IDXW-1:0] rd_grain_q;

  prog_tgt_e tgt;
  assign tgt = prog_tgt_e'(prog_tgt);

  link_switch #(.ROWS(ROWS), .COLS(COLS)) u_links (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (prog_we && tgt == PT_LINK),
    .cfg_idx   (prog_grain),
    .cfg_sel   (in_sel_e'(prog_data[2:0])),
    .sel       (link_sel),
    .out_links (out_links),
    .in_links  (in_links)
  );

  for (genvar i = 0; i < N; i++) begin : g_grain
    grain u_grain (
      .clk        (clk),
      .rst_n      (rst_n),
      .prog_we    (prog_we && prog_grain == IDXW'(i) && tgt != PT_LINK),
      .prog_tgt   (tgt),
      .prog_addr  (prog_addr),
      .prog_data  (prog_data),
      .rd_addr    (rd_addr),
      .rd_data    (grain_rd[i]),
      .start      (start && start_mask[i]),
      .start_pc   (start_pc),
      .busy       (busy[i]),
      .halt_pulse (halt_pulse[i]),
      .nb_in      (in_links[i]),
      .nb_out     (out_links[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_grain_q <= '0;
    else        rd_grain_q <= rd_grain;
  end

  assign rd_data = (32'(rd_grain_q) < N) ? grain_rd[rd_grain_q] : '0;

endmodule
