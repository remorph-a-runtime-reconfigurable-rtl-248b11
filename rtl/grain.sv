// grain: one coarse-grained reconfigurable module (CGRM) of the reMORPH array.
//
// A small Harvard processor: a 512 x 72-bit instruction memory, a 512 x 48-bit
// data memory, the micro-sequencer and a DSP48E1-style compute element. The grain
// reads operands only from its own data memory; it writes results to its own
// memory, to the memory of the neighbour its outgoing link is routed to
// (nb_out), or to both. The neighbour that the link switch routes towards this
// grain writes into its memory through nb_in.
//
// Host side, used between epochs while the grain is idle:
//   prog_we/prog_tgt/prog_addr/prog_data  write one instruction (72 bits, PT_IMEM)
//                                         or one data word (low 48 bits, PT_DMEM)
//   rd_addr -> rd_data                    read a data word; rd_data is valid one
//                                         cycle after rd_addr, only while !busy
//   start/start_pc                        run from start_pc until HALT
//   busy, halt_pulse                      running; one-cycle pulse on HALT
// A host data write goes through the own write port and takes priority over a
// write-back in the same cycle; the host is expected to write only while idle.
//
// The parts and their connections follow the tile diagram of the architecture
// (sequencer, instruction memory, memory, DSP48E); the programming port follows
// the remark that the low 48 bits of the data bus are written when data memory
// is programmed. The readback port is this design's choice.
module grain
  import remorph_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // host programming and readback
  input  logic      prog_we,
  input  prog_tgt_e prog_tgt,
  input  addr_t     prog_addr,
  input  instr_t    prog_data,
  input  addr_t     rd_addr,
  output word_t     rd_data,
  // run control
  input  logic      start,
  input  addr_t     start_pc,
  output logic      busy,
  output logic      halt_pulse,
  // near-neighbour links
  input  link_t     nb_in,
  output link_t     nb_out
);

  addr_t  pc, imem_raddr;
  instr_t imem_rdata;
  addr_t  seq_raddr0, dm_raddr0, dm_raddr1;
  word_t  dm_rdata0, dm_rdata1;
  logic   seq_we, dm_we;
  addr_t  seq_waddr, dm_waddr;
  word_t  seq_wdata, dm_wdata;
  logic   ce_valid;
  ctrl_t  ce_ctrl;
  logic [AWIDTH-1:0] ce_a;
  logic [BWIDTH-1:0] ce_b;
  word_t  ce_c, ce_p;
  flags_t ce_flags;
  logic   ce_out_valid;

  logic host_dm_we;
  assign host_dm_we = prog_we && (prog_tgt == PT_DMEM);

  always_comb begin
    dm_we    = host_dm_we | seq_we;
    dm_waddr = host_dm_we ? prog_addr : seq_waddr;
    dm_wdata = host_dm_we ? prog_data[DW-1:0] : seq_wdata;
  end

  assign dm_raddr0 = busy ? seq_raddr0 : rd_addr;
  assign rd_data   = dm_rdata0;

  instr_mem #(.DEPTH(512), .WIDTH(IW)) u_imem (
    .clk   (clk),
    .we    (prog_we && (prog_tgt == PT_IMEM)),
    .waddr (prog_addr),
    .wdata (prog_data),
    .raddr (imem_raddr),
    .rdata (imem_rdata)
  );

  data_mem #(.DEPTH(512), .WIDTH(DW)) u_dmem (
    .clk    (clk),
    .wea    (dm_we),
    .waddra (dm_waddr),
    .wdataa (dm_wdata),
    .web    (nb_in.we),
    .waddrb (nb_in.addr),
    .wdatab (nb_in.data),
    .raddr0 (dm_raddr0),
    .rdata0 (dm_rdata0),
    .raddr1 (dm_raddr1),
    .rdata1 (dm_rdata1)
  );

  sequencer u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .start_pc   (start_pc),
    .busy       (busy),
    .halt_pulse (halt_pulse),
    .pc         (pc),
    .imem_raddr (imem_raddr),
    .imem_rdata (imem_rdata),
    .dm_raddr0  (seq_raddr0),
    .dm_rdata0  (dm_rdata0),
    .dm_raddr1  (dm_raddr1),
    .dm_rdata1  (dm_rdata1),
    .dm_we      (seq_we),
    .dm_waddr   (seq_waddr),
    .dm_wdata   (seq_wdata),
    .ce_valid   (ce_valid),
    .ce_ctrl    (ce_ctrl),
    .ce_a       (ce_a),
    .ce_b       (ce_b),
    .ce_c       (ce_c),
    .ce_p       (ce_p),
    .ce_flags   (ce_flags),
    .nb_out     (nb_out)
  );

  compute_element u_ce (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ce_valid),
    .ctrl      (ce_ctrl),
    .a         (ce_a),
    .b         (ce_b),
    .c         (ce_c),
    .p         (ce_p),
    .flags     (ce_flags),
    .out_valid (ce_out_valid)
  );

endmodule
