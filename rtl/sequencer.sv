// sequencer: the micro-sequencer of a grain.
//
// It executes the explicit 72-bit instructions of remorph_pkg::instr_t in a
// five-stage pipeline, one cycle per stage:
//   P   the instruction arrives from the instruction memory; both source
//       addresses are presented to the data memory
//   O   for an indirect operand the word just read is used as its address
//       (low 9 bits); a direct operand is read again at the same address
//   E1  the compute element registers A, B, C and the control word; for an
//       indirect write-back the pointer location own_addr is read
//   E2  the compute element forms P and the flags
//   W   the result is written to the own memory and/or sent over the link; a
//       conditional jump is resolved with the flags of this result
// The instruction memory is read in the cycle before P, from the next address.
//
// Issue rules. The data memory has two read ports, used by P and by O, so a new
// instruction enters P only when O is empty: at most one instruction every two
// cycles. An instruction also waits
//   - while the instruction in E1 reads its write-back pointer (port 0 busy);
//   - while an older instruction still has to write an address it will read
//     (read-after-write through the data memory; a write whose address is not
//     yet known, and an operand whose address is not yet known, count as a
//     match);
//   - after a conditional jump, until that jump reaches W: the next address is
//     then known and the instruction at it enters P one cycle later.
// Unconditional next addresses (pc+1, a jump) are known as soon as the
// instruction is in P. P, which the compute element keeps, needs no interlock:
// an instruction's E2 always follows the previous one's.
// Straight-line independent code therefore runs at one instruction per 2 cycles
// and a loop closed by a conditional jump costs 5 cycles for its last
// instruction; the first instruction enters P one cycle after start.
//
// Operand steering: C always takes operand 2. If OPMODE selects the multiplier
// (X mux = 01), A = operand 1 [29:0] and B = operand 2 [17:0]; otherwise
// A:B = operand 1. ce_c is therefore a wire from dm_rdata1, and the written
// data (dm_wdata, nb_out.data) is a wire from ce_p: the sequencer steers data,
// the compute element and the memories hold it.
//
// Write-back: own_we writes P to the own data memory at own_addr, or at the
// address held in location own_addr when own_ind is set; nb_we drives P with
// nb_addr onto the outgoing neighbour link for one cycle. Both may be set.
// Next address: pc+1 unless nx_en is set and the flag condition (nx_flag,
// inverted by nx_inv) holds, then nx_addr. An enabled unconditional jump to its
// own address is HALT: nothing is issued after it and busy drops when it leaves
// W. An all-zero op field is a NOP that leaves P and the flags alone.
//
// The instruction fields, the two addressing modes, the own/neighbour/both
// write-back, the next-address choices, HALT and the five-stage pipeline follow
// the architecture description. The stage contents, the interlocks, the operand
// steering and the encodings are this design's choice.
module sequencer
  import remorph_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  addr_t             start_pc,
  output logic              busy,
  output logic              halt_pulse,
  output addr_t             pc,
  // instruction memory read port
  output addr_t             imem_raddr,
  input  instr_t            imem_rdata,
  // data memory read ports and own write port
  output addr_t             dm_raddr0,
  input  word_t             dm_rdata0,
  output addr_t             dm_raddr1,
  input  word_t             dm_rdata1,
  output logic              dm_we,
  output addr_t             dm_waddr,
  output word_t             dm_wdata,
  // compute element
  output logic              ce_valid,
  output ctrl_t             ce_ctrl,
  output logic [AWIDTH-1:0] ce_a,
  output logic [BWIDTH-1:0] ce_b,
  output word_t             ce_c,
  input  word_t             ce_p,
  input  flags_t            ce_flags,
  // outgoing near-neighbour link
  output link_t             nb_out
);

  // ---- pipeline registers --------------------------------------------------
  logic   running;
  addr_t  npc;          // address of the next instruction to enter P
  logic   npc_valid;    // npc is known (no unresolved conditional jump, no HALT)
  logic   vo, ve1, ve2, vw;
  instr_t io, ie1, ie2, iw;
  addr_t  pco, pce1, pce2, pcw;
  addr_t  dptr;         // write-back pointer of the instruction in W

  instr_t ip;           // instruction in P (straight from the memory)
  logic   issue;

  // ---- helpers -------------------------------------------------------------
  function automatic logic is_cond(input instr_t t);
    return t.nx_en && (t.nx_flag != FL_ALWAYS || t.nx_inv);
  endfunction

  function automatic logic is_halt(input instr_t t, input addr_t at);
    return t.nx_en && (t.nx_flag == FL_ALWAYS) && !t.nx_inv && (t.nx_addr == at);
  endfunction

  // Next address of an instruction whose next address does not depend on flags.
  function automatic addr_t uncond_next(input instr_t t, input addr_t at);
    return (t.nx_en && !t.nx_inv) ? t.nx_addr : addr_t'(at + 1'b1);
  endfunction

  // Could an older instruction writing (known address wa, or unknown) hit a
  // location that instruction t reads in P or O?
  function automatic logic raw_any(input instr_t t, input logic known, input addr_t wa);
    logic h;
    h = !known || t.s1.ind || t.s2.ind;
    h = h || (t.s1.addr == wa) || (t.s2.addr == wa);
    return h;
  endfunction

  // Hazard with a write at the end of the current cycle: only the pointer
  // reads done in P are too early.
  function automatic logic raw_ptr(input instr_t t, input addr_t wa);
    return (t.s1.ind && t.s1.addr == wa) || (t.s2.ind && t.s2.addr == wa);
  endfunction

  // ---- issue ---------------------------------------------------------------
  logic hazard;
  assign ip = imem_rdata;

  always_comb begin
    hazard = vo || (ve1 && ie1.own_we && ie1.own_ind);
    if (ve1 && ie1.own_we && raw_any(ip, !ie1.own_ind, ie1.own_addr)) hazard = 1'b1;
    if (ve2 && ie2.own_we && raw_any(ip, !ie2.own_ind, ie2.own_addr)) hazard = 1'b1;
    if (vw && iw.own_we && raw_ptr(ip, dm_waddr)) hazard = 1'b1;
    issue = running && npc_valid && !hazard;
  end

  // ---- branch resolution in W ----------------------------------------------
  logic  cond, take;
  addr_t w_next;
  logic  w_resolve, w_halt;

  always_comb begin
    unique case (iw.nx_flag)
      FL_ZERO: cond = ce_flags.zero;
      FL_NEG:  cond = ce_flags.neg;
      FL_EQ:   cond = ce_flags.eq;
      default: cond = 1'b1;
    endcase
    cond      = cond ^ iw.nx_inv;
    take      = iw.nx_en && cond;
    w_next    = take ? iw.nx_addr : addr_t'(pcw + 1'b1);
    w_resolve = vw && is_cond(iw);
    w_halt    = vw && is_halt(iw, pcw);
  end

  // ---- next fetch address ----------------------------------------------------
  addr_t npc_d;
  logic  npc_valid_d;

  always_comb begin
    npc_d       = npc;
    npc_valid_d = npc_valid;
    if (!running) begin
      if (start) begin
        npc_d       = start_pc;
        npc_valid_d = 1'b1;
      end
    end else if (issue) begin
      if (is_cond(ip) || is_halt(ip, npc)) begin
        npc_valid_d = 1'b0;
      end else begin
        npc_d = uncond_next(ip, npc);
      end
    end else if (w_resolve) begin
      npc_d       = w_next;
      npc_valid_d = 1'b1;
    end
    imem_raddr = npc_d;
  end

  // ---- data memory, compute element and write-back -------------------------
  logic mul;
  assign mul = (ie1.op.opmode[1:0] == 2'b01);

  always_comb begin
    dm_raddr0 = ip.s1.addr;
    dm_raddr1 = ip.s2.addr;
    if (vo) begin
      dm_raddr0 = io.s1.ind ? addr_t'(dm_rdata0[AW-1:0]) : io.s1.addr;
      dm_raddr1 = io.s2.ind ? addr_t'(dm_rdata1[AW-1:0]) : io.s2.addr;
    end else if (ve1 && ie1.own_ind) begin
      dm_raddr0 = ie1.own_addr;
    end

    ce_valid = ve1 && (ie1.op != '0);
    ce_ctrl  = ie1.op;
    ce_c     = dm_rdata1;
    if (mul) begin
      ce_a = dm_rdata0[AWIDTH-1:0];
      ce_b = dm_rdata1[BWIDTH-1:0];
    end else begin
      ce_a = dm_rdata0[DW-1:BWIDTH];
      ce_b = dm_rdata0[BWIDTH-1:0];
    end

    dm_we    = vw && iw.own_we;
    dm_waddr = iw.own_ind ? dptr : iw.own_addr;
    dm_wdata = ce_p;

    nb_out.we   = vw && iw.nb_we;
    nb_out.addr = iw.nb_addr;
    nb_out.data = ce_p;
  end

  assign busy = running;
  assign pc   = npc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      npc        <= '0;
      npc_valid  <= 1'b0;
      vo         <= 1'b0;
      ve1        <= 1'b0;
      ve2        <= 1'b0;
      vw         <= 1'b0;
      io         <= '0;
      ie1        <= '0;
      ie2        <= '0;
      iw         <= '0;
      pco        <= '0;
      pce1       <= '0;
      pce2       <= '0;
      pcw        <= '0;
      dptr       <= '0;
      halt_pulse <= 1'b0;
    end else begin
      halt_pulse <= w_halt;
      if (!running && start) running <= 1'b1;
      else if (w_halt)       running <= 1'b0;
      npc       <= npc_d;
      npc_valid <= npc_valid_d;
      vo  <= issue;
      ve1 <= vo;
      ve2 <= ve1;
      vw  <= ve2;
      if (issue) begin io <= ip; pco <= npc; end
      if (vo)    begin ie1 <= io; pce1 <= pco; end
      if (ve1)   begin ie2 <= ie1; pce2 <= pce1; end
      if (ve2)   begin iw <= ie2; pcw <= pce2; dptr <= addr_t'(dm_rdata0[AW-1:0]); end
    end
  end

endmodule
