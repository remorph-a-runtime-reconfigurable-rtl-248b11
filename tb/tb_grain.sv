// tb_grain: one grain driven through its host port, with a neighbour writing
// into its memory while it runs.
//
// The host downloads code and data, starts the grain and reads results back. The
// program counts a location up to a limit (branch on the EQ comparator flag),
// adds a word that the neighbour link delivered during the run and writes the
// sum both to its own memory and out over its link, then tests the NEG flag,
// which must skip a write, and halts. Checks cover the readback values, the
// outgoing link write, the skipped write, a second neighbour write that lands
// while the grain runs, and the busy time given by the pipeline timing.
module tb_grain;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic prog_we = 1'b0;
  prog_tgt_e prog_tgt = PT_IMEM;
  addr_t prog_addr = '0;
  instr_t prog_data = '0;
  addr_t rd_addr = '0;
  word_t rd_data;
  logic start = 1'b0;
  addr_t start_pc = '0;
  logic busy, halt_pulse;
  link_t nb_in = '0;
  link_t nb_out;

  int checks = 0, failures = 0;
  int halts = 0, nb_seen = 0;
  link_t nb_last;

  grain dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && halt_pulse) halts++;
    if (rst_n && nb_out.we) begin nb_seen++; nb_last = nb_out; end
  end

  task automatic chk(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic prog(input prog_tgt_e tg, input int a, input instr_t d);
    @(negedge clk); prog_we = 1'b1; prog_tgt = tg; prog_addr = addr_t'(a); prog_data = d;
    @(negedge clk); prog_we = 1'b0;
  endtask

  task automatic readback(input int a, output word_t v);
    @(negedge clk); rd_addr = addr_t'(a);
    @(negedge clk); v = rd_data;
  endtask

  initial begin
    word_t v, nbval, k23;
    int limit, busy_cycles, n_instr;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    limit = 7;
    nbval = {16'($urandom), 32'($urandom)};
    k23   = {16'($urandom), 32'($urandom)};
    // data: upper bits of the 72-bit bus must be ignored
    prog(PT_DMEM, 20, {24'hFFFFFF, 48'd0});
    prog(PT_DMEM, 21, instr_t'(72'd1));
    prog(PT_DMEM, 22, instr_t'(72'(limit)));
    prog(PT_DMEM, 23, instr_t'(72'(k23)));
    prog(PT_DMEM, 40, instr_t'(72'h1234));
    // code
    prog(PT_IMEM, 0, mk(.op(op_add()), .s1(20), .s2(21), .we(1'b1), .dst(20)));
    prog(PT_IMEM, 1, mk(.op(op_pass()), .s1(20), .s2(22), .jen(1'b1), .fl(FL_EQ), .ja(3)));
    prog(PT_IMEM, 2, mk(.op(op_nop()), .jen(1'b1), .ja(0)));
    prog(PT_IMEM, 3, mk(.op(op_add()), .s1(30), .s2(23), .we(1'b1), .dst(31), .nbwe(1'b1), .nba(7)));
    prog(PT_IMEM, 4, mk(.op(op_sub()), .s1(22), .s2(21), .jen(1'b1), .fl(FL_NEG), .ja(6)));
    prog(PT_IMEM, 5, mk(.op(op_add()), .s1(21), .s2(21), .we(1'b1), .dst(40)));
    prog(PT_IMEM, 6, halt(6));

    readback(20, v); chk("host dmem write keeps 48 bits", 64'(v), 0);

    @(negedge clk); start = 1'b1; start_pc = '0;
    @(negedge clk); start = 1'b0;
    busy_cycles = 0;
    // neighbour deposits two words while the grain runs
    nb_in = '{we: 1'b1, addr: addr_t'(30), data: nbval};
    @(negedge clk); busy_cycles++;
    nb_in = '{we: 1'b1, addr: addr_t'(50), data: ~nbval};
    @(negedge clk); busy_cycles++;
    nb_in = '0;
    while (busy) begin
      busy_cycles++;
      @(negedge clk);
    end
    // Pipeline timing: instruction 1 reads what 0 writes, so it enters P in
    // 0's W cycle (4 cycles after 0); 1 is a conditional jump, resolved 4
    // cycles later; the NOP jump (2) follows one cycle after that, and 0 again
    // two cycles after 2: 11 cycles per pass. The last pass continues with
    // 3 (cycle 11*(limit-1) + 10), 4 two cycles later, HALT one cycle after
    // 4's W and HALT's W four cycles after that.
    n_instr = 11 * (limit - 1) + 10 + 2 + 5 + 4;
    chk("busy cycles", 64'(busy_cycles), 64'(n_instr));
    readback(20, v); chk("counter", 64'(v), 64'(limit));
    readback(31, v); chk("own write", 64'(v), 64'(nbval + k23));
    readback(50, v); chk("neighbour write", 64'(v), 64'(word_t'(~nbval)));
    readback(40, v); chk("NEG branch skipped write", 64'(v), 64'h1234);
    chk("halt pulses", 64'(halts), 1);
    chk("link writes", 64'(nb_seen), 1);
    chk("link addr", 64'(nb_last.addr), 7);
    chk("link data", 64'(nb_last.data), 64'(word_t'(nbval + k23)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
