// tb_remorph_top: end-to-end test of the reMORPH array at its default 4 x 4 size.
//
// Workload: the sum of 1000 numbers on four grains P1..P4 (grains 0..3, the top
// row, west to east), 250 numbers per grain, reduced to one total in P3, run
// three ways:
//   One    a single configuration: links P1->P2->P3->P4 are set once, every grain
//          sums its share, waits (polling a ready word) for the partial sum from
//          its west neighbour, adds it and passes it on; P4 ends with the total.
//   Two    three epochs, code and links change: epoch 1 sums (P1 writes into P2,
//          P4 into P3), the link into P3 is rewired to come from P2 and new code
//          is downloaded for epoch 2 (P2 and P3 add two numbers, P2 sends its
//          result to P3) and again for epoch 3 (P3 adds two numbers).
//   Three  the same epochs, but the code of all epochs is downloaded up front
//          and only the link changes; each epoch starts at its own address.
// Each run checks the total against a sum computed here, checks the busy time of
// every epoch against the pipeline timing of the grains, and prints a cycle
// breakdown (code download, data download, link reconfiguration, run time).
// The mechanisms the design has are counted and each must occur: link writes to
// a neighbour memory, link reconfigurations, conditional branches taken,
// indirect operand reads, HALTs, code downloads between epochs, polling waits,
// multi-grain epochs, pipeline hazard stalls and overlapped instruction issue.
module tb_remorph_top;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;

  localparam int N = 16;
  localparam int NUMS = 250;
  localparam int IDXW = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [IDXW-1:0] prog_grain = '0;
  logic [1:0] prog_tgt = '0;
  logic [AW-1:0] prog_addr = '0;
  logic [IW-1:0] prog_data = '0;
  logic [IDXW-1:0] rd_grain = '0;
  logic [AW-1:0] rd_addr = '0;
  logic [DW-1:0] rd_data;
  logic start = 1'b0;
  logic [N-1:0] start_mask = '0;
  logic [AW-1:0] start_pc = '0;
  logic [N-1:0] busy, halt_pulse;

  remorph_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ------------------------------------------------
  logic [N-1:0] nbwe_v, take_v, ind_v, stall_v, overlap_v;
  for (genvar i = 0; i < N; i++) begin : g_probe
    assign nbwe_v[i]    = dut.out_links[i].we;
    assign take_v[i]    = dut.g_grain[i].u_grain.u_seq.w_resolve && dut.g_grain[i].u_grain.u_seq.take;
    assign ind_v[i]     = dut.g_grain[i].u_grain.u_seq.vo &&
                          (dut.g_grain[i].u_grain.u_seq.io.s1.ind || dut.g_grain[i].u_grain.u_seq.io.s2.ind);
    // an instruction held back by a data or port hazard
    assign stall_v[i]   = dut.g_grain[i].u_grain.u_seq.running && dut.g_grain[i].u_grain.u_seq.npc_valid &&
                          dut.g_grain[i].u_grain.u_seq.hazard && !dut.g_grain[i].u_grain.u_seq.vo;
    // an instruction issued while older ones are still in E1, E2 or W
    assign overlap_v[i] = dut.g_grain[i].u_grain.u_seq.issue &&
                          (dut.g_grain[i].u_grain.u_seq.ve1 || dut.g_grain[i].u_grain.u_seq.ve2 ||
                           dut.g_grain[i].u_grain.u_seq.vw);
  end
  int n_link_writes = 0, n_cond_taken = 0, n_indirect = 0, n_halts = 0;
  int n_reconfig = 0, n_code_dl = 0, n_multi_epoch = 0, n_poll = 0, n_stall = 0, n_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    n_link_writes += $countones(nbwe_v);
    n_cond_taken  += $countones(take_v);
    n_indirect    += $countones(ind_v);
    n_halts       += $countones(halt_pulse);
    n_stall       += $countones(stall_v);
    n_overlap     += $countones(overlap_v);
  end

  // ---- host helpers ------------------------------------------------------
  task automatic put(input int g, input prog_tgt_e tg, input int a, input logic [IW-1:0] d);
    @(negedge clk);
    prog_we = 1'b1; prog_grain = IDXW'(g); prog_tgt = 2'(tg); prog_addr = AW'(a); prog_data = d;
  endtask
  task automatic put_end();
    @(negedge clk); prog_we = 1'b0;
  endtask
  task automatic code(input int g, input int a, input instr_t t);
    put(g, PT_IMEM, a, t);
  endtask
  task automatic link(input int g, input in_sel_e s);
    put(g, PT_LINK, 0, IW'(s));
    n_reconfig++;
  endtask
  task automatic read(input int g, input int a, output word_t v);
    @(negedge clk); rd_grain = IDXW'(g); rd_addr = AW'(a);
    @(negedge clk); v = rd_data;
  endtask

  // run the grains in mask from pc; return busy cycles until all are idle
  task automatic run(input logic [N-1:0] mask, input int pc, output int cyc);
    @(negedge clk); start = 1'b1; start_mask = mask; start_pc = AW'(pc);
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while ((busy & mask) != '0) begin
      @(negedge clk);
      cyc++;
    end
    cyc--;
    if ($countones(mask) > 1) n_multi_epoch++;
  endtask

  task automatic chk(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- the workload ------------------------------------------------------
  // Data memory map of a summing grain:
  //   1..250 numbers, 256 pointer/counter, 257 running sum, 258 one, 259 zero,
  //   300 partial sum received, 301 ready word / second partial, 302, 303 results
  localparam int PTR = 256, SUM = 257, ONE = 258, ZERO = 259;
  word_t nums [4][1:NUMS];
  longint unsigned part [4];
  longint unsigned total;

  task automatic load_data();
    total = 0;
    for (int g = 0; g < 4; g++) begin
      part[g] = 0;
      for (int k = 1; k <= NUMS; k++) begin
        nums[g][k] = word_t'($urandom);
        part[g] += 64'(nums[g][k]);
        put(g, PT_DMEM, k, IW'(nums[g][k]));
      end
      total += part[g];
    end
    for (int g = 0; g < 4; g++) begin
      put(g, PT_DMEM, PTR, IW'(NUMS));
      put(g, PT_DMEM, SUM, '0);
      put(g, PT_DMEM, ONE, IW'(1));
      put(g, PT_DMEM, ZERO, '0);
      put(g, PT_DMEM, 301, '0);
    end
    put_end();
  endtask

  // summation loop at address base: 2 instructions, 2*NUMS executed
  task automatic loop_code(input int g, input int base);
    code(g, base,     mk(.op(op_add()), .s1(SUM), .s2(PTR), .i2(1'b1), .we(1'b1), .dst(SUM)));
    code(g, base + 1, mk(.op(op_sub()), .s1(ONE), .s2(PTR), .we(1'b1), .dst(PTR),
                         .jen(1'b1), .fl(FL_ZERO), .inv(1'b1), .ja(base)));
  endtask

  // Busy cycles of a grain that runs the summation loop over n numbers (7
  // cycles per pass: the loop's conditional jump is resolved in W) and then k
  // independent instructions (one every 2 cycles) and HALT, whose W ends the run.
  // With n = 0 it is k straight instructions and HALT.
  function automatic longint unsigned epoch_cycles(input int n, input int k);
    return (n > 0) ? 64'(7 * n + 5 + 2 * k) : 64'(5 + 2 * k);
  endfunction

  int t0, t_code, t_data, t_reconf, t_run;

  task automatic report(input string name);
    $display("config %s: code download %0d, data download %0d, link reconfiguration %0d, run %0d cycles",
             name, t_code, t_data, t_reconf, t_run);
  endtask

  // Two (reprogram = 1) and Three (reprogram = 0)
  task automatic run_epochs(input bit reprogram);
    int cyc;
    word_t v;
    t_code = 0; t_reconf = 0; t_run = 0;
    t0 = int'(cycle); load_data(); t_data = int'(cycle) - t0;
    t0 = int'(cycle);
    link(1, IN_WEST); link(2, IN_EAST);
    link(0, IN_NONE); link(3, IN_NONE);
    put_end();
    t_reconf += int'(cycle) - t0;
    t0 = int'(cycle);
    for (int g = 0; g < 4; g++) begin
      loop_code(g, 0);
      if (g == 0 || g == 3) begin
        code(g, 2, mk(.op(op_add()), .s1(SUM), .s2(ZERO), .nbwe(1'b1), .nba(300)));
        code(g, 3, halt(3));
      end else begin
        code(g, 2, halt(2));
      end
    end
    if (!reprogram) begin
      code(1, 10, mk(.op(op_add()), .s1(SUM), .s2(300), .nbwe(1'b1), .nba(301)));
      code(1, 11, halt(11));
      code(2, 10, mk(.op(op_add()), .s1(SUM), .s2(300), .we(1'b1), .dst(302)));
      code(2, 11, halt(11));
      code(2, 20, mk(.op(op_add()), .s1(301), .s2(302), .we(1'b1), .dst(303)));
      code(2, 21, halt(21));
    end
    put_end();
    t_code += int'(cycle) - t0;

    // epoch 1
    run(16'h000F, 0, cyc);
    t_run += cyc;
    chk("epoch 1 cycles", 64'(cyc), epoch_cycles(NUMS, 1));
    read(1, 300, v); chk("P1 partial in P2", 64'(v), part[0] & 64'hFFFF_FFFF_FFFF);
    read(2, 300, v); chk("P4 partial in P3", 64'(v), part[3] & 64'hFFFF_FFFF_FFFF);

    // context switch: link into P3 now from P2
    t0 = int'(cycle); link(2, IN_WEST); put_end(); t_reconf += int'(cycle) - t0;
    if (reprogram) begin
      t0 = int'(cycle);
      code(1, 0, mk(.op(op_add()), .s1(SUM), .s2(300), .nbwe(1'b1), .nba(301)));
      code(1, 1, halt(1));
      code(2, 0, mk(.op(op_add()), .s1(SUM), .s2(300), .we(1'b1), .dst(302)));
      code(2, 1, halt(1));
      put_end();
      t_code += int'(cycle) - t0;
      n_code_dl++;
    end
    run(16'h0006, reprogram ? 0 : 10, cyc);
    t_run += cyc;
    chk("epoch 2 cycles", 64'(cyc), epoch_cycles(0, 1));

    if (reprogram) begin
      t0 = int'(cycle);
      code(2, 0, mk(.op(op_add()), .s1(301), .s2(302), .we(1'b1), .dst(303)));
      code(2, 1, halt(1));
      put_end();
      t_code += int'(cycle) - t0;
      n_code_dl++;
    end
    run(16'h0004, reprogram ? 0 : 20, cyc);
    t_run += cyc;
    chk("epoch 3 cycles", 64'(cyc), epoch_cycles(0, 1));
    read(2, 303, v);
    chk("total", 64'(v), total & 64'hFFFF_FFFF_FFFF);
    chk("data download cycles", 64'(t_data), 64'(4 * NUMS + 20 + 1));
    report(reprogram ? "Two" : "Three");
  endtask

  // One: single configuration with a chain of links and polling
  task automatic run_single();
    int cyc;
    word_t v;
    t_code = 0; t_reconf = 0; t_run = 0;
    t0 = int'(cycle); load_data(); t_data = int'(cycle) - t0;
    t0 = int'(cycle);
    link(1, IN_WEST); link(2, IN_WEST); link(3, IN_WEST);
    put_end();
    t_reconf = int'(cycle) - t0;
    t0 = int'(cycle);
    for (int g = 0; g < 4; g++) begin
      loop_code(g, 0);
      if (g == 0) begin
        code(g, 2, mk(.op(op_add()), .s1(SUM), .s2(ZERO), .nbwe(1'b1), .nba(300)));
        code(g, 3, mk(.op(op_add()), .s1(ONE), .s2(ZERO), .nbwe(1'b1), .nba(301)));
        code(g, 4, halt(4));
      end else begin
        // wait until the ready word from the west neighbour is one
        code(g, 2, mk(.op(op_pass()), .s1(301), .s2(ONE), .jen(1'b1), .fl(FL_EQ), .inv(1'b1), .ja(2)));
        if (g < 3) begin
          // accumulate locally, then forward: the forward reads what the
          // accumulate writes, so it has to wait in the pipeline
          code(g, 3, mk(.op(op_add()), .s1(SUM), .s2(300), .we(1'b1), .dst(SUM)));
          code(g, 4, mk(.op(op_add()), .s1(SUM), .s2(ZERO), .nbwe(1'b1), .nba(300)));
          code(g, 5, mk(.op(op_add()), .s1(ONE), .s2(ZERO), .nbwe(1'b1), .nba(301)));
          code(g, 6, halt(6));
        end else begin
          code(g, 3, mk(.op(op_add()), .s1(SUM), .s2(300), .we(1'b1), .dst(303)));
          code(g, 4, halt(4));
        end
      end
    end
    put_end();
    t_code = int'(cycle) - t0;
    begin
      int polls0;
      polls0 = n_cond_taken;
      run(16'h000F, 0, cyc);
      t_run = cyc;
      // taken branches beyond the loops' own are polls of a ready word
      n_poll = n_cond_taken - polls0 - 4 * (NUMS - 1);
    end
    read(3, 303, v);
    chk("total", 64'(v), total & 64'hFFFF_FFFF_FFFF);
    checks++;
    if (t_run <= int'(epoch_cycles(NUMS, 2))) begin
      failures++;
      $display("FAIL single configuration ran too fast: %0d", t_run);
    end
    report("One");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_single();
    run_epochs(1'b1);
    run_epochs(1'b0);
    $display("mechanisms: link writes %0d, link reconfigurations %0d, conditional branches taken %0d, indirect reads %0d, halts %0d, code downloads %0d, polling waits %0d, multi-grain epochs %0d, hazard stalls %0d, overlapped issues %0d",
             n_link_writes, n_reconfig, n_cond_taken, n_indirect, n_halts, n_code_dl, n_poll, n_multi_epoch, n_stall, n_overlap);
    chk("link writes seen",     64'(n_link_writes > 0), 1);
    chk("reconfigurations seen", 64'(n_reconfig > 0), 1);
    chk("branches seen",        64'(n_cond_taken > 0), 1);
    chk("indirect reads seen",  64'(n_indirect > 0), 1);
    chk("halts seen",           64'(n_halts > 0), 1);
    chk("code downloads seen",  64'(n_code_dl > 0), 1);
    chk("polling seen",         64'(n_poll > 0), 1);
    chk("multi-grain epochs",   64'(n_multi_epoch > 0), 1);
    chk("hazard stalls seen",   64'(n_stall > 0), 1);
    chk("overlapped issue seen", 64'(n_overlap > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
