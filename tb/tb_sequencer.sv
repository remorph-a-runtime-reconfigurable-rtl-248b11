// tb_sequencer: runs a small program through the micro-sequencer, wired here to
// an instruction memory, a data memory and the compute element.
//
// The program sums ten numbers in a loop (indirect source operand, decrement
// and branch on not-zero), multiplies two words into a location given by a
// pointer (indirect destination), sends the sum over the neighbour link, runs a
// NOP that keeps P, adds one to what the NOP stored (a read-after-write the
// pipeline must wait for), and halts. Results are checked against values computed here;
// the number of busy cycles is checked against the pipeline timing (at most
// one issue every 2 cycles, conditional jumps resolved in W).
module tb_sequencer;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  addr_t start_pc = '0;
  logic busy, halt_pulse;
  addr_t pc, imem_raddr;
  instr_t imem_rdata;
  addr_t dm_raddr0, dm_raddr1, dm_waddr;
  word_t dm_rdata0, dm_rdata1, dm_wdata;
  logic dm_we;
  logic ce_valid, ce_out_valid;
  ctrl_t ce_ctrl;
  logic [AWIDTH-1:0] ce_a;
  logic [BWIDTH-1:0] ce_b;
  word_t ce_c, ce_p;
  flags_t ce_flags;
  link_t nb_out;

  // host-side write ports of the two memories
  logic im_we = 1'b0, hd_we = 1'b0, rb_en = 1'b0;
  addr_t rb_addr = '0;
  addr_t im_wa = '0, hd_wa = '0;
  instr_t im_wd = '0;
  word_t hd_wd = '0;

  int checks = 0, failures = 0;

  sequencer dut (.*);
  instr_mem #(.DEPTH(512), .WIDTH(IW)) u_im (.clk(clk), .we(im_we), .waddr(im_wa), .wdata(im_wd),
                                            .raddr(imem_raddr), .rdata(imem_rdata));
  data_mem #(.DEPTH(512), .WIDTH(DW)) u_dm (.clk(clk),
    .wea(dm_we | hd_we), .waddra(hd_we ? hd_wa : dm_waddr), .wdataa(hd_we ? hd_wd : dm_wdata),
    .web(1'b0), .waddrb('0), .wdatab('0),
    .raddr0(rb_en ? rb_addr : dm_raddr0), .rdata0(dm_rdata0), .raddr1(dm_raddr1), .rdata1(dm_rdata1));
  compute_element u_ce (.clk(clk), .rst_n(rst_n), .in_valid(ce_valid), .ctrl(ce_ctrl), .a(ce_a),
                        .b(ce_b), .c(ce_c), .p(ce_p), .flags(ce_flags), .out_valid(ce_out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr_i(input int a, input instr_t t);
    @(negedge clk); im_we = 1'b1; im_wa = addr_t'(a); im_wd = t;
    @(negedge clk); im_we = 1'b0;
  endtask
  task automatic wr_d(input int a, input word_t v);
    @(negedge clk); hd_we = 1'b1; hd_wa = addr_t'(a); hd_wd = v;
    @(negedge clk); hd_we = 1'b0;
  endtask

  word_t vals [1:10];
  longint unsigned sum, prod;
  int nb_seen = 0;
  word_t nb_data;
  addr_t nb_addr;

  always @(posedge clk) if (rst_n && nb_out.we) begin
    nb_seen++;
    nb_data = nb_out.data;
    nb_addr = nb_out.addr;
  end

  initial begin
    int busy_cycles;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    sum = 0;
    for (int i = 1; i <= 10; i++) begin
      vals[i] = {16'($urandom), 32'($urandom)};
      wr_d(i, vals[i]);
      sum = (sum + 64'(vals[i])) & 64'hFFFF_FFFF_FFFF;
    end
    prod = 64'(signed'(64'(signed'(vals[1][24:0])) * 64'(signed'(vals[2][17:0])))) & 64'hFFFF_FFFF_FFFF;
    wr_d(100, 48'd10);   // pointer / counter
    wr_d(101, 48'd0);    // sum
    wr_d(102, 48'd1);    // constant one
    wr_d(103, 48'd0);    // constant zero
    wr_d(104, 48'd200);  // destination pointer
    wr_d(210, 48'hABCD); // overwritten by the NOP's write-back
    // 0: sum += mem[mem[100]]
    wr_i(0, mk(.op(op_add()), .s1(101), .s2(100), .i2(1'b1), .we(1'b1), .dst(101)));
    // 1: mem[100] -= 1; if not zero goto 0
    wr_i(1, mk(.op(op_sub()), .s1(102), .s2(100), .we(1'b1), .dst(100),
               .jen(1'b1), .fl(FL_ZERO), .inv(1'b1), .ja(0)));
    // 2: mem[mem[104]] = mem[1] * mem[2]
    wr_i(2, mk(.op(op_mul()), .s1(1), .s2(2), .we(1'b1), .dst(104), .di(1'b1)));
    // 3: neighbour[55] = sum + 0
    wr_i(3, mk(.op(op_add()), .s1(101), .s2(103), .nbwe(1'b1), .nba(55)));
    // 4: NOP, writes the unchanged P to 210
    wr_i(4, mk(.op(op_nop()), .we(1'b1), .dst(210)));
    // 5: mem[211] = mem[210] + 1 (reads what the NOP writes: must wait)
    wr_i(5, mk(.op(op_add()), .s1(210), .s2(102), .we(1'b1), .dst(211)));
    // 6: HALT
    wr_i(6, halt(6));

    @(negedge clk); start = 1'b1; start_pc = '0;
    @(negedge clk); start = 1'b0;
    busy_cycles = 0;
    while (busy) begin
      busy_cycles++;
      @(negedge clk);
    end
    // Loop iteration: instruction 0 enters P, instruction 1 two cycles later,
    // and the next instruction 0 one cycle after instruction 1's W: 7 cycles.
    // After the last iteration (W of instruction 1 in cycle 70) come
    // 2 (mul, cycle 71), 3 (cycle 75: waits for 2's pointer read and unknown
    // write address), 4 (77), 5 (81: waits for 4's write of 210), HALT (83)
    // with its W in cycle 87.
    chk("busy cycles", 64'(busy_cycles), 64'(7 * 10 + 17));
    chk("halt pc", 64'(pc), 64'd6);
    chk("neighbour writes", 64'(nb_seen), 64'd1);
    chk("neighbour addr", 64'(nb_addr), 64'd55);
    chk("neighbour data", 64'(nb_data), sum);
    chk("P after the last add", 64'(ce_p), (sum + 1) & 64'hFFFF_FFFF_FFFF);
    // Read back through the data memory port 0 (sequencer idle, addresses static)
    rb_en = 1'b1; rb_addr = addr_t'(101); @(posedge clk); #1; chk("sum", 64'(dm_rdata0), sum);
    rb_en = 1'b1; rb_addr = addr_t'(100); @(posedge clk); #1; chk("counter", 64'(dm_rdata0), 0);
    rb_en = 1'b1; rb_addr = addr_t'(200); @(posedge clk); #1; chk("product", 64'(dm_rdata0), prod);
    rb_en = 1'b1; rb_addr = addr_t'(210); @(posedge clk); #1; chk("nop keeps P", 64'(dm_rdata0), sum);
    rb_en = 1'b1; rb_addr = addr_t'(211); @(posedge clk); #1; chk("dependent add", 64'(dm_rdata0), (sum + 1) & 64'hFFFF_FFFF_FFFF);
    rb_en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
