// tb_remorph_kernels: compute kernels with loops on the reMORPH array at its
// default 4 x 4 size.
//
// Two kernels run side by side in one epoch, each grain with its own program:
//   matrix product  grains 0..3 compute C = A * B for 4 x 4 matrices of 16-bit
//                   signed numbers. Grain g holds row g of A and all of B, and
//                   writes row g of C. The program is two nested loops. The inner
//                   loop multiplies through two indirect operands (pointers into A
//                   and B) and accumulates in memory. The outer loop stores the
//                   dot product through an indirect write-back pointer and moves
//                   the B pointer to the next column.
//   factorial       grains 4..7 compute n! for their own n (1..10; 10! is the
//                   largest that fits the 25-bit multiplier input) with a
//                   multiply and a count-down loop.
//   FFT             grains 8..11 each compute an 8-point complex FFT of 16-bit
//                   samples in fixed point (see below), in a fourth epoch.
// A second epoch runs the factorials alone with new n values and new matrices
// are multiplied in a third. The FFT is also compared with the exact transform
// computed in floating point, to within 4. Results are checked against values computed here.
// The busy time of every factorial grain is checked against the pipeline timing:
// 7 cycles per loop pass, plus 5 for the HALT after the loop exit.
// Hazard stalls in the matrix loops and taken branches must occur.
module tb_remorph_kernels;
  import remorph_pkg::*;
  import remorph_asm_pkg::*;

  localparam int N = 16;
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

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- counters ----------------------------------------------------------
  int busy_cnt [N];
  logic [N-1:0] stall_v, take_v;
  for (genvar i = 0; i < N; i++) begin : g_probe
    assign stall_v[i] = dut.g_grain[i].u_grain.u_seq.running && dut.g_grain[i].u_grain.u_seq.npc_valid &&
                        dut.g_grain[i].u_grain.u_seq.hazard && !dut.g_grain[i].u_grain.u_seq.vo;
    assign take_v[i]  = dut.g_grain[i].u_grain.u_seq.w_resolve && dut.g_grain[i].u_grain.u_seq.take;
  end
  int n_stall = 0, n_taken = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall += $countones(stall_v[3:0]);
    n_taken += $countones(take_v);
  end
  always @(negedge clk) for (int g = 0; g < N; g++) if (busy[g]) busy_cnt[g]++;

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
  task automatic data(input int g, input int a, input word_t w);
    put(g, PT_DMEM, a, IW'(w));
  endtask
  task automatic read(input int g, input int a, output word_t v);
    @(negedge clk); rd_grain = IDXW'(g); rd_addr = AW'(a);
    @(negedge clk); v = rd_data;
  endtask

  task automatic run(input logic [N-1:0] mask, output int cyc);
    for (int g = 0; g < N; g++) busy_cnt[g] = 0;
    @(negedge clk); start = 1'b1; start_mask = mask; start_pc = '0;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while ((busy & mask) != '0) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  task automatic chk(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- matrix product ----------------------------------------------------
  // Data map: A row 10..13, B 20..35 (B[k][j] at 20 + 4k + j), C row 40..43,
  // pointers and constants from 100.
  localparam int AROW = 10, BMAT = 20, CROW = 40;
  localparam int PA = 100, PB = 101, PO = 102, S = 103, T = 104, CNT = 105, J = 106;
  localparam int ONE = 110, FOUR = 111, ZERO = 112, FIFTEEN = 113, A0 = 114;
  longint am [4][4], bm [4][4];

  function automatic word_t sw(input longint v);
    return word_t'(v);
  endfunction

  task automatic mat_code(input int g);
    code(g, 0,  mk(.op(op_mul()), .s1(PA), .i1(1'b1), .s2(PB), .i2(1'b1), .we(1'b1), .dst(T)));
    code(g, 1,  mk(.op(op_add()), .s1(S), .s2(T), .we(1'b1), .dst(S)));
    code(g, 2,  mk(.op(op_add()), .s1(ONE), .s2(PA), .we(1'b1), .dst(PA)));
    code(g, 3,  mk(.op(op_add()), .s1(FOUR), .s2(PB), .we(1'b1), .dst(PB)));
    code(g, 4,  mk(.op(op_sub()), .s1(ONE), .s2(CNT), .we(1'b1), .dst(CNT),
                   .jen(1'b1), .fl(FL_ZERO), .inv(1'b1), .ja(0)));
    code(g, 5,  mk(.op(op_add()), .s1(S), .s2(ZERO), .we(1'b1), .dst(PO), .di(1'b1)));
    code(g, 6,  mk(.op(op_add()), .s1(ZERO), .s2(ZERO), .we(1'b1), .dst(S)));
    code(g, 7,  mk(.op(op_add()), .s1(A0), .s2(ZERO), .we(1'b1), .dst(PA)));
    code(g, 8,  mk(.op(op_sub()), .s1(FIFTEEN), .s2(PB), .we(1'b1), .dst(PB)));
    code(g, 9,  mk(.op(op_add()), .s1(FOUR), .s2(ZERO), .we(1'b1), .dst(CNT)));
    code(g, 10, mk(.op(op_add()), .s1(ONE), .s2(PO), .we(1'b1), .dst(PO)));
    code(g, 11, mk(.op(op_sub()), .s1(ONE), .s2(J), .we(1'b1), .dst(J),
                   .jen(1'b1), .fl(FL_ZERO), .inv(1'b1), .ja(0)));
    code(g, 12, halt(12));
  endtask

  task automatic mat_data(input bit extreme);
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++) begin
        am[i][k] = extreme ? -32768 : longint'($signed(16'($urandom)));
        bm[i][k] = extreme ? (((i + k) % 2) != 0 ? 32767 : -32768) : longint'($signed(16'($urandom)));
      end
    for (int g = 0; g < 4; g++) begin
      for (int k = 0; k < 4; k++) data(g, AROW + k, sw(am[g][k]));
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 4; j++) data(g, BMAT + 4 * k + j, sw(bm[k][j]));
      for (int j = 0; j < 4; j++) data(g, CROW + j, '0);
      data(g, PA, word_t'(AROW));  data(g, PB, word_t'(BMAT)); data(g, PO, word_t'(CROW));
      data(g, S, '0);              data(g, CNT, 48'd4);          data(g, J, 48'd4);
      data(g, ONE, 48'd1);         data(g, FOUR, 48'd4);         data(g, ZERO, '0);
      data(g, FIFTEEN, 48'd15);    data(g, A0, word_t'(AROW));
    end
    put_end();
  endtask

  task automatic mat_check();
    word_t v;
    longint e;
    for (int g = 0; g < 4; g++)
      for (int j = 0; j < 4; j++) begin
        e = 0;
        for (int k = 0; k < 4; k++) e += am[g][k] * bm[k][j];
        read(g, CROW + j, v);
        chk($sformatf("C[%0d][%0d]", g, j), 64'(v), 64'(sw(e)));
      end
  endtask

  // ---- factorial -----------------------------------------------------------
  localparam int ACC = 200, K = 201, FONE = 202;
  int fn [4];

  task automatic fact_code(input int g);
    code(g, 0, mk(.op(op_mul()), .s1(ACC), .s2(K), .we(1'b1), .dst(ACC)));
    code(g, 1, mk(.op(op_sub()), .s1(FONE), .s2(K), .we(1'b1), .dst(K),
                  .jen(1'b1), .fl(FL_ZERO), .inv(1'b1), .ja(0)));
    code(g, 2, halt(2));
  endtask

  task automatic fact_data(input int n0, input int n1, input int n2, input int n3);
    fn = '{n0, n1, n2, n3};
    for (int i = 0; i < 4; i++) begin
      data(4 + i, ACC, 48'd1);
      data(4 + i, K, word_t'(fn[i]));
      data(4 + i, FONE, 48'd1);
    end
    put_end();
  endtask

  task automatic fact_check();
    word_t v;
    longint unsigned f;
    for (int i = 0; i < 4; i++) begin
      f = 1;
      for (int k = 2; k <= fn[i]; k++) f *= longint'(k);
      read(4 + i, ACC, v);
      chk($sformatf("%0d!", fn[i]), 64'(v), f);
      chk($sformatf("busy cycles of %0d!", fn[i]), 64'(busy_cnt[4 + i]), 64'(7 * fn[i] + 5));
    end
  endtask

  // ---- 8-point FFT -----------------------------------------------------------
  // Radix-2 decimation in time, three stages of four butterflies, generated as
  // straight-line code. Input: 8 complex 16-bit samples, stored bit-reversed in
  // buffer 0; each stage reads one buffer and writes the other, so stage 3
  // leaves X[0..7] in natural order in buffer 1. Twiddles W^k = e^(-j2pi k/8) are
  // Q17 numbers (0.7071 = 92682). W^0 and W^2 (= -j) need no multiply. For W^1
  // and W^3 every product goes through the multiplier and is then scaled with
  // the slice's P >>> 17 path while it is added: P = (P >>> 17) + C.
  localparam int FRE0 = 10, FIM0 = 20, FRE1 = 30, FIM1 = 40;
  localparam int FTR = 50, FTI = 51, FT1 = 52, FZERO = 53, FWR = 60, FWI = 64, FNWI = 68;
  localparam longint C707 = 92682;
  longint fx_re [4][8], fx_im [4][8];
  longint mm [512];
  longint mp;
  int fpc;

  function automatic ctrl_t op_shadd();   // (P >>> 17) + C
    return '{carryinsel: 3'b000, alumode: ALU_ADD, opmode: 7'b110_11_00};
  endfunction

  function automatic longint sxn(input longint v, input int bits);
    longint u;
    u = v << (64 - bits);
    return u >>> (64 - bits);
  endfunction

  // Each e_* emits one instruction to grain g (when emit is set) and applies it
  // to the model memory mm and model P.
  task automatic emit_i(input bit emit, input int g, input instr_t t);
    if (emit) code(g, fpc, t);
    fpc++;
  endtask
  task automatic e_add(input bit emit, input int g, input int dst, input int s1, input int s2);
    emit_i(emit, g, mk(.op(op_add()), .s1(s1), .s2(s2), .we(1'b1), .dst(dst)));
    mp = sxn(mm[s1] + mm[s2], 48); mm[dst] = mp;
  endtask
  task automatic e_sub(input bit emit, input int g, input int dst, input int s1, input int s2);
    emit_i(emit, g, mk(.op(op_sub()), .s1(s1), .s2(s2), .we(1'b1), .dst(dst)));
    mp = sxn(mm[s2] - mm[s1], 48); mm[dst] = mp;
  endtask
  task automatic e_mul(input bit emit, input int g, input int s1, input int s2);
    emit_i(emit, g, mk(.op(op_mul()), .s1(s1), .s2(s2)));
    mp = sxn(mm[s1], 25) * sxn(mm[s2], 18);
  endtask
  task automatic e_shadd(input bit emit, input int g, input int dst, input int s2);
    emit_i(emit, g, mk(.op(op_shadd()), .s2(s2), .we(1'b1), .dst(dst)));
    mp = sxn((mp >>> 17) + mm[s2], 48); mm[dst] = mp;
  endtask

  task automatic butterfly(input bit emit, input int g, input int a, input int b, input int k,
                           input int sre, input int sim, input int dre, input int dim);
    int tr, ti;
    case (k)
      0: begin
        tr = sre + b; ti = sim + b;
      end
      2: begin
        // (Br + jBi) * (-j) = Bi - jBr
        e_add(emit, g, dre + a, sre + a, sim + b);
        e_sub(emit, g, dre + b, sim + b, sre + a);
        e_sub(emit, g, dim + a, sre + b, sim + a);
        e_add(emit, g, dim + b, sim + a, sre + b);
        return;
      end
      default: begin
        e_mul(emit, g, sre + b, FWR + k);  e_shadd(emit, g, FT1, FZERO);
        e_mul(emit, g, sim + b, FNWI + k); e_shadd(emit, g, FTR, FT1);
        e_mul(emit, g, sre + b, FWI + k);  e_shadd(emit, g, FT1, FZERO);
        e_mul(emit, g, sim + b, FWR + k);  e_shadd(emit, g, FTI, FT1);
        tr = FTR; ti = FTI;
      end
    endcase
    e_add(emit, g, dre + a, sre + a, tr);
    e_sub(emit, g, dre + b, tr, sre + a);
    e_add(emit, g, dim + a, sim + a, ti);
    e_sub(emit, g, dim + b, ti, sim + a);
  endtask

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int bitrev3(input int i);
    return ((i & 1) << 2) | (i & 2) | ((i >> 2) & 1);
  endfunction

  // fft_init loads the model memory with the samples and constants of slot i;
  // fft_gen then walks the FFT once, emitting the code to grain g when emit is set.
  task automatic fft_init(input int i);
    for (int a = 0; a < 512; a++) mm[a] = 0;
    for (int n = 0; n < 8; n++) begin
      mm[FRE0 + n] = fx_re[i][bitrev3(n)];
      mm[FIM0 + n] = fx_im[i][bitrev3(n)];
    end
    mm[FWR + 1] = C707;  mm[FWI + 1] = -C707; mm[FNWI + 1] = C707;
    mm[FWR + 3] = -C707; mm[FWI + 3] = -C707; mm[FNWI + 3] = C707;
    mp = 0;
  endtask

  task automatic fft_gen(input bit emit, input int g, input int i);
    int sre, sim, dre, dim, half, span;
    fft_init(i);
    fpc = 0;
    for (int st = 1; st <= 3; st++) begin
      half = 1 << (st - 1);
      span = 2 * half;
      sre = (st % 2) != 0 ? FRE0 : FRE1;  sim = (st % 2) != 0 ? FIM0 : FIM1;
      dre = (st % 2) != 0 ? FRE1 : FRE0;  dim = (st % 2) != 0 ? FIM1 : FIM0;
      for (int grp = 0; grp < 8; grp += span)
        for (int j = 0; j < half; j++)
          butterfly(emit, g, grp + j, grp + j + half, j * (8 / span), sre, sim, dre, dim);
    end
    if (emit) code(g, fpc, halt(fpc));
  endtask

  task automatic fft_data(input int g, input int i);
    fft_init(i);
    for (int a = FRE0; a < FNWI + 4; a++) data(g, a, sw(mm[a]));
    put_end();
  endtask

  task automatic fft_check(input int g, input int i);
    word_t v;
    real xr, xi, ang;
    fft_gen(1'b0, g, i);
    for (int k = 0; k < 8; k++) begin
      read(g, FRE1 + k, v);
      chk($sformatf("FFT grain %0d Re X[%0d]", g, k), 64'(v), 64'(sw(mm[FRE1 + k])));
      read(g, FIM1 + k, v);
      chk($sformatf("FFT grain %0d Im X[%0d]", g, k), 64'(v), 64'(sw(mm[FIM1 + k])));
      // the fixed-point result must stay close to the exact transform
      xr = 0.0; xi = 0.0;
      for (int n = 0; n < 8; n++) begin
        ang = -2.0 * 3.14159265358979 * real'(k * n) / 8.0;
        xr += real'(fx_re[i][n]) * $cos(ang) - real'(fx_im[i][n]) * $sin(ang);
        xi += real'(fx_re[i][n]) * $sin(ang) + real'(fx_im[i][n]) * $cos(ang);
      end
      checks++;
      if (rabs(real'(mm[FRE1 + k]) - xr) > 4.0 || rabs(real'(mm[FIM1 + k]) - xi) > 4.0) begin
        failures++;
        $display("FAIL FFT grain %0d X[%0d] = %0d, %0dj, exact %f, %fj", g, k,
                 mm[FRE1 + k], mm[FIM1 + k], xr, xi);
      end
    end
  endtask

  // ---- sequence ----------------------------------------------------------
  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    for (int g = 0; g < 4; g++) mat_code(g);
    for (int g = 4; g < 8; g++) fact_code(g);
    put_end();

    // epoch 1: both kernels at once
    mat_data(1'b0);
    fact_data(10, 7, 3, 1);
    run(16'h00FF, cyc);
    $display("epoch 1 (matrix product and factorials): %0d cycles", cyc);
    mat_check();
    fact_check();

    // epoch 2: factorials alone
    fact_data(9, 8, 5, 2);
    run(16'h00F0, cyc);
    $display("epoch 2 (factorials): %0d cycles", cyc);
    fact_check();

    // epoch 3: matrix product with the largest magnitudes
    mat_data(1'b1);
    run(16'h000F, cyc);
    $display("epoch 3 (matrix product): %0d cycles", cyc);
    mat_check();

    // epoch 4: 8-point FFTs on grains 8..11
    for (int i = 0; i < 4; i++)
      for (int n = 0; n < 8; n++) begin
        fx_re[i][n] = (i == 0) ? 32767 : longint'($signed(16'($urandom)));
        fx_im[i][n] = (i == 0) ? 0 : longint'($signed(16'($urandom)));
      end
    fx_re[1] = '{-32768, -32768, -32768, -32768, -32768, -32768, -32768, -32768};
    fx_im[1] = '{-32768, 32767, -32768, 32767, -32768, 32767, -32768, 32767};
    for (int i = 0; i < 4; i++) begin
      fft_gen(1'b1, 8 + i, i);
      fft_data(8 + i, i);
    end
    run(16'h0F00, cyc);
    $display("epoch 4 (8-point FFTs, %0d instructions each): %0d cycles", fpc + 1, cyc);
    for (int i = 0; i < 4; i++) fft_check(8 + i, i);

    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no hazard stall in the matrix loops"); end
    checks++;
    if (n_taken == 0) begin failures++; $display("FAIL no taken branch"); end
    $display("hazard stalls %0d, taken branches %0d", n_stall, n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
