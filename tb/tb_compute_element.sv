// tb_compute_element: self-checking test of the DSP48E1-style compute element.
//
// Issues random operands with a list of control words (add, subtract, the
// inverted-Z and inverted-sum modes, multiply, multiply-accumulate, P+C
// accumulate, the 17-bit arithmetic shift of P, carry-in selections and the
// logic functions) and compares P and the four flags with a reference computed
// here on 64-bit integers. Also checks the two-cycle latency: out_valid must rise
// exactly two edges after in_valid.
module tb_compute_element;
  import remorph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  ctrl_t ctrl = '0;
  logic [AWIDTH-1:0] a = '0;
  logic [BWIDTH-1:0] b = '0;
  word_t c = '0;
  word_t p;
  flags_t flags;
  logic out_valid;

  int checks = 0;
  int failures = 0;

  compute_element dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint unsigned MASK = 64'h0000_FFFF_FFFF_FFFF;
  longint unsigned ref_p = 0;
  logic ref_carry = 1'b0;

  function automatic longint unsigned sx(input longint unsigned v, input int bits);
    longint unsigned s;
    s = v & ((64'd1 << bits) - 1);
    if (s[bits-1]) s = s | ~((64'd1 << bits) - 1);
    return s;
  endfunction

  // Reference of one operation; returns the new P, sets carry.
  function automatic longint unsigned model(input ctrl_t k, input longint unsigned av,
      input longint unsigned bv, input longint unsigned cv, input longint unsigned pv,
      input logic prev_carry, output logic co);
    longint unsigned mm, xv, yv, zv, ci, s, r;
    mm = (sx(av, 25) * sx(bv, 18)) & MASK;
    case (k.opmode[1:0])
      2'b00: xv = 0;
      2'b01: xv = mm;
      2'b10: xv = pv;
      default: xv = ((av << 18) | bv) & MASK;
    endcase
    case (k.opmode[3:2])
      2'b10: yv = MASK;
      2'b11: yv = cv;
      default: yv = 0;
    endcase
    case (k.opmode[6:4])
      3'b010, 3'b100: zv = pv;
      3'b011: zv = cv;
      3'b110: zv = unsigned'(signed'(sx(pv, 48)) >>> 17) & MASK;
      default: zv = 0;
    endcase
    case (k.carryinsel)
      3'b001: ci = 1;
      3'b100: ci = 64'(prev_carry);
      3'b101: ci = 64'(!pv[47]);
      3'b110: ci = 64'(av[24] == bv[17]);
      3'b111: ci = 64'(pv[47]);
      default: ci = 0;
    endcase
    co = 1'b0;
    r = 0;
    case (k.alumode)
      4'b0000: begin s = zv + xv + yv + ci; r = s; co = s[48]; end
      4'b0001: begin s = (~zv & MASK) + xv + yv + ci; r = s; co = s[48]; end
      4'b0010: begin s = zv + xv + yv + ci; r = ~s; co = s[48]; end
      4'b0011: begin s = (~zv & MASK) + xv + yv + ci; r = ~s; co = s[48]; end
      4'b0100: r = (k.opmode[3:2] == 2'b10) ? ~(xv ^ zv) : (xv ^ zv);
      4'b1100: r = (k.opmode[3:2] == 2'b10) ? (xv | zv) : (xv & zv);
      4'b1110: r = (k.opmode[3:2] == 2'b10) ? ~(xv | zv) : ~(xv & zv);
      default: r = 0;
    endcase
    return r & MASK;
  endfunction

  ctrl_t ops [14];
  initial begin
    ops[0]  = '{carryinsel: 3'b000, alumode: 4'b0000, opmode: 7'b011_00_11}; // A:B + C
    ops[1]  = '{carryinsel: 3'b000, alumode: 4'b0011, opmode: 7'b011_00_11}; // C - A:B
    ops[2]  = '{carryinsel: 3'b000, alumode: 4'b0000, opmode: 7'b000_01_01}; // A*B
    ops[3]  = '{carryinsel: 3'b000, alumode: 4'b0000, opmode: 7'b010_01_01}; // P + A*B
    ops[4]  = '{carryinsel: 3'b000, alumode: 4'b0000, opmode: 7'b010_11_00}; // P + C
    ops[5]  = '{carryinsel: 3'b000, alumode: 4'b0000, opmode: 7'b110_00_00}; // P >>> 17
    ops[6]  = '{carryinsel: 3'b001, alumode: 4'b0000, opmode: 7'b011_00_11}; // A:B + C + 1
    ops[7]  = '{carryinsel: 3'b000, alumode: 4'b0001, opmode: 7'b011_00_11}; // A:B - C - 1
    ops[8]  = '{carryinsel: 3'b000, alumode: 4'b0010, opmode: 7'b011_00_11}; // ~(A:B + C)
    ops[9]  = '{carryinsel: 3'b000, alumode: 4'b0100, opmode: 7'b011_00_11}; // A:B xor C
    ops[10] = '{carryinsel: 3'b000, alumode: 4'b1100, opmode: 7'b011_00_11}; // A:B and C
    ops[11] = '{carryinsel: 3'b000, alumode: 4'b1100, opmode: 7'b011_10_11}; // A:B or C
    ops[12] = '{carryinsel: 3'b110, alumode: 4'b0000, opmode: 7'b000_01_01}; // A*B rounded
    ops[13] = '{carryinsel: 3'b111, alumode: 4'b0000, opmode: 7'b010_11_00}; // P + C + P[47]
  end

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    longint unsigned exp_p;
    logic exp_c;
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      ctrl_t k;
      k = ops[n % 14];
      @(negedge clk);
      ctrl = k;
      a = AWIDTH'($urandom);
      b = BWIDTH'($urandom);
      c = {16'($urandom), 32'($urandom)};
      if (n % 7 == 3) c = word_t'(((64'(a) << 18) | 64'(b)) & MASK);  // make A:B - C zero / equal
      in_valid = 1'b1;
      exp_p = model(k, 64'(a), 64'(b), 64'(c), ref_p, ref_carry, exp_c);
      lat = 0;
      @(negedge clk);
      in_valid = 1'b0;
      while (!out_valid && lat < 5) begin
        lat++;
        @(negedge clk);
      end
      check("latency", 64'(lat + 1), 64'd2);
      check("P", 64'(p), exp_p);
      check("zero", 64'(flags.zero), 64'(exp_p == 0));
      check("neg", 64'(flags.neg), 64'(exp_p[47]));
      check("eq", 64'(flags.eq), 64'(exp_p == 64'(c)));
      if (k.alumode[3:2] == 2'b00) check("carry", 64'(flags.carry), 64'(exp_c));
      ref_p = exp_p;
      ref_carry = (k.alumode[3:2] == 2'b00) ? exp_c : 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
