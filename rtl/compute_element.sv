// compute_element: the execution unit of a grain, modelled on the DSP48E1 slice.
//
// Two stages, as in the architecture description: the first rising edge after
// in_valid registers A (30 bits), B (18 bits), C (48 bits) and the 14-bit control
// word; the next edge registers the 48-bit result P together with the flags.
// Every instruction therefore takes exactly two cycles here, whatever it does.
//
// The datapath is the DSP48E1 one as far as a single slice without cascade goes:
//   M = A[24:0] * B[17:0] (signed 25x18 multiplier)
//   X mux (OPMODE[1:0]):  0, M, P, A:B
//   Y mux (OPMODE[3:2]):  0, 0 (the multiplier's second partial product, folded
//                         into X here), all ones, C
//   Z mux (OPMODE[6:4]):  0, PCIN(=0), P, C, P, PCIN>>17(=0), P>>>17, 0
//   ALUMODE: 0000 Z+X+Y+CIN, 0001 ~Z+X+Y+CIN, 0010 ~(Z+X+Y+CIN), 0011 Z-(X+Y+CIN),
//            01xx/11xx the two-input logic functions of X and Z (XOR, XNOR, AND,
//            AND-NOT, NAND, OR-NOT and, with Y = all ones, their OR/NOR forms).
//   CARRYINSEL picks the carry in: the carry-in pin, cascade inputs (all tied to
//            their inactive level, since a grain has one slice), the previous
//            carry out, ~P[47], P[47], or A[24] XNOR B[17] for rounding.
// The comparator does not feed P: it compares the new P with 0 and with the
// registered C operand and, with the sign and the carry out, forms the flags that
// the sequencer uses for conditional jumps.
//
// The unit, the operand widths, the 14-bit control word and the two-stage timing
// follow the architecture description; that the 14 bits are OPMODE, ALUMODE and
// CARRYINSEL, and the function table itself, follow the DSP48E1 slice it names.
// Unsupported codes (ALUMODE 10xx, the undefined logic codes) give P = 0.
//
// Interface: in_valid with a, b, c, ctrl; out_valid pulses two edges later with
// p and flags, which then hold until the next result.
module compute_element
  import remorph_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  ctrl_t             ctrl,
  input  logic [AWIDTH-1:0] a,
  input  logic [BWIDTH-1:0] b,
  input  word_t             c,
  output word_t             p,
  output flags_t            flags,
  output logic              out_valid
);

  // Stage 1: input registers.
  logic              v1;
  ctrl_t             ctrl_q;
  logic [AWIDTH-1:0] a_q;
  logic [BWIDTH-1:0] b_q;
  word_t             c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      ctrl_q <= '0;
      a_q    <= '0;
      b_q    <= '0;
      c_q    <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        ctrl_q <= ctrl;
        a_q    <= a;
        b_q    <= b;
        c_q    <= c;
      end
    end
  end

  // Stage 2: multiplier, muxes, ALU and comparator.
  logic  carry_q;
  word_t m, x, y, z, zi, r;
  logic  cin, cout;
  logic [49:0] sum3;
  logic signed [42:0] prod;

  always_comb begin
    prod = $signed(a_q[24:0]) * $signed(b_q);
    m    = word_t'(48'(signed'(prod)));

    unique case (ctrl_q.opmode[1:0])
      2'b00: x = '0;
      2'b01: x = m;
      2'b10: x = p;
      default: x = {a_q, b_q};
    endcase

    unique case (ctrl_q.opmode[3:2])
      2'b10:   y = '1;
      2'b11:   y = c_q;
      default: y = '0;
    endcase

    unique case (ctrl_q.opmode[6:4])
      3'b010, 3'b100: z = p;
      3'b011:         z = c_q;
      3'b110:         z = word_t'($signed(p) >>> 17);
      default:        z = '0;
    endcase

    unique case (ctrl_q.carryinsel)
      3'b001:  cin = 1'b1;           // ~PCIN[47], PCIN tied to 0
      3'b100:  cin = carry_q;        // previous carry out
      3'b101:  cin = ~p[DW-1];
      3'b110:  cin = ~(a_q[24] ^ b_q[17]);
      3'b111:  cin = p[DW-1];
      default: cin = 1'b0;           // carry-in pin and cascade inputs tied low
    endcase

    // Three-input adder; Z is inverted for ALUMODE 0001 and 0011.
    zi   = ctrl_q.alumode[0] ? ~z : z;
    sum3 = 50'(zi) + 50'(x) + 50'(y) + 50'(cin);
    cout = sum3[DW];
    r    = '0;

    if (ctrl_q.alumode[3:2] == 2'b00) begin
      unique case (ctrl_q.alumode[1:0])
        2'b00:   r = sum3[DW-1:0];
        2'b01:   r = sum3[DW-1:0];
        2'b10:   r = ~sum3[DW-1:0];
        default: r = ~sum3[DW-1:0];
      endcase
    end else if (ctrl_q.alumode[2] && (ctrl_q.opmode[3:2] == 2'b00 || ctrl_q.opmode[3:2] == 2'b10)) begin
      // Logic unit; Y = all ones turns the second set of functions on.
      logic yones;
      yones = ctrl_q.opmode[3];
      unique case (ctrl_q.alumode)
        4'b0100, 4'b0111: r = yones ? ~(x ^ z) : (x ^ z);
        4'b0101, 4'b0110: r = yones ? (x ^ z) : ~(x ^ z);
        4'b1100:          r = yones ? (x | z) : (x & z);
        4'b1101:          r = yones ? (x | ~z) : (x & ~z);
        4'b1110:          r = yones ? ~(x | z) : ~(x & z);
        default:          r = yones ? (~x & z) : (~x | z);
      endcase
      cout = 1'b0;
    end else begin
      cout = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p         <= '0;
      flags     <= '0;
      carry_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        p           <= r;
        carry_q     <= cout;
        flags.carry <= cout;
        flags.zero  <= (r == '0);
        flags.neg   <= r[DW-1];
        flags.eq    <= (r == c_q);
      end
    end
  end

endmodule
