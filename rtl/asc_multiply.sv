// asc_multiply: Multiplier section of the ASC arithmetic-unit pipe.
//
// Multiplies two 32-bit numbers into a 64-bit product that is left in
// redundant form: the section's output registers are the Pseudosum and the
// Pseudocarry, whose sum (formed by the Accumulator) is the product.  As in
// the text the multiplier operand is recoded and the summands are reduced by a
// Wallace tree of full adders.  The recoding is radix-4 (Booth); the 17
// recoded summands plus one row of Booth correction bits are reduced
// 18 -> 12 -> 8 -> 6 -> 4 -> 3 -> 2 by carry-save adders.
//
// Modes (ctl):
//   MUL_FIX  a[31:0] x b[31:0], two's complement, 64-bit result.
//   MUL_FLT  32-bit hexadecimal floating operands, sign/magnitude: the two
//            24-bit fractions are multiplied; the exponent bits do not enter
//            the tree.  The section also forms the product's sign and
//            exponent (ea + eb - 64), which ride along with the fraction
//            product; that exponent path is this design's own.
// Bit 0 of the Pseudocarry is always zero (carries only move left); it is
// kept so that both registers are full 64-bit words.
// Timing: one clock.  out_valid pulses one clock after in_valid when ctl is
// not MUL_NONE.
module asc_multiply
  import asc_au_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mul_ctl_e          ctl,
  input  logic              in_valid,
  input  word_t             a,
  input  word_t             b,
  output word_t             psum,
  output word_t             pcarry,
  output logic              p_sign,
  output logic signed [9:0] p_exp,
  output logic              out_valid
);
  logic        flt;
  logic [63:0] mcand;          // multiplicand, extended to 64 bits
  logic [33:0] mplier;         // multiplier, extended to 34 bits
  logic [63:0] r0 [18];
  logic [63:0] r1 [12];
  logic [63:0] r2 [8];
  logic [63:0] r3 [6];
  logic [63:0] r4 [4];
  logic [63:0] r5 [3];
  logic [63:0] s_n, c_n;

  function automatic logic [127:0] csa(logic [63:0] x, logic [63:0] y, logic [63:0] z);
    logic [63:0] s, c;
    s = x ^ y ^ z;
    c = ((x & y) | (x & z) | (y & z)) << 1;
    return {s, c};
  endfunction

  assign flt = (ctl == MUL_FLT);

  always_comb begin
    if (flt) begin
      mcand  = {40'b0, a[23:0]};
      mplier = {10'b0, b[23:0]};
    end else begin
      mcand  = {{32{a[31]}}, a[31:0]};
      mplier = {{2{b[31]}}, b[31:0]};
    end
  end

  // Booth radix-4 recoding: digit i looks at mplier[2i+1:2i-1]
  always_comb begin
    logic [2:0]  grp;
    logic [63:0] mag;
    logic        neg;
    r0[17] = '0;
    for (int i = 0; i < 17; i++) begin
      grp = (i == 0) ? {mplier[1:0], 1'b0} : mplier[2*i+1 -: 3];
      case (grp)
        3'b001, 3'b010: begin mag = mcand;      neg = 1'b0; end
        3'b011:         begin mag = mcand << 1; neg = 1'b0; end
        3'b100:         begin mag = mcand << 1; neg = 1'b1; end
        3'b101, 3'b110: begin mag = mcand;      neg = 1'b1; end
        default:        begin mag = '0;         neg = 1'b0; end
      endcase
      // a negative digit: (~mag << 2i) plus a hot one at bit 2i
      r0[i] = (neg ? ~mag : mag) << (2 * i);
      r0[17][2*i] = neg;
    end
  end

  // Wallace tree
  always_comb begin
    for (int i = 0; i < 6; i++) {r1[2*i], r1[2*i+1]} = csa(r0[3*i], r0[3*i+1], r0[3*i+2]);
    for (int i = 0; i < 4; i++) {r2[2*i], r2[2*i+1]} = csa(r1[3*i], r1[3*i+1], r1[3*i+2]);
    for (int i = 0; i < 2; i++) {r3[2*i], r3[2*i+1]} = csa(r2[3*i], r2[3*i+1], r2[3*i+2]);
    r3[4] = r2[6];
    r3[5] = r2[7];
    for (int i = 0; i < 2; i++) {r4[2*i], r4[2*i+1]} = csa(r3[3*i], r3[3*i+1], r3[3*i+2]);
    {r5[0], r5[1]} = csa(r4[0], r4[1], r4[2]);
    r5[2] = r4[3];
    {s_n, c_n} = csa(r5[0], r5[1], r5[2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psum      <= '0;
      pcarry    <= '0;
      p_sign    <= 1'b0;
      p_exp     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (ctl != MUL_NONE);
      if (ctl != MUL_NONE) begin
        psum   <= s_n;
        pcarry <= c_n;
        p_sign <= flt & (a[31] ^ b[31]);
        p_exp  <= flt ? 10'(signed'({1'b0, a[30:24]})) + 10'(signed'({1'b0, b[30:24]}))
                        - 10'(EXP_BIAS)
                      : '0;
      end
    end
  end
endmodule
