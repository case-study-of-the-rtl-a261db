// asc_normalize: Normalize section of the ASC arithmetic-unit pipe.
//
// Floating results must be hexadecimally normalized (leading fraction digit
// non-zero).  From the Add section's 57-bit magnitude (or an Accumulator
// partial product) the section
//   * shifts right one digit and adds 1 to the exponent when the add carried
//     out, otherwise
//   * counts the leading zero hex digits, shifts left by that many digits and
//     subtracts the count from the exponent;
//   * gives a true zero (all bits 0) for a zero fraction;
//   * gives a true zero and raises unf when the exponent falls below 0, and
//     raises ovf (exponent kept modulo 128) when it passes 127.
// The over/underflow handling is this design's choice; the text does not
// describe it.  The normalized value is registered both unpacked (nrm_f, fed
// back to Exponent Subtract for the dot product) and packed (result).
//
// Like the Align section for right shifts, this section performs all left
// shifts (logical or circular, 0..64 bits, count from input B[6:0]) in two
// steps: whole hex digits in NRM_SH_HEX, then 0..3 bits in NRM_SH_BIT.
// Arithmetic left shifts are done as logical ones.
// Timing: one clock per step; out_valid pulses when a result was registered.
module asc_normalize
  import asc_au_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  nrm_ctl_e          ctl,
  input  shkind_e           shk,
  input  logic              add_sign,
  input  logic signed [9:0] add_exp,
  input  logic [FRAC_W:0]   add_mag,
  input  logic              add_valid,
  input  ufloat_t           acc_f,
  input  logic              acc_valid,
  input  word_t             in_a,
  input  word_t             in_b,
  input  logic              in_valid,
  output ufloat_t           nrm_f,
  output word_t             result,
  output logic              ovf,
  output logic              unf,
  output logic              out_valid
);
  logic              s_sign;
  logic signed [9:0] s_exp;
  logic [59:0]       m60;
  logic              fv;
  ufloat_t           n_f;
  logic              n_ovf, n_unf;
  word_t             hex_reg, hex_n, bit_n;
  logic [1:0]        bit_cnt;
  logic              hex_done;
  logic [6:0]        cnt;

  always_comb begin
    if (ctl == NRM_ACC) begin
      s_sign = acc_f.sign;
      s_exp  = acc_f.exp;
      m60    = {4'b0, acc_f.frac};
      fv     = acc_valid;
    end else begin
      s_sign = add_sign;
      s_exp  = add_exp;
      m60    = {3'b0, add_mag};
      fv     = add_valid && (ctl == NRM_ADD);
    end
  end

  always_comb begin
    int unsigned lz;
    logic signed [9:0] e;
    logic [55:0] f;
    lz    = 14;
    for (int d = 0; d < 14; d++) begin
      if (lz == 14 && m60[55-4*d -: 4] != 4'h0) lz = d;
    end
    n_ovf = 1'b0;
    n_unf = 1'b0;
    if (m60[59:56] != 4'h0) begin
      f = m60[59:4];
      e = s_exp + 10'sd1;
    end else begin
      f = m60[55:0] << (4 * lz);
      e = s_exp - 10'(lz);
    end
    if (lz == 14 && m60[59:56] == 4'h0) begin
      n_f = '0;
    end else if (e < 0) begin
      n_f   = '0;
      n_unf = 1'b1;
    end else begin
      n_f.sign = s_sign;
      n_f.exp  = (e > 127) ? {3'b0, e[6:0]} : e;
      n_f.frac = f;
      n_ovf    = (e > 127);
    end
  end

  function automatic word_t lshift(word_t v, logic [6:0] n, shkind_e k);
    if (k == SH_CIRC) return (v << n) | (v >> (7'd64 - n));
    return v << n;
  endfunction

  assign cnt   = (in_b[6:0] > 7'd64) ? 7'd64 : in_b[6:0];
  assign hex_n = lshift(in_a, {cnt[6:2], 2'b00}, shk);
  assign bit_n = lshift(hex_reg, {5'b0, bit_cnt}, shk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nrm_f     <= '0;
      result    <= '0;
      ovf       <= 1'b0;
      unf       <= 1'b0;
      hex_reg   <= '0;
      bit_cnt   <= '0;
      hex_done  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      case (ctl)
        NRM_ADD, NRM_ACC: begin
          out_valid <= fv;
          if (fv) begin
            nrm_f  <= n_f;
            result <= {n_f.sign, n_f.exp[6:0], n_f.frac};
            ovf    <= n_ovf;
            unf    <= n_unf;
          end
        end
        NRM_SH_HEX: begin
          hex_done <= in_valid;
          if (in_valid) begin
            hex_reg <= hex_n;
            bit_cnt <= cnt[1:0];
          end
        end
        NRM_SH_BIT: begin
          hex_done  <= 1'b0;
          out_valid <= hex_done;
          if (hex_done) begin
            result <= bit_n;
            ovf    <= 1'b0;
            unf    <= 1'b0;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
