// asc_align: Align section of the ASC arithmetic-unit pipe.
//
// Performs every right shift of the pipe.
//  * Floating add-type instructions: the Small Operand Register's fraction is
//    shifted right by the hex-digit count from Exponent Subtract, in one
//    clock.  The Large operand and the small sign pass along unchanged.
//  * Shift instructions (logical, arithmetic, circular; 0..64 bits): two
//    clocks, as in the text.  Step ALN_SH_HEX shifts input A right by whole
//    hex digits (0..16 digits, i.e. 0..64 bits) and keeps the leftover
//    0..3-bit count; step ALN_SH_BIT finishes with that 0..3-bit shift.
//    The count is taken from input B[6:0] and counts above 64 are clipped to
//    64; where the count comes from is this design's choice.
// Timing: one clock per step.  out_valid pulses after the float step and
// after the second shift step; the first shift step produces no result.
module asc_align
  import asc_au_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  aln_ctl_e          ctl,
  input  shkind_e           shk,
  // from Exponent Subtract
  input  ufloat_t           exs_large,
  input  logic              exs_small_sign,
  input  logic [FRAC_W-1:0] exs_small_frac,
  input  logic [3:0]        exs_shift,
  input  logic              exs_valid,
  // from the Input section
  input  word_t             in_a,
  input  word_t             in_b,
  input  logic              in_valid,
  // results
  output ufloat_t           large_op,
  output logic              small_sign,
  output logic [FRAC_W-1:0] small_frac,
  output word_t             sh_result,
  output logic              out_valid
);
  word_t      hex_reg;       // value after the hex-digit step
  logic [1:0] bit_cnt;       // bits still to shift
  logic       hex_done;      // hex step holds a value for the bit step
  logic [6:0] cnt;
  logic [6:0] hex_bits;
  word_t      hex_n, bit_n;

  function automatic word_t rshift(word_t v, logic [6:0] n, shkind_e k);
    case (k)
      SH_ARITH: return word_t'($signed(v) >>> n);
      SH_CIRC:  return (v >> n) | (v << (7'd64 - n));
      default:  return v >> n;
    endcase
  endfunction

  assign cnt      = (in_b[6:0] > 7'd64) ? 7'd64 : in_b[6:0];
  assign hex_bits = {cnt[6:2], 2'b00};
  assign hex_n    = rshift(in_a, hex_bits, shk);
  assign bit_n    = rshift(hex_reg, {5'b0, bit_cnt}, shk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      large_op      <= '0;
      small_sign <= 1'b0;
      small_frac <= '0;
      sh_result  <= '0;
      hex_reg    <= '0;
      bit_cnt    <= '0;
      hex_done   <= 1'b0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      case (ctl)
        ALN_FLT: begin
          out_valid <= exs_valid;
          if (exs_valid) begin
            large_op      <= exs_large;
            small_sign <= exs_small_sign;
            small_frac <= exs_small_frac >> {exs_shift, 2'b00};
          end
        end
        ALN_SH_HEX: begin
          hex_done <= in_valid;
          if (in_valid) begin
            hex_reg <= hex_n;
            bit_cnt <= cnt[1:0];
          end
        end
        ALN_SH_BIT: begin
          hex_done  <= 1'b0;
          out_valid <= hex_done;
          if (hex_done) sh_result <= bit_n;
        end
        default: ;
      endcase
    end
  end
endmodule
