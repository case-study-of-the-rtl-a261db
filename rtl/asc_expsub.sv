// asc_expsub: Exponent Subtract section of the ASC arithmetic-unit pipe.
//
// For floating-point addition it compares the exponents of its two operands,
// routes the operand with the larger exponent to the Large Operand Register
// and the other to the Small Operand Register, and computes how many hex
// digits the small fraction must move right to line up (0..14 digits, i.e.
// 0..56 bits in steps of four; larger differences are clipped to 14, which
// shifts the small fraction out entirely).  On equal exponents the first
// operand is taken as the large one; the Add section copes with a larger small
// fraction.  The section also holds the compare logic: fixed and floating
// compares of the two input operands produce a condition code.
//
// Operand sources (ctl):
//   EXS_IN_FLT   X = input A, Y = input B (sign of B inverted when neg).
//   EXS_CMP_FIX  signed compare of input A with input B.
//   EXS_CMP_FLT  floating compare of input A with input B.
//   EXS_ACC_NRM  dot product loop: X = Accumulator partial product,
//                Y = Normalizer output; a side without new data counts as 0.
//   EXS_HOLD     park the Normalizer output in a hold register.
//   EXS_COMB     X = parked value, Y = Normalizer output.
// The hold/combine pair is how this design adds the four partial sums that
// circulate at the end of a floating dot product (the text says only that the
// pipe is reconfigured to add them).
// Condition code: 0 equal, 1 A < B, 2 A > B (encoding is this design's own).
// Timing: one clock; out_valid pulses when new data was registered.
module asc_expsub
  import asc_au_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  exs_ctl_e ctl,
  input  logic     neg,
  input  word_t    in_a,
  input  word_t    in_b,
  input  logic     in_valid,
  input  ufloat_t  acc_f,
  input  logic     acc_valid,
  input  ufloat_t  nrm_f,
  input  logic     nrm_valid,
  output ufloat_t  large_op,
  output logic              small_sign,
  output logic [FRAC_W-1:0] small_frac,
  output logic [3:0]        shift,
  output logic [1:0]        cc,
  output logic     out_valid
);
  localparam ufloat_t FZERO = '0;

  ufloat_t x, y, held;
  logic    v;
  logic signed [10:0] diff;
  logic [1:0] cc_n;

  function automatic logic signed [64:0] fkey(word_t w);
    logic signed [64:0] m;
    m = signed'({2'b00, w[62:0]});
    if (w[55:0] == '0) return '0;
    return w[63] ? -m : m;
  endfunction

  always_comb begin
    x = FZERO;
    y = FZERO;
    v = 1'b0;
    case (ctl)
      EXS_IN_FLT: begin
        x = unpack64(in_a);
        y = unpack64(in_b);
        y.sign = y.sign ^ neg;
        v = in_valid;
      end
      EXS_CMP_FIX, EXS_CMP_FLT: v = in_valid;
      EXS_ACC_NRM: begin
        x = acc_valid ? acc_f : FZERO;
        y = nrm_valid ? nrm_f : FZERO;
        v = acc_valid | nrm_valid;
      end
      EXS_COMB: begin
        x = held;
        y = nrm_valid ? nrm_f : FZERO;
        v = 1'b1;
      end
      default: ;
    endcase
  end

  always_comb begin
    logic signed [64:0] ka, kb;
    if (ctl == EXS_CMP_FLT) begin
      ka = fkey(in_a);
      kb = fkey(in_b);
    end else begin
      ka = 65'(signed'(in_a));
      kb = 65'(signed'(in_b));
    end
    cc_n = (ka == kb) ? 2'd0 : (ka < kb) ? 2'd1 : 2'd2;
  end

  assign diff = 11'(x.exp) - 11'(y.exp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      large_op      <= '0;
      small_sign <= 1'b0;
      small_frac <= '0;
      shift      <= '0;
      cc         <= '0;
      held       <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= v;
      if (ctl == EXS_HOLD) held <= nrm_valid ? nrm_f : FZERO;
      if (v) begin
        cc <= cc_n;
        if (diff >= 0) begin
          large_op      <= x;
          small_sign <= y.sign;
          small_frac <= y.frac;
          shift      <= (diff > 14) ? 4'd14 : 4'(diff);
        end else begin
          large_op      <= y;
          small_sign <= x.sign;
          small_frac <= x.frac;
          shift      <= (-diff > 14) ? 4'd14 : 4'(-diff);
        end
      end
    end
  end
endmodule
