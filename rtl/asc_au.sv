// asc_au: the MBU/AU arithmetic pipe of the TI Advanced Scientific Computer.
//
// Eight sections - Input, Multiply, Accumulate, Exponent Subtract, Align,
// Add, Normalize, Output - all run every clock; a control word read from the
// 512 x 256 control ROM chooses, section by section, where each one takes
// its operands from and what it does, so every instruction is given its own
// configuration of the pipe (fixed add: Input -> Add -> Output; floating add:
// Input -> Exponent Subtract -> Align -> Add -> Normalize -> Output; fixed
// multiply: Input -> Multiply -> Accumulate -> Output).  A scalar instruction
// reads one ROM word per internal section it uses; a vector instruction reads
// fill words, then loops on one steady word (B1) while operands stream in at
// one pair per clock, then leaves through B2 into drain words.  The sequencer
// and the ROM stand for the part of the MBU that controls the pipe.
//
// Floating vector dot product (VDPF): products leave the Accumulator one per
// clock and meet, in Exponent Subtract, the partial sum coming back from the
// Normalizer four sections later, so four partial sums circulate:
// S[n] = A[n]B[n] + S[n-4].  After the last product the drain words add the
// four sums pairwise: ((S0+S1)+(S2+S3)).  The result is available 15 clocks
// after the steady word sees the end of the loop.
//
// Valid bits.  Besides its data, each section registers a one-clock "new
// data" pulse, so that short vectors and drain steps carry bubbles correctly.
// This is an addition of this design; the text has the ROM sequence alone
// determine timing.
//
// Interface.
//   start/opcode/vlen/sc_a/sc_b  issue an instruction when ready is high; the
//                                first operand pair is on opnd_a/opnd_b with
//                                start.  sc_a/sc_b take that operand from the
//                                previous result instead ("short circuit").
//   opnd_take                    high in a clock in which the pipe takes the
//                                pair on opnd_a/opnd_b (start included).
//   result/result_valid          one pulse per result; result_to_ipu tells
//                                whether it is a scalar result for the IPU
//                                or a vector element for the MBU; cc, ovf and
//                                unf qualify it.
// Vector shifts use their shifting section for two clocks per element (a
// two-word loop in the ROM) and so deliver one result every two clocks.
// Latency from start to result_valid: fixed add 3 clocks, floating add 6,
// fixed multiply 4, floating multiply 5, shifts 4; vectors stream one result
// per clock (vector shifts: one per two clocks).
module asc_au
  import asc_au_pkg::*;
#(
  parameter int unsigned LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  opcode_e          opcode,
  input  logic [LEN_W-1:0] vlen,
  input  logic             sc_a,
  input  logic             sc_b,
  input  word_t            opnd_a,
  input  word_t            opnd_b,
  output logic             opnd_take,
  output logic             ready,
  output word_t            result,
  output logic             result_valid,
  output logic             result_to_ipu,
  output logic [1:0]       result_cc,
  output logic             result_ovf,
  output logic             result_unf,
  output logic             eol
);
  rom_addr_t          addr;
  logic [ROM_WIDTH-1:0] rom_data;
  ctl_t               rom_ctl, c;
  logic               active, start_q;
  logic               sc_a_eff, sc_b_eff;

  asc_control_rom u_rom (.addr(addr), .data(rom_data), .ctl(rom_ctl));

  asc_sequencer #(.LEN_W(LEN_W)) u_seq (
    .clk, .rst_n, .start, .opcode, .vlen, .word(rom_ctl),
    .addr, .active, .take(opnd_take), .eol, .ready
  );

  assign c = active ? rom_ctl : CTL_IDLE;

  // short-circuit selection applies to the pair taken with start
  assign start_q  = start && ready;
  assign sc_a_eff = start_q && sc_a;
  assign sc_b_eff = start_q && sc_b;

  // ------------------------------------------------------------ sections
  word_t in_a, in_b;
  logic  in_v;
  asc_input u_in (
    .clk, .rst_n, .load(opnd_take), .mbu_a(opnd_a), .mbu_b(opnd_b),
    .sc_a(sc_a_eff), .sc_b(sc_b_eff), .prev_result(result),
    .a(in_a), .b(in_b), .valid(in_v)
  );

  word_t             psum, pcarry;
  logic              p_sign, mul_v;
  logic signed [9:0] p_exp;
  asc_multiply u_mul (
    .clk, .rst_n, .ctl(c.mul), .in_valid(in_v), .a(in_a), .b(in_b),
    .psum, .pcarry, .p_sign, .p_exp, .out_valid(mul_v)
  );

  word_t   acc;
  ufloat_t acc_f;
  logic    acc_v;
  asc_accumulate u_acc (
    .clk, .rst_n, .ctl(c.acc), .fb(c.acc_fb), .clr(c.acc_clr), .in_valid(mul_v),
    .psum, .pcarry, .p_sign, .p_exp, .acc, .acc_f, .out_valid(acc_v)
  );

  ufloat_t           nrm_f;
  logic              nrm_v;
  ufloat_t           exs_large;
  logic              exs_ssign;
  logic [FRAC_W-1:0] exs_sfrac;
  logic [3:0]        exs_shift;
  logic [1:0]        exs_cc;
  logic              exs_v;
  asc_expsub u_exs (
    .clk, .rst_n, .ctl(c.exs), .neg(c.exs_neg), .in_a, .in_b, .in_valid(in_v),
    .acc_f, .acc_valid(acc_v), .nrm_f, .nrm_valid(nrm_v),
    .large_op(exs_large), .small_sign(exs_ssign), .small_frac(exs_sfrac),
    .shift(exs_shift), .cc(exs_cc), .out_valid(exs_v)
  );

  ufloat_t           aln_large;
  logic              aln_ssign;
  logic [FRAC_W-1:0] aln_sfrac;
  word_t             aln_res;
  logic              aln_v;
  asc_align u_aln (
    .clk, .rst_n, .ctl(c.aln), .shk(c.shk),
    .exs_large, .exs_small_sign(exs_ssign), .exs_small_frac(exs_sfrac),
    .exs_shift, .exs_valid(exs_v), .in_a, .in_b, .in_valid(in_v),
    .large_op(aln_large), .small_sign(aln_ssign), .small_frac(aln_sfrac),
    .sh_result(aln_res), .out_valid(aln_v)
  );

  word_t             add_res;
  logic              add_ovf, add_sign, add_v;
  logic signed [9:0] add_exp;
  logic [FRAC_W:0]   add_mag;
  asc_add u_add (
    .clk, .rst_n, .ctl(c.add), .sub(c.add_sub), .in_a, .in_b, .in_valid(in_v),
    .aln_large, .aln_small_sign(aln_ssign), .aln_small_frac(aln_sfrac), .aln_valid(aln_v),
    .fix_result(add_res), .fix_ovf(add_ovf), .f_sign(add_sign), .f_exp(add_exp),
    .f_mag(add_mag), .out_valid(add_v)
  );

  word_t nrm_res;
  logic  nrm_ovf, nrm_unf;
  asc_normalize u_nrm (
    .clk, .rst_n, .ctl(c.nrm), .shk(c.shk),
    .add_sign, .add_exp, .add_mag, .add_valid(add_v),
    .acc_f, .acc_valid(acc_v), .in_a, .in_b, .in_valid(in_v),
    .nrm_f, .result(nrm_res), .ovf(nrm_ovf), .unf(nrm_unf), .out_valid(nrm_v)
  );

  asc_output u_out (
    .clk, .rst_n, .sel(c.out), .any(c.out_any), .ipu(c.out_ipu),
    .in_a, .in_b, .in_valid(in_v),
    .acc, .acc_valid(acc_v), .exs_cc, .exs_valid(exs_v),
    .aln_result(aln_res), .aln_valid(aln_v),
    .add_result(add_res), .add_ovf, .add_valid(add_v),
    .nrm_result(nrm_res), .nrm_ovf, .nrm_unf, .nrm_valid(nrm_v),
    .result, .res_valid(result_valid), .res_to_ipu(result_to_ipu),
    .res_cc(result_cc), .res_ovf(result_ovf), .res_unf(result_unf)
  );

  // only the control-word bits are defined in the ROM's 256 output lines
  logic unused_rom;
  assign unused_rom = ^rom_data[ROM_WIDTH-1:CTL_W];

  // the ROM must never send the pipe to an address outside the microprogram
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n) active |-> addr < ROM_AW'(ROM_DEPTH - 1));
endmodule
