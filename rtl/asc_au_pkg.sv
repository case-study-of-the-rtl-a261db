// asc_au_pkg: shared types, constants and the control microprogram of the ASC
// arithmetic-unit pipe.
//
// Number formats.  Words are 64 bits.  Fixed point is two's complement.
// Floating point is sign/magnitude with a 7-bit excess-64 hexadecimal exponent:
//   64-bit: [63] sign, [62:56] exponent, [55:0] fraction (14 hex digits)
//   32-bit: [31] sign, [30:24] exponent, [23:0] fraction (6 hex digits)
// The 7-bit exponent, the hexadecimal radix and the 0..56 bit alignment range
// follow the text; the exact bit placement is this design's choice.
//
// Inside the pipe a floating operand travels unpacked (ufloat_t) with a
// 10-bit signed biased exponent so that a product exponent can leave the
// 0..127 range until the normalizer checks it.
//
// Control.  One control word (ctl_t) drives every section in the clock in
// which it is read: each field selects the source and function of one
// section.  The output section's fields act one clock later (the output
// section holds its own copy of them).  b1/b2 are the two next-address fields
// of the text; done ends the instruction.  The words are built by rom_word();
// the microprogram layout is this design's own, the mechanism (one word per
// internal section for scalars; fill, steady and drain words with B1/B2 for
// vectors) is the text's.
package asc_au_pkg;

  localparam int unsigned W          = 64;   // word size
  localparam int unsigned FRAC_W     = 56;   // 64-bit floating fraction
  localparam int unsigned ROM_DEPTH  = 512;  // control ROM addresses
  localparam int unsigned ROM_WIDTH  = 256;  // control ROM output lines
  localparam int unsigned ROM_AW     = 9;
  localparam int          EXP_BIAS   = 64;

  typedef logic [W-1:0] word_t;
  typedef logic [ROM_AW-1:0] rom_addr_t;

  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;    // biased by 64, widened for range checks
    logic [FRAC_W-1:0] frac;
  } ufloat_t;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [4:0] {
    OP_ADD  = 5'd0,   // fixed add
    OP_SUB  = 5'd1,   // fixed subtract
    OP_AND  = 5'd2,
    OP_OR   = 5'd3,
    OP_XOR  = 5'd4,
    OP_CMP  = 5'd5,   // fixed compare
    OP_CMPF = 5'd6,   // floating compare
    OP_FAD  = 5'd7,   // floating add
    OP_FSB  = 5'd8,   // floating subtract
    OP_MPY  = 5'd9,   // fixed multiply 32x32 -> 64
    OP_FMP  = 5'd10,  // floating multiply, 32-bit operands, 64-bit result
    OP_SRL  = 5'd11,  // shift right logical
    OP_SRA  = 5'd12,  // shift right arithmetic
    OP_SRC  = 5'd13,  // shift right circular
    OP_SLL  = 5'd14,  // shift left logical
    OP_SLC  = 5'd15,  // shift left circular
    OP_VADD = 5'd16,  // vector fixed add
    OP_VFAD = 5'd17,  // vector floating add
    OP_VMPY = 5'd18,  // vector fixed multiply
    OP_VCMP = 5'd19,  // vector fixed compare
    OP_VDPX = 5'd20,  // fixed-point vector dot product
    OP_VDPF = 5'd21,  // floating-point vector dot product
    // codes 22 and 23 are left free: the VDPF microprogram runs into slot 22
    OP_VSRL = 5'd24,  // vector shifts, two clocks per element
    OP_VSRA = 5'd25,
    OP_VSRC = 5'd26,
    OP_VSLL = 5'd27,
    OP_VSLC = 5'd28,
    OP_VCMPF = 5'd29  // vector floating compare
  } opcode_e;
  localparam int unsigned NUM_OPS = 30;   // one past the highest code

  // Codes that name an instruction (22, 23, 30 and 31 do not).
  function automatic logic op_defined(int unsigned op);
    return op < 22 || (op >= 24 && op < NUM_OPS);
  endfunction

  function automatic logic is_vshift(opcode_e op);
    return op >= OP_VSRL && op <= OP_VSLC;
  endfunction

  // ------------------------------------------------------ section controls
  typedef enum logic [1:0] {MUL_NONE, MUL_FIX, MUL_FLT} mul_ctl_e;
  typedef enum logic [1:0] {ACC_NONE, ACC_FIX, ACC_FLT} acc_ctl_e;
  typedef enum logic [2:0] {
    EXS_NONE,      // nothing selected
    EXS_IN_FLT,    // floating add/sub: operands from the input section
    EXS_CMP_FIX,   // fixed compare of the input operands
    EXS_CMP_FLT,   // floating compare of the input operands
    EXS_ACC_NRM,   // dot product: accumulator output with normalizer output
    EXS_HOLD,      // dot product end: park the normalizer output
    EXS_COMB       // dot product end: combine parked value with normalizer output
  } exs_ctl_e;
  typedef enum logic [1:0] {ALN_NONE, ALN_FLT, ALN_SH_HEX, ALN_SH_BIT} aln_ctl_e;
  typedef enum logic [1:0] {SH_LOGICAL, SH_ARITH, SH_CIRC} shkind_e;
  typedef enum logic [1:0] {ADD_NONE, ADD_FIX, ADD_FLT} add_ctl_e;
  typedef enum logic [2:0] {NRM_NONE, NRM_ADD, NRM_ACC, NRM_SH_HEX, NRM_SH_BIT} nrm_ctl_e;
  typedef enum logic [3:0] {
    OUT_NONE, OUT_AND, OUT_OR, OUT_XOR, OUT_ACC, OUT_EXS, OUT_ALN, OUT_ADD, OUT_NRM
  } out_ctl_e;

  typedef struct packed {
    logic      fetch;     // take the next operand pair from the MBU
    mul_ctl_e  mul;
    acc_ctl_e  acc;
    logic      acc_fb;    // add the accumulator's own output (fixed dot product)
    logic      acc_clr;   // clear the accumulator
    exs_ctl_e  exs;
    logic      exs_neg;   // invert the sign of the second operand (subtract)
    aln_ctl_e  aln;
    shkind_e   shk;       // shift kind for align / normalize shift steps
    add_ctl_e  add;
    logic      add_sub;   // fixed subtract
    nrm_ctl_e  nrm;
    out_ctl_e  out;
    logic      out_any;   // output takes its source even without new data
    logic      out_ipu;   // result goes to the IPU (else to the MBU)
    rom_addr_t b1;
    rom_addr_t b2;
    logic      done;      // last word of the instruction
  } ctl_t;

  localparam int unsigned CTL_W = $bits(ctl_t);

  localparam ctl_t CTL_IDLE = '{fetch: 1'b0, mul: MUL_NONE, acc: ACC_NONE, acc_fb: 1'b0,
                                acc_clr: 1'b0, exs: EXS_NONE, exs_neg: 1'b0, aln: ALN_NONE,
                                shk: SH_LOGICAL, add: ADD_NONE, add_sub: 1'b0, nrm: NRM_NONE,
                                out: OUT_NONE, out_any: 1'b0, out_ipu: 1'b0, b1: '0, b2: '0,
                                done: 1'b0};

  // ----------------------------------------------------- helper functions
  function automatic ufloat_t unpack64(word_t w);
    ufloat_t f;
    f.sign = w[63];
    f.exp  = 10'(signed'({1'b0, w[62:56]}));
    f.frac = w[55:0];
    return f;
  endfunction

  // Merge two control words section by section: a section selected in 'a'
  // wins, otherwise 'b' supplies it.
  function automatic ctl_t merge(ctl_t a, ctl_t b);
    ctl_t r = a;
    if (a.mul == MUL_NONE) r.mul = b.mul;
    if (a.acc == ACC_NONE) begin r.acc = b.acc; r.acc_fb = b.acc_fb; end
    r.acc_clr = a.acc_clr | b.acc_clr;
    if (a.exs == EXS_NONE) begin r.exs = b.exs; r.exs_neg = b.exs_neg; end
    if (a.aln == ALN_NONE && a.nrm != NRM_SH_HEX && a.nrm != NRM_SH_BIT) r.shk = b.shk;
    if (a.aln == ALN_NONE) r.aln = b.aln;
    if (a.add == ADD_NONE) begin r.add = b.add; r.add_sub = b.add_sub; end
    if (a.nrm == NRM_NONE) r.nrm = b.nrm;
    if (a.out == OUT_NONE) begin r.out = b.out; r.out_any = b.out_any; r.out_ipu = b.out_ipu; end
    r.fetch = a.fetch | b.fetch;
    return r;
  endfunction

  // Number of internal sections (= ROM words) a scalar instruction uses.
  function automatic int unsigned scalar_len(opcode_e op);
    case (op)
      OP_FAD, OP_FSB:                         return 4;
      OP_FMP:                                 return 3;
      OP_MPY, OP_SRL, OP_SRA, OP_SRC,
      OP_SLL, OP_SLC:                         return 2;
      default:                                return 1;
    endcase
  endfunction

  // Word k of a scalar instruction: what section k does.  The output fields
  // ride in the last word.
  function automatic ctl_t scalar_word(opcode_e op, int unsigned k);
    ctl_t c = CTL_IDLE;
    c.out_ipu = 1'b1;
    case (op)
      OP_ADD, OP_SUB: begin c.add = ADD_FIX; c.add_sub = (op == OP_SUB); c.out = OUT_ADD; end
      OP_AND:         c.out = OUT_AND;
      OP_OR:          c.out = OUT_OR;
      OP_XOR:         c.out = OUT_XOR;
      OP_CMP:         begin c.exs = EXS_CMP_FIX; c.out = OUT_EXS; end
      OP_CMPF:        begin c.exs = EXS_CMP_FLT; c.out = OUT_EXS; end
      OP_FAD, OP_FSB:
        case (k)
          0:       begin c.exs = EXS_IN_FLT; c.exs_neg = (op == OP_FSB); end
          1:       c.aln = ALN_FLT;
          2:       c.add = ADD_FLT;
          default: begin c.nrm = NRM_ADD; c.out = OUT_NRM; end
        endcase
      OP_MPY:
        if (k == 0) c.mul = MUL_FIX;
        else begin c.acc = ACC_FIX; c.out = OUT_ACC; end
      OP_FMP:
        case (k)
          0:       c.mul = MUL_FLT;
          1:       c.acc = ACC_FLT;
          default: begin c.nrm = NRM_ACC; c.out = OUT_NRM; end
        endcase
      OP_SRL, OP_SRA, OP_SRC: begin
        c.shk = (op == OP_SRL) ? SH_LOGICAL : (op == OP_SRA) ? SH_ARITH : SH_CIRC;
        if (k == 0) c.aln = ALN_SH_HEX;
        else begin c.aln = ALN_SH_BIT; c.out = OUT_ALN; end
      end
      OP_SLL, OP_SLC: begin
        c.shk = (op == OP_SLL) ? SH_LOGICAL : SH_CIRC;
        if (k == 0) c.nrm = NRM_SH_HEX;
        else begin c.nrm = NRM_SH_BIT; c.out = OUT_NRM; end
      end
      default: ;
    endcase
    return c;
  endfunction

  // ------------------------------------------------ microprogram layout
  // Each instruction owns a block of 16 ROM addresses starting at op*16.
  // Scalar: words 0..K-1.  Element-wise vector with a K-word scalar body:
  //   fill words 0..K-2, steady word K-1 (B1 = itself, B2 = first drain
  //   word), drain words K..2K-1.
  // Vector shifts: a two-word loop (hex step, then bit step with the fetch),
  //   see rom_word.  The floating dot product takes 21 words and runs into
  //   slot 22, so codes 22 and 23 name no instruction.
  localparam int unsigned SLOT = 16;

  function automatic rom_addr_t start_addr(opcode_e op);
    return rom_addr_t'(int'(op) * SLOT);
  endfunction

  function automatic opcode_e vector_body(opcode_e op);
    case (op)
      OP_VADD: return OP_ADD;
      OP_VFAD: return OP_FAD;
      OP_VMPY: return OP_MPY;
      OP_VCMP: return OP_CMP;
      OP_VCMPF: return OP_CMPF;
      OP_VDPX: return OP_MPY;
      OP_VSRL: return OP_SRL;
      OP_VSRA: return OP_SRA;
      OP_VSRC: return OP_SRC;
      OP_VSLL: return OP_SLL;
      OP_VSLC: return OP_SLC;
      default: return OP_FMP;
    endcase
  endfunction

  // Float dot product steady configuration: multiply, accumulate and the
  // four-section add loop all active.
  function automatic ctl_t vdpf_loop();
    ctl_t c = CTL_IDLE;
    c.mul = MUL_FLT; c.acc = ACC_FLT; c.exs = EXS_ACC_NRM;
    c.aln = ALN_FLT; c.add = ADD_FLT; c.nrm = NRM_ADD;
    return c;
  endfunction

  function automatic ctl_t rom_word(rom_addr_t a);
    ctl_t        c = CTL_IDLE;
    int unsigned opi = int'(a) / SLOT;
    int unsigned j   = int'(a) % SLOT;
    opcode_e     op;
    opcode_e     body;
    int unsigned k;
    // the dot-product block is longer than one slot and runs on past it
    if (opi == int'(OP_VDPF) + 1) begin
      opi = int'(OP_VDPF);
      j   = int'(a) - int'(OP_VDPF) * SLOT;
    end
    if (!op_defined(opi)) return CTL_IDLE;
    op   = opcode_e'(opi);
    body = vector_body(op);
    k    = scalar_len(body);
    if (op < OP_VADD) begin
      // scalar: one word per internal section
      if (j < scalar_len(op)) begin
        c = scalar_word(op, j);
        c.b1 = a + 1'b1; c.b2 = a + 1'b1;
        c.done = (j == scalar_len(op) - 1);
      end
    end else if (op == OP_VDPF) begin
      // fill 0..5, steady 6, drain 7..20 (see asc_au header for timing)
      if (j > 20) begin
        c = CTL_IDLE;
      end else if (j <= 5) begin
        c = CTL_IDLE;
        c.fetch = 1'b1; c.mul = MUL_FLT;
        if (j >= 1) c.acc = ACC_FLT;
        if (j >= 2) c.exs = EXS_ACC_NRM;
        if (j >= 3) c.aln = ALN_FLT;
        if (j >= 4) c.add = ADD_FLT;
        if (j >= 5) c.nrm = NRM_ADD;
        c.b1 = a + 1'b1; c.b2 = a + 1'b1;
      end else if (j == 6) begin
        c = vdpf_loop(); c.fetch = 1'b1;
        c.b1 = a; c.b2 = a + 1'b1;
      end else begin
        c = vdpf_loop();
        c.b1 = a + 1'b1; c.b2 = a + 1'b1;
        if (j >= 8)  c.mul = MUL_NONE;
        if (j >= 9)  c.acc = ACC_NONE;
        // j = 7..9 finish the last products; pairing afterwards
        case (j)
          7, 8, 9: ;
          10, 12, 15: c.exs = EXS_HOLD;
          11, 13, 17: c.exs = EXS_COMB;
          default:    c.exs = EXS_NONE;
        endcase
        if (j == 20) begin c.out = OUT_NRM; c.out_ipu = 1'b1; c.done = 1'b1; end
      end
    end else if (is_vshift(op)) begin
      // Two words per element, since the shifting section is used for two
      // clocks: X (hex step) and Y (bit step, fetch of the next pair, output).
      // 0: X   B1 -> 1, B2 -> 3 (length 1: straight to the last bit step)
      // 1: Y   B1 -> 0 (loop), B2 -> 2 after the last pair is fetched
      // 2: X   for the last element
      // 3: Y   for the last element, done
      if (j < 4) begin
        c = scalar_word(body, j % 2);
        c.fetch = (j == 1);
        if (j % 2 == 0) c.out = OUT_NONE;
        c.out_ipu = 1'b0;
        case (j)
          0:       begin c.b1 = a + 1'b1; c.b2 = a + ROM_AW'(3); end
          1:       begin c.b1 = a - 1'b1; c.b2 = a + 1'b1; end
          2:       begin c.b1 = a + 1'b1; c.b2 = a + 1'b1; end
          default: c.done = 1'b1;
        endcase
      end
    end else if (op == OP_VDPX) begin
      // fill 0, steady 1, drain 2..3
      c.mul = MUL_FIX;
      case (j)
        0: begin c.fetch = 1'b1; c.acc_clr = 1'b1; c.b1 = a + 1'b1; c.b2 = a + 1'b1; end
        1: begin c.fetch = 1'b1; c.acc = ACC_FIX; c.acc_fb = 1'b1; c.b1 = a; c.b2 = a + 1'b1; end
        2: begin c.acc = ACC_FIX; c.acc_fb = 1'b1; c.b1 = a + 1'b1; c.b2 = a + 1'b1; end
        3: begin c.mul = MUL_NONE; c.acc = ACC_FIX; c.acc_fb = 1'b1; c.out = OUT_ACC;
                 c.out_any = 1'b1; c.out_ipu = 1'b1; c.done = 1'b1; end
        default: c = CTL_IDLE;
      endcase
    end else begin
      // element-wise vector: fill, steady, drain built from the scalar body
      if (j < 2 * k) begin
        c = CTL_IDLE;
        if (j + 1 < k) begin
          for (int unsigned i = 0; i <= j; i++) c = merge(c, scalar_word(body, i));
          c.fetch = 1'b1;
          c.out = OUT_NONE;
          c.b1 = a + 1'b1; c.b2 = a + 1'b1;
        end else if (j + 1 == k) begin
          for (int unsigned i = 0; i < k; i++) c = merge(c, scalar_word(body, i));
          c.fetch = 1'b1;
          c.b1 = a; c.b2 = a + 1'b1;
        end else begin
          for (int unsigned i = j - k; i < k; i++) c = merge(c, scalar_word(body, i));
          c.b1 = a + 1'b1; c.b2 = a + 1'b1;
          c.done = (j == 2 * k - 1);
        end
        c.out_ipu = 1'b0;
      end
    end
    return c;
  endfunction

endpackage
