// tb_asc_au: end-to-end test of the arithmetic pipe at its default size.
//
// Issues every instruction of the microprogram as the MBU/IPU would: scalar
// fixed and floating arithmetic, logical operations, compares, right and
// left shifts, the short circuit, element-wise vectors of several lengths,
// vector shifts, floating vector compares and both vector dot products.
// Every result is compared with the integer reference model in asc_ref_pkg;
// scalar latencies and the vector rates (one result per clock, one per two
// clocks for vector shifts) are checked.  The test also counts how often each
// mechanism of the pipe fired (B2 end-of-loop branch, steady-word looping,
// short circuit, alignment shift, post-add carry, leading-zero
// normalization, accumulator feedback, dot-product pairing, fixed overflow,
// exponent underflow) and fails if one never did.
module tb_asc_au;
  import asc_au_pkg::*;
  import asc_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic       start = 1'b0;
  opcode_e    opcode = OP_ADD;
  logic [15:0] vlen = 16'd1;
  logic       sc_a = 1'b0, sc_b = 1'b0;
  word_t      opnd_a = '0, opnd_b = '0;
  logic       opnd_take, ready, result_valid, result_to_ipu, result_ovf, result_unf, eol;
  word_t      result;
  logic [1:0] result_cc;

  asc_au dut (.*);

  always #5 clk = ~clk;
  // reset falls at 1 ns, a real edge, so the asynchronous reset acts before the first clock
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // collected results
  word_t     res_q[$];
  logic [1:0] cc_q[$];
  logic      ovf_q[$], unf_q[$], ipu_q[$];
  longint    t_q[$];
  always @(posedge clk) if (rst_n && result_valid) begin
    res_q.push_back(result); cc_q.push_back(result_cc); ovf_q.push_back(result_ovf);
    unf_q.push_back(result_unf); ipu_q.push_back(result_to_ipu); t_q.push_back(cycle);
  end

  // mechanism counters
  int n_b2 = 0, n_loop = 0, n_sc = 0, n_align = 0, n_carry = 0, n_lz = 0;
  int n_accfb = 0, n_pair = 0, n_ovf = 0, n_unf = 0, n_hexbit = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.active && !dut.rom_ctl.done && dut.eol && dut.rom_ctl.b1 != dut.rom_ctl.b2) n_b2++;
    if (dut.active && dut.rom_ctl.b1 == dut.addr && dut.opnd_take) n_loop++;
    if (dut.sc_a_eff || dut.sc_b_eff) n_sc++;
    if (dut.exs_v && dut.exs_shift != 0 && dut.c.aln == ALN_FLT) n_align++;
    if (dut.add_v && dut.add_mag[56] && dut.c.nrm == NRM_ADD) n_carry++;
    if (dut.add_v && dut.add_mag[56:52] == 0 && dut.add_mag != 0 && dut.c.nrm == NRM_ADD) n_lz++;
    if (dut.mul_v && dut.c.acc_fb && dut.c.acc == ACC_FIX) n_accfb++;
    if (dut.c.exs == EXS_COMB) n_pair++;
    if (result_valid && result_ovf) n_ovf++;
    if (result_valid && result_unf) n_unf++;
    if (dut.c.aln == ALN_SH_BIT || dut.c.nrm == NRM_SH_BIT) n_hexbit++;
  end

  word_t va[64], vb[64];
  longint t_issue;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // issue one instruction with n operand pairs from va/vb and wait until the
  // pipe is idle and the last result has had time to leave
  task automatic issue(opcode_e op, int n, bit sca = 0, bit scb = 0);
    int idx;
    res_q.delete(); cc_q.delete(); ovf_q.delete(); unf_q.delete(); ipu_q.delete(); t_q.delete();
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; opcode = op; vlen = 16'(n); sc_a = sca; sc_b = scb;
    opnd_a = va[0]; opnd_b = vb[0];
    t_issue = cycle;
    idx = 1;
    @(negedge clk);
    start = 0; sc_a = 0; sc_b = 0;
    while (!ready) begin
      opnd_a = va[idx % 64]; opnd_b = vb[idx % 64];
      #1;
      if (opnd_take) idx++;
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(idx == n, $sformatf("%s took %0d operand pairs, expected %0d", op.name(), idx, n));
  endtask

  // one scalar instruction: check value and latency from issue to result
  task automatic scalar(opcode_e op, word_t a, word_t b, word_t exp, int lat, bit sca = 0);
    va[0] = a; vb[0] = b;
    issue(op, 1, sca);
    check(res_q.size() == 1, $sformatf("%s: %0d results", op.name(), res_q.size()));
    if (res_q.size() == 1) begin
      check(res_q[0] == exp, $sformatf("%s a=%h b=%h got %h exp %h", op.name(), a, b, res_q[0], exp));
      check(t_q[0] - t_issue == longint'(lat),
            $sformatf("%s latency %0d exp %0d", op.name(), t_q[0] - t_issue, lat));
      check(ipu_q[0] == 1'b1, "scalar result not sent to the IPU");
    end
  endtask

  word_t last;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a, b, e;
    int sh;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- scalar fixed point and logical
    for (int i = 0; i < 20; i++) begin
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      scalar(OP_ADD, a, b, a + b, 3);
      scalar(OP_SUB, a, b, a - b, 3);
      scalar(OP_AND, a, b, a & b, 3);
      scalar(OP_OR,  a, b, a | b, 3);
      scalar(OP_XOR, a, b, a ^ b, 3);
      scalar(OP_CMP, a, b, {62'b0, cmp_fix(a, b)}, 3);
      scalar(OP_CMP, a, a, 64'd0, 3);
      e = 64'($signed(a[31:0]) * $signed(b[31:0]));
      scalar(OP_MPY, a, b, e, 4);
    end
    scalar(OP_MPY, 64'h8000_0000, 64'h8000_0000, 64'h4000_0000_0000_0000, 4);
    scalar(OP_MPY, 64'hFFFF_FFFF, 64'h7FFF_FFFF, 64'hFFFF_FFFF_8000_0001, 4);
    // fixed overflow
    scalar(OP_ADD, 64'h7FFF_FFFF_FFFF_FFFF, 64'd1, 64'h8000_0000_0000_0000, 3);
    check(ovf_q.size() == 1 && ovf_q[0], "fixed overflow not flagged");

    // ---------------- shifts
    for (int i = 0; i < 30; i++) begin
      a  = {$urandom(), $urandom()};
      sh = (i < 3) ? i * 32 : $urandom_range(64, 0);
      b  = 64'(sh);
      scalar(OP_SRL, a, b, shift_ref(a, sh, 0, 0), 4);
      scalar(OP_SRA, a, b, shift_ref(a, sh, 0, 1), 4);
      scalar(OP_SRC, a, b, shift_ref(a, sh, 0, 2), 4);
      scalar(OP_SLL, a, b, shift_ref(a, sh, 1, 0), 4);
      scalar(OP_SLC, a, b, shift_ref(a, sh, 1, 2), 4);
    end

    // ---------------- scalar floating point
    for (int i = 0; i < 40; i++) begin
      a = rand_flt64(60, 70); b = rand_flt64(60, 70);
      if (i % 5 == 0) b = {~a[63], a[62:0]} ^ 64'(i);   // cancellation
      scalar(OP_FAD, a, b, rf_fad(a, b, 0), 6);
      scalar(OP_FSB, a, b, rf_fad(a, b, 1), 6);
      scalar(OP_CMPF, a, b, {62'b0, cmp_flt(a, b)}, 3);
      a = rand_flt32(60, 68); b = rand_flt32(60, 68);
      scalar(OP_FMP, a, b, rf_fmp(a, b), 5);
    end
    // a = -b exactly: true zero
    a = rand_flt64(60, 70);
    scalar(OP_FAD, a, {~a[63], a[62:0]}, 64'd0, 6);
    // exponent underflow: 16^-63 squared
    a = {1'b0, 7'd1, 24'h100000} ; 
    scalar(OP_FMP, a, a, 64'd0, 5);
    check(unf_q.size() == 1 && unf_q[0], "exponent underflow not flagged");

    // ---------------- short circuit: previous result as operand A
    a = 64'd1000; b = 64'd234;
    scalar(OP_ADD, a, b, 64'd1234, 3);
    scalar(OP_ADD, 64'hDEAD, 64'd6, 64'd1240, 3, 1'b1);
    scalar(OP_SUB, 64'hBEEF, 64'd40, 64'd1200, 3, 1'b1);

    // ---------------- element-wise vectors
    foreach (va[i]) begin va[i] = {$urandom(), $urandom()}; vb[i] = {$urandom(), $urandom()}; end
    for (int n = 1; n <= 40; n += 13) begin
      issue(OP_VADD, n);
      check(res_q.size() == n, $sformatf("VADD n=%0d: %0d results", n, res_q.size()));
      for (int i = 0; i < res_q.size(); i++) check(res_q[i] == va[i] + vb[i], $sformatf("VADD elt %0d", i));
      for (int i = 1; i < t_q.size(); i++) check(t_q[i] == t_q[i-1] + 1, "VADD not one result per clock");
      if (res_q.size() > 0) check(ipu_q[0] == 1'b0, "vector result not sent to the MBU");
      issue(OP_VMPY, n);
      check(res_q.size() == n, $sformatf("VMPY n=%0d: %0d results", n, res_q.size()));
      for (int i = 0; i < res_q.size(); i++)
        check(res_q[i] == 64'($signed(va[i][31:0]) * $signed(vb[i][31:0])), $sformatf("VMPY elt %0d", i));
      for (int i = 1; i < t_q.size(); i++) check(t_q[i] == t_q[i-1] + 1, "VMPY not one result per clock");
      issue(OP_VCMP, n);
      check(res_q.size() == n, $sformatf("VCMP n=%0d: %0d results", n, res_q.size()));
      for (int i = 0; i < res_q.size(); i++) check(res_q[i][1:0] == cmp_fix(va[i], vb[i]), $sformatf("VCMP elt %0d", i));
    end
    foreach (va[i]) begin va[i] = rand_flt64(58, 72); vb[i] = rand_flt64(58, 72); end
    for (int n = 1; n <= 40; n += 13) begin
      issue(OP_VFAD, n);
      check(res_q.size() == n, $sformatf("VFAD n=%0d: %0d results", n, res_q.size()));
      for (int i = 0; i < res_q.size(); i++)
        check(res_q[i] == rf_fad(va[i], vb[i], 0), $sformatf("VFAD elt %0d got %h exp %h", i, res_q[i], rf_fad(va[i], vb[i], 0)));
      for (int i = 1; i < t_q.size(); i++) check(t_q[i] == t_q[i-1] + 1, "VFAD not one result per clock");
      issue(OP_VCMPF, n);
      check(res_q.size() == n, $sformatf("VCMPF n=%0d: %0d results", n, res_q.size()));
      for (int i = 0; i < res_q.size(); i++) check(res_q[i][1:0] == cmp_flt(va[i], vb[i]), $sformatf("VCMPF elt %0d", i));
      for (int i = 1; i < t_q.size(); i++) check(t_q[i] == t_q[i-1] + 1, "VCMPF not one result per clock");
    end

    // ---------------- vector shifts: two clocks per element
    foreach (va[i]) begin va[i] = {$urandom(), $urandom()}; vb[i] = 64'($urandom_range(70, 0)); end
    for (int n = 1; n <= 30; n += 9) begin
      opcode_e vs[5] = '{OP_VSRL, OP_VSRA, OP_VSRC, OP_VSLL, OP_VSLC};
      foreach (vs[m]) begin
        bit left;
        int kind;
        left = (vs[m] == OP_VSLL || vs[m] == OP_VSLC);
        kind = (vs[m] == OP_VSRA) ? 1 : (vs[m] == OP_VSRC || vs[m] == OP_VSLC) ? 2 : 0;
        issue(vs[m], n);
        check(res_q.size() == n, $sformatf("%s n=%0d: %0d results", vs[m].name(), n, res_q.size()));
        for (int i = 0; i < res_q.size(); i++)
          check(res_q[i] == shift_ref(va[i], int'(vb[i]), left, kind),
                $sformatf("%s elt %0d got %h exp %h", vs[m].name(), i, res_q[i], shift_ref(va[i], int'(vb[i]), left, kind)));
        for (int i = 1; i < t_q.size(); i++) check(t_q[i] == t_q[i-1] + 2, $sformatf("%s not two clocks per result", vs[m].name()));
        if (t_q.size() > 0) check(t_q[0] - t_issue == 4, $sformatf("%s first result after %0d clocks", vs[m].name(), t_q[0] - t_issue));
        if (res_q.size() > 0) check(ipu_q[0] == 1'b0, "vector shift result not sent to the MBU");
      end
    end

    // ---------------- dot products
    foreach (va[i]) begin va[i] = {$urandom(), $urandom()}; vb[i] = {$urandom(), $urandom()}; end
    for (int n = 1; n <= 12; n++) begin
      e = '0;
      for (int i = 0; i < n; i++) e += 64'($signed(va[i][31:0]) * $signed(vb[i][31:0]));
      issue(OP_VDPX, n);
      check(res_q.size() == 1, $sformatf("VDPX n=%0d: %0d results", n, res_q.size()));
      if (res_q.size() == 1) check(res_q[0] == e, $sformatf("VDPX n=%0d got %h exp %h", n, res_q[0], e));
    end
    foreach (va[i]) begin va[i] = rand_flt32(60, 68); vb[i] = rand_flt32(60, 68); end
    for (int n = 1; n <= 40; n = (n < 10) ? n + 1 : n + 15) begin
      rf_t chain[4];
      rf_t p1, p2;
      int  c0;
      for (int c = 0; c < 4; c++) chain[c] = rf_zero();
      for (int i = 0; i < n; i++) chain[i % 4] = rf_add(rf_prod(va[i][31:0], vb[i][31:0]), chain[i % 4]);
      // the drain pairs the chains in the order they leave the normalizer
      // after the end of the loop; the steady word is reached no earlier than
      // 8 clocks after issue, so a short vector starts the pairing at chain
      // max(n,8) mod 4
      c0 = ((n < 8) ? 8 : n) % 4;
      p1 = rf_add(chain[c0], chain[(c0 + 1) % 4]);
      p2 = rf_add(chain[(c0 + 2) % 4], chain[(c0 + 3) % 4]);
      e  = rf_pack(rf_add(p1, p2));
      issue(OP_VDPF, n);
      check(res_q.size() == 1, $sformatf("VDPF n=%0d: %0d results", n, res_q.size()));
      if (res_q.size() == 1) begin
        check(res_q[0] == e, $sformatf("VDPF n=%0d got %h exp %h", n, res_q[0], e));
        // n >= 8: the loop ends in the steady word, and the result follows
        // the issue by n + 15 clocks (six fill words, drain of 14)
        if (n >= 8) check(t_q[0] - t_issue == longint'(n + 15),
                          $sformatf("VDPF n=%0d latency %0d", n, t_q[0] - t_issue));
      end
    end

    // ---------------- mechanisms
    check(n_b2 > 0,    "end-of-loop B2 branch never taken");
    check(n_loop > 0,  "steady word never looped");
    check(n_sc > 0,    "short circuit never used");
    check(n_align > 0, "alignment shift never used");
    check(n_carry > 0, "post-add carry normalization never happened");
    check(n_lz > 0,    "leading-zero normalization never happened");
    check(n_accfb > 0, "accumulator feedback never used");
    check(n_pair > 0,  "dot-product pairing never used");
    check(n_ovf > 0,   "overflow never flagged");
    check(n_unf > 0,   "underflow never flagged");
    check(n_hexbit > 0, "two-step shift never used");
    $display("mechanisms: b2=%0d loop=%0d sc=%0d align=%0d carry=%0d lz=%0d accfb=%0d pair=%0d ovf=%0d unf=%0d shift2=%0d",
             n_b2, n_loop, n_sc, n_align, n_carry, n_lz, n_accfb, n_pair, n_ovf, n_unf, n_hexbit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
