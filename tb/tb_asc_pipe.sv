// tb_asc_pipe: end-to-end test of one MBU/AU pipeline at its default size,
// with two behavioural interleaved-memory ports.
//
// Vector instructions are issued with memory addresses (aligned and
// unaligned, lengths 1..60) and run from the octet look-ahead buffers; scalar
// instructions come with their operands, some using the short circuit.
// Every result is compared with the integer reference model (asc_ref_pkg);
// vector results must come one per clock.  The test counts each mechanism of
// the design and fails if one never happened: look-ahead buffer full, octet
// boundary crossed, pipe waiting for the look-ahead, B2 end-of-loop branch,
// steady-word looping, short circuit, alignment shift, post-add carry,
// leading-zero normalization, accumulator feedback, dot-product pairing,
// two-step shift, a vector at two clocks per result (vector shifts), fixed
// overflow and exponent underflow.
module tb_asc_pipe;
  import asc_au_pkg::*;
  import asc_ref_pkg::*;

  logic        clk = 0, rst_n = 1;
  logic        issue = 0, issue_ready, is_vector = 0, sc_a = 0, sc_b = 0;
  opcode_e     opcode = OP_ADD;
  logic [15:0] vlen = 16'd1;
  logic [23:0] base_a = '0, base_b = '0;
  word_t       scalar_a = '0, scalar_b = '0;
  logic        mema_req, mema_ready, mema_rvalid, memb_req, memb_ready, memb_rvalid;
  logic [20:0] mema_addr, memb_addr;
  logic [511:0] mema_rdata, memb_rdata;
  word_t       result;
  logic        result_valid, result_to_ipu, result_ovf, result_unf;
  logic [1:0]  result_cc;

  asc_pipe dut (.*);
  asc_mem_model u_ma (.clk, .req(mema_req), .addr(mema_addr), .ready(mema_ready),
                      .rvalid(mema_rvalid), .rdata(mema_rdata));
  asc_mem_model u_mb (.clk, .req(memb_req), .addr(memb_addr), .ready(memb_ready),
                      .rvalid(memb_rvalid), .rdata(memb_rdata));

  always #5 clk = ~clk;
  // reset falls at 1 ns, a real edge, so the asynchronous reset acts before the first clock
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  word_t   res_q[$];
  logic    ovf_q[$], unf_q[$];
  longint  t_q[$];
  always @(posedge clk) if (rst_n && result_valid) begin
    res_q.push_back(result); ovf_q.push_back(result_ovf); unf_q.push_back(result_unf); t_q.push_back(cycle);
  end

  // mechanism counters
  int n_full = 0, n_cross = 0, n_wait = 0, n_b2 = 0, n_loop = 0, n_sc = 0, n_align = 0;
  int n_carry = 0, n_lz = 0, n_accfb = 0, n_pair = 0, n_sh2 = 0, n_ovf = 0, n_unf = 0, n_half = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_sa.held == 3) n_full++;
    if (dut.u_sa.take && dut.u_sa.avail && dut.u_sa.last_in_oct && dut.u_sa.words_left > 1) n_cross++;
    if (dut.state == 1 && !(dut.sa_primed && dut.sb_primed)) n_wait++;
    if (dut.u_au.active && !dut.u_au.rom_ctl.done && dut.u_au.eol && dut.u_au.rom_ctl.b1 != dut.u_au.rom_ctl.b2) n_b2++;
    if (dut.u_au.active && dut.u_au.rom_ctl.b1 == dut.u_au.addr && dut.u_au.opnd_take) n_loop++;
    if (dut.u_au.sc_a_eff || dut.u_au.sc_b_eff) n_sc++;
    if (dut.u_au.exs_v && dut.u_au.exs_shift != 0 && dut.u_au.c.aln == ALN_FLT) n_align++;
    if (dut.u_au.add_v && dut.u_au.add_mag[56] && dut.u_au.c.nrm == NRM_ADD) n_carry++;
    if (dut.u_au.add_v && dut.u_au.add_mag[56:52] == 0 && dut.u_au.add_mag != 0 && dut.u_au.c.nrm == NRM_ADD) n_lz++;
    if (dut.u_au.mul_v && dut.u_au.c.acc_fb && dut.u_au.c.acc == ACC_FIX) n_accfb++;
    if (dut.u_au.c.exs == EXS_COMB) n_pair++;
    if (dut.u_au.c.aln == ALN_SH_BIT || dut.u_au.c.nrm == NRM_SH_BIT) n_sh2++;
    if (dut.state == 2 && dut.u_au.active && dut.u_au.rom_ctl.aln == ALN_SH_HEX && !dut.u_au.rom_ctl.fetch) n_half++;
    if (result_valid && result_ovf) n_ovf++;
    if (result_valid && result_unf) n_unf++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (!issue_ready) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic run_vector(opcode_e op, int n, int ba, int bb);
    res_q.delete(); ovf_q.delete(); unf_q.delete(); t_q.delete();
    @(negedge clk);
    while (!issue_ready) @(negedge clk);
    issue = 1; opcode = op; is_vector = 1; vlen = 16'(n); base_a = 24'(ba); base_b = 24'(bb);
    @(negedge clk);
    issue = 0; is_vector = 0;
    wait_idle();
  endtask

  task automatic run_scalar(opcode_e op, word_t a, word_t b, word_t exp, bit sca = 0);
    res_q.delete(); ovf_q.delete(); unf_q.delete(); t_q.delete();
    @(negedge clk);
    while (!issue_ready) @(negedge clk);
    issue = 1; opcode = op; is_vector = 0; scalar_a = a; scalar_b = b; sc_a = sca;
    @(negedge clk);
    issue = 0; sc_a = 0;
    wait_idle();
    check(res_q.size() == 1 && res_q[0] == exp,
          $sformatf("%s %h %h: got %h exp %h", op.name(), a, b, (res_q.size() > 0) ? res_q[0] : '0, exp));
  endtask

  function automatic word_t ma(int i); return u_ma.mem[i]; endfunction
  function automatic word_t mb(int i); return u_mb.mem[i]; endfunction

  task automatic check_stream(string name, int n);
    check(res_q.size() == n, $sformatf("%s n=%0d: %0d results", name, n, res_q.size()));
    for (int i = 1; i < t_q.size(); i++) check(t_q[i] == t_q[i-1] + 1, $sformatf("%s not one result per clock", name));
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   lens[6] = '{1, 3, 8, 9, 24, 60};
    int   ba, bb, n;
    word_t e, a, b;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ------------- fixed-point vectors
    for (int i = 0; i < 4096; i++) begin u_ma.mem[i] = {$urandom(), $urandom()}; u_mb.mem[i] = {$urandom(), $urandom()}; end
    foreach (lens[k]) begin
      n = lens[k]; ba = 8 * k + k; bb = 1000 + 3 * k;
      run_vector(OP_VADD, n, ba, bb);
      check_stream("VADD", n);
      for (int i = 0; i < res_q.size(); i++) check(res_q[i] == ma(ba + i) + mb(bb + i), $sformatf("VADD elt %0d", i));
      run_vector(OP_VMPY, n, ba, bb);
      check_stream("VMPY", n);
      for (int i = 0; i < res_q.size(); i++)
        check(res_q[i] == 64'($signed(ma(ba + i)[31:0]) * $signed(mb(bb + i)[31:0])), $sformatf("VMPY elt %0d", i));
      run_vector(OP_VCMP, n, ba, bb);
      check_stream("VCMP", n);
      for (int i = 0; i < res_q.size(); i++) check(res_q[i][1:0] == cmp_fix(ma(ba + i), mb(bb + i)), "VCMP elt");
      run_vector((k % 2) ? OP_VSLC : OP_VSRA, n, ba, bb);
      check(res_q.size() == n, $sformatf("vector shift n=%0d: %0d results", n, res_q.size()));
      for (int i = 1; i < t_q.size(); i++) check(t_q[i] == t_q[i-1] + 2, "vector shift not two clocks per result");
      for (int i = 0; i < res_q.size(); i++)
        check(res_q[i] == shift_ref(ma(ba + i), int'(mb(bb + i)[6:0]), k % 2, (k % 2) ? 2 : 1), $sformatf("vector shift elt %0d", i));
      run_vector(OP_VDPX, n, ba, bb);
      e = '0;
      for (int i = 0; i < n; i++) e += 64'($signed(ma(ba + i)[31:0]) * $signed(mb(bb + i)[31:0]));
      check(res_q.size() == 1 && res_q[0] == e, $sformatf("VDPX n=%0d", n));
    end

    // ------------- floating-point vectors
    for (int i = 0; i < 2048; i++) begin u_ma.mem[i] = rand_flt64(58, 72); u_mb.mem[i] = rand_flt64(58, 72); end
    for (int i = 2048; i < 4096; i++) begin u_ma.mem[i] = rand_flt32(60, 68); u_mb.mem[i] = rand_flt32(60, 68); end
    foreach (lens[k]) begin
      rf_t chain[4];
      rf_t p1, p2;
      int  c0;
      n = lens[k]; ba = 16 * k + 5; bb = 700 + k;
      run_vector(OP_VFAD, n, ba, bb);
      check_stream("VFAD", n);
      for (int i = 0; i < res_q.size(); i++) check(res_q[i] == rf_fad(ma(ba + i), mb(bb + i), 0), $sformatf("VFAD elt %0d", i));
      run_vector(OP_VCMPF, n, ba, bb);
      check_stream("VCMPF", n);
      for (int i = 0; i < res_q.size(); i++) check(res_q[i][1:0] == cmp_flt(ma(ba + i), mb(bb + i)), "VCMPF elt");
      ba = 2048 + 7 * k; bb = 3000 + 2 * k;
      for (int c = 0; c < 4; c++) chain[c] = rf_zero();
      for (int i = 0; i < n; i++) chain[i % 4] = rf_add(rf_prod(ma(ba + i)[31:0], mb(bb + i)[31:0]), chain[i % 4]);
      c0 = ((n < 8) ? 8 : n) % 4;
      p1 = rf_add(chain[c0], chain[(c0 + 1) % 4]);
      p2 = rf_add(chain[(c0 + 2) % 4], chain[(c0 + 3) % 4]);
      e  = rf_pack(rf_add(p1, p2));
      run_vector(OP_VDPF, n, ba, bb);
      check(res_q.size() == 1 && res_q[0] == e, $sformatf("VDPF n=%0d got %h exp %h", n, (res_q.size() > 0) ? res_q[0] : '0, e));
    end

    // ------------- scalars from the IPU
    for (int i = 0; i < 10; i++) begin
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      run_scalar(OP_ADD, a, b, a + b);
      run_scalar(OP_SUB, a, b, a - b);
      run_scalar(OP_XOR, a, b, a ^ b);
      run_scalar(OP_SRA, a, 64'(i * 7), shift_ref(a, i * 7, 0, 1));
      run_scalar(OP_SLC, a, 64'(i * 6), shift_ref(a, i * 6, 1, 2));
      a = rand_flt64(60, 70); b = rand_flt64(60, 70);
      run_scalar(OP_FSB, a, b, rf_fad(a, b, 1));
      run_scalar(OP_CMPF, a, b, {62'b0, cmp_flt(a, b)});
      a = rand_flt32(60, 68); b = rand_flt32(60, 68);
      run_scalar(OP_FMP, a, b, rf_fmp(a, b));
    end
    run_scalar(OP_ADD, 64'h7FFF_FFFF_FFFF_FFFF, 64'd5, 64'h8000_0000_0000_0004);
    run_scalar(OP_FMP, {1'b0, 7'd2, 24'h100000}, {1'b0, 7'd2, 24'h100000}, 64'd0);
    run_scalar(OP_MPY, 64'd12, 64'd11, 64'd132);
    run_scalar(OP_ADD, 64'h55, 64'd8, 64'd140, 1'b1);   // 132 short-circuited + 8

    check(n_full > 0,  "look-ahead buffer never full");
    check(n_cross > 0, "octet boundary never crossed");
    check(n_wait > 0,  "pipe never waited for the look-ahead");
    check(n_b2 > 0,    "end-of-loop B2 branch never taken");
    check(n_loop > 0,  "steady word never looped");
    check(n_sc > 0,    "short circuit never used");
    check(n_align > 0, "alignment shift never used");
    check(n_carry > 0, "post-add carry never normalized");
    check(n_lz > 0,    "leading-zero normalization never happened");
    check(n_accfb > 0, "accumulator feedback never used");
    check(n_pair > 0,  "dot-product pairing never used");
    check(n_sh2 > 0,   "two-step shift never used");
    check(n_half > 0,  "vector never ran at two clocks per result");
    check(n_ovf > 0,   "overflow never flagged");
    check(n_unf > 0,   "underflow never flagged");
    $display("mechanisms: full=%0d cross=%0d wait=%0d b2=%0d loop=%0d sc=%0d align=%0d carry=%0d lz=%0d accfb=%0d pair=%0d sh2=%0d ovf=%0d unf=%0d half=%0d",
             n_full, n_cross, n_wait, n_b2, n_loop, n_sc, n_align, n_carry, n_lz, n_accfb, n_pair, n_sh2, n_ovf, n_unf, n_half);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
