// tb_asc_control_rom: reads the whole 512-word ROM and checks the
// microprogram: every instruction's word chain ends in a done word, scalar
// instructions use one word per internal section (fixed add 1, floating add
// 4, fixed multiply 2), vector instructions have a steady loop (one word
// whose B1 is itself, or for vector shifts a hex word and a bit word) whose
// B2 leads to the drain, and unused output lines are zero.
module tb_asc_control_rom;
  import asc_au_pkg::*;
  rom_addr_t              addr = '0;
  logic [ROM_WIDTH-1:0]   data;
  ctl_t                   ctl;
  int checks = 0, failures = 0;

  asc_control_rom dut (.*);

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps, steady;
    ctl_t w;
    for (int i = 0; i < ROM_DEPTH; i++) begin
      addr = rom_addr_t'(i);
      #1;
      check(data[ROM_WIDTH-1:CTL_W] == '0, "unused ROM lines");
      check(ctl == rom_word(addr), "ROM word differs from its definition");
    end
    for (int op = 0; op < NUM_OPS; op++) begin
      if (!op_defined(op)) continue;
      addr = start_addr(opcode_e'(op));
      steps = 0; steady = -1;
      #1;
      while (!ctl.done && steps < 40) begin
        if (ctl.b1 <= addr) steady = steps;
        // follow B1 unless it loops back, then B2
        addr = (ctl.b1 <= addr) ? ctl.b2 : ctl.b1;
        steps++;
        #1;
      end
      steps++;
      check(ctl.done, $sformatf("opcode %0d never ends", op));
      if (op < int'(OP_VADD)) begin
        check(steps == int'(scalar_len(opcode_e'(op))), $sformatf("opcode %0d uses %0d words", op, steps));
        check(steady < 0, "scalar word loops");
      end else begin
        check(steady >= 0, $sformatf("vector opcode %0d has no steady word", op));
      end
    end
    // the three configurations of the pipe the text counts: 1, 4 and 2 words
    check(scalar_len(OP_ADD) == 1 && scalar_len(OP_FAD) == 4 && scalar_len(OP_MPY) == 2, "word counts");
    addr = start_addr(OP_FAD); #1;
    check(ctl.exs == EXS_IN_FLT && ctl.aln == ALN_NONE, "FAD word 0 is exponent subtract");
    addr = start_addr(OP_FAD) + 3; #1;
    check(ctl.nrm == NRM_ADD && ctl.out == OUT_NRM && ctl.done, "FAD word 3 is normalize");
    addr = start_addr(OP_ADD); #1;
    check(ctl.add == ADD_FIX && ctl.out == OUT_ADD && ctl.exs == EXS_NONE, "ADD uses the add section only");
    // vector shift: a two-word loop, the hex step then the bit step
    addr = start_addr(OP_VSRA); #1;
    check(ctl.aln == ALN_SH_HEX && !ctl.fetch && ctl.shk == SH_ARITH && ctl.b1 == addr + 1, "VSRA hex word");
    addr = start_addr(OP_VSRA) + 1; #1;
    check(ctl.aln == ALN_SH_BIT && ctl.fetch && ctl.out == OUT_ALN && ctl.b1 == addr - 1, "VSRA bit word");
    addr = start_addr(OP_VSLC) + 1; #1;
    check(ctl.nrm == NRM_SH_BIT && ctl.shk == SH_CIRC && ctl.out == OUT_NRM && !ctl.out_ipu, "VSLC bit word");
    addr = 9'(22 * SLOT + 5); #1;
    check(ctl == rom_word(9'(int'(OP_VDPF) * SLOT + 21)), "VDPF spill");
    addr = 9'(23 * SLOT); #1;
    check(ctl == CTL_IDLE, "undefined code 23 is idle");
    addr = start_addr(OP_VDPF) + 6; #1;
    check(ctl.b1 == addr && ctl.fetch && ctl.exs == EXS_ACC_NRM, "VDPF steady word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
