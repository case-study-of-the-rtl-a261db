// tb_asc_sequencer: the sequencer driving the real control ROM.  Scalar
// instructions must stay active for exactly their word count; a vector of n
// elements must take exactly n operand pairs (one per clock in the steady
// word; one per two clocks for vector shifts), signal the end of the loop,
// branch through B2 and finish.
module tb_asc_sequencer;
  import asc_au_pkg::*;
  logic        clk = 0, rst_n = 1, start = 0;
  opcode_e     opcode = OP_ADD;
  logic [15:0] vlen = 16'd1;
  ctl_t        word;
  logic [ROM_WIDTH-1:0] data;
  rom_addr_t   addr;
  logic        active, take, eol, ready;
  int checks = 0, failures = 0;

  asc_sequencer dut (.*);
  asc_control_rom u_rom (.addr, .data, .ctl(word));
  always #5 clk = ~clk;
  // reset falls at 1 ns, a real edge, so the asynchronous reset acts before the first clock
  initial #1 rst_n = 1'b0;

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(opcode_e op, int n, output int cyc, output int takes, output int b2s);
    @(negedge clk);
    check(ready, "ready when idle");
    start = 1; opcode = op; vlen = 16'(n);
    #1;
    check(take, "first pair taken with start");
    @(negedge clk);
    start = 0;
    cyc = 0; takes = 1; b2s = 0;
    while (active && cyc < 1000) begin
      check(addr >= start_addr(op), "address below the instruction");
      if (take) takes++;
      if (eol && !word.done && word.b1 != word.b2) b2s++;
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    int cyc, takes, b2s, prev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < int'(OP_VADD); op++) begin
      run(opcode_e'(op), 1, cyc, takes, b2s);
      check(cyc == int'(scalar_len(opcode_e'(op))), $sformatf("scalar %0d active %0d clocks", op, cyc));
      check(takes == 1, "scalar takes one pair");
    end
    for (int op = int'(OP_VADD); op < NUM_OPS; op++) begin
      if (!op_defined(op)) continue;
      prev = -1;
      for (int n = 1; n <= 30; n += 7) begin
        run(opcode_e'(op), n, cyc, takes, b2s);
        check(takes == n, $sformatf("vector %0d n=%0d took %0d pairs", op, n, takes));
        check(b2s == 1, $sformatf("vector %0d n=%0d left the loop %0d times", op, n, b2s));
        // beyond the fill, each extra element costs exactly one clock (two
        // for the vector shifts, which use their section twice)
        if (prev >= 0 && n > 8)
          check(cyc == prev + (is_vshift(opcode_e'(op)) ? 14 : 7), $sformatf("vector %0d rate", op));
        prev = (n > 1) ? cyc : -1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
