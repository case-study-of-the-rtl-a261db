// tb_asc_input: operand registers, one-clock valid pulse and the short-circuit
// selection of the Input section.
module tb_asc_input;
  import asc_au_pkg::*;
  logic  clk = 0, rst_n = 1, load = 0, sc_a = 0, sc_b = 0, valid;
  word_t mbu_a = '0, mbu_b = '0, prev_result = '0, a, b;
  int checks = 0, failures = 0;

  asc_input dut (.*);
  always #5 clk = ~clk;
  // reset falls at 1 ns, a real edge, so the asynchronous reset acts before the first clock
  initial #1 rst_n = 1'b0;

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t ea, eb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = 1'($urandom()); sc_a = 1'($urandom()); sc_b = 1'($urandom());
      mbu_a = {$urandom(), $urandom()}; mbu_b = {$urandom(), $urandom()};
      prev_result = {$urandom(), $urandom()};
      ea = load ? (sc_a ? prev_result : mbu_a) : a;
      eb = load ? (sc_b ? prev_result : mbu_b) : b;
      @(negedge clk);
      check(valid == load, "valid is not the load of the clock before");
      check(a == ea && b == eb, $sformatf("operands %h %h exp %h %h", a, b, ea, eb));
      load = 0;
      @(negedge clk);
      check(valid == 0, "valid longer than one clock");
      check(a == ea && b == eb, "operands not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
