// tb_asc_multiply: pseudosum + pseudocarry must equal the product, for signed
// 32-bit operands and for 24-bit floating fractions (with sign and exponent).
module tb_asc_multiply;
  import asc_au_pkg::*;
  logic              clk = 0, rst_n = 1, in_valid = 0;
  mul_ctl_e          ctl = MUL_NONE;
  word_t             a = '0, b = '0, psum, pcarry;
  logic              p_sign, out_valid;
  logic signed [9:0] p_exp;
  int checks = 0, failures = 0;

  asc_multiply dut (.*);
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

  initial begin
    word_t e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      if (i == 0) begin a[31:0] = 32'h8000_0000; b[31:0] = 32'h8000_0000; end
      if (i == 1) begin a[31:0] = 32'hFFFF_FFFF; b[31:0] = 32'h8000_0000; end
      if (i == 2) begin a[31:0] = 32'h7FFF_FFFF; b[31:0] = 32'h7FFF_FFFF; end
      ctl = (i % 2) ? MUL_FLT : MUL_FIX;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "no valid pulse");
      if (ctl == MUL_FIX) begin
        e = 64'($signed(a[31:0]) * $signed(b[31:0]));
        check(psum + pcarry == e, $sformatf("fix %h*%h = %h got %h", a[31:0], b[31:0], e, psum + pcarry));
      end else begin
        e = 64'(a[23:0]) * 64'(b[23:0]);
        check(psum + pcarry == e, $sformatf("flt %h*%h = %h got %h", a[23:0], b[23:0], e, psum + pcarry));
        check(p_sign == (a[31] ^ b[31]), "product sign");
        check(p_exp == 10'(int'(a[30:24]) + int'(b[30:24]) - 64), "product exponent");
      end
      @(negedge clk);
      check(!out_valid, "valid longer than one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
