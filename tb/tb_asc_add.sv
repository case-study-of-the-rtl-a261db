// tb_asc_add: fixed add/subtract with overflow, and the signed-magnitude
// addition of aligned floating fractions (including results that change sign).
module tb_asc_add;
  import asc_au_pkg::*;
  logic              clk = 0, rst_n = 1, sub = 0, in_valid = 0, aln_small_sign = 0, aln_valid = 0;
  add_ctl_e          ctl = ADD_NONE;
  word_t             in_a = '0, in_b = '0, fix_result;
  ufloat_t           aln_large = '0;
  logic [FRAC_W-1:0] aln_small_frac = '0;
  logic              fix_ovf, f_sign, out_valid;
  logic signed [9:0] f_exp;
  logic [FRAC_W:0]   f_mag;
  int checks = 0, failures = 0;

  asc_add dut (.*);
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
    bit    ov;
    longint signed lm, sm, r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ctl = ADD_FIX; sub = 1'($urandom()); in_valid = 1;
      in_a = {$urandom(), $urandom()}; in_b = {$urandom(), $urandom()};
      if (i == 0) begin in_a = 64'h7FFF_FFFF_FFFF_FFFF; in_b = 64'd1; sub = 0; end
      if (i == 1) begin in_a = 64'h8000_0000_0000_0000; in_b = 64'd1; sub = 1; end
      e  = sub ? in_a - in_b : in_a + in_b;
      ov = sub ? (in_a[63] != in_b[63] && e[63] != in_a[63]) : (in_a[63] == in_b[63] && e[63] != in_a[63]);
      @(negedge clk);
      in_valid = 0;
      check(out_valid && fix_result == e && fix_ovf == ov, $sformatf("fixed %h %s %h", in_a, sub ? "-" : "+", in_b));
      // floating fractions
      ctl = ADD_FLT; aln_valid = 1;
      aln_large.sign = 1'($urandom()); aln_large.exp = 10'($urandom_range(127, 0));
      aln_large.frac = {$urandom(), $urandom()};
      aln_small_frac = {$urandom(), $urandom()} >> $urandom_range(56, 0);
      aln_small_sign = 1'($urandom());
      lm = aln_large.sign ? -longint'(aln_large.frac) : longint'(aln_large.frac);
      sm = aln_small_sign ? -longint'(aln_small_frac) : longint'(aln_small_frac);
      r  = lm + sm;
      @(negedge clk);
      aln_valid = 0;
      check(out_valid && f_exp == aln_large.exp, "float exponent");
      check(longint'(f_mag) == ((r < 0) ? -r : r), $sformatf("float magnitude %h", f_mag));
      if (r != 0) check(f_sign == (r < 0), "float sign");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
