// tb_asc_align: fraction alignment by 0..14 hex digits in one clock and the
// two-clock right shifts (logical, arithmetic, circular, 0..64 bits).
module tb_asc_align;
  import asc_au_pkg::*;
  import asc_ref_pkg::*;
  logic              clk = 0, rst_n = 1, exs_small_sign = 0, exs_valid = 0, in_valid = 0;
  aln_ctl_e          ctl = ALN_NONE;
  shkind_e           shk = SH_LOGICAL;
  ufloat_t           exs_large = '0, large_op;
  logic [FRAC_W-1:0] exs_small_frac = '0, small_frac;
  logic [3:0]        exs_shift = '0;
  word_t             in_a = '0, in_b = '0, sh_result;
  logic              small_sign, out_valid;
  int checks = 0, failures = 0;

  asc_align dut (.*);
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
    int n, k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      ctl = ALN_FLT;
      exs_large = unpack64({$urandom(), $urandom()});
      exs_small_frac = {$urandom(), $urandom()};
      exs_small_sign = 1'($urandom());
      exs_shift = 4'($urandom_range(14, 0));
      exs_valid = 1;
      @(negedge clk);
      exs_valid = 0;
      check(out_valid, "float valid");
      check(small_frac == exs_small_frac >> (4 * exs_shift) && large_op == exs_large &&
            small_sign == exs_small_sign, $sformatf("align by %0d digits", exs_shift));
      // shift instruction: hex step then bit step
      n = (i < 3) ? 64 * i / 2 : $urandom_range(64, 0);
      k = i % 3;
      in_a = {$urandom(), $urandom()}; in_b = 64'(n);
      shk = shkind_e'(k);
      ctl = ALN_SH_HEX; in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(!out_valid, "no result after the first shift step");
      ctl = ALN_SH_BIT;
      @(negedge clk);
      check(out_valid, "result after the second shift step");
      check(sh_result == shift_ref(in_a, n, 0, k),
            $sformatf("shift kind %0d by %0d: %h exp %h", k, n, sh_result, shift_ref(in_a, n, 0, k)));
      ctl = ALN_NONE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
