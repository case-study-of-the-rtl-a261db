// tb_asc_accumulate: three-operand addition with feedback (a running sum of
// random pseudosum/pseudocarry pairs), clear, hold without new data, and the
// floating partial-product packing.
module tb_asc_accumulate;
  import asc_au_pkg::*;
  logic              clk = 0, rst_n = 1, fb = 0, clr = 0, in_valid = 0;
  acc_ctl_e          ctl = ACC_NONE;
  word_t             psum = '0, pcarry = '0, acc;
  logic              p_sign = 0, out_valid;
  logic signed [9:0] p_exp = '0;
  ufloat_t           acc_f;
  int checks = 0, failures = 0;

  asc_accumulate dut (.*);
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
    word_t run;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 50; blk++) begin
      @(negedge clk);
      clr = 1; ctl = ACC_FIX; fb = 1; in_valid = 0;
      @(negedge clk);
      clr = 0;
      check(acc == 0, "clear");
      run = 0;
      for (int i = 0; i < 20; i++) begin
        psum = {$urandom(), $urandom()}; pcarry = {$urandom(), $urandom()};
        in_valid = 1'($urandom());
        if (in_valid) run = run + psum + pcarry;
        @(negedge clk);
        check(acc == run, $sformatf("running sum %h exp %h", acc, run));
        check(out_valid == in_valid, "valid pulse");
      end
      in_valid = 0;
      // floating product packing, no feedback
      ctl = ACC_FLT; fb = 0;
      psum = 64'($urandom()) << 16; pcarry = 64'($urandom());
      p_sign = 1'($urandom()); p_exp = 10'($urandom_range(200, 0)) - 10'sd50;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      run = psum + pcarry;
      check(acc_f.frac == {run[47:0], 8'h0} && acc_f.sign == p_sign && acc_f.exp == p_exp,
            "floating partial product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
