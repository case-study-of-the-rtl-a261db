// tb_asc_normalize: hexadecimal normalization of add results (carry digit,
// leading zero digits, zero, exponent underflow and overflow), of accumulator
// partial products, and the two-clock left shifts.
module tb_asc_normalize;
  import asc_au_pkg::*;
  import asc_ref_pkg::*;
  logic              clk = 0, rst_n = 1, add_sign = 0, add_valid = 0, acc_valid = 0, in_valid = 0;
  nrm_ctl_e          ctl = NRM_NONE;
  shkind_e           shk = SH_LOGICAL;
  logic signed [9:0] add_exp = '0;
  logic [FRAC_W:0]   add_mag = '0;
  ufloat_t           acc_f = '0, nrm_f;
  word_t             in_a = '0, in_b = '0, result;
  logic              ovf, unf, out_valid;
  int checks = 0, failures = 0;

  asc_normalize dut (.*);
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
    rf_t r;
    int  e, n, k;
    bit  big;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      ctl = NRM_ADD; add_valid = 1;
      add_sign = 1'($urandom());
      e = $urandom_range(140, 0) - 6;
      add_exp = 10'(e);
      add_mag = {$urandom(), $urandom()};
      add_mag = add_mag >> $urandom_range(57, 0);
      if (i % 50 == 0) add_mag = '0;
      r   = rf_norm(add_sign, e, 64'(add_mag));
      big = (add_mag != 0) && (r.e > 127);
      @(negedge clk);
      add_valid = 0;
      check(out_valid, "valid");
      check(result == rf_pack(r), $sformatf("normalize %h e=%0d: %h exp %h", add_mag, e, result, rf_pack(r)));
      check(ovf == big, "overflow flag");
      check(unf == (add_mag != 0 && r.f == 0), "underflow flag");
      // accumulator partial product
      ctl = NRM_ACC; acc_valid = 1;
      acc_f.sign = 1'($urandom()); acc_f.exp = 10'($urandom_range(100, 30));
      acc_f.frac = {$urandom(), $urandom()} >> $urandom_range(8, 0);
      r = rf_norm(acc_f.sign, int'(acc_f.exp), 64'(acc_f.frac));
      @(negedge clk);
      acc_valid = 0;
      check(result == rf_pack(r), "partial product");
      check(nrm_f.frac == r.f[55:0] && nrm_f.sign == r.s, "unpacked output");
      // left shift
      n = (i < 2) ? 64 * i : $urandom_range(64, 0);
      k = (i % 2) ? 2 : 0;
      shk = shkind_e'(k);
      in_a = {$urandom(), $urandom()}; in_b = 64'(n);
      ctl = NRM_SH_HEX; in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(!out_valid, "no result after the first shift step");
      ctl = NRM_SH_BIT;
      @(negedge clk);
      check(out_valid && result == shift_ref(in_a, n, 1, k), $sformatf("left shift %0d kind %0d", n, k));
      ctl = NRM_NONE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
