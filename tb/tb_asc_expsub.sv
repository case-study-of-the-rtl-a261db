// tb_asc_expsub: large/small routing and hex shift count for floating adds,
// fixed and floating compares, the dot-product sources with missing data
// counted as zero, and the hold/combine pairing.
module tb_asc_expsub;
  import asc_au_pkg::*;
  import asc_ref_pkg::*;
  logic     clk = 0, rst_n = 1, neg = 0, in_valid = 0, acc_valid = 0, nrm_valid = 0;
  exs_ctl_e ctl = EXS_NONE;
  word_t    in_a = '0, in_b = '0;
  ufloat_t  acc_f = '0, nrm_f = '0, large_op;
  logic              small_sign, out_valid;
  logic [FRAC_W-1:0] small_frac;
  logic [3:0]        shift;
  logic [1:0]        cc;
  int checks = 0, failures = 0;

  asc_expsub dut (.*);
  always #5 clk = ~clk;
  // reset falls at 1 ns, a real edge, so the asynchronous reset acts before the first clock
  initial #1 rst_n = 1'b0;

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic check_pair(ufloat_t x, ufloat_t y, string s);
    int d;
    ufloat_t l, sm;
    if (y.exp > x.exp) begin l = y; sm = x; end else begin l = x; sm = y; end
    d = int'(l.exp) - int'(sm.exp);
    if (d > 14) d = 14;
    check(large_op == l && small_frac == sm.frac && small_sign == sm.sign && shift == 4'(d),
          $sformatf("%s: large %h small %h shift %0d", s, large_op, small_frac, shift));
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ufloat_t x, y;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      // floating add operands from the input section
      @(negedge clk);
      in_a = rand_flt64(40, 90); in_b = rand_flt64(40, 90);
      if (i % 4 == 0) in_b[62:56] = in_a[62:56];
      neg = 1'($urandom()); ctl = EXS_IN_FLT; in_valid = 1;
      x = unpack64(in_a); y = unpack64(in_b); y.sign ^= neg;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "valid");
      check_pair(x, y, "input operands");
      // compares
      ctl = (i % 2) ? EXS_CMP_FLT : EXS_CMP_FIX; in_valid = 1;
      if (i % 8 == 1) in_b = in_a;
      @(negedge clk);
      in_valid = 0;
      check(cc == ((ctl == EXS_CMP_FLT) ? cmp_flt(in_a, in_b) : cmp_fix(in_a, in_b)),
            $sformatf("compare %h %h cc %0d", in_a, in_b, cc));
      // dot-product sources
      ctl = EXS_ACC_NRM;
      acc_f = unpack64(rand_flt64(50, 70)); nrm_f = unpack64(rand_flt64(50, 70));
      acc_valid = 1'($urandom()); nrm_valid = 1'($urandom());
      x = acc_valid ? acc_f : '0; y = nrm_valid ? nrm_f : '0;
      @(negedge clk);
      check(out_valid == (acc_valid | nrm_valid), "dot-product valid");
      if (acc_valid | nrm_valid) check_pair(x, y, "accumulator/normalizer");
      // pairing
      acc_valid = 0;
      ctl = EXS_HOLD; nrm_valid = 1; x = nrm_f;
      @(negedge clk);
      check(!out_valid, "hold produces nothing");
      ctl = EXS_NONE; nrm_f = unpack64(rand_flt64(50, 70));
      @(negedge clk);
      ctl = EXS_COMB; nrm_valid = 1'($urandom()); y = nrm_valid ? nrm_f : '0;
      @(negedge clk);
      check(out_valid, "combine valid");
      check_pair(x, y, "combine");
      ctl = EXS_NONE; nrm_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
