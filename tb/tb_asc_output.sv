// tb_asc_output: result selection one clock after the control fields, the
// logical instructions, the 'any' load, status flags and IPU/MBU routing.
module tb_asc_output;
  import asc_au_pkg::*;
  logic     clk = 0, rst_n = 1, any = 0, ipu = 0, in_valid = 0;
  out_ctl_e sel = OUT_NONE;
  word_t    in_a = '0, in_b = '0, acc = '0, aln_result = '0, add_result = '0, nrm_result = '0, result;
  logic     acc_valid = 0, exs_valid = 0, aln_valid = 0, add_ovf = 0, add_valid = 0;
  logic     nrm_ovf = 0, nrm_unf = 0, nrm_valid = 0;
  logic [1:0] exs_cc = '0, res_cc;
  logic     res_valid, res_to_ipu, res_ovf, res_unf;
  int checks = 0, failures = 0;

  asc_output dut (.*);
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
    bit    v, any1, ipu1;
    out_ctl_e sel1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      // clock 1: control fields and input operands
      sel = out_ctl_e'($urandom_range(8, 1)); any = ($urandom_range(7, 0) == 0); ipu = 1'($urandom());
      in_a = {$urandom(), $urandom()}; in_b = {$urandom(), $urandom()}; in_valid = 1'($urandom());
      acc_valid = 0; exs_valid = 0; aln_valid = 0; add_valid = 0; nrm_valid = 0;
      case (sel)
        OUT_AND: begin e = in_a & in_b; v = in_valid; end
        OUT_OR:  begin e = in_a | in_b; v = in_valid; end
        OUT_XOR: begin e = in_a ^ in_b; v = in_valid; end
        default: begin e = '0; v = 0; end
      endcase
      sel1 = sel; any1 = any; ipu1 = ipu;
      @(negedge clk);
      // clock 2: the sources present their data
      sel = OUT_NONE; any = 0; in_valid = 0; in_a = '0; in_b = '0;
      acc = {$urandom(), $urandom()}; aln_result = {$urandom(), $urandom()};
      add_result = {$urandom(), $urandom()}; nrm_result = {$urandom(), $urandom()};
      exs_cc = 2'($urandom_range(2, 0)); add_ovf = 1'($urandom()); nrm_ovf = 1'($urandom());
      nrm_unf = 1'($urandom());
      acc_valid = 1'($urandom()); exs_valid = 1'($urandom()); aln_valid = 1'($urandom());
      add_valid = 1'($urandom()); nrm_valid = 1'($urandom());
      case (sel1)
        OUT_ACC: begin e = acc; v = acc_valid; end
        OUT_EXS: begin e = {62'b0, exs_cc}; v = exs_valid; end
        OUT_ALN: begin e = aln_result; v = aln_valid; end
        OUT_ADD: begin e = add_result; v = add_valid; end
        OUT_NRM: begin e = nrm_result; v = nrm_valid; end
        default: ;
      endcase
      if (any1) v = 1;
      @(negedge clk);
      check(res_valid == v, $sformatf("valid for source %0d", sel1));
      if (v) begin
        check(result == e, $sformatf("result for source %0d", i));
        check(res_to_ipu == ipu1, "destination");
        if (sel1 == OUT_ADD) check(res_ovf == add_ovf, "add overflow flag");
        if (sel1 == OUT_NRM) check(res_ovf == nrm_ovf && res_unf == nrm_unf, "normalizer flags");
        if (sel1 == OUT_EXS) check(res_cc == exs_cc, "condition code");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
