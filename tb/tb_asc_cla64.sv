// tb_asc_cla64: random and corner-case sums of the 64-bit lookahead adder
// against the simulator's own addition.
module tb_asc_cla64;
  logic [63:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  asc_cla64 dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [64:0] r;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin a = '1; b = 64'd1; cin = 0; end
        1: begin a = '1; b = '0;    cin = 1; end
        2: begin a = '1; b = '1;    cin = 1; end
        3: begin a = 64'h0000_FFFF_0000_FFFF; b = 64'h1; cin = 1; end
        default: begin
          a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()}; cin = 1'($urandom());
          if (i % 7 == 0) b = ~a;    // long propagate chains
        end
      endcase
      #1;
      r = 65'(a) + 65'(b) + 65'(cin);
      checks++;
      if ({cout, sum} != r) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h + %b = %h, got %h", a, b, cin, r, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
