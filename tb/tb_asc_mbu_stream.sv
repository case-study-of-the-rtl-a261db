// tb_asc_mbu_stream: one operand stream against the interleaved-memory model.
// For random base addresses and lengths the stream must deliver exactly the
// vector's words in order, request exactly the octets the vector touches,
// never have more than three octets requested or buffered, and be primed
// only with three full octets or the whole vector buffered.  The consumer
// takes a word per clock once primed, sometimes pausing.
module tb_asc_mbu_stream;
  import asc_au_pkg::*;
  logic        clk = 0, rst_n = 1, start = 0, take = 0;
  logic [23:0] base = '0;
  logic [15:0] n = '0;
  word_t       word;
  logic        avail, primed, mem_req, mem_ready, mem_rvalid;
  logic [20:0] mem_addr;
  logic [511:0] mem_rdata;
  int checks = 0, failures = 0;

  asc_mbu_stream dut (.*);
  asc_mem_model u_mem (.clk, .req(mem_req), .addr(mem_addr), .ready(mem_ready),
                       .rvalid(mem_rvalid), .rdata(mem_rdata));
  always #5 clk = ~clk;
  // reset falls at 1 ns, a real edge, so the asynchronous reset acts before the first clock
  initial #1 rst_n = 1'b0;

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  int outstanding = 0;   // octets requested and not yet fully consumed
  always @(posedge clk) if (rst_n) begin
    if (outstanding > 3) begin failures++; $display("FAIL more than three octets ahead"); end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, reqs, first_oct, last_oct;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = {32'(i), $urandom()};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      @(negedge clk);
      base = 24'($urandom_range(3000, 0));
      n    = 16'((t < 8) ? t + 1 : $urandom_range(80, 1));
      first_oct = int'(base) / 8;
      last_oct  = (int'(base) + int'(n) - 1) / 8;
      start = 1;
      @(negedge clk);
      start = 0;
      got = 0; reqs = 0;
      while (got < int'(n)) begin
        if (primed && got == 0)
          check(dut.held == 3 || (dut.oct_left == 0 && dut.inflight == 0), "primed too early");
        take = (got > 0 || primed) && ($urandom_range(5, 0) != 0);
        #1;
        if (mem_req && mem_ready) begin
          check(int'(mem_addr) == first_oct + reqs, "octet address out of order");
          reqs++;
        end
        if (take && avail) begin
          check(word == u_mem.mem[int'(base) + got], $sformatf("word %0d of n=%0d base=%0d", got, n, base));
          got++;
        end else if (take && got > 0) begin
          // a paused consumer is fine; one that finds nothing is not, once primed
          check(avail, "stream ran dry");
        end
        outstanding = int'(dut.held) + int'(dut.inflight);
        @(negedge clk);
        take = 0;
      end
      check(reqs == last_oct - first_oct + 1, $sformatf("requested %0d octets for %0d..%0d", reqs, first_oct, last_oct));
      check(!avail, "words left over");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
