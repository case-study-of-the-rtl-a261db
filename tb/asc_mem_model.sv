// asc_mem_model: behavioural model of one port of the 8-way interleaved
// memory, for testbenches.  An octet (eight consecutive words, one from each
// bank) is read per request; a request is accepted when the banks are free,
// after which they stay busy for BANK_CYCLE clocks, and the octet arrives
// LATENCY clocks after the request, in request order.  Timing values are
// placeholders, not the original machine's.
module asc_mem_model #(
  parameter int unsigned ADDR_W     = 24,
  parameter int unsigned WORDS      = 4096,
  parameter int unsigned LATENCY    = 6,
  parameter int unsigned BANK_CYCLE = 2
) (
  input  logic              clk,
  input  logic              req,
  input  logic [ADDR_W-4:0] addr,
  output logic              ready,
  output logic              rvalid,
  output logic [8*64-1:0]   rdata
);
  logic [63:0] mem [WORDS];
  int unsigned busy = 0;
  int unsigned n_req = 0;
  longint      due_q[$];
  logic [8*64-1:0] data_q[$];
  longint      now = 0;

  assign ready = (busy == 0);

  initial begin
    rvalid = 0;
    rdata  = '0;
  end

  always @(posedge clk) begin
    logic [8*64-1:0] d;
    now++;
    rvalid <= 1'b0;
    if (due_q.size() > 0 && due_q[0] <= now) begin
      rvalid <= 1'b1;
      rdata  <= data_q.pop_front();
      void'(due_q.pop_front());
    end
    if (busy > 0) busy <= busy - 1;
    if (req && ready) begin
      for (int w = 0; w < 8; w++) d[64*w +: 64] = mem[(int'(addr) * 8 + w) % WORDS];
      data_q.push_back(d);
      due_q.push_back(now + LATENCY - 1);
      busy <= BANK_CYCLE - 1;
      n_req++;
    end
  end
endmodule
