// ddr_model: behavioural external-memory model for testbenches (not synthesizable).
//
// Word-addressed array of DEPTH words of LW bits. A read request for address a
// returns N consecutive words a..a+N-1 (word 0 in the low bits) after a random
// latency of 1..MAXLAT cycles, in request order. A write stores N words from
// address a, word i only where mask[i] is set. When STALL is set, request and write
// ready drop at random to exercise back-pressure. Addresses outside the array read
// as zero and are not written. The testbench initialises the array. Counters report
// traffic.
module ddr_model #(
  parameter int LW     = 64,
  parameter int N      = 8,
  parameter int DEPTH  = 4096,
  parameter int MAXLAT = 8,
  parameter bit STALL  = 1
) (
  input  logic            clk,
  input  logic            rd_req_valid,
  output logic            rd_req_ready,
  input  logic [31:0]     rd_addr,
  output logic            rd_rsp_valid,
  input  logic            rd_rsp_ready,
  output logic [N*LW-1:0] rd_rsp_data,
  input  logic            wr_valid,
  output logic            wr_ready,
  input  logic [31:0]     wr_addr,
  input  logic [N*LW-1:0] wr_data,
  input  logic [N-1:0]    wr_mask
);
  logic [LW-1:0] mem [DEPTH];
  int unsigned   reads = 0, writes = 0, stalls = 0;

  typedef struct { logic [N*LW-1:0] data; int due; } rsp_t;
  rsp_t q [$];
  int   cyc = 0;

  function automatic logic [N*LW-1:0] fetch(input logic [31:0] a);
    logic [N*LW-1:0] d = '0;
    for (int i = 0; i < N; i++)
      if (a + 32'(i) < DEPTH) d[i*LW +: LW] = mem[a + 32'(i)];
    return d;
  endfunction

  initial begin
    rd_req_ready = 1'b0;
    wr_ready = 1'b0;
  end

  assign rd_rsp_valid = (q.size() > 0) && (q[0].due <= cyc);
  assign rd_rsp_data  = (q.size() > 0) ? q[0].data : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_req_valid && rd_req_ready) begin
      rsp_t r;
      r.data = fetch(rd_addr);
      r.due  = cyc + 1 + int'($urandom_range(0, MAXLAT - 1));
      if (q.size() > 0 && r.due < q[$].due) r.due = q[$].due;
      q.push_back(r);
      reads++;
    end
    if (rd_rsp_valid && rd_rsp_ready) void'(q.pop_front());
    if (wr_valid && wr_ready) begin
      for (int i = 0; i < N; i++)
        if (wr_mask[i] && wr_addr + 32'(i) < DEPTH) mem[wr_addr + 32'(i)] <= wr_data[i*LW +: LW];
      writes++;
    end
    rd_req_ready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
    wr_ready     <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (STALL && (rd_req_valid && !rd_req_ready)) stalls++;
  end
endmodule
