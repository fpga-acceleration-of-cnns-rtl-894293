// chan_fifo: a blocking point-to-point channel between two kernels or two PEs.
//
// Writer and reader use valid/ready handshakes; a transfer happens on a clock edge
// where valid and ready are both high. The channel holds up to DEPTH words in a
// circular buffer; rd_data is the oldest word, shown combinationally from the
// buffer while rd_valid is high. A shallow depth (2) is used between neighbouring
// PEs; a deep channel (prefetch) is used in front of the array to absorb the
// variable latency of memory reads. Sizes and the handshake are this design's
// own; the channel semantics (blocking read and write) follow the kernels' channels.
module chan_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      count;

  wire do_wr = wr_valid && wr_ready;
  wire do_rd = rd_valid && rd_ready;

  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rp];

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= nxt(wp);
      if (do_rd) rp <= nxt(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // The occupancy never exceeds the depth.
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
