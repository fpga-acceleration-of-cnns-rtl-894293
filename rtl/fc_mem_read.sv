// fc_mem_read: memory reader of the dedicated fully connected (FC) processor.
//
// For one FC layer it first reads the in_plates plates of the input vector
// (in_base + k) and sends them to fc_pe tagged LOAD, then streams the weights:
// for every output channel o the in_plates weight plates w_base + o*in_plates + k,
// the last one tagged LAST. FC layers get no Winograd transform: input and weights
// are plain 8-bit plates of VEC*W_VEC values, the input channels viewed as
// W_VEC x 1 x (inp_ch/W_VEC) so all W_VEC*VEC multipliers of the PE are used.
// Weights are used once and dropped; there is no batching.
//
// Interface: controller kstart/cfg/idle; DDR read request (valid/ready, plate
// address) and in-order response (valid/ready); token {load, last, plate} out
// (valid/ready), one plate per cycle. A tag queue pairs responses with their tags;
// the plate bits of the token are the response data, unregistered.
// Streaming weights to a single PE that holds the input follows the described FC
// processor; the tag queue is this design's.
module fc_mem_read
  import cnn_pkg::*;
#(
  parameter int VEC = VEC_SIZE,
  parameter int TAG_DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     kstart,
  input  fc_cfg_t                  cfg,
  output logic                     idle,
  output logic                     rd_req_valid,
  input  logic                     rd_req_ready,
  output logic [31:0]              rd_addr,
  input  logic                     rd_rsp_valid,
  output logic                     rd_rsp_ready,
  input  logic [W_VEC*VEC*DW-1:0]  rd_rsp_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [2+W_VEC*VEC*DW-1:0] out_data
);
  fc_cfg_t     c;
  logic        issuing, phase_w;       // phase_w: streaming weights
  logic [15:0] k_i, o_i;

  logic        tq_wr, tq_rv;
  logic [1:0]  tq_rd;
  wire         last_k = (k_i == c.in_plates - 1'b1);

  assign rd_req_valid = issuing && tq_wr;
  assign rd_addr      = phase_w ? c.w_base + 32'(o_i) * 32'(c.in_plates) + 32'(k_i)
                                : c.in_base + 32'(k_i);
  wire   step         = rd_req_valid && rd_req_ready;

  chan_fifo #(.WIDTH(2), .DEPTH(TAG_DEPTH)) u_tags (
    .clk, .rst_n,
    .wr_valid(step), .wr_ready(tq_wr), .wr_data({!phase_w, phase_w && last_k}),
    .rd_valid(tq_rv), .rd_ready(out_valid && out_ready), .rd_data(tq_rd));

  assign out_valid    = tq_rv && rd_rsp_valid;
  assign rd_rsp_ready = tq_rv && out_ready;
  assign out_data     = {tq_rd, rd_rsp_data};
  assign idle         = !issuing && !tq_rv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c <= '0; issuing <= 1'b0; phase_w <= 1'b0; k_i <= '0; o_i <= '0;
    end else if (kstart) begin
      c <= cfg; issuing <= 1'b1; phase_w <= 1'b0; k_i <= '0; o_i <= '0;
    end else if (step) begin
      if (last_k) begin
        k_i <= '0;
        if (!phase_w) phase_w <= 1'b1;
        else if (o_i == c.out_ch - 1'b1) issuing <= 1'b0;
        else o_i <= o_i + 1'b1;
      end else begin
        k_i <= k_i + 1'b1;
      end
    end
  end
endmodule
