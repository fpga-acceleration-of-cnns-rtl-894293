// mem_read_weight: streams the weight filters into the systolic weight channel.
//
// For every output-channel set s and every PE p it sends the NWP = kf*kh*in_cg
// weight plates of output channel m = s*NPE + p (Winograd-domain, XW bits per
// element), tagged with the target PE index and a LAST flag on the filter's final
// plate. All NPE*NWP plates of a set enter at PE0 and are forwarded PE to PE; each
// PE keeps the plates addressed to it. Filters of output channels m >= out_ch are
// sent as zero plates without reading memory, so every PE always receives a full
// filter. Plate order inside a filter is (kf, kh, cg), cg innermost, matching the
// data stream. Weight plate address: w_base + m*NWP + (kf*kh_n + kh)*in_cg + cg.
//
// Interface: controller kstart/cfg/idle; DDR read request (valid/ready, plate
// address) and in-order response (valid/ready); output token {target, last, plate}
// (valid/ready). A small tag queue keeps zero plates in order with memory
// responses. Weight forwarding through PE0 follows the described systolic weight
// channels; the tag queue and the zero plates are this design's choices.
module mem_read_weight
  import cnn_pkg::*;
#(
  parameter int VEC = VEC_SIZE,
  parameter int NPE = LANE_NUM,
  parameter int TAG_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         kstart,
  input  conv_cfg_t                    cfg,
  output logic                         idle,
  output logic                         rd_req_valid,
  input  logic                         rd_req_ready,
  output logic [31:0]                  rd_addr,
  input  logic                         rd_rsp_valid,
  output logic                         rd_rsp_ready,
  input  logic [W_VEC*VEC*XW-1:0]      rd_rsp_data,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [8+1+W_VEC*VEC*XW-1:0]  out_data
);
  localparam int PW = W_VEC * VEC * XW;

  conv_cfg_t   c;
  logic [31:0] nwp;
  logic [15:0] set_i, pe_i;
  logic [31:0] k_i;
  logic        issuing;

  // tag queue: {zero, last, target}
  logic        tq_wv, tq_wr, tq_rv, tq_rr;
  logic [9:0]  tq_wd, tq_rd;

  logic [31:0] m;
  always_comb m = 32'(set_i) * NPE + 32'(pe_i);
  wire zero_plate = (m >= 32'(c.out_ch));
  wire last_k     = (k_i == nwp - 1);

  assign tq_wd        = {zero_plate, last_k, 8'(pe_i)};
  assign rd_addr      = c.w_base + m * nwp + k_i;
  // a request is issued only together with its tag
  assign rd_req_valid = issuing && !zero_plate && tq_wr;
  assign tq_wv        = issuing && (zero_plate ? 1'b1 : rd_req_ready);
  wire   step         = tq_wv && tq_wr;

  chan_fifo #(.WIDTH(10), .DEPTH(TAG_DEPTH)) u_tags (
    .clk, .rst_n,
    .wr_valid(tq_wv), .wr_ready(tq_wr), .wr_data(tq_wd),
    .rd_valid(tq_rv), .rd_ready(tq_rr), .rd_data(tq_rd));

  wire t_zero = tq_rd[9];
  assign out_valid    = tq_rv && (t_zero || rd_rsp_valid);
  assign out_data     = {tq_rd[7:0], tq_rd[8], (t_zero ? PW'(0) : rd_rsp_data)};
  assign tq_rr        = out_valid && out_ready;
  assign rd_rsp_ready = tq_rv && !t_zero && out_ready;
  assign idle         = !issuing && !tq_rv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c <= '0; nwp <= '0;
      set_i <= '0; pe_i <= '0; k_i <= '0;
      issuing <= 1'b0;
    end else if (kstart) begin
      c <= cfg;
      nwp <= 32'(cfg.kf) * 32'(cfg.kh) * 32'(cfg.in_cg);
      set_i <= '0; pe_i <= '0; k_i <= '0;
      issuing <= 1'b1;
    end else if (step) begin
      if (last_k) begin
        k_i <= '0;
        if (pe_i == 16'(NPE - 1)) begin
          pe_i <= '0;
          if (set_i == c.m_sets - 1'b1) issuing <= 1'b0;
          else set_i <= set_i + 1'b1;
        end else begin
          pe_i <= pe_i + 1'b1;
        end
      end else begin
        k_i <= k_i + 1;
      end
    end
  end
endmodule
