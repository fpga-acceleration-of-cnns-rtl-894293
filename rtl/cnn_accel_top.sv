// cnn_accel_top: convolution processor and dedicated FC processor.
//
// Convolution processor (one layer at a time, started by its controller):
//   mem_read_data_ddr -> memreaddata channel -> mem_read_data (double tile buffer)
//   -> winograd_xform -> deep data channel -> systolic_array (ROWS x COLS PEs)
//   -> inv_winograd -> mem_write
//   mem_read_weight -> deep weight channel -> systolic_array (weights forwarded
//   PE to PE into each PE's double weight buffer)
// FC processor (independent, own controller): fc_mem_read -> fc_pe.
// The two processors run concurrently, so the FC layers of one input can overlap
// the convolution layers of the next.
//
// External memory is reached through one port per kernel: feature reads (dr_*),
// weight reads (wr_*), output writes (ow_*) with the sum-layer read (os_*), FC reads
// (fr_*) and FC byte writes (fw_*). Addresses count lanes (VEC bytes) for feature
// ports, weight plates for wr_*, plates (VEC*W_VEC bytes) for fr_* and bytes for
// fw_*. Read responses are in order with valid/ready. Arbitration and the memory
// controller are outside this block. The host loads each processor's layer table
// (*_cfg_wr_*), then pulses *_start with the layer count; *_layer shows the layer
// in progress and *_done pulses at the end.
//
// The kernel structure, systolic array, Winograd F(6,3), double buffers, deep
// channels and the separate FC processor follow the described design; port
// shapes, channel depths and buffer sizes are this design's choices.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int VEC        = VEC_SIZE,
  parameter int ROWS       = PE_ROWS,
  parameter int COLS       = PE_COLS,
  parameter int WDEPTH     = 576,
  parameter int TILE_DEPTH = 2048,
  parameter int FC_DEPTH   = 392,
  parameter int DEEP       = 64,
  parameter int MAX_LAYERS = 32
) (
  input  logic clk,
  input  logic rst_n,
  // convolution processor control
  input  logic                          cv_cfg_wr_en,
  input  logic [$clog2(MAX_LAYERS)-1:0] cv_cfg_wr_addr,
  input  conv_cfg_t                     cv_cfg_wr_data,
  input  logic                          cv_start,
  input  logic [$clog2(MAX_LAYERS):0]   cv_num_layers,
  output logic                          cv_busy,
  output logic                          cv_done,
  output logic [$clog2(MAX_LAYERS)-1:0] cv_layer,
  // FC processor control
  input  logic                          fc_cfg_wr_en,
  input  logic [$clog2(MAX_LAYERS)-1:0] fc_cfg_wr_addr,
  input  fc_cfg_t                       fc_cfg_wr_data,
  input  logic                          fc_start,
  input  logic [$clog2(MAX_LAYERS):0]   fc_num_layers,
  output logic                          fc_busy,
  output logic                          fc_done,
  output logic [$clog2(MAX_LAYERS)-1:0] fc_layer,
  // feature reads
  output logic                          dr_req_valid,
  input  logic                          dr_req_ready,
  output logic [31:0]                   dr_addr,
  input  logic                          dr_rsp_valid,
  output logic                          dr_rsp_ready,
  input  logic [W_VEC*VEC*DW-1:0]       dr_rsp_data,
  // weight reads
  output logic                          wr_req_valid,
  input  logic                          wr_req_ready,
  output logic [31:0]                   wr_addr,
  input  logic                          wr_rsp_valid,
  output logic                          wr_rsp_ready,
  input  logic [W_VEC*VEC*XW-1:0]       wr_rsp_data,
  // output writes
  output logic                          ow_valid,
  input  logic                          ow_ready,
  output logic [31:0]                   ow_addr,
  output logic [INV_VEC*VEC*DW-1:0]     ow_data,
  output logic [INV_VEC-1:0]            ow_mask,
  // sum-layer reads
  output logic                          os_req_valid,
  input  logic                          os_req_ready,
  output logic [31:0]                   os_addr,
  input  logic                          os_rsp_valid,
  output logic                          os_rsp_ready,
  input  logic [INV_VEC*VEC*DW-1:0]     os_rsp_data,
  // FC reads
  output logic                          fr_req_valid,
  input  logic                          fr_req_ready,
  output logic [31:0]                   fr_addr,
  input  logic                          fr_rsp_valid,
  output logic                          fr_rsp_ready,
  input  logic [W_VEC*VEC*DW-1:0]       fr_rsp_data,
  // FC writes
  output logic                          fw_valid,
  input  logic                          fw_ready,
  output logic [31:0]                   fw_addr,
  output logic [7:0]                    fw_data
);
  localparam int NPE = ROWS * COLS;
  localparam int PW8 = W_VEC * VEC * DW;
  localparam int PWX = W_VEC * VEC * XW;

  // ---------------- convolution processor ----------------
  conv_cfg_t cv_cfg;
  logic      cv_kstart;
  logic [3:0] cv_idle;

  controller #(.cfg_t(conv_cfg_t), .MAX_LAYERS(MAX_LAYERS), .N_KERNELS(4)) u_cv_ctrl (
    .clk, .rst_n,
    .cfg_wr_en(cv_cfg_wr_en), .cfg_wr_addr(cv_cfg_wr_addr), .cfg_wr_data(cv_cfg_wr_data),
    .start(cv_start), .num_layers(cv_num_layers), .busy(cv_busy), .done(cv_done),
    .layer(cv_layer), .cfg(cv_cfg), .kstart(cv_kstart), .kidle(cv_idle));

  logic           rdd_v, rdd_r;  logic [PW8-1:0] rdd_d;   // DDR reader -> channel
  logic           mrc_v, mrc_r;  logic [PW8-1:0] mrc_d;   // channel -> buffer
  logic           mrd_v, mrd_r;  logic [COND_W+PW8-1:0] mrd_d;
  logic           wx_v, wx_r;    logic [COND_W+PWX-1:0] wx_d;
  logic           pe_dv, pe_dr;  logic [COND_W+PWX-1:0] pe_dd;
  logic           mw_v, mw_r;    logic [9+PWX-1:0] mw_d;
  logic           pe_wv, pe_wr;  logic [9+PWX-1:0] pe_wd;
  logic           ao_v, ao_r;    logic [NPE*W_VEC*ACCW-1:0] ao_d;
  logic           iw_v, iw_r;    logic [NPE*INV_VEC*OUTW-1:0] iw_d;

  mem_read_data_ddr #(.VEC(VEC), .WV(W_VEC)) u_mrd_ddr (
    .clk, .rst_n, .kstart(cv_kstart), .cfg(cv_cfg), .idle(cv_idle[0]),
    .rd_req_valid(dr_req_valid), .rd_req_ready(dr_req_ready), .rd_addr(dr_addr),
    .rd_rsp_valid(dr_rsp_valid), .rd_rsp_ready(dr_rsp_ready), .rd_rsp_data(dr_rsp_data),
    .out_valid(rdd_v), .out_ready(rdd_r), .out_data(rdd_d));

  chan_fifo #(.WIDTH(PW8), .DEPTH(DEEP)) u_memreaddata_ch (
    .clk, .rst_n, .wr_valid(rdd_v), .wr_ready(rdd_r), .wr_data(rdd_d),
    .rd_valid(mrc_v), .rd_ready(mrc_r), .rd_data(mrc_d));

  mem_read_data #(.VEC(VEC), .WV(W_VEC), .TILE_DEPTH(TILE_DEPTH)) u_mrd (
    .clk, .rst_n, .kstart(cv_kstart), .cfg(cv_cfg), .idle(cv_idle[1]),
    .in_valid(mrc_v), .in_ready(mrc_r), .in_data(mrc_d),
    .out_valid(mrd_v), .out_ready(mrd_r), .out_data(mrd_d));

  winograd_xform #(.VEC(VEC), .SBW(COND_W)) u_wino (
    .clk, .rst_n, .in_valid(mrd_v), .in_ready(mrd_r), .in_data(mrd_d),
    .out_valid(wx_v), .out_ready(wx_r), .out_data(wx_d));

  chan_fifo #(.WIDTH(COND_W+PWX), .DEPTH(DEEP)) u_data_ch (
    .clk, .rst_n, .wr_valid(wx_v), .wr_ready(wx_r), .wr_data(wx_d),
    .rd_valid(pe_dv), .rd_ready(pe_dr), .rd_data(pe_dd));

  mem_read_weight #(.VEC(VEC), .NPE(NPE)) u_mrw (
    .clk, .rst_n, .kstart(cv_kstart), .cfg(cv_cfg), .idle(cv_idle[2]),
    .rd_req_valid(wr_req_valid), .rd_req_ready(wr_req_ready), .rd_addr(wr_addr),
    .rd_rsp_valid(wr_rsp_valid), .rd_rsp_ready(wr_rsp_ready), .rd_rsp_data(wr_rsp_data),
    .out_valid(mw_v), .out_ready(mw_r), .out_data(mw_d));

  chan_fifo #(.WIDTH(9+PWX), .DEPTH(DEEP)) u_weight_ch (
    .clk, .rst_n, .wr_valid(mw_v), .wr_ready(mw_r), .wr_data(mw_d),
    .rd_valid(pe_wv), .rd_ready(pe_wr), .rd_data(pe_wd));

  systolic_array #(.VEC(VEC), .ROWS(ROWS), .COLS(COLS), .WDEPTH(WDEPTH)) u_array (
    .clk, .rst_n,
    .d_in_valid(pe_dv), .d_in_ready(pe_dr), .d_in_data(pe_dd),
    .w_in_valid(pe_wv), .w_in_ready(pe_wr), .w_in_data(pe_wd),
    .o_valid(ao_v), .o_ready(ao_r), .o_data(ao_d));

  inv_winograd #(.NB(NPE)) u_inv (
    .clk, .rst_n, .in_valid(ao_v), .in_ready(ao_r), .in_data(ao_d),
    .out_valid(iw_v), .out_ready(iw_r), .out_data(iw_d));

  mem_write #(.VEC(VEC), .NPE(NPE)) u_mw (
    .clk, .rst_n, .kstart(cv_kstart), .cfg(cv_cfg), .idle(cv_idle[3]),
    .in_valid(iw_v), .in_ready(iw_r), .in_data(iw_d),
    .wr_valid(ow_valid), .wr_ready(ow_ready), .wr_addr(ow_addr), .wr_data(ow_data),
    .wr_mask(ow_mask),
    .rd_req_valid(os_req_valid), .rd_req_ready(os_req_ready), .rd_addr(os_addr),
    .rd_rsp_valid(os_rsp_valid), .rd_rsp_ready(os_rsp_ready), .rd_rsp_data(os_rsp_data));

  // ---------------- FC processor ----------------
  fc_cfg_t    fc_cfg;
  logic       fc_kstart;
  logic [1:0] fc_idle;
  logic       ft_v, ft_r;  logic [2+PW8-1:0] ft_d;

  controller #(.cfg_t(fc_cfg_t), .MAX_LAYERS(MAX_LAYERS), .N_KERNELS(2)) u_fc_ctrl (
    .clk, .rst_n,
    .cfg_wr_en(fc_cfg_wr_en), .cfg_wr_addr(fc_cfg_wr_addr), .cfg_wr_data(fc_cfg_wr_data),
    .start(fc_start), .num_layers(fc_num_layers), .busy(fc_busy), .done(fc_done),
    .layer(fc_layer), .cfg(fc_cfg), .kstart(fc_kstart), .kidle(fc_idle));

  fc_mem_read #(.VEC(VEC)) u_fc_rd (
    .clk, .rst_n, .kstart(fc_kstart), .cfg(fc_cfg), .idle(fc_idle[0]),
    .rd_req_valid(fr_req_valid), .rd_req_ready(fr_req_ready), .rd_addr(fr_addr),
    .rd_rsp_valid(fr_rsp_valid), .rd_rsp_ready(fr_rsp_ready), .rd_rsp_data(fr_rsp_data),
    .out_valid(ft_v), .out_ready(ft_r), .out_data(ft_d));

  fc_pe #(.VEC(VEC), .IN_DEPTH(FC_DEPTH)) u_fc_pe (
    .clk, .rst_n, .kstart(fc_kstart), .cfg(fc_cfg), .idle(fc_idle[1]),
    .in_valid(ft_v), .in_ready(ft_r), .in_data(ft_d),
    .wr_valid(fw_valid), .wr_ready(fw_ready), .wr_addr(fw_addr), .wr_data(fw_data));
endmodule
