// systolic_array: semi-1D systolic array of ROWS x COLS processing elements.
//
// PE(r,c) has linear index p = c*ROWS + r and computes output channel
// set*NPE + p. Data plates and weight tokens enter at PE(0,0); the PEs of row 0 pass
// them right along the row and down their column, every other PE passes them down.
// Output blocks travel down each column, each PE appending its own; the last-row
// PE of column c also receives the complete vector of columns 0..c-1 from the
// last-row PE on its left and passes the vector of columns 0..c on. The last-row PE
// of the last column delivers the vector of all NPE blocks (block k from PE k).
// Every link between two PEs is a channel (chan_fifo, depth LINK_DEPTH) of exactly
// the width it needs: inside column c the link below row r carries r+1 blocks, and
// the last-row link leaving column c carries (c+1)*ROWS blocks, so the array uses
// W_VEC*(COLS*(ROWS-1)*ROWS/2 + ROWS*COLS*(COLS+1)/2) output lanes instead of
// W_VEC*NPE*(NPE+1)/2 in a plain chain.
//
// Latency from a plate entering PE(0,0) to the same plate reaching PE(r,c) is about
// 2*(r+c) cycles (one register in the PE input channel per hop). The grid, the
// output forwarding rule and systolic weight forwarding follow the described
// design; ROWS=4 x COLS=8 for 32 PEs and the link depth are this design's choices.
module systolic_array
  import cnn_pkg::*;
#(
  parameter int VEC        = VEC_SIZE,
  parameter int ROWS       = PE_ROWS,
  parameter int COLS       = PE_COLS,
  parameter int WDEPTH     = 576,
  parameter int LINK_DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                                d_in_valid,
  output logic                                d_in_ready,
  input  logic [COND_W+W_VEC*VEC*XW-1:0]      d_in_data,
  input  logic                                w_in_valid,
  output logic                                w_in_ready,
  input  logic [9+W_VEC*VEC*XW-1:0]           w_in_data,
  output logic                                o_valid,
  input  logic                                o_ready,
  output logic [ROWS*COLS*W_VEC*ACCW-1:0]     o_data
);
  localparam int NPE = ROWS * COLS;
  localparam int DWD = COND_W + W_VEC * VEC * XW;
  localparam int WWD = 9 + W_VEC * VEC * XW;
  localparam int BW  = W_VEC * ACCW;
  localparam int OBW = NPE * BW;

  // Inputs of each PE, indexed by the destination PE.
  logic           di_v [NPE], di_r [NPE];
  logic [DWD-1:0] di_d [NPE];
  logic           wi_v [NPE], wi_r [NPE];
  logic [WWD-1:0] wi_d [NPE];
  logic           ab_v [NPE], ab_r [NPE];   // blocks from the PE above
  logic [OBW-1:0] ab_d [NPE];
  logic           lf_v [NPE], lf_r [NPE];   // blocks from the last-row PE on the left
  logic [OBW-1:0] lf_d [NPE];

  assign di_v[0] = d_in_valid;
  assign di_d[0] = d_in_data;
  assign d_in_ready = di_r[0];
  assign wi_v[0] = w_in_valid;
  assign wi_d[0] = w_in_data;
  assign w_in_ready = wi_r[0];

  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      localparam int P       = c * ROWS + r;
      localparam int N_ABOVE = r;
      localparam int N_LEFT  = (r == ROWS - 1) ? c * ROWS : 0;
      localparam int N_OUT   = N_LEFT + N_ABOVE + 1;
      localparam bit HAS_DOWN  = (r < ROWS - 1);
      localparam bit HAS_RIGHT = (r == 0) && (c < COLS - 1);

      logic           dd_v, dd_r, dr_v, dr_r, wd_v, wd_r, wr_v, wr_r;
      logic [DWD-1:0] d_o;
      logic [WWD-1:0] w_o;
      logic           o_v, o_r;
      logic [N_OUT*BW-1:0] o_d;

      if (r == 0) begin : g_top
        assign ab_v[P] = 1'b0;
        assign ab_d[P] = '0;
        if (c == 0) begin : g_origin
          assign lf_v[P] = 1'b0;
          assign lf_d[P] = '0;
        end
      end
      if (r != ROWS - 1 && !(r == 0 && c == 0)) begin : g_noleft
        assign lf_v[P] = 1'b0;
        assign lf_d[P] = '0;
      end
      if (r == ROWS - 1 && c == 0 && r != 0) begin : g_noleft0
        assign lf_v[P] = 1'b0;
        assign lf_d[P] = '0;
      end

      pe #(
        .VEC(VEC), .ID(P), .ROW(r), .COL(c), .ROWS(ROWS), .WDEPTH(WDEPTH),
        .N_ABOVE(N_ABOVE), .N_LEFT(N_LEFT), .HAS_DOWN(HAS_DOWN), .HAS_RIGHT(HAS_RIGHT)
      ) u_pe (
        .clk, .rst_n,
        .d_in_valid(di_v[P]), .d_in_ready(di_r[P]), .d_in_data(di_d[P]),
        .d_down_valid(dd_v), .d_down_ready(dd_r),
        .d_right_valid(dr_v), .d_right_ready(dr_r), .d_out_data(d_o),
        .w_in_valid(wi_v[P]), .w_in_ready(wi_r[P]), .w_in_data(wi_d[P]),
        .w_down_valid(wd_v), .w_down_ready(wd_r),
        .w_right_valid(wr_v), .w_right_ready(wr_r), .w_out_data(w_o),
        .o_above_valid(ab_v[P]), .o_above_ready(ab_r[P]),
        .o_above_data(ab_d[P][((N_ABOVE > 0) ? N_ABOVE : 1)*BW-1:0]),
        .o_left_valid(lf_v[P]), .o_left_ready(lf_r[P]),
        .o_left_data(lf_d[P][((N_LEFT > 0) ? N_LEFT : 1)*BW-1:0]),
        .o_out_valid(o_v), .o_out_ready(o_r), .o_out_data(o_d)
      );

      // data and weight links to the PE below
      if (HAS_DOWN) begin : g_down
        chan_fifo #(.WIDTH(DWD), .DEPTH(LINK_DEPTH)) u_d (
          .clk, .rst_n, .wr_valid(dd_v), .wr_ready(dd_r), .wr_data(d_o),
          .rd_valid(di_v[P+1]), .rd_ready(di_r[P+1]), .rd_data(di_d[P+1]));
        chan_fifo #(.WIDTH(WWD), .DEPTH(LINK_DEPTH)) u_w (
          .clk, .rst_n, .wr_valid(wd_v), .wr_ready(wd_r), .wr_data(w_o),
          .rd_valid(wi_v[P+1]), .rd_ready(wi_r[P+1]), .rd_data(wi_d[P+1]));
        // output blocks to the PE below
        logic [N_OUT*BW-1:0] ob;
        chan_fifo #(.WIDTH(N_OUT*BW), .DEPTH(LINK_DEPTH)) u_o (
          .clk, .rst_n, .wr_valid(o_v), .wr_ready(o_r), .wr_data(o_d),
          .rd_valid(ab_v[P+1]), .rd_ready(ab_r[P+1]), .rd_data(ob));
        assign ab_d[P+1] = OBW'(ob);
      end else begin : g_nodown
        assign dd_r = 1'b0;
        assign wd_r = 1'b0;
      end

      // row 0: data and weight links to the next column
      if (HAS_RIGHT) begin : g_right
        chan_fifo #(.WIDTH(DWD), .DEPTH(LINK_DEPTH)) u_d (
          .clk, .rst_n, .wr_valid(dr_v), .wr_ready(dr_r), .wr_data(d_o),
          .rd_valid(di_v[P+ROWS]), .rd_ready(di_r[P+ROWS]), .rd_data(di_d[P+ROWS]));
        chan_fifo #(.WIDTH(WWD), .DEPTH(LINK_DEPTH)) u_w (
          .clk, .rst_n, .wr_valid(wr_v), .wr_ready(wr_r), .wr_data(w_o),
          .rd_valid(wi_v[P+ROWS]), .rd_ready(wi_r[P+ROWS]), .rd_data(wi_d[P+ROWS]));
      end else begin : g_noright
        assign dr_r = 1'b0;
        assign wr_r = 1'b0;
      end

      // last row: the whole vector goes to the next column's last-row PE, or out
      if (r == ROWS - 1) begin : g_last
        if (c < COLS - 1) begin : g_mid
          logic [N_OUT*BW-1:0] ob;
          chan_fifo #(.WIDTH(N_OUT*BW), .DEPTH(LINK_DEPTH)) u_o (
            .clk, .rst_n, .wr_valid(o_v), .wr_ready(o_r), .wr_data(o_d),
            .rd_valid(lf_v[P+ROWS]), .rd_ready(lf_r[P+ROWS]), .rd_data(ob));
          assign lf_d[P+ROWS] = OBW'(ob);
        end else begin : g_end
          assign o_valid = o_v;
          assign o_r     = o_ready;
          assign o_data  = OBW'(o_d);
        end
      end
    end
  end
endmodule
