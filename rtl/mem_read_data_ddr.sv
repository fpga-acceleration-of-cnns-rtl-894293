// mem_read_data_ddr: fetches input feature tiles from DDR (the DDR side of the
// double data buffer).
//
// For every output-channel set and every tile of the layer it requests, row by row,
// the plates (W_VEC consecutive lanes of one channel group) that cover the input
// tile, and passes the returned plates unchanged into the channel that feeds
// mem_read_data. Tiles are taken along width, height and frames; an input tile is
// (tile_owg*INV_VEC + KW - 1) x (tile_oh + kh - 1) x (tile_of + kf - 1) pixels and
// its width is rounded up to whole plates. The input is re-read once per
// output-channel set (tile-major order). Request order, outer to inner:
// set, frame tile, row tile, column tile, channel group, frame, row, plate.
//
// Interface: kstart/cfg from the controller, idle back to it; a read request port
// (valid/ready, lane address) and an in-order read response port (valid/ready,
// one plate); the response is forwarded combinationally to out_* (one plate per
// cycle), so out_data is the memory's data bits themselves and the logic of this
// kernel is all in the address walk. Isolating the DDR reads in their own kernel and tiling in three
// dimensions follow the described design; the request order is this design's.
module mem_read_data_ddr
  import cnn_pkg::*;
#(
  parameter int VEC = VEC_SIZE,
  parameter int WV  = W_VEC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 kstart,
  input  conv_cfg_t            cfg,
  output logic                 idle,
  // DDR read port
  output logic                 rd_req_valid,
  input  logic                 rd_req_ready,
  output logic [31:0]          rd_addr,
  input  logic                 rd_rsp_valid,
  output logic                 rd_rsp_ready,
  input  logic [WV*VEC*DW-1:0] rd_rsp_data,
  // memreaddata channel
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [WV*VEC*DW-1:0] out_data
);
  conv_cfg_t c;
  logic [15:0] tile_ih, tile_if, npx;
  logic [15:0] set_i, tf_i, th_i, tw_i, cg_i, f_i, y_i, xp_i;
  logic        issuing;
  logic [31:0] outstanding;

  assign rd_req_valid = issuing;
  assign out_valid    = rd_rsp_valid;
  assign out_data     = rd_rsp_data;
  assign rd_rsp_ready = out_ready;
  assign idle         = !issuing && (outstanding == '0);

  // Address of the plate being requested.
  logic [31:0] fy, yy, xx;
  always_comb begin
    fy = 32'(tf_i) * 32'(c.tile_of) + 32'(f_i);
    yy = 32'(th_i) * 32'(c.tile_oh) + 32'(y_i);
    xx = 32'(tw_i) * 32'(c.tile_owg) * INV_VEC + 32'(xp_i) * WV;
    rd_addr = c.in_base + ((32'(cg_i) * c.in_f + fy) * c.in_h + yy) * c.in_w + xx;
  end

  wire req_fire = rd_req_valid && rd_req_ready;
  wire rsp_fire = rd_rsp_valid && rd_rsp_ready;

  // Innermost-first carry chain of the request loops.
  logic w_xp, w_y, w_f, w_cg, w_tw, w_th, w_tf, w_set;
  always_comb begin
    w_xp  = (xp_i  == npx - 1'b1);
    w_y   = (y_i   == tile_ih - 1'b1);
    w_f   = (f_i   == tile_if - 1'b1);
    w_cg  = (cg_i  == c.in_cg - 1'b1);
    w_tw  = (tw_i  == c.n_tw - 1'b1);
    w_th  = (th_i  == c.n_th - 1'b1);
    w_tf  = (tf_i  == c.n_tf - 1'b1);
    w_set = (set_i == c.m_sets - 1'b1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c <= '0;
      issuing <= 1'b0;
      outstanding <= '0;
      {tile_ih, tile_if, npx} <= '0;
      {set_i, tf_i, th_i, tw_i, cg_i, f_i, y_i, xp_i} <= '0;
    end else begin
      outstanding <= outstanding + 32'(req_fire) - 32'(rsp_fire);
      if (kstart) begin
        c       <= cfg;
        tile_ih <= cfg.tile_oh + 16'(cfg.kh) - 1'b1;
        tile_if <= cfg.tile_of + 16'(cfg.kf) - 1'b1;
        npx     <= 16'((cfg.tile_owg * INV_VEC + KW - 1 + WV - 1) / WV);
        {set_i, tf_i, th_i, tw_i, cg_i, f_i, y_i, xp_i} <= '0;
        issuing <= 1'b1;
      end else if (req_fire) begin
        xp_i <= w_xp ? '0 : xp_i + 1'b1;
        if (w_xp) begin
          y_i <= w_y ? '0 : y_i + 1'b1;
          if (w_y) begin
            f_i <= w_f ? '0 : f_i + 1'b1;
            if (w_f) begin
              cg_i <= w_cg ? '0 : cg_i + 1'b1;
              if (w_cg) begin
                tw_i <= w_tw ? '0 : tw_i + 1'b1;
                if (w_tw) begin
                  th_i <= w_th ? '0 : th_i + 1'b1;
                  if (w_th) begin
                    tf_i <= w_tf ? '0 : tf_i + 1'b1;
                    if (w_tf) begin
                      set_i <= w_set ? '0 : set_i + 1'b1;
                      if (w_set) issuing <= 1'b0;
                    end
                  end
                end
              end
            end
          end
        end
      end
    end
  end
endmodule
