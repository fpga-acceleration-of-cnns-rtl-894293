// mem_write: writes the inverse-transformed output vectors back to DDR.
//
// Each input vector holds INV_VEC output pixels (one output column group) of all NPE
// output channels of the current set. The writer regenerates the position of every
// vector from the layer configuration, in the stream order of mem_read_data
// (set, frame tile, row tile, column tile, output frame, row, column group), and
// writes it as NPE/VEC writes: one per channel group, INV_VEC lanes wide, lanes of
// columns >= out_wv masked off. The layout is the same lane layout the input uses,
// base + ((cg*F + f)*H + y)*W + x with the output pitches, so the next layer can
// read it directly. Each channel value is arithmetically shifted right by `shift`,
// optionally clamped at zero (ReLU) and saturated to 8 bits.
//
// Sum layer: when `sum` is set (a convolution layer split along input channels)
// the plate already in memory is read first and each value is added to it before
// ReLU and saturation, accumulating the partial results of the sub-layers.
//
// Interface: vectors in (valid/ready); write port (valid/ready, lane address,
// INV_VEC lanes, lane mask); read port for the sum layer (request valid/ready, in-order
// response). One plate written per cycle without sum, one per read round trip with
// it. Output rearrangement and the sum layer in this kernel follow the described
// design; the INV_VEC-lane write and the quantization are this design's choices.
module mem_write
  import cnn_pkg::*;
#(
  parameter int VEC = VEC_SIZE,
  parameter int NPE = LANE_NUM
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          kstart,
  input  conv_cfg_t                     cfg,
  output logic                          idle,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [NPE*INV_VEC*OUTW-1:0]   in_data,
  output logic                          wr_valid,
  input  logic                          wr_ready,
  output logic [31:0]                   wr_addr,
  output logic [INV_VEC*VEC*DW-1:0]     wr_data,
  output logic [INV_VEC-1:0]            wr_mask,
  output logic                          rd_req_valid,
  input  logic                          rd_req_ready,
  output logic [31:0]                   rd_addr,
  input  logic                          rd_rsp_valid,
  output logic                          rd_rsp_ready,
  input  logic [INV_VEC*VEC*DW-1:0]     rd_rsp_data
);
  localparam int NG = NPE / VEC;           // channel groups per set

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_WRITE} state_t;
  state_t state;

  conv_cfg_t   c;
  logic        active;
  logic [15:0] set_i, tf_i, th_i, tw_i, of_i, oy_i, xg_i, g_i;
  logic [15:0] n_cg;                       // valid output channel groups
  logic [INV_VEC*VEC*DW-1:0] old_q;

  // position of the current vector and plate
  logic [31:0] gcg, ff, yy, xx;
  always_comb begin
    gcg = 32'(set_i) * NG + 32'(g_i);
    ff  = 32'(tf_i) * 32'(c.tile_of) + 32'(of_i);
    yy  = 32'(th_i) * 32'(c.tile_oh) + 32'(oy_i);
    xx  = (32'(tw_i) * 32'(c.tile_owg) + 32'(xg_i)) * INV_VEC;
  end
  logic [31:0] addr;
  assign addr    = c.out_base + ((gcg * c.out_f + ff) * c.out_h + yy) * c.out_w + xx;
  assign wr_addr = addr;
  assign rd_addr = addr;
  wire   grp_ok  = (gcg < 32'(n_cg));

  // value computation for the current channel group
  always_comb begin
    wr_data = '0;
    for (int i = 0; i < INV_VEC; i++) begin
      wr_mask[i] = (xx + 32'(i) < 32'(c.out_wv));
      for (int v = 0; v < VEC; v++) begin
        logic signed [OUTW-1:0] val;
        val = signed'(in_data[((32'(g_i) * VEC + v) * INV_VEC + i) * OUTW +: OUTW]) >>> c.shift;
        if (c.sum) val += OUTW'(signed'(old_q[(i*VEC+v)*DW +: DW]));
        if (c.relu && val < 0) val = '0;
        wr_data[(i*VEC+v)*DW +: DW] = sat8(val);
      end
    end
  end

  assign rd_req_valid = (state == S_READ);
  assign rd_rsp_ready = (state == S_WAIT);
  assign wr_valid     = (state == S_WRITE);
  wire   last_g       = (g_i == 16'(NG - 1));
  assign in_ready     = (state == S_WRITE) && wr_ready && last_g
                     || (state == S_IDLE) && in_valid && !grp_ok && last_g && active;
  assign idle         = !active;

  logic w_xg, w_oy, w_of, w_tw, w_th, w_tf, w_set;
  always_comb begin
    w_xg  = (xg_i  == c.tile_owg - 1'b1);
    w_oy  = (oy_i  == c.tile_oh - 1'b1);
    w_of  = (of_i  == c.tile_of - 1'b1);
    w_tw  = (tw_i  == c.n_tw - 1'b1);
    w_th  = (th_i  == c.n_th - 1'b1);
    w_tf  = (tf_i  == c.n_tf - 1'b1);
    w_set = (set_i == c.m_sets - 1'b1);
  end

  wire vec_done = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c <= '0; active <= 1'b0; n_cg <= '0; old_q <= '0;
      {set_i, tf_i, th_i, tw_i, of_i, oy_i, xg_i, g_i} <= '0;
    end else begin
      if (kstart) begin
        c      <= cfg;
        active <= 1'b1;
        n_cg   <= 16'((32'(cfg.out_ch) + VEC - 1) / VEC);
        {set_i, tf_i, th_i, tw_i, of_i, oy_i, xg_i, g_i} <= '0;
        state  <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (active && in_valid) begin
            if (!grp_ok) begin
              // channel group beyond out_ch: nothing to write
              if (!last_g) g_i <= g_i + 1'b1;
            end else begin
              state <= c.sum ? S_READ : S_WRITE;
            end
          end
          S_READ:  if (rd_req_ready) state <= S_WAIT;
          S_WAIT:  if (rd_rsp_valid) begin
            old_q <= rd_rsp_data;
            state <= S_WRITE;
          end
          S_WRITE: if (wr_ready) begin
            state <= S_IDLE;
            if (!last_g) g_i <= g_i + 1'b1;
          end
          default: state <= S_IDLE;
        endcase
        if (!c.sum) old_q <= '0;
        if (vec_done) begin
          g_i  <= '0;
          xg_i <= w_xg ? '0 : xg_i + 1'b1;
          if (w_xg) begin
            oy_i <= w_oy ? '0 : oy_i + 1'b1;
            if (w_oy) begin
              of_i <= w_of ? '0 : of_i + 1'b1;
              if (w_of) begin
                tw_i <= w_tw ? '0 : tw_i + 1'b1;
                if (w_tw) begin
                  th_i <= w_th ? '0 : th_i + 1'b1;
                  if (w_th) begin
                    tf_i <= w_tf ? '0 : tf_i + 1'b1;
                    if (w_tf) begin
                      set_i <= w_set ? '0 : set_i + 1'b1;
                      if (w_set) active <= 1'b0;
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
