// mem_read_data: double (load/compute) input-tile buffer feeding the PE array.
//
// Two tile buffers swap roles: while the compute buffer streams plates to the array,
// the next tile arriving from mem_read_data_ddr is written into the load buffer; a
// buffer is handed over when it is completely loaded and released when every plate
// of its tile has been streamed. Each buffer is split into W_VEC banks, bank b
// holding the lanes whose tile-local column is b modulo W_VEC, so a plate that starts
// at any column (output groups start every INV_VEC columns and overlap by KW-1) is
// read in one cycle and rotated into place. This is how the input reuse inside a
// tile is served from on-chip memory instead of DDR.
//
// Stream order per tile, outer to inner: output frame, output row, output column
// group, then filter frame kf, filter row kh and channel group cg (the order of the
// weight plates in a PE). With every plate goes the 32-bit condition word of the
// PE loop: FIRST (clear accumulators), LAST (emit the block) and SET_END (last plate
// of the current weight set). Computing these tests once here, instead of in every
// PE, follows the described optimization; placing it in front of PE0 is this
// design's choice.
//
// Interface: plates in (valid/ready); {cond, plate} out (valid/ready) with one
// register stage after the bank read, one plate per cycle. TILE_DEPTH is the
// number of plate rows per buffer (lanes per bank); its size is this design's.
module mem_read_data
  import cnn_pkg::*;
#(
  parameter int VEC        = VEC_SIZE,
  parameter int WV         = W_VEC,
  parameter int TILE_DEPTH = 2048
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        kstart,
  input  conv_cfg_t                   cfg,
  output logic                        idle,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [WV*VEC*DW-1:0]        in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [COND_W+WV*VEC*DW-1:0] out_data
);
  localparam int LW = VEC * DW;
  localparam int AW = $clog2(TILE_DEPTH);

  conv_cfg_t   c;
  logic [15:0] tile_ih, tile_if, npx;
  logic [31:0] tile_plates, tiles_total, tiles_per_set;

  // ---------------- buffer state ----------------
  logic [1:0]  full;
  logic        lb, cb;                 // load / compute buffer index
  logic        loading, computing;
  logic [31:0] ld_tiles, cp_tiles;     // tiles completed by each side
  logic [AW-1:0] ld_addr;

  assign idle = !loading && !computing && !out_valid;

  // ---------------- load side ----------------
  assign in_ready = loading && !full[lb];
  wire   ld_fire  = in_valid && in_ready;
  wire   ld_last  = (32'(ld_addr) == tile_plates - 1);

  // ---------------- compute side ----------------
  logic [15:0] of_i, oy_i, xg_i, kf_i, kh_i, cg_i;
  logic [31:0] set_tile;               // tile index inside the current set
  logic        s1_valid;
  logic [COND_W-1:0] s1_cond;
  logic [$clog2(WV)-1:0] s1_rot;
  logic [LW-1:0] s1_lane [WV];

  wire   adv      = !s1_valid || out_ready;
  wire   issue    = computing && full[cb];
  wire   cp_fire  = issue && adv;

  logic w_cg, w_kh, w_kf, w_xg, w_oy, w_of, w_set;
  always_comb begin
    w_cg = (cg_i == c.in_cg - 1'b1);
    w_kh = (kh_i == 16'(c.kh) - 1'b1);
    w_kf = (kf_i == 16'(c.kf) - 1'b1);
    w_xg = (xg_i == c.tile_owg - 1'b1);
    w_oy = (oy_i == c.tile_oh - 1'b1);
    w_of = (of_i == c.tile_of - 1'b1);
    w_set = (set_tile == tiles_per_set - 1);
  end
  wire block_last = w_cg && w_kh && w_kf;
  wire tile_last  = block_last && w_xg && w_oy && w_of;

  logic [COND_W-1:0] cond;
  always_comb begin
    cond = '0;
    cond[COND_FIRST]   = (cg_i == '0) && (kh_i == '0) && (kf_i == '0);
    cond[COND_LAST]    = block_last;
    cond[COND_SET_END] = tile_last && w_set;
  end

  // Plate row of the tile and the first column of the plate to read.
  logic [31:0] row_idx, x0;
  always_comb begin
    row_idx = (32'(cg_i) * 32'(tile_if) + 32'(of_i) + 32'(kf_i)) * 32'(tile_ih)
              + 32'(oy_i) + 32'(kh_i);
    x0 = 32'(xg_i) * INV_VEC;
  end

  // ---------------- banks ----------------
  for (genvar b = 0; b < WV; b++) begin : g_bank
    logic [LW-1:0] mem [2*TILE_DEPTH];
    logic [31:0]   rd_a;
    always_comb begin
      rd_a = row_idx * 32'(npx) + (x0 / WV) + ((32'(b) < (x0 % WV)) ? 32'd1 : 32'd0);
    end
    always_ff @(posedge clk) begin
      if (ld_fire) mem[(lb ? TILE_DEPTH : 0) + 32'(ld_addr)] <= in_data[b*LW +: LW];
      if (cp_fire) s1_lane[b] <= mem[(cb ? TILE_DEPTH : 0) + 32'(rd_a[AW-1:0])];
    end
  end

  // Output: lane i of the plate is held by bank (x0 + i) mod WV.
  always_comb begin
    out_data = '0;
    out_data[WV*LW +: COND_W] = s1_cond;
    for (int i = 0; i < WV; i++)
      out_data[i*LW +: LW] = s1_lane[(i + int'(s1_rot)) % WV];
  end
  assign out_valid = s1_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c <= '0;
      {tile_ih, tile_if, npx} <= '0;
      {tile_plates, tiles_total, tiles_per_set} <= '0;
      full <= '0; lb <= 1'b0; cb <= 1'b0;
      loading <= 1'b0; computing <= 1'b0;
      ld_tiles <= '0; cp_tiles <= '0; ld_addr <= '0;
      {of_i, oy_i, xg_i, kf_i, kh_i, cg_i} <= '0;
      set_tile <= '0;
      s1_valid <= 1'b0; s1_cond <= '0; s1_rot <= '0;
    end else begin
      if (kstart) begin
        c         <= cfg;
        tile_ih   <= cfg.tile_oh + 16'(cfg.kh) - 1'b1;
        tile_if   <= cfg.tile_of + 16'(cfg.kf) - 1'b1;
        npx       <= 16'((cfg.tile_owg * INV_VEC + KW - 1 + WV - 1) / WV);
        tile_plates <= 32'(cfg.in_cg) * (32'(cfg.tile_of) + 32'(cfg.kf) - 1)
                     * (32'(cfg.tile_oh) + 32'(cfg.kh) - 1)
                     * 32'((cfg.tile_owg * INV_VEC + KW - 1 + WV - 1) / WV);
        tiles_per_set <= 32'(cfg.n_tw) * 32'(cfg.n_th) * 32'(cfg.n_tf);
        tiles_total   <= 32'(cfg.n_tw) * 32'(cfg.n_th) * 32'(cfg.n_tf) * 32'(cfg.m_sets);
        loading   <= 1'b1;
        computing <= 1'b1;
        ld_tiles  <= '0; cp_tiles <= '0; ld_addr <= '0;
        {of_i, oy_i, xg_i, kf_i, kh_i, cg_i} <= '0;
        set_tile  <= '0;
      end else begin
        // load side
        if (ld_fire) begin
          if (ld_last) begin
            ld_addr <= '0;
            lb      <= ~lb;
            ld_tiles <= ld_tiles + 1;
            if (ld_tiles + 1 == tiles_total) loading <= 1'b0;
          end else begin
            ld_addr <= ld_addr + 1'b1;
          end
        end
        // compute side loop counters
        if (cp_fire) begin
          cg_i <= w_cg ? '0 : cg_i + 1'b1;
          if (w_cg) begin
            kh_i <= w_kh ? '0 : kh_i + 1'b1;
            if (w_kh) begin
              kf_i <= w_kf ? '0 : kf_i + 1'b1;
              if (w_kf) begin
                xg_i <= w_xg ? '0 : xg_i + 1'b1;
                if (w_xg) begin
                  oy_i <= w_oy ? '0 : oy_i + 1'b1;
                  if (w_oy) begin
                    of_i <= w_of ? '0 : of_i + 1'b1;
                    if (w_of) begin
                      cb <= ~cb;
                      set_tile <= w_set ? '0 : set_tile + 1;
                      cp_tiles <= cp_tiles + 1;
                      if (cp_tiles + 1 == tiles_total) computing <= 1'b0;
                    end
                  end
                end
              end
            end
          end
        end
        // buffer hand-over: a loaded buffer becomes full, a streamed one empty
        for (int i = 0; i < 2; i++) begin
          if (ld_fire && ld_last && lb == 1'(i)) full[i] <= 1'b1;
          if (cp_fire && tile_last && cb == 1'(i)) full[i] <= 1'b0;
        end
      end
      // output register stage
      if (adv) begin
        s1_valid <= cp_fire;
        if (cp_fire) begin
          s1_cond <= cond;
          s1_rot  <= $clog2(WV)'(x0 % WV);
        end
      end
    end
  end

  // A tile must fit into one buffer.
  assert property (@(posedge clk) disable iff (!rst_n) ld_fire |-> 32'(ld_addr) < TILE_DEPTH);
endmodule
