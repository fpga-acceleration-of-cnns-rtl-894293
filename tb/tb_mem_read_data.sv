// tb_mem_read_data: the double tile buffer. The testbench delivers the input tiles of
// a 3-D layer (2x2x2 tiles, two output-channel sets) plate by plate with random gaps,
// exactly as the DDR reader would, and checks every plate streamed out: its eight
// lanes must be the feature columns x0..x0+7 of the right channel group, frame and row
// for the (set, tile, frame, row, column group, kf, kh, cg) walk, and its condition
// word must flag the first and last plate of each output block and the end of each
// set. Also checks that loading and streaming overlapped (both buffers in use).
module tb_mem_read_data;
  import cnn_pkg::*;
  localparam int VEC = 2, WV = W_VEC, LW = VEC * DW;
  logic clk = 0, rst_n = 0;
  logic kstart, idle;
  conv_cfg_t cfg;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [WV*LW-1:0] in_data;
  logic [COND_W+WV*LW-1:0] out_data;
  int checks = 0, failures = 0, nout = 0, overlap = 0;
  logic [COND_W+WV*LW-1:0] exp_q [$];

  mem_read_data #(.VEC(VEC), .WV(WV), .TILE_DEPTH(64)) dut (.*);

  localparam int TOW = 2, TOH = 2, TOF = 2, NCG = 2, KH = 3, KF = 2, NT = 2, NS = 2;
  localparam int NPX = (TOW * 6 + 2 + 7) / 8, TIH = TOH + KH - 1, TIF = TOF + KF - 1;

  function automatic logic [LW-1:0] feat(int cg, int f, int y, int x);
    return LW'(cg * 7919 + f * 1301 + y * 97 + x * 5 + 3);
  endfunction

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n) begin
    if (dut.ld_fire && dut.cp_fire) overlap++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data != exp_q.pop_front()) begin
        failures++;
        if (failures < 10) $display("plate %0d mismatch", nout);
      end
      nout++;
    end
  end

  // input plates
  initial begin
    in_valid = 0; in_data = '0;
    wait (rst_n);
    @(negedge clk); @(negedge clk);
    for (int s = 0; s < NS; s++)
      for (int tf = 0; tf < NT; tf++)
        for (int th = 0; th < NT; th++)
          for (int tw = 0; tw < NT; tw++)
            for (int cg = 0; cg < NCG; cg++)
              for (int f = 0; f < TIF; f++)
                for (int y = 0; y < TIH; y++)
                  for (int xp = 0; xp < NPX; xp++) begin
                    @(negedge clk);
                    while ($urandom_range(0, 2) == 0) @(negedge clk);
                    for (int i = 0; i < WV; i++)
                      in_data[i*LW +: LW] = feat(cg, tf*TOF + f, th*TOH + y, tw*TOW*6 + xp*8 + i);
                    in_valid = 1;
                    @(posedge clk);
                    while (!in_ready) @(posedge clk);
                    @(negedge clk);
                    in_valid = 0;
                  end
  end

  initial begin
    kstart = 0;
    cfg = '0;
    cfg.in_cg = 16'(NCG); cfg.kh = 4'(KH); cfg.kf = 4'(KF);
    cfg.tile_owg = 16'(TOW); cfg.tile_oh = 16'(TOH); cfg.tile_of = 16'(TOF);
    cfg.n_tw = 16'(NT); cfg.n_th = 16'(NT); cfg.n_tf = 16'(NT); cfg.m_sets = 16'(NS);
    for (int s = 0; s < NS; s++)
      for (int tf = 0; tf < NT; tf++)
        for (int th = 0; th < NT; th++)
          for (int tw = 0; tw < NT; tw++)
            for (int of = 0; of < TOF; of++)
              for (int oy = 0; oy < TOH; oy++)
                for (int xg = 0; xg < TOW; xg++)
                  for (int kf = 0; kf < KF; kf++)
                    for (int kh = 0; kh < KH; kh++)
                      for (int cg = 0; cg < NCG; cg++) begin
                        logic [COND_W+WV*LW-1:0] e;
                        logic lastp;
                        e = '0;
                        for (int i = 0; i < WV; i++)
                          e[i*LW +: LW] = feat(cg, tf*TOF + of + kf, th*TOH + oy + kh, (tw*TOW + xg)*6 + i);
                        lastp = (kf == KF-1) && (kh == KH-1) && (cg == NCG-1);
                        e[WV*LW + COND_FIRST] = (kf == 0) && (kh == 0) && (cg == 0);
                        e[WV*LW + COND_LAST] = lastp;
                        e[WV*LW + COND_SET_END] = lastp && (of == TOF-1) && (oy == TOH-1) &&
                          (xg == TOW-1) && (tf == NT-1) && (th == NT-1) && (tw == NT-1);
                        exp_q.push_back(e);
                      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); kstart = 1;
    @(negedge clk); kstart = 0;
    wait (idle);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d plates missing", exp_q.size()); end
    checks++;
    if (overlap == 0) begin failures++; $display("load and compute never overlapped"); end
    $display("plates %0d, load/compute overlap cycles %0d", nout, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
