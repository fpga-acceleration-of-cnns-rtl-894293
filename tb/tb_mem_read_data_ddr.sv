// tb_mem_read_data_ddr: the DDR side of the data buffer against a memory model with
// random latency and stalls. For a 3-D layer split into 2x2x2 tiles and two
// output-channel sets, the testbench computes every plate the tile walk must read
// (set, tile, channel group, frame, row, plate) and checks the plates delivered,
// their count and that the kernel returns to idle.
module tb_mem_read_data_ddr;
  import cnn_pkg::*;
  localparam int VEC = 2, WV = W_VEC, LW = VEC * DW;
  logic clk = 0, rst_n = 0;
  logic kstart, idle;
  conv_cfg_t cfg;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready, out_valid, out_ready;
  logic [31:0] rd_addr;
  logic [WV*LW-1:0] rd_rsp_data, out_data;
  int checks = 0, failures = 0, nout = 0;
  logic [WV*LW-1:0] exp_q [$];

  mem_read_data_ddr #(.VEC(VEC), .WV(WV)) dut (.*);
  ddr_model #(.LW(LW), .N(WV), .DEPTH(4096), .MAXLAT(6), .STALL(1)) u_ddr (
    .clk, .rd_req_valid, .rd_req_ready, .rd_addr, .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_mask('0));

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_data != exp_q.pop_front()) begin
      failures++;
      if (failures < 10) $display("plate %0d mismatch", nout);
    end
    nout++;
  end

  initial begin
    int iw, ih, ifr, tow, toh, tof, npx, tih, tif, ntot;
    kstart = 0;
    cfg = '0;
    for (int a = 0; a < 4096; a++) u_ddr.mem[a] = LW'(a * 37 + 11);
    iw = 28; ih = 7; ifr = 5;
    tow = 2; toh = 2; tof = 2;
    cfg.in_base = 32'd9; cfg.in_w = 16'(iw); cfg.in_h = 16'(ih); cfg.in_f = 16'(ifr);
    cfg.in_cg = 16'd2; cfg.kh = 4'd3; cfg.kf = 4'd2;
    cfg.tile_owg = 16'(tow); cfg.tile_oh = 16'(toh); cfg.tile_of = 16'(tof);
    cfg.n_tw = 16'd2; cfg.n_th = 16'd2; cfg.n_tf = 16'd2; cfg.m_sets = 16'd2;
    npx = (tow * 6 + 2 + 7) / 8; tih = toh + 2; tif = tof + 1;
    for (int s = 0; s < 2; s++)
      for (int tf = 0; tf < 2; tf++)
        for (int th = 0; th < 2; th++)
          for (int tw = 0; tw < 2; tw++)
            for (int cg = 0; cg < 2; cg++)
              for (int f = 0; f < tif; f++)
                for (int y = 0; y < tih; y++)
                  for (int xp = 0; xp < npx; xp++) begin
                    int a;
                    logic [WV*LW-1:0] p;
                    a = 9 + ((cg * ifr + tf * tof + f) * ih + th * toh + y) * iw + tw * tow * 6 + xp * 8;
                    for (int i = 0; i < WV; i++) p[i*LW +: LW] = LW'((a + i) * 37 + 11);
                    exp_q.push_back(p);
                  end
    ntot = exp_q.size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); kstart = 1;
    @(negedge clk); kstart = 0;
    checks++;
    if (idle) begin failures++; $display("idle right after start"); end
    wait (idle);
    repeat (10) @(posedge clk);
    checks++;
    if (nout != ntot || exp_q.size() != 0) begin failures++; $display("got %0d of %0d plates", nout, ntot); end
    $display("plates %0d, memory stalls %0d", nout, u_ddr.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
