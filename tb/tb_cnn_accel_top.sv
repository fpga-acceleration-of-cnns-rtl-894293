// tb_cnn_accel_top: end-to-end run of the accelerator at reduced size (VEC 2, 2 x 2
// PEs) with behavioural memories that stall and have random latency.
//
// The convolution processor runs four layers from its layer table:
//   L0  2-D 3x3, 4 -> 6 channels, 10x4 output written with a one-pixel zero border
//       (6 channels on 4 PEs: two sets, the second half empty), ReLU;
//   L1  2-D 3x3 reading L0's output directly, 6 -> 4 channels;
//   L2  3-D 3x3x3, 2 -> 4 channels, 4 frames -> 2 frames (two frame tiles);
//   L3  the same on two more input channels as a sum layer onto L2's output, i.e. a
//       4-channel 3-D convolution split into two sub-layers, ReLU.
// At the same time the FC processor runs two layers (32 -> 16 -> 5), the second
// reading the first's output. Expected results come from direct convolution and dot
// products on the testbench's own copy of memory, with the weights transformed to
// the Winograd domain the way the host does it. Every mechanism is counted and must
// occur: tile load/compute overlap, weight load/compute overlap, stalls at the array
// input, zero filters, masked columns, skipped channel groups, sum-layer reads,
// saturation, ReLU clamping and FC/convolution concurrency.
module tb_cnn_accel_top;
  import cnn_pkg::*;
  localparam int VEC = 2, ROWS = 2, COLS = 2, NPE = ROWS * COLS;
  localparam int LW = VEC * DW, PWX = W_VEC * VEC * XW, PW8 = W_VEC * VEC * DW;
  localparam int FDEPTH = 2048, WDEP = 256, CDEPTH = 64;

  logic clk = 0, rst_n = 0;
  logic cv_cfg_wr_en, cv_start, cv_busy, cv_done, fc_cfg_wr_en, fc_start, fc_busy, fc_done;
  logic [4:0] cv_cfg_wr_addr, fc_cfg_wr_addr, cv_layer, fc_layer;
  logic [5:0] cv_num_layers, fc_num_layers;
  conv_cfg_t cv_cfg_wr_data;
  fc_cfg_t fc_cfg_wr_data;
  logic dr_req_valid, dr_req_ready, dr_rsp_valid, dr_rsp_ready;
  logic [31:0] dr_addr;
  logic [PW8-1:0] dr_rsp_data;
  logic wr_req_valid, wr_req_ready, wr_rsp_valid, wr_rsp_ready;
  logic [31:0] wr_addr;
  logic [PWX-1:0] wr_rsp_data;
  logic ow_valid, ow_ready;
  logic [31:0] ow_addr;
  logic [INV_VEC*LW-1:0] ow_data;
  logic [INV_VEC-1:0] ow_mask;
  logic os_req_valid, os_req_ready, os_rsp_valid, os_rsp_ready;
  logic [31:0] os_addr;
  logic [INV_VEC*LW-1:0] os_rsp_data;
  logic fr_req_valid, fr_req_ready, fr_rsp_valid, fr_rsp_ready;
  logic [31:0] fr_addr;
  logic [PW8-1:0] fr_rsp_data;
  logic fw_valid, fw_ready;
  logic [31:0] fw_addr;
  logic [7:0] fw_data;

  int checks = 0, failures = 0;

  cnn_accel_top #(.VEC(VEC), .ROWS(ROWS), .COLS(COLS), .WDEPTH(16), .TILE_DEPTH(128),
                  .FC_DEPTH(16), .DEEP(8)) dut (.*);

  // feature memory: reads through the model, output writes and sum reads below
  ddr_model #(.LW(LW), .N(W_VEC), .DEPTH(FDEPTH), .MAXLAT(8), .STALL(1)) u_fm (
    .clk, .rd_req_valid(dr_req_valid), .rd_req_ready(dr_req_ready), .rd_addr(dr_addr),
    .rd_rsp_valid(dr_rsp_valid), .rd_rsp_ready(dr_rsp_ready), .rd_rsp_data(dr_rsp_data),
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_mask('0));
  ddr_model #(.LW(PWX), .N(1), .DEPTH(WDEP), .MAXLAT(8), .STALL(1)) u_wm (
    .clk, .rd_req_valid(wr_req_valid), .rd_req_ready(wr_req_ready), .rd_addr(wr_addr),
    .rd_rsp_valid(wr_rsp_valid), .rd_rsp_ready(wr_rsp_ready), .rd_rsp_data(wr_rsp_data),
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_mask('0));
  ddr_model #(.LW(PW8), .N(1), .DEPTH(CDEPTH), .MAXLAT(8), .STALL(1)) u_cm (
    .clk, .rd_req_valid(fr_req_valid), .rd_req_ready(fr_req_ready), .rd_addr(fr_addr),
    .rd_rsp_valid(fr_rsp_valid), .rd_rsp_ready(fr_rsp_ready), .rd_rsp_data(fr_rsp_data),
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_mask('0));

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // output writes, sum-layer reads and FC byte writes go straight to the memories
  logic [INV_VEC*LW-1:0] os_q [$];
  always @(posedge clk) begin
    ow_ready <= ($urandom_range(0, 3) != 0);
    fw_ready <= ($urandom_range(0, 3) != 0);
    os_req_ready <= ($urandom_range(0, 1) != 0);
    if (ow_valid && ow_ready)
      for (int i = 0; i < INV_VEC; i++)
        if (ow_mask[i]) u_fm.mem[ow_addr + 32'(i)] <= ow_data[i*LW +: LW];
    if (os_req_valid && os_req_ready) begin
      logic [INV_VEC*LW-1:0] d;
      for (int i = 0; i < INV_VEC; i++) d[i*LW +: LW] = u_fm.mem[os_addr + 32'(i)];
      os_q.push_back(d);
    end
    if (os_rsp_valid && os_rsp_ready) void'(os_q.pop_front());
    if (fw_valid && fw_ready) u_cm.mem[fw_addr / 16][(fw_addr % 16) * 8 +: 8] <= fw_data;
  end
  assign os_rsp_valid = (os_q.size() > 0);
  assign os_rsp_data  = (os_q.size() > 0) ? os_q[0] : '0;

  // ---------------- reference model ----------------
  logic [LW-1:0]  fref [FDEPTH];
  logic [PW8-1:0] cref [CDEPTH];
  int sats = 0, clamps = 0;

  function automatic int wt(int l, int m, int c, int kf, int kh, int kw);
    return int'((l * 7 + m * 13 + c * 5 + kf * 11 + kh * 3 + kw * 17 + (m * c) % 7) % 15) - 7;
  endfunction

  function automatic logic [7:0] fbyte(int base, int w, int h, int f, int c, int z, int y, int x);
    return fref[base + (((c / VEC) * f + z) * h + y) * w + x][(c % VEC) * 8 +: 8];
  endfunction

  // host side: weight transform into the Winograd domain and weight placement
  task automatic put_weights(int l, int wbase, int m_n, int c_n, int kf_n, int kh_n);
    int cg_n, nwp;
    cg_n = c_n / VEC;
    nwp = kf_n * kh_n * cg_n;
    for (int m = 0; m < m_n; m++)
      for (int kf = 0; kf < kf_n; kf++)
        for (int kh = 0; kh < kh_n; kh++)
          for (int cg = 0; cg < cg_n; cg++) begin
            logic [PWX-1:0] p;
            for (int ln = 0; ln < W_VEC; ln++)
              for (int v = 0; v < VEC; v++) begin
                int s;
                s = 0;
                for (int k = 0; k < 3; k++) s += G_S[ln][k] * wt(l, m, cg * VEC + v, kf, kh, k);
                p[(ln*VEC+v)*XW +: XW] = XW'(s);
              end
            u_wm.mem[wbase + m * nwp + (kf * kh_n + kh) * cg_n + cg] = p;
          end
  endtask

  // direct convolution of one layer on the reference memory
  task automatic ref_conv(int l, conv_cfg_t c, int c_n);
    int ow, oh, of;
    ow = 32'(c.out_wv); oh = 32'(c.tile_oh) * 32'(c.n_th); of = 32'(c.tile_of) * 32'(c.n_tf);
    for (int m = 0; m < 32'(c.out_ch); m++)
      for (int z = 0; z < of; z++)
        for (int y = 0; y < oh; y++)
          for (int x = 0; x < ow; x++) begin
            longint acc, q;
            int a;
            acc = 0;
            for (int ci = 0; ci < c_n; ci++)
              for (int kf = 0; kf < 32'(c.kf); kf++)
                for (int kh = 0; kh < 32'(c.kh); kh++)
                  for (int kw = 0; kw < 3; kw++)
                    acc += longint'($signed(fbyte(c.in_base, c.in_w, c.in_h, c.in_f, ci, z + kf, y + kh, x + kw)))
                           * wt(l, m, ci, kf, kh, kw);
            q = (acc * WINO_SCALE) >>> c.shift;
            a = c.out_base + (((m / VEC) * c.out_f + z) * c.out_h + y) * c.out_w + x;
            if (c.sum) q += longint'($signed(fref[a][(m % VEC) * 8 +: 8]));
            if (c.relu && q < 0) begin q = 0; clamps++; end
            if (q > 127) begin q = 127; sats++; end
            if (q < -128) begin q = -128; sats++; end
            fref[a][(m % VEC) * 8 +: 8] = 8'(q);
          end
  endtask

  task automatic ref_fc(fc_cfg_t c, int l);
    for (int o = 0; o < 32'(c.out_ch); o++) begin
      longint acc, q;
      int a;
      acc = 0;
      for (int k = 0; k < 32'(c.in_plates); k++)
        for (int j = 0; j < W_VEC * VEC; j++)
          acc += longint'($signed(cref[c.in_base + k][j*8 +: 8])) *
                 longint'($signed(cref[c.w_base + o * c.in_plates + k][j*8 +: 8]));
      q = acc >>> c.shift;
      if (c.relu && q < 0) begin q = 0; clamps++; end
      if (q > 127) begin q = 127; sats++; end
      if (q < -128) begin q = -128; sats++; end
      a = c.out_base + o;
      cref[a / 16][(a % 16) * 8 +: 8] = 8'(q);
    end
  endtask

  function automatic conv_cfg_t mk(int ib, int iw, int ih, int ifr, int icg, int kh, int kf,
      int wb, int m, int towg, int toh, int tof, int ntw, int nth, int ntf,
      int ob, int ow, int oh, int ofr, int owv, int sh, bit relu, bit sum);
    conv_cfg_t c;
    c = '0;
    c.in_base = 32'(ib); c.in_w = 16'(iw); c.in_h = 16'(ih); c.in_f = 16'(ifr); c.in_cg = 16'(icg);
    c.kh = 4'(kh); c.kf = 4'(kf); c.w_base = 32'(wb); c.out_ch = 16'(m);
    c.m_sets = 16'((m + NPE - 1) / NPE);
    c.tile_owg = 16'(towg); c.tile_oh = 16'(toh); c.tile_of = 16'(tof);
    c.n_tw = 16'(ntw); c.n_th = 16'(nth); c.n_tf = 16'(ntf);
    c.out_base = 32'(ob); c.out_w = 16'(ow); c.out_h = 16'(oh); c.out_f = 16'(ofr); c.out_wv = 16'(owv);
    c.shift = 6'(sh); c.relu = relu; c.sum = sum;
    return c;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_tile_overlap = 0, n_wload_overlap = 0, n_in_stall = 0, n_zero_filter = 0;
  int n_masked = 0, n_grp_skip = 0, n_sum_rd = 0, n_concurrent = 0, n_3d = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mrd.ld_fire && dut.u_mrd.cp_fire) n_tile_overlap++;
    if (dut.u_array.g_col[1].g_row[1].u_pe.w_store && dut.u_array.g_col[0].g_row[0].u_pe.a_fire)
      n_wload_overlap++;
    if (dut.pe_dv && !dut.pe_dr) n_in_stall++;
    if (dut.u_mrw.tq_rr && dut.u_mrw.t_zero) n_zero_filter++;
    if (ow_valid && ow_ready && ow_mask != '1) n_masked++;
    if (dut.u_mw.state == 0 && dut.u_mw.active && iw_valid_q && !dut.u_mw.grp_ok) n_grp_skip++;
    if (os_req_valid && os_req_ready) n_sum_rd++;
    if (cv_busy && fc_busy) n_concurrent++;
    if (dut.u_mrd.cp_fire && dut.u_mrd.c.kf > 1) n_3d++;
  end
  wire iw_valid_q = dut.iw_v;

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  // ---------------- test ----------------
  conv_cfg_t L [4];
  fc_cfg_t F [2];
  initial begin
    cv_cfg_wr_en = 0; cv_start = 0; cv_cfg_wr_addr = '0; cv_num_layers = '0; cv_cfg_wr_data = '0;
    fc_cfg_wr_en = 0; fc_start = 0; fc_cfg_wr_addr = '0; fc_num_layers = '0; fc_cfg_wr_data = '0;
    for (int a = 0; a < FDEPTH; a++) fref[a] = '0;
    for (int a = 0; a < CDEPTH; a++) cref[a] = '0;
    for (int a = 0; a < WDEP; a++) u_wm.mem[a] = '0;

    // L0 input: 4 channels, 10x4 interior in a 14x6 padded frame
    for (int c = 0; c < 4; c++)
      for (int y = 1; y <= 4; y++)
        for (int x = 1; x <= 10; x++) fref[0 + ((c / VEC) * 6 + y) * 14 + x][(c % VEC) * 8 +: 8] = 8'($urandom_range(0, 255));
    // L2 / L3 inputs: 2 channels each, 4 frames of 8x4
    for (int a = 600; a < 728; a++) fref[a] = LW'($urandom);
    for (int a = 1000; a < 1128; a++) fref[a] = LW'($urandom);

    L[0] = mk(0,   14, 6, 1, 2, 3, 1,   0, 6, 1, 2, 1, 2, 2, 1, 215, 14, 6, 1, 10, 14, 1, 0);
    L[1] = mk(200, 14, 6, 1, 3, 3, 1,  64, 4, 1, 2, 1, 2, 2, 1, 500, 12, 4, 1, 10, 15, 0, 0);
    L[2] = mk(600,  8, 4, 4, 1, 3, 3, 128, 4, 1, 2, 1, 1, 1, 2, 800,  6, 2, 2,  6, 15, 0, 0);
    L[3] = mk(1000, 8, 4, 4, 1, 3, 3, 192, 4, 1, 2, 1, 1, 1, 2, 800,  6, 2, 2,  6, 15, 1, 1);
    put_weights(0,   0, 6, 4, 1, 3);
    put_weights(1,  64, 4, 6, 1, 3);
    put_weights(2, 128, 4, 2, 3, 3);
    put_weights(3, 192, 4, 2, 3, 3);
    for (int a = 0; a < FDEPTH; a++) u_fm.mem[a] = fref[a];
    ref_conv(0, L[0], 4);
    ref_conv(1, L[1], 6);
    ref_conv(2, L[2], 2);
    ref_conv(3, L[3], 2);

    // FC: 32 inputs -> 16 outputs (plate 50) -> 5 outputs (plate 55)
    for (int a = 0; a < 2; a++) cref[a] = PW8'({$urandom, $urandom, $urandom, $urandom});
    for (int a = 2; a < 18 * 2 + 2; a++)
      for (int j = 0; j < 16; j++) cref[a][j*8 +: 8] = 8'($urandom_range(0, 30) - 15);
    for (int a = 40; a < 45; a++)
      for (int j = 0; j < 16; j++) cref[a][j*8 +: 8] = 8'($urandom_range(0, 30) - 15);
    F[0] = '0; F[0].in_base = 0;  F[0].in_plates = 2; F[0].w_base = 2;  F[0].out_ch = 16;
    F[0].out_base = 50 * 16; F[0].shift = 6; F[0].relu = 1;
    F[1] = '0; F[1].in_base = 50; F[1].in_plates = 1; F[1].w_base = 40; F[1].out_ch = 5;
    F[1].out_base = 55 * 16; F[1].shift = 3; F[1].relu = 0;
    for (int a = 0; a < CDEPTH; a++) u_cm.mem[a] = cref[a];
    ref_fc(F[0], 0);
    ref_fc(F[1], 1);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); cv_cfg_wr_en = 1; cv_cfg_wr_addr = 5'(i); cv_cfg_wr_data = L[i];
    end
    @(negedge clk); cv_cfg_wr_en = 0;
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); fc_cfg_wr_en = 1; fc_cfg_wr_addr = 5'(i); fc_cfg_wr_data = F[i];
    end
    @(negedge clk); fc_cfg_wr_en = 0;
    cv_start = 1; cv_num_layers = 6'd4; fc_start = 1; fc_num_layers = 6'd2;
    @(negedge clk); cv_start = 0; fc_start = 0;
    fork
      wait (cv_done);
      wait (fc_done);
    join
    repeat (20) @(posedge clk);

    for (int a = 0; a < FDEPTH; a++) begin
      checks++;
      if (u_fm.mem[a] != fref[a]) begin
        failures++;
        if (failures < 10) $display("feature lane %0d: %h exp %h", a, u_fm.mem[a], fref[a]);
      end
    end
    for (int a = 0; a < CDEPTH; a++) begin
      checks++;
      if (u_cm.mem[a] != cref[a]) begin
        failures++;
        if (failures < 10) $display("fc plate %0d: %h exp %h", a, u_cm.mem[a], cref[a]);
      end
    end
    $display("mechanisms:");
    need("tile load/compute overlap", n_tile_overlap);
    need("weight load during compute", n_wload_overlap);
    need("array input stalls", n_in_stall);
    need("zero filters", n_zero_filter);
    need("masked output columns", n_masked);
    need("skipped channel groups", n_grp_skip);
    need("sum-layer reads", n_sum_rd);
    need("saturations", sats);
    need("ReLU clamps", clamps);
    need("FC/conv concurrent cycles", n_concurrent);
    need("3-D plates", n_3d);
    need("memory stalls", int'(u_fm.stalls + u_wm.stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
