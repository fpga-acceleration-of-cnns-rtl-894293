// tb_cnn_accel_full: the accelerator at its default size (VEC 8, 4 x 8 PEs, full
// weight, tile and FC buffers) with behavioural memories. One 2-D 3x3 layer of
// 384 -> 40 channels on a 6x2 output (144 weight plates per filter, two filter sets,
// the second mostly empty, so both weight buffers of every PE are used) and one
// FC layer of 64 -> 4 run concurrently; every output lane and FC byte is compared
// with a direct computation on the testbench's copy of memory.
module tb_cnn_accel_full;
  import cnn_pkg::*;
  localparam int VEC = VEC_SIZE, NPE = PE_ROWS * PE_COLS;
  localparam int LW = VEC * DW, PWX = W_VEC * VEC * XW, PW8 = W_VEC * VEC * DW;
  localparam int FDEPTH = 2048, WDEP = 6144, CDEPTH = 16;

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

  cnn_accel_top dut (.*);

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
    repeat (200000) @(posedge clk);
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
    if (fw_valid && fw_ready) u_cm.mem[fw_addr / (PW8 / 8)][(fw_addr % (PW8 / 8)) * 8 +: 8] <= fw_data;
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
      cref[a / (PW8 / 8)][(a % (PW8 / 8)) * 8 +: 8] = 8'(q);
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

  // ---------------- test ----------------
  conv_cfg_t L [1];
  fc_cfg_t F [1];
  initial begin
    cv_cfg_wr_en = 0; cv_start = 0; cv_cfg_wr_addr = '0; cv_num_layers = '0; cv_cfg_wr_data = '0;
    fc_cfg_wr_en = 0; fc_start = 0; fc_cfg_wr_addr = '0; fc_num_layers = '0; fc_cfg_wr_data = '0;
    for (int a = 0; a < FDEPTH; a++) fref[a] = '0;
    for (int a = 0; a < CDEPTH; a++) cref[a] = '0;
    for (int a = 0; a < WDEP; a++) u_wm.mem[a] = '0;

    // input: 384 channels (48 groups), 6x2 interior in an 8x4 padded frame
    for (int g = 0; g < 48; g++)
      for (int y = 1; y <= 2; y++)
        for (int x = 1; x <= 6; x++) fref[(g * 4 + y) * 8 + x] = LW'({$urandom, $urandom});
    L[0] = mk(0, 8, 4, 1, 48, 3, 1, 0, 40, 1, 2, 1, 1, 1, 1, 1600, 6, 2, 1, 6, 22, 1, 0);
    put_weights(0, 0, 40, 384, 1, 3);
    for (int a = 0; a < FDEPTH; a++) u_fm.mem[a] = fref[a];
    ref_conv(0, L[0], 384);

    // FC: 64 inputs -> 4 outputs at plate 10
    cref[0] = PW8'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                    $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    for (int a = 1; a < 5; a++)
      for (int j = 0; j < W_VEC * VEC; j++) cref[a][j*8 +: 8] = 8'($urandom_range(0, 30) - 15);
    F[0] = '0; F[0].in_base = 0; F[0].in_plates = 1; F[0].w_base = 1; F[0].out_ch = 4;
    F[0].out_base = 10 * (PW8 / 8); F[0].shift = 6; F[0].relu = 0;
    for (int a = 0; a < CDEPTH; a++) u_cm.mem[a] = cref[a];
    ref_fc(F[0], 0);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1; i++) begin
      @(negedge clk); cv_cfg_wr_en = 1; cv_cfg_wr_addr = 5'(i); cv_cfg_wr_data = L[i];
    end
    @(negedge clk); cv_cfg_wr_en = 0;
    for (int i = 0; i < 1; i++) begin
      @(negedge clk); fc_cfg_wr_en = 1; fc_cfg_wr_addr = 5'(i); fc_cfg_wr_data = F[i];
    end
    @(negedge clk); fc_cfg_wr_en = 0;
    cv_start = 1; cv_num_layers = 6'd1; fc_start = 1; fc_num_layers = 6'd1;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
