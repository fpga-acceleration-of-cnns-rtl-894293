// tb_mem_write: output writer. Two layers are written into a memory model: a plain
// layer (shift, ReLU, 8-bit saturation) and then a sum layer that adds a second set
// of results onto the first, as for a convolution split into two sub-layers. The
// layer has 3 output channels on 4 PEs (so one channel group of the first set and both
// groups of the second set are not written) and 24 computed columns of which 20 are
// valid. The whole memory image is compared with one computed here; saturation and
// ReLU clamping must each have happened.
module tb_mem_write;
  import cnn_pkg::*;
  localparam int VEC = 2, NPE = 4, LW = VEC * DW, DEPTH = 512;
  logic clk = 0, rst_n = 0;
  logic kstart, idle;
  conv_cfg_t cfg;
  logic in_valid, in_ready;
  logic [NPE*INV_VEC*OUTW-1:0] in_data;
  logic wr_valid, wr_ready, rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready;
  logic [31:0] wr_addr, rd_addr;
  logic [INV_VEC*LW-1:0] wr_data, rd_rsp_data;
  logic [INV_VEC-1:0] wr_mask;
  int checks = 0, failures = 0, sats = 0, clamps = 0;
  logic [LW-1:0] img [DEPTH];

  mem_write #(.VEC(VEC), .NPE(NPE)) dut (.*);
  ddr_model #(.LW(LW), .N(INV_VEC), .DEPTH(DEPTH), .MAXLAT(4), .STALL(1)) u_ddr (
    .clk, .rd_req_valid, .rd_req_ready, .rd_addr, .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_mask);

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_layer(input bit sum);
    cfg.sum = sum;
    @(negedge clk); kstart = 1;
    @(negedge clk); kstart = 0;
    for (int s = 0; s < 2; s++)
      for (int th = 0; th < 2; th++)
        for (int tw = 0; tw < 2; tw++)
          for (int xg = 0; xg < 2; xg++) begin
            for (int p = 0; p < NPE; p++)
              for (int i = 0; i < INV_VEC; i++) begin
                longint val, q;
                int m, x, y, a;
                val = longint'($urandom_range(0, 3000)) - 1500;
                in_data[(p*INV_VEC+i)*OUTW +: OUTW] = OUTW'(val);
                m = s * NPE + p;
                x = (tw * 2 + xg) * 6 + i;
                y = th;
                if (m < 4 && x < 20) begin
                  a = 27 + ((m / VEC) * 4 + y) * 26 + x;
                  q = val >>> 3;
                  if (sum) q += longint'($signed(img[a][(m%VEC)*8 +: 8]));
                  if (q < 0) begin q = 0; clamps++; end
                  if (q > 127) begin q = 127; sats++; end
                  img[a][(m%VEC)*8 +: 8] = 8'(q);
                end
              end
            @(negedge clk);
            in_valid = 1;
            @(posedge clk);
            while (!in_ready) @(posedge clk);
            @(negedge clk);
            in_valid = 0;
          end
    wait (idle);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    kstart = 0; in_valid = 0; in_data = '0;
    for (int a = 0; a < DEPTH; a++) begin u_ddr.mem[a] = '0; img[a] = '0; end
    cfg = '0;
    cfg.out_base = 32'd27; cfg.out_w = 16'd26; cfg.out_h = 16'd4; cfg.out_f = 16'd1;
    cfg.out_wv = 16'd20; cfg.out_ch = 16'd3; cfg.m_sets = 16'd2;
    cfg.tile_owg = 16'd2; cfg.tile_oh = 16'd1; cfg.tile_of = 16'd1;
    cfg.n_tw = 16'd2; cfg.n_th = 16'd2; cfg.n_tf = 16'd1;
    cfg.shift = 6'd3; cfg.relu = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_layer(1'b0);
    run_layer(1'b1);
    for (int a = 0; a < DEPTH; a++) begin
      checks++;
      if (u_ddr.mem[a] != img[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h exp %h", a, u_ddr.mem[a], img[a]);
      end
    end
    checks++;
    if (sats == 0 || clamps == 0) begin failures++; $display("saturation/ReLU not exercised"); end
    checks++;
    if (u_ddr.reads == 0) begin failures++; $display("sum layer read nothing"); end
    $display("saturated %0d clamped %0d sum reads %0d writes %0d", sats, clamps, u_ddr.reads, u_ddr.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
