// tb_mem_read_weight: weight streaming for a layer with 6 output channels on 4 PEs
// (two sets; PEs 2 and 3 have no channel in the second set). Checks the order of the
// tokens (set, PE, plate), their target index and LAST flag, the plate data read from
// the memory model (random latency and stalls), that the missing channels get zero
// plates without memory reads, and that the kernel returns to idle.
module tb_mem_read_weight;
  import cnn_pkg::*;
  localparam int VEC = 2, NPE = 4, PW = W_VEC * VEC * XW;
  logic clk = 0, rst_n = 0;
  logic kstart, idle;
  conv_cfg_t cfg;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready, out_valid, out_ready;
  logic [31:0] rd_addr;
  logic [PW-1:0] rd_rsp_data;
  logic [9+PW-1:0] out_data;
  int checks = 0, failures = 0, nout = 0, zeros = 0;
  logic [9+PW-1:0] exp_q [$];

  mem_read_weight #(.VEC(VEC), .NPE(NPE)) dut (.*);
  ddr_model #(.LW(PW), .N(1), .DEPTH(256), .MAXLAT(5), .STALL(1)) u_ddr (
    .clk, .rd_req_valid, .rd_req_ready, .rd_addr, .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_mask('0));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_data != exp_q.pop_front()) begin
      failures++;
      if (failures < 10) $display("token %0d mismatch: tgt %0d last %0d", nout, out_data[PW+1 +: 8], out_data[PW]);
    end
    if (out_data[PW-1:0] == '0) zeros++;
    nout++;
  end

  initial begin
    int nwp;
    kstart = 0;
    cfg = '0;
    for (int a = 0; a < 256; a++) u_ddr.mem[a] = {PW/32{32'(a * 2654435761 + 1)}};
    cfg.kh = 4'd3; cfg.kf = 4'd1; cfg.in_cg = 16'd2; cfg.out_ch = 16'd6; cfg.m_sets = 16'd2;
    cfg.w_base = 32'd100;
    nwp = 6;
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < NPE; p++)
        for (int k = 0; k < nwp; k++) begin
          int m;
          m = s * NPE + p;
          exp_q.push_back({8'(p), (k == nwp - 1),
            (m < 6) ? {PW/32{32'((100 + m * nwp + k) * 2654435761 + 1)}} : PW'(0)});
        end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); kstart = 1;
    @(negedge clk); kstart = 0;
    wait (idle);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d tokens missing", exp_q.size()); end
    checks++;
    if (u_ddr.reads != 36 || zeros != 12) begin
      failures++; $display("reads %0d zero plates %0d", u_ddr.reads, zeros);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
