// tb_fc_mem_read: FC reader for two layers (3 input plates / 4 outputs, then 2 / 3).
// Checks that the input plates come first tagged LOAD, then the weight plates of each
// output channel in order with LAST on the final plate of each channel, all with the
// data of the memory model (random latency and stalls), and that it returns to idle.
module tb_fc_mem_read;
  import cnn_pkg::*;
  localparam int VEC = 2, PW = W_VEC * VEC * DW;
  logic clk = 0, rst_n = 0;
  logic kstart, idle;
  fc_cfg_t cfg;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready, out_valid, out_ready;
  logic [31:0] rd_addr;
  logic [PW-1:0] rd_rsp_data;
  logic [2+PW-1:0] out_data;
  int checks = 0, failures = 0, nout = 0;
  logic [2+PW-1:0] exp_q [$];

  fc_mem_read #(.VEC(VEC)) dut (.*);
  ddr_model #(.LW(PW), .N(1), .DEPTH(256), .MAXLAT(5), .STALL(1)) u_ddr (
    .clk, .rd_req_valid, .rd_req_ready, .rd_addr, .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_mask('0));

  function automatic logic [PW-1:0] pat(int a);
    return {PW/32{32'(a * 40503 + 7)}};
  endfunction

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
      if (failures < 10) $display("token %0d mismatch", nout);
    end
    nout++;
  end

  task automatic layer(int ib, int np, int wb, int no);
    cfg = '0;
    cfg.in_base = 32'(ib); cfg.in_plates = 16'(np); cfg.w_base = 32'(wb); cfg.out_ch = 16'(no);
    for (int k = 0; k < np; k++) exp_q.push_back({2'b10, pat(ib + k)});
    for (int o = 0; o < no; o++)
      for (int k = 0; k < np; k++) exp_q.push_back({1'b0, (k == np - 1), pat(wb + o * np + k)});
    @(negedge clk); kstart = 1;
    @(negedge clk); kstart = 0;
    wait (idle);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d tokens missing", exp_q.size()); end
  endtask

  initial begin
    kstart = 0; cfg = '0;
    for (int a = 0; a < 256; a++) u_ddr.mem[a] = pat(a);
    repeat (3) @(posedge clk);
    rst_n = 1;
    layer(10, 3, 50, 4);
    layer(120, 2, 200, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
