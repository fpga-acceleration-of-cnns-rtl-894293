// tb_controller: loads four layer configurations, starts the controller and emulates
// kernels that stay busy a random number of cycles after each kstart. Checks that
// the layers are issued in order with their configuration, that no kstart comes while
// a kernel is busy, and that done pulses once after the last layer.
module tb_controller;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_wr_en, start, busy, done, kstart;
  logic [4:0] cfg_wr_addr, layer;
  logic [5:0] num_layers;
  conv_cfg_t cfg_wr_data, cfg;
  logic [2:0] kidle;
  int checks = 0, failures = 0, issued = 0, dones = 0;
  int busy_cnt [3];

  controller #(.cfg_t(conv_cfg_t), .MAX_LAYERS(32), .N_KERNELS(3)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // emulated kernels
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) busy_cnt[k] <= 0;
    end else begin
    for (int k = 0; k < 3; k++) begin
      if (kstart) busy_cnt[k] <= $urandom_range(1, 30);
      else if (busy_cnt[k] > 0) busy_cnt[k] <= busy_cnt[k] - 1;
    end
    if (kstart) begin
      checks++;
      if (kidle != 3'b111) begin failures++; $display("kstart while busy"); end
      checks++;
      if (cfg.in_base != 32'(1000 + issued) || layer != 5'(issued)) begin
        failures++; $display("layer %0d issued cfg %0d", issued, cfg.in_base);
      end
      issued++;
    end
    if (done) dones++;
    end
  end
  always_comb for (int k = 0; k < 3; k++) kidle[k] = (busy_cnt[k] == 0);

  initial begin
    cfg_wr_en = 0; start = 0; cfg_wr_addr = '0; num_layers = '0; cfg_wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      cfg_wr_en = 1; cfg_wr_addr = 5'(i); cfg_wr_data = '0; cfg_wr_data.in_base = 32'(1000 + i);
    end
    @(negedge clk); cfg_wr_en = 0;
    start = 1; num_layers = 6'd4;
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("not busy after start"); end
    wait (done);
    repeat (5) @(posedge clk);
    checks++;
    if (issued != 4 || dones != 1 || busy) begin
      failures++; $display("issued %0d dones %0d", issued, dones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
