// tb_fc_pe: FC processing element for two layers (5 input plates x 6 outputs with ReLU,
// then 3 x 4 without). The testbench sends the LOAD tokens and the weight tokens with
// random gaps and random write back-pressure, and checks each byte written (address
// out_base + o, value = saturate(ReLU(dot >>> shift))) against dot products computed
// here. Saturation and ReLU clamping must both occur. A third layer (4 x 5) is sent
// back to back with no write back-pressure and must take one weight plate per clock.
module tb_fc_pe;
  import cnn_pkg::*;
  localparam int VEC = 2, NM = W_VEC * VEC, PW = NM * DW;
  logic clk = 0, rst_n = 0;
  logic kstart, idle;
  fc_cfg_t cfg;
  logic in_valid, in_ready, wr_valid, wr_ready;
  logic [2+PW-1:0] in_data;
  logic [31:0] wr_addr;
  logic [7:0] wr_data;
  int checks = 0, failures = 0, sats = 0, clamps = 0, nwr = 0;
  logic [39:0] exp_q [$];
  bit burst = 0;
  int w_first = -1, w_last = -1, w_n = 0, cyc = 0;

  fc_pe #(.VEC(VEC), .IN_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) wr_ready = burst || ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    cyc++;
    if (burst && in_valid && in_ready && !in_data[PW+1]) begin
      if (w_first < 0) w_first = cyc;
      w_last = cyc;
      w_n++;
    end
  end

  always @(posedge clk) if (rst_n && wr_valid && wr_ready) begin
    checks++;
    if (exp_q.size() == 0 || {wr_addr, wr_data} != exp_q.pop_front()) begin
      failures++;
      if (failures < 10) $display("write %0d: addr %0d data %0d", nwr, wr_addr, $signed(wr_data));
    end
    nwr++;
  end

  task automatic send(logic [2+PW-1:0] t);
    if (!burst) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
    end else if (!in_valid) @(negedge clk);
    in_valid = 1; in_data = t;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    if (!burst) in_valid = 0;
  endtask

  task automatic layer(int np, int no, int ob, int sh, bit relu);
    logic [PW-1:0] x [8];
    cfg = '0;
    cfg.in_plates = 16'(np); cfg.out_ch = 16'(no); cfg.out_base = 32'(ob);
    cfg.shift = 6'(sh); cfg.relu = relu;
    @(negedge clk); kstart = 1;
    @(negedge clk); kstart = 0;
    for (int k = 0; k < np; k++) begin
      for (int j = 0; j < NM; j++) x[k][j*8 +: 8] = 8'($urandom);
      send({2'b10, x[k]});
    end
    for (int o = 0; o < no; o++) begin
      longint acc, q;
      acc = 0;
      for (int k = 0; k < np; k++) begin
        logic [PW-1:0] w;
        for (int j = 0; j < NM; j++) begin
          w[j*8 +: 8] = 8'($urandom);
          acc += longint'($signed(x[k][j*8 +: 8])) * longint'($signed(w[j*8 +: 8]));
        end
        send({1'b0, (k == np - 1), w});
      end
      q = acc >>> sh;
      if (relu && q < 0) begin q = 0; clamps++; end
      if (q > 127) begin q = 127; sats++; end
      if (q < -128) begin q = -128; sats++; end
      exp_q.push_back({32'(ob + o), 8'(q)});
    end
    in_valid = 0;
    wait (idle);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    kstart = 0; in_valid = 0; in_data = '0; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    layer(5, 6, 100, 6, 1'b1);
    layer(3, 4, 300, 4, 1'b0);
    burst = 1;
    layer(4, 5, 400, 5, 1'b0);
    burst = 0;
    checks++;
    if (w_n != 20 || w_last - w_first != 19) begin
      failures++; $display("rate: %0d weight plates in %0d cycles", w_n, w_last - w_first + 1);
    end
    checks++;
    if (exp_q.size() != 0 || nwr != 15) begin failures++; $display("writes %0d", nwr); end
    checks++;
    if (sats == 0 || clamps == 0) begin failures++; $display("sat %0d clamp %0d", sats, clamps); end
    $display("back-to-back layer: %0d weight plates in %0d cycles", w_n, w_last - w_first + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
