// tb_chan_fifo: random writes and reads against a queue model; checks order, data,
// full/empty flags and that a full channel accepts nothing.
module tb_chan_fifo;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0;
  logic wv, wr, rv, rr;
  logic [W-1:0] wd, rd;
  int checks = 0, failures = 0, cyc = 0, fulls = 0;
  logic [W-1:0] model [$];

  chan_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_valid(wv), .wr_ready(wr),
    .wr_data(wd), .rd_valid(rv), .rd_ready(rr), .rd_data(rd));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wv = 0; rr = 0; wd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      wv = ($urandom_range(0, 2) != 0);
      wd = W'($urandom);
      rr = ($urandom_range(0, 2) == 0) || (cyc > 2000 && $urandom_range(0,1) == 1);
      #1;
      checks++;
      if (rv != (model.size() > 0)) begin failures++; $display("rd_valid mismatch"); end
      checks++;
      if (wr != (model.size() < D)) begin failures++; $display("wr_ready mismatch"); end
      if (model.size() == D) fulls++;
      if (rv && model.size() > 0) begin
        checks++;
        if (rd != model[0]) begin failures++; $display("data %h exp %h", rd, model[0]); end
      end
      @(posedge clk);
      if (rv && rr) void'(model.pop_front());
      if (wv && wr) model.push_back(wd);
      cyc++;
    end
    checks++;
    if (fulls == 0) begin failures++; $display("channel never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
