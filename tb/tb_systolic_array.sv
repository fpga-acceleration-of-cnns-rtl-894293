// tb_systolic_array: a 2 x 3 semi-1D array (6 PEs) runs three output-channel sets.
// Per set the weight stream carries the filters of PEs 0..5 in order and the data
// stream carries three output blocks; the weights of the next set are streamed while
// the current set computes. Checks every output vector block by block against dot
// products computed here (block p must be PE p's channel), the number of vectors,
// and that weight loading overlapped computation at least once.
module tb_systolic_array;
  import cnn_pkg::*;
  localparam int VEC = 2, ROWS = 2, COLS = 3, NPE = ROWS * COLS;
  localparam int NW = 4, NBLK = 3, NSET = 3;
  localparam int PW = W_VEC * VEC * XW, BW = W_VEC * ACCW;
  logic clk = 0, rst_n = 0;
  logic d_in_valid, d_in_ready, w_in_valid, w_in_ready, o_valid, o_ready;
  logic [COND_W+PW-1:0] d_in_data;
  logic [9+PW-1:0] w_in_data;
  logic [NPE*BW-1:0] o_data;
  int checks = 0, failures = 0, overlap = 0, nvec = 0;

  systolic_array #(.VEC(VEC), .ROWS(ROWS), .COLS(COLS), .WDEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [PW-1:0] wpl [NSET][NPE][NW];
  logic [PW-1:0] dpl [NSET][NBLK][NW];

  function automatic logic [PW-1:0] rnd_plate();
    logic [PW-1:0] p;
    for (int i = 0; i < W_VEC * VEC; i++) p[i*XW +: XW] = XW'($signed($urandom_range(0, 600)) - 300);
    return p;
  endfunction

  initial begin
    for (int s = 0; s < NSET; s++)
      for (int k = 0; k < NW; k++) begin
        for (int p = 0; p < NPE; p++) wpl[s][p][k] = rnd_plate();
        for (int b = 0; b < NBLK; b++) dpl[s][b][k] = rnd_plate();
      end
  end

  always @(negedge clk) o_ready = ($urandom_range(0, 2) != 0);

  initial begin
    w_in_valid = 0; w_in_data = '0;
    wait (rst_n);
    for (int s = 0; s < NSET; s++)
      for (int p = 0; p < NPE; p++)
        for (int k = 0; k < NW; k++) begin
          @(negedge clk);
          w_in_valid = 1; w_in_data = {8'(p), (k == NW - 1), wpl[s][p][k]};
          @(posedge clk);
          while (!w_in_ready) @(posedge clk);
          @(negedge clk);
          w_in_valid = 0;
        end
  end

  initial begin
    d_in_valid = 0; d_in_data = '0;
    wait (rst_n);
    for (int s = 0; s < NSET; s++)
      for (int b = 0; b < NBLK; b++)
        for (int k = 0; k < NW; k++) begin
          logic [COND_W-1:0] cd;
          cd = '0;
          cd[COND_FIRST] = (k == 0);
          cd[COND_LAST] = (k == NW - 1);
          cd[COND_SET_END] = (k == NW - 1) && (b == NBLK - 1);
          @(negedge clk);
          d_in_valid = 1; d_in_data = {cd, dpl[s][b][k]};
          @(posedge clk);
          while (!d_in_ready) @(posedge clk);
          @(negedge clk);
          d_in_valid = 0;
        end
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.g_col[2].g_row[1].u_pe.w_store && dut.g_col[0].g_row[0].u_pe.a_fire) overlap++;
    if (o_valid && o_ready) begin
      int s, b;
      s = nvec / NBLK; b = nvec % NBLK;
      for (int p = 0; p < NPE; p++)
        for (int l = 0; l < W_VEC; l++) begin
          longint a;
          a = 0;
          for (int k = 0; k < NW; k++)
            for (int v = 0; v < VEC; v++)
              a += longint'($signed(dpl[s][b][k][(l*VEC+v)*XW +: XW])) *
                   longint'($signed(wpl[s][p][k][(l*VEC+v)*XW +: XW]));
          checks++;
          if ($signed(o_data[(p*W_VEC+l)*ACCW +: ACCW]) != ACCW'(a)) begin
            failures++;
            if (failures < 10) $display("vec %0d PE %0d lane %0d: %0d exp %0d", nvec, p, l,
              $signed(o_data[(p*W_VEC+l)*ACCW +: ACCW]), a);
          end
        end
      nvec++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nvec == NSET * NBLK);
    repeat (30) @(posedge clk);
    checks++;
    if (nvec != NSET * NBLK) begin failures++; $display("extra vectors"); end
    checks++;
    if (overlap == 0) begin failures++; $display("weights never loaded during compute"); end
    $display("overlap cycles %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
