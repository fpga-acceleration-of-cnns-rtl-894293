// tb_pe: one PE (index 2, row 0 of column 1 in a 2-row grid) with random back-pressure.
// Three filters (weight sets) are sent to it, mixed with tokens for other PEs, while
// three output blocks per set are computed. Checks: every output block equals the
// lane-wise dot products computed here, with the blocks from above and left placed in
// front of it; every data plate is forwarded down and right unchanged; weight tokens
// for PE 0/3 go down and for PE 4/5 go right, in order. Counts the cycles where a
// filter is loaded while the PE computes (double weight buffer) and fails if none.
// A second PE (single, no neighbours, never blocked) gets one filter and then
// NBLK*NW data plates back to back; it must take one plate per clock and emit NBLK
// blocks, the rate the PE is designed for.
module tb_pe;
  import cnn_pkg::*;
  localparam int VEC = 2, NW = 6, NBLK = 3, NSET = 3;
  localparam int PW = W_VEC * VEC * XW, DWD = COND_W + PW, WWD = 9 + PW, BW = W_VEC * ACCW;
  logic clk = 0, rst_n = 0;
  logic d_in_valid, d_in_ready, d_down_valid, d_down_ready, d_right_valid, d_right_ready;
  logic [DWD-1:0] d_in_data, d_out_data;
  logic w_in_valid, w_in_ready, w_down_valid, w_down_ready, w_right_valid, w_right_ready;
  logic [WWD-1:0] w_in_data, w_out_data;
  logic o_above_valid, o_above_ready, o_left_valid, o_left_ready, o_out_valid, o_out_ready;
  logic [BW-1:0] o_above_data, o_left_data;
  logic [3*BW-1:0] o_out_data;
  int checks = 0, failures = 0, overlap = 0, stall_cycles = 0;

  pe #(.VEC(VEC), .ID(2), .ROW(0), .COL(1), .ROWS(2), .WDEPTH(16), .N_ABOVE(1),
       .N_LEFT(1), .HAS_DOWN(1), .HAS_RIGHT(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stimulus storage
  logic [PW-1:0] wpl [NSET][NW];
  logic [PW-1:0] dpl [NSET][NBLK][NW];
  logic [DWD-1:0] dq_exp_down [$], dq_exp_right [$];
  logic [WWD-1:0] wq_exp_down [$], wq_exp_right [$];
  logic [BW-1:0] res_exp [$];

  function automatic logic [PW-1:0] rnd_plate();
    logic [PW-1:0] p;
    for (int i = 0; i < W_VEC * VEC; i++) p[i*XW +: XW] = XW'($signed($urandom_range(0, 4000)) - 2000);
    return p;
  endfunction

  initial begin
    for (int s = 0; s < NSET; s++)
      for (int k = 0; k < NW; k++) begin
        wpl[s][k] = rnd_plate();
        for (int b = 0; b < NBLK; b++) dpl[s][b][k] = rnd_plate();
      end
    for (int s = 0; s < NSET; s++)
      for (int b = 0; b < NBLK; b++) begin
        logic [BW-1:0] r;
        for (int l = 0; l < W_VEC; l++) begin
          longint a;
          a = 0;
          for (int k = 0; k < NW; k++)
            for (int v = 0; v < VEC; v++)
              a += longint'($signed(dpl[s][b][k][(l*VEC+v)*XW +: XW])) *
                   longint'($signed(wpl[s][k][(l*VEC+v)*XW +: XW]));
          r[l*ACCW +: ACCW] = ACCW'(a);
        end
        res_exp.push_back(r);
      end
  end

  // random ready on the outputs
  always @(negedge clk) begin
    d_down_ready  = ($urandom_range(0, 3) != 0);
    d_right_ready = ($urandom_range(0, 3) != 0);
    w_down_ready  = ($urandom_range(0, 3) != 0);
    w_right_ready = ($urandom_range(0, 3) != 0);
    o_out_ready   = ($urandom_range(0, 2) != 0);
  end

  // weight driver
  initial begin
    w_in_valid = 0; w_in_data = '0;
    wait (rst_n);
    for (int s = 0; s < NSET; s++) begin
      for (int k = 0; k < NW + 4; k++) begin
        logic [WWD-1:0] tok;
        if (k < 4) begin
          int tg;
          tg = (k == 0) ? 0 : (k == 1) ? 4 : (k == 2) ? 3 : 5;
          tok = {8'(tg), 1'b0, rnd_plate()};
          if (tg == 4 || tg == 5) wq_exp_right.push_back(tok); else wq_exp_down.push_back(tok);
        end else begin
          tok = {8'd2, (k == NW + 3), wpl[s][k-4]};
        end
        @(negedge clk);
        w_in_valid = 1; w_in_data = tok;
        @(posedge clk);
        while (!w_in_ready) @(posedge clk);
        @(negedge clk);
        w_in_valid = 0;
      end
    end
  end

  // data driver
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
          dq_exp_down.push_back(d_in_data); dq_exp_right.push_back(d_in_data);
          @(posedge clk);
          while (!d_in_ready) @(posedge clk);
          @(negedge clk);
          d_in_valid = 0;
        end
  end

  // blocks from above and left
  int ab_n = 0, lf_n = 0;
  always_comb begin
    o_above_valid = 1'b1; o_above_data = BW'(1000 + ab_n);
    o_left_valid  = 1'b1; o_left_data  = BW'(2000 + lf_n);
  end

  int nres = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.w_store && dut.a_fire) overlap++;
    if (d_in_valid && !d_in_ready) stall_cycles++;
    if (o_above_ready) ab_n <= ab_n + 1;
    if (o_left_ready) lf_n <= lf_n + 1;
    if (d_down_valid && d_down_ready) begin
      checks++;
      if (d_out_data != dq_exp_down.pop_front()) begin failures++; $display("data down mismatch"); end
    end
    if (d_right_valid && d_right_ready) begin
      checks++;
      if (d_out_data != dq_exp_right.pop_front()) begin failures++; $display("data right mismatch"); end
    end
    if (w_down_valid && w_down_ready) begin
      checks++;
      if (w_out_data != wq_exp_down.pop_front()) begin failures++; $display("weight down mismatch"); end
    end
    if (w_right_valid && w_right_ready) begin
      checks++;
      if (w_out_data != wq_exp_right.pop_front()) begin failures++; $display("weight right mismatch"); end
    end
    if (o_out_valid && o_out_ready) begin
      logic [BW-1:0] e;
      e = res_exp.pop_front();
      checks++;
      if (o_out_data[2*BW +: BW] != e) begin failures++; $display("block %0d mismatch", nres); end
      checks++;
      if (o_out_data[BW +: BW] != BW'(1000 + nres) || o_out_data[0 +: BW] != BW'(2000 + nres)) begin
        failures++; $display("appended blocks out of place");
      end
      nres++;
    end
  end


  // ---------------- rate check on an unobstructed PE ----------------
  logic r_dv, r_dr, r_wv, r_wr, r_ov;
  logic [DWD-1:0] r_dd;
  logic [WWD-1:0] r_wd;
  logic [BW-1:0] r_od;
  pe #(.VEC(VEC), .ID(0), .ROW(0), .COL(0), .ROWS(1), .WDEPTH(16), .N_ABOVE(0),
       .N_LEFT(0), .HAS_DOWN(0), .HAS_RIGHT(0)) u_rate (
    .clk, .rst_n,
    .d_in_valid(r_dv), .d_in_ready(r_dr), .d_in_data(r_dd),
    .d_down_valid(), .d_down_ready(1'b0), .d_right_valid(), .d_right_ready(1'b0), .d_out_data(),
    .w_in_valid(r_wv), .w_in_ready(r_wr), .w_in_data(r_wd),
    .w_down_valid(), .w_down_ready(1'b0), .w_right_valid(), .w_right_ready(1'b0), .w_out_data(),
    .o_above_valid(1'b0), .o_above_ready(), .o_above_data('0),
    .o_left_valid(1'b0), .o_left_ready(), .o_left_data('0),
    .o_out_valid(r_ov), .o_out_ready(1'b1), .o_out_data(r_od));

  int r_first = -1, r_last = -1, r_n = 0, r_blocks = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && r_dv && r_dr) begin
      if (r_first < 0) r_first = cyc;
      r_last = cyc;
      r_n++;
    end
    if (rst_n && r_ov) r_blocks++;
  end

  initial begin
    r_dv = 0; r_dd = '0; r_wv = 0; r_wd = '0;
    wait (rst_n);
    for (int k = 0; k < NW; k++) begin
      @(negedge clk);
      r_wv = 1; r_wd = {8'd0, (k == NW - 1), wpl[0][k]};
      @(posedge clk);
      while (!r_wr) @(posedge clk);
    end
    @(negedge clk); r_wv = 0;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < NW; k++) begin
        logic [COND_W-1:0] cd;
        cd = '0;
        cd[COND_FIRST] = (k == 0);
        cd[COND_LAST] = (k == NW - 1);
        cd[COND_SET_END] = (k == NW - 1) && (b == NBLK - 1);
        r_dv = 1; r_dd = {cd, dpl[0][b][k]};
        @(posedge clk);
        while (!r_dr) @(posedge clk);
        @(negedge clk);
      end
    r_dv = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nres == NSET * NBLK);
    repeat (20) @(posedge clk);
    checks++;
    if (dq_exp_down.size() != 0 || dq_exp_right.size() != 0 || wq_exp_down.size() != 0 ||
        wq_exp_right.size() != 0) begin failures++; $display("forwarded streams incomplete"); end
    checks++;
    if (overlap == 0) begin failures++; $display("no weight load overlapped compute"); end
    checks++;
    if (r_n != NBLK * NW || r_last - r_first != NBLK * NW - 1) begin
      failures++; $display("rate: %0d plates in %0d cycles", r_n, r_last - r_first + 1);
    end
    checks++;
    if (r_blocks != NBLK) begin failures++; $display("rate PE emitted %0d blocks", r_blocks); end
    $display("weight-load/compute overlap cycles %0d, input stalls %0d", overlap, stall_cycles);
    $display("unobstructed PE: %0d plates in %0d cycles", r_n, r_last - r_first + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
