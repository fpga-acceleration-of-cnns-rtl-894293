// tb_inv_winograd: checks the F(6,3) inverse transform. The testbench forms, for NB
// channels, Winograd-domain accumulators m = sum over several rows of (90*G*g).*(4*B^T*d)
// from random data and filters, feeds them to the unit and compares the six outputs
// with 11520 times the direct convolution summed over the same rows. The matrices are
// written out here independently of the design's package. Also exercises back-pressure.
module tb_inv_winograd;
  localparam int NB = 3, ACCW = 48, OUTW = 64;
  logic clk = 0, rst_n = 0;
  logic iv, ir, ov, orr;
  logic [NB*8*ACCW-1:0] id;
  logic [NB*6*OUTW-1:0] od;
  int checks = 0, failures = 0;

  inv_winograd #(.NB(NB)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od));

  int G9 [8][3] = '{'{90,0,0},'{-20,-20,-20},'{-20,20,-20},'{1,2,4},'{1,-2,4},
                   '{64,32,16},'{64,-32,16},'{0,0,90}};
  int B4 [8][8] = '{'{4,0,-21,0,21,0,-4,0},'{0,4,4,-17,-17,4,4,0},'{0,-4,4,17,-17,-4,4,0},
                   '{0,2,1,-10,-5,8,4,0},'{0,-2,1,10,-5,-8,4,0},'{0,8,16,-10,-20,2,4,0},
                   '{0,-8,16,10,-20,-2,4,0},'{0,-4,0,21,0,-21,0,4}};

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint ref_y [NB][6];
  initial begin
    iv = 0; orr = 1; id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      for (int n = 0; n < NB; n++) begin
        longint m [8];
        for (int l = 0; l < 8; l++) m[l] = 0;
        for (int j = 0; j < 6; j++) ref_y[n][j] = 0;
        for (int r = 0; r < 5; r++) begin
          int d [8]; int g [3];
          for (int k = 0; k < 8; k++) d[k] = $signed($urandom_range(0, 255)) - 128;
          for (int k = 0; k < 3; k++) g[k] = $signed($urandom_range(0, 255)) - 128;
          for (int l = 0; l < 8; l++) begin
            longint bd, gw;
            bd = 0; gw = 0;
            for (int k = 0; k < 8; k++) bd += B4[l][k] * d[k];
            for (int k = 0; k < 3; k++) gw += G9[l][k] * g[k];
            m[l] += bd * gw;
          end
          for (int j = 0; j < 6; j++)
            for (int k = 0; k < 3; k++) ref_y[n][j] += d[j+k] * g[k];
        end
        for (int l = 0; l < 8; l++) id[(n*8+l)*ACCW +: ACCW] = ACCW'(m[l]);
      end
      @(negedge clk);
      iv = 1;
      orr = ($urandom_range(0, 1) == 1);
      @(posedge clk);
      while (!ir) @(posedge clk);
      @(negedge clk);
      iv = 0;
      orr = 1;
      #1;
      for (int n = 0; n < NB; n++)
        for (int j = 0; j < 6; j++) begin
          checks++;
          if (!ov || $signed(od[(n*6+j)*OUTW +: OUTW]) != 11520 * ref_y[n][j]) begin
            failures++;
            if (failures < 10) $display("t%0d n%0d j%0d got %0d exp %0d", t, n, j,
              $signed(od[(n*6+j)*OUTW +: OUTW]), 11520 * ref_y[n][j]);
          end
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
