// tb_winograd_xform: checks the F(6,3) input transform through the Winograd identity.
// For random 8-column data and random 3-tap filters (per channel) the transformed
// plate from the unit is multiplied by the filter's transformed taps (90*G*g) and
// inverse-transformed (32*A^T) in the testbench; the result must equal 11520 times
// the direct 1-D convolution for all six outputs. The matrices used here are written
// out independently of the design's package. Also checks the sideband passes and
// that a stalled output holds its value.
module tb_winograd_xform;
  localparam int VEC = 4, SBW = 32;
  logic clk = 0, rst_n = 0;
  logic iv, ir, ov, orr;
  logic [SBW+8*VEC*8-1:0]  id;
  logic [SBW+8*VEC*16-1:0] od;
  int checks = 0, failures = 0;

  winograd_xform #(.VEC(VEC), .SBW(SBW)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir),
    .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od));

  // 90*G and 32*A^T of F(6,3)
  int G9 [8][3] = '{'{90,0,0},'{-20,-20,-20},'{-20,20,-20},'{1,2,4},'{1,-2,4},
                   '{64,32,16},'{64,-32,16},'{0,0,90}};
  int A32 [6][8] = '{'{32,32,32,32,32,32,32,0},'{0,32,-32,64,-64,16,-16,0},
                    '{0,32,32,128,128,8,8,0},'{0,32,-32,256,-256,4,-4,0},
                    '{0,32,32,512,512,2,2,0},'{0,32,-32,1024,-1024,1,-1,32}};

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int d [VEC][8];
  int g [VEC][3];
  initial begin
    iv = 0; orr = 1; id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [SBW-1:0] sb;
      sb = $urandom;
      for (int v = 0; v < VEC; v++) begin
        for (int k = 0; k < 8; k++) d[v][k] = (t < 4) ? ((t % 2) ? 127 : -128) : $signed($urandom_range(0, 255)) - 128;
        for (int k = 0; k < 3; k++) g[v][k] = $signed($urandom_range(0, 255)) - 128;
      end
      @(negedge clk);
      iv = 1;
      id = '0;
      id[8*VEC*8 +: SBW] = sb;
      for (int v = 0; v < VEC; v++)
        for (int k = 0; k < 8; k++) id[(k*VEC+v)*8 +: 8] = 8'(d[v][k]);
      @(posedge clk);
      while (!ir) @(posedge clk);
      @(negedge clk);
      iv = 0;
      // hold the output for a cycle to check it is stable
      orr = 0;
      @(negedge clk);
      checks++;
      if (!ov || od[8*VEC*16 +: SBW] != sb) begin failures++; $display("sideband/valid"); end
      for (int v = 0; v < VEC; v++) begin
        longint m [8];
        for (int l = 0; l < 8; l++) begin
          longint gw;
          gw = 0;
          for (int k = 0; k < 3; k++) gw += G9[l][k] * g[v][k];
          m[l] = gw * longint'($signed(od[(l*VEC+v)*16 +: 16]));
        end
        for (int j = 0; j < 6; j++) begin
          longint y, ref_y;
          y = 0;
          for (int l = 0; l < 8; l++) y += A32[j][l] * m[l];
          ref_y = 0;
          for (int k = 0; k < 3; k++) ref_y += d[v][j+k] * g[v][k];
          checks++;
          if (y != 11520 * ref_y) begin
            failures++;
            if (failures < 10) $display("t%0d v%0d j%0d: %0d != 11520*%0d", t, v, j, y, ref_y);
          end
        end
      end
      orr = 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
