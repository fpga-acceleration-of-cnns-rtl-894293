// inv_winograd: F(6,3) inverse Winograd transform of the array's output.
//
// The last PE delivers, for each of the NB output channels, W_VEC = 8 Winograd-domain
// accumulators m[0..7]. Each is turned into INV_VEC = 6 output pixels y = AT_S * m,
// where AT_S = 32 * A^T of F(6,3) has only integer entries. Together with the
// scaled input transform (x4) and the host's scaled weight transform (x90), y equals
// WINO_SCALE = 11520 times the direct convolution, exactly.
//
// Timing: one register stage with valid/ready, a full output vector per cycle.
// Placement after the last PE follows the described design; the scaling is this
// design's choice.
module inv_winograd
  import cnn_pkg::*;
#(
  parameter int NB = LANE_NUM
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [NB*W_VEC*ACCW-1:0]      in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [NB*INV_VEC*OUTW-1:0]    out_data
);
  logic [NB*INV_VEC*OUTW-1:0] t;

  always_comb begin
    t = '0;
    for (int n = 0; n < NB; n++) begin
      for (int j = 0; j < INV_VEC; j++) begin
        logic signed [OUTW-1:0] acc;
        acc = '0;
        for (int l = 0; l < W_VEC; l++)
          acc += OUTW'(AT_S[j][l]) * OUTW'(signed'(in_data[(n*W_VEC+l)*ACCW +: ACCW]));
        t[(n*INV_VEC+j)*OUTW +: OUTW] = acc;
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= t;
    end
  end
endmodule
