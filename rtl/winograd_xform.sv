// winograd_xform: F(6,3) Winograd input transform of a data plate.
//
// For every channel v of the plate the W_VEC = 8 lanes d[0..7] (eight consecutive
// columns) are replaced by BT_S * d, where BT_S = 4 * B^T of F(6,3) has only integer
// entries. A PE then multiplies element-wise with Winograd-domain weights and the
// inverse transform (inv_winograd) recovers six convolution outputs. The scaling
// by 4 keeps all arithmetic exact; the overall factor is removed by the output
// shift in mem_write. Sideband bits (the condition word) travel unchanged.
//
// Timing: one register stage with valid/ready; a plate per cycle. The transform
// placement (between mem_read_data and PE0) follows the described design; the
// integer scaling is this design's choice.
module winograd_xform
  import cnn_pkg::*;
#(
  parameter int VEC = VEC_SIZE,
  parameter int SBW = COND_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  output logic                             in_ready,
  input  logic [SBW+W_VEC*VEC*DW-1:0]      in_data,
  output logic                             out_valid,
  input  logic                             out_ready,
  output logic [SBW+W_VEC*VEC*XW-1:0]      out_data
);
  logic [SBW+W_VEC*VEC*XW-1:0] t;

  always_comb begin
    t = '0;
    t[W_VEC*VEC*XW +: SBW] = in_data[W_VEC*VEC*DW +: SBW];
    for (int v = 0; v < VEC; v++) begin
      for (int l = 0; l < W_VEC; l++) begin
        logic signed [XW-1:0] acc;
        acc = '0;
        for (int k = 0; k < W_VEC; k++)
          acc += XW'(BT_S[l][k]) * XW'(signed'(in_data[(k*VEC+v)*DW +: DW]));
        t[(l*VEC+v)*XW +: XW] = acc;
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
