// fc_pe: processing element of the dedicated FC processor.
//
// Tokens tagged LOAD fill the input buffer with the layer's input vector, one plate
// per token. Every other token is a weight plate: it is multiplied element-wise with
// the input plate of the same position k (k counts the weight plates since the last
// LAST) and the W_VEC*VEC products are added to the accumulator. On the token tagged
// LAST the accumulator is the output channel's value; it is shifted right by
// `shift`, optionally clamped at zero (ReLU), saturated to 8 bits and written to
// byte address out_base + o.
//
// Timing: stage A reads the input buffer, stage B multiplies and accumulates, the
// result is written in a third step; one weight plate per cycle, so the FC layer
// runs at the rate weights arrive from memory. Interface: controller kstart/cfg/idle,
// tokens in (valid/ready), byte write port (valid/ready). The input buffer and the
// MAC over streamed weights follow the described FC processor; the buffer size
// (IN_DEPTH plates, enough for a 25088-input layer) and the quantization are this
// design's choices.
module fc_pe
  import cnn_pkg::*;
#(
  parameter int VEC      = VEC_SIZE,
  parameter int IN_DEPTH = 392,
  parameter int FCW      = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      kstart,
  input  fc_cfg_t                   cfg,
  output logic                      idle,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [2+W_VEC*VEC*DW-1:0] in_data,
  output logic                      wr_valid,
  input  logic                      wr_ready,
  output logic [31:0]               wr_addr,
  output logic [7:0]                wr_data
);
  localparam int PW = W_VEC * VEC * DW;
  localparam int NM = W_VEC * VEC;
  localparam int AW = $clog2(IN_DEPTH);

  fc_cfg_t        c;
  logic [PW-1:0]  ibuf [IN_DEPTH];
  logic [AW-1:0]  ld_i, k_i;
  logic [15:0]    o_i, wo_i;   // output being written / output whose weights arrive
  logic           active;

  wire t_load = in_data[PW+1];
  wire t_last = in_data[PW];

  // stage B and result registers
  logic              b_valid, b_last;
  logic [PW-1:0]     b_w, b_x;
  logic signed [FCW-1:0] acc, res;
  logic              res_valid;

  wire b_adv = !b_valid || !b_last || !res_valid || (wr_valid && wr_ready);
  assign in_ready = active && (t_load || b_adv);
  wire fire   = in_valid && in_ready;
  wire w_fire = fire && !t_load;

  always_ff @(posedge clk) begin
    if (fire && t_load) ibuf[ld_i] <= in_data[PW-1:0];
    if (w_fire) begin
      b_x <= ibuf[k_i];
      b_w <= in_data[PW-1:0];
    end
  end

  logic signed [FCW-1:0] dot;
  always_comb begin
    dot = '0;
    for (int j = 0; j < NM; j++)
      dot += FCW'(signed'(b_x[j*DW +: DW])) * FCW'(signed'(b_w[j*DW +: DW]));
  end

  logic signed [OUTW-1:0] q;
  always_comb begin
    q = OUTW'(res) >>> c.shift;
    if (c.relu && q < 0) q = '0;
  end
  assign wr_valid = res_valid;
  assign wr_data  = sat8(q);
  assign wr_addr  = c.out_base + 32'(o_i);
  assign idle     = !active && !b_valid && !res_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c <= '0; active <= 1'b0; ld_i <= '0; k_i <= '0; o_i <= '0; wo_i <= '0;
      b_valid <= 1'b0; b_last <= 1'b0; acc <= '0; res <= '0; res_valid <= 1'b0;
    end else if (kstart) begin
      c <= cfg; active <= 1'b1; ld_i <= '0; k_i <= '0; o_i <= '0; wo_i <= '0;
    end else begin
      if (fire && t_load) ld_i <= ld_i + 1'b1;
      if (w_fire) k_i <= t_last ? '0 : k_i + 1'b1;
      if (w_fire && t_last) wo_i <= wo_i + 1'b1;
      if (w_fire && t_last && wo_i == c.out_ch - 1'b1) active <= 1'b0;
      if (wr_valid && wr_ready) begin
        res_valid <= 1'b0;
        o_i <= o_i + 1'b1;
      end
      if (b_adv) begin
        b_valid <= w_fire;
        b_last  <= w_fire && t_last;
        if (b_valid) begin
          if (b_last) begin
            res       <= acc + dot;
            res_valid <= 1'b1;
            acc       <= '0;
          end else begin
            acc <= acc + dot;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (fire && t_load) |-> 32'(ld_i) < IN_DEPTH);
endmodule
