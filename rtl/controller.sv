// controller: starts the kernels of a processor layer by layer.
//
// The host first writes one configuration word per layer into the layer table
// (cfg_wr_*), then pulses `start` with the number of layers. For each layer the
// controller presents the configuration on `cfg` and pulses `kstart` for one cycle;
// every kernel latches `cfg` on that pulse, works out its own loop counts from it and
// raises its busy flag. When all kernels report idle again the next layer is issued,
// so a layer reads only what the previous layer has completely written. `done`
// pulses after the last layer. The configuration type is a parameter, so the same
// controller serves the convolution processor and the FC processor, which run
// independently of each other. Broadcasting the layer configuration to every kernel
// follows the described controller kernel; the table, the handshake and the
// wait-for-idle rule between layers are this design's choices.
module controller #(
  parameter type cfg_t      = cnn_pkg::conv_cfg_t,
  parameter int  MAX_LAYERS = 32,
  parameter int  N_KERNELS  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host side
  input  logic                          cfg_wr_en,
  input  logic [$clog2(MAX_LAYERS)-1:0] cfg_wr_addr,
  input  cfg_t                          cfg_wr_data,
  input  logic                          start,
  input  logic [$clog2(MAX_LAYERS):0]   num_layers,
  output logic                          busy,
  output logic                          done,
  output logic [$clog2(MAX_LAYERS)-1:0] layer,
  // kernel side
  output cfg_t                          cfg,
  output logic                          kstart,
  input  logic [N_KERNELS-1:0]          kidle
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_SETTLE, S_WAIT} state_t;

  cfg_t   table_q [MAX_LAYERS];
  state_t state;
  logic [$clog2(MAX_LAYERS):0] n_q, cur;

  always_ff @(posedge clk) begin
    if (cfg_wr_en) table_q[cfg_wr_addr] <= cfg_wr_data;
  end

  assign busy  = (state != S_IDLE);
  assign layer = cur[$clog2(MAX_LAYERS)-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      n_q    <= '0;
      cur    <= '0;
      cfg    <= '0;
      kstart <= 1'b0;
      done   <= 1'b0;
    end else begin
      kstart <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_q <= num_layers;
          cur <= '0;
          if (num_layers == '0) done <= 1'b1;
          else state <= S_ISSUE;
        end
        S_ISSUE: begin
          cfg    <= table_q[cur[$clog2(MAX_LAYERS)-1:0]];
          kstart <= 1'b1;
          state  <= S_SETTLE;
        end
        S_SETTLE: state <= S_WAIT;   // kernels raise busy on the cycle after kstart
        S_WAIT: if (&kidle) begin
          if (cur + 1'b1 == n_q) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cur   <= cur + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
