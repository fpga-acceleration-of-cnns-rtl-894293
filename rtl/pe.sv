// pe: processing element of the semi-1D systolic array; computes one output channel.
//
// Datapath: W_VEC MAC units, unit l forming the dot product of the VEC channels of
// lane l of the Winograd-domain data plate with lane l of a weight plate and adding
// it to accumulator l. After the last plate of an output block (COND_LAST) the
// W_VEC accumulators are one output block of this channel; the next block starts
// with COND_FIRST. The weight plate used is number k of the filter, k counting the
// plates since COND_FIRST.
//
// Double weight buffer: two filter buffers of WDEPTH plates. Weight tokens arriving
// with this PE's index are written into the load buffer; on the token with LAST the
// buffer is marked full and loading moves to the other buffer. Data plates are
// accepted only while the compute buffer is full; a plate with COND_SET_END frees it.
// Loading the next output channel's filter thus overlaps computation.
//
// Forwarding: every accepted data plate is passed on to the PE below and, in row 0,
// also to the PE on the right. Weight tokens for other PEs are forwarded to the right
// (row 0, target in a later column) or down. Output blocks travel down each column:
// the PE appends its block to the N_ABOVE blocks from the PEs above it; a PE in the
// last row also takes the N_LEFT blocks of all previous columns from the last-row PE
// on its left. Block k of a vector belongs to PE k of the column-major order.
// d_out_data and w_out_data are the accepted words themselves, unregistered: the
// FIFO links of the array hold them, so only the handshakes are logic here.
//
// Timing: stage A accepts a data plate and reads the weight buffer, stage B does the
// MACs, so a block's result is ready two cycles after its last plate is accepted;
// one plate per cycle when nothing stalls. The MAC structure, double weight buffer,
// systolic data/weight forwarding and semi-1D output forwarding follow the described
// design; the two-stage pipeline and the routing rule for weights are this design's.
module pe
  import cnn_pkg::*;
#(
  parameter int VEC     = VEC_SIZE,
  parameter int ID      = 0,
  parameter int ROW     = 0,
  parameter int COL     = 0,
  parameter int ROWS    = PE_ROWS,
  parameter int WDEPTH  = 576,
  parameter int N_ABOVE = 0,
  parameter int N_LEFT  = 0,
  parameter bit HAS_DOWN  = 1,
  parameter bit HAS_RIGHT = 0
) (
  input  logic clk,
  input  logic rst_n,
  // data plates {cond, plate}
  input  logic                               d_in_valid,
  output logic                               d_in_ready,
  input  logic [COND_W+W_VEC*VEC*XW-1:0]     d_in_data,
  output logic                               d_down_valid,
  input  logic                               d_down_ready,
  output logic                               d_right_valid,
  input  logic                               d_right_ready,
  output logic [COND_W+W_VEC*VEC*XW-1:0]     d_out_data,
  // weight tokens {target, last, plate}
  input  logic                               w_in_valid,
  output logic                               w_in_ready,
  input  logic [9+W_VEC*VEC*XW-1:0]          w_in_data,
  output logic                               w_down_valid,
  input  logic                               w_down_ready,
  output logic                               w_right_valid,
  input  logic                               w_right_ready,
  output logic [9+W_VEC*VEC*XW-1:0]          w_out_data,
  // output blocks
  input  logic                                           o_above_valid,
  output logic                                           o_above_ready,
  input  logic [((N_ABOVE > 0) ? N_ABOVE : 1)*W_VEC*ACCW-1:0] o_above_data,
  input  logic                                           o_left_valid,
  output logic                                           o_left_ready,
  input  logic [((N_LEFT > 0) ? N_LEFT : 1)*W_VEC*ACCW-1:0]   o_left_data,
  output logic                                           o_out_valid,
  input  logic                                           o_out_ready,
  output logic [(N_LEFT+N_ABOVE+1)*W_VEC*ACCW-1:0]       o_out_data
);
  localparam int PW = W_VEC * VEC * XW;
  localparam int BW = W_VEC * ACCW;
  localparam int KW_ = $clog2(WDEPTH);

  // ---------------- weight side ----------------
  logic [PW-1:0] wbuf [2*WDEPTH];
  logic [1:0]    wfull;
  logic          lbuf, cbuf;
  logic [KW_-1:0] wcnt;

  wire [7:0] w_tgt  = w_in_data[PW+1 +: 8];
  wire       w_last = w_in_data[PW];
  wire       w_mine = (w_tgt == 8'(ID));
  wire [7:0] w_tcol = 8'(w_tgt / ROWS);
  wire       w_go_right = (ROW == 0) && (w_tcol > 8'(COL));

  assign w_out_data    = w_in_data;
  assign w_right_valid = HAS_RIGHT && w_in_valid && !w_mine && w_go_right;
  assign w_down_valid  = HAS_DOWN  && w_in_valid && !w_mine && !w_go_right;
  assign w_in_ready    = w_mine ? !wfull[lbuf]
                                : (w_go_right ? (HAS_RIGHT && w_right_ready)
                                              : (HAS_DOWN && w_down_ready));
  wire w_store = w_in_valid && w_in_ready && w_mine;

  // ---------------- data side, stage A ----------------
  wire [COND_W-1:0] a_cond = d_in_data[PW +: COND_W];
  logic             b_valid, b_last;
  logic [COND_W-1:0] b_cond;
  logic [PW-1:0]    b_data, b_w;
  logic [KW_-1:0]   kidx;
  logic             res_valid;
  logic [BW-1:0]    res;
  logic [BW-1:0]    acc;

  wire res_take = o_out_valid && o_out_ready;
  wire b_adv    = !b_valid || !b_last || !res_valid || res_take;
  wire down_ok  = !HAS_DOWN  || d_down_ready;
  wire right_ok = !HAS_RIGHT || d_right_ready;
  assign d_in_ready    = wfull[cbuf] && b_adv && down_ok && right_ok;
  wire a_fire = d_in_valid && d_in_ready;
  assign d_out_data    = d_in_data;
  assign d_down_valid  = HAS_DOWN  && d_in_valid && wfull[cbuf] && b_adv && right_ok;
  assign d_right_valid = HAS_RIGHT && d_in_valid && wfull[cbuf] && b_adv && down_ok;

  wire [KW_-1:0] a_k = a_cond[COND_FIRST] ? '0 : kidx;

  always_ff @(posedge clk) begin
    if (w_store) wbuf[(lbuf ? WDEPTH : 0) + 32'(wcnt)] <= w_in_data[PW-1:0];
    if (a_fire) begin
      b_w    <= wbuf[(cbuf ? WDEPTH : 0) + 32'(a_k)];
      b_data <= d_in_data[PW-1:0];
      b_cond <= a_cond;
    end
  end

  // ---------------- stage B: W_VEC MAC units ----------------
  logic [BW-1:0] acc_next;
  always_comb begin
    for (int l = 0; l < W_VEC; l++) begin
      logic signed [ACCW-1:0] s;
      s = '0;
      for (int v = 0; v < VEC; v++)
        s += ACCW'(signed'(b_data[(l*VEC+v)*XW +: XW])) * ACCW'(signed'(b_w[(l*VEC+v)*XW +: XW]));
      acc_next[l*ACCW +: ACCW] = b_cond[COND_FIRST] ? s : acc[l*ACCW +: ACCW] + s;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wfull <= '0; lbuf <= 1'b0; cbuf <= 1'b0; wcnt <= '0;
      kidx <= '0;
      b_valid <= 1'b0; b_last <= 1'b0;
      acc <= '0; res <= '0; res_valid <= 1'b0;
    end else begin
      // weight loading into the load buffer
      if (w_store) begin
        if (w_last) begin
          wcnt <= '0;
          lbuf <= ~lbuf;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      // stage A
      if (a_fire) kidx <= a_k + 1'b1;
      for (int i = 0; i < 2; i++) begin
        if (w_store && w_last && lbuf == 1'(i)) wfull[i] <= 1'b1;
        if (a_fire && a_cond[COND_SET_END] && cbuf == 1'(i)) wfull[i] <= 1'b0;
      end
      if (a_fire && a_cond[COND_SET_END]) cbuf <= ~cbuf;
      // stage B
      if (res_take) res_valid <= 1'b0;
      if (b_adv) begin
        b_valid <= a_fire;
        b_last  <= a_fire && a_cond[COND_LAST];
        if (b_valid) begin
          acc <= acc_next;
          if (b_last) begin
            res       <= acc_next;
            res_valid <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- output forwarding ----------------
  wire above_ok = (N_ABOVE == 0) || o_above_valid;
  wire left_ok  = (N_LEFT == 0)  || o_left_valid;
  assign o_out_valid   = res_valid && above_ok && left_ok;
  assign o_above_ready = (N_ABOVE > 0) && res_take;
  assign o_left_ready  = (N_LEFT > 0)  && res_take;

  if (N_LEFT > 0 && N_ABOVE > 0) begin : g_out_la
    assign o_out_data = {res, o_above_data, o_left_data};
  end else if (N_LEFT > 0) begin : g_out_l
    assign o_out_data = {res, o_left_data};
  end else if (N_ABOVE > 0) begin : g_out_a
    assign o_out_data = {res, o_above_data};
  end else begin : g_out_own
    assign o_out_data = res;
  end

  // A weight token may only be stored while the load buffer is free.
  assert property (@(posedge clk) disable iff (!rst_n) w_store |-> !wfull[lbuf]);
  // Data is consumed only with a loaded filter.
  assert property (@(posedge clk) disable iff (!rst_n) a_fire |-> wfull[cbuf]);
endmodule
