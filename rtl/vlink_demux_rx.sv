// vlink_demux_rx -- receiving half of one shared TSV array.
//
// The data and control TSVs are captured in a register on clk_tsv. The tag
// (0 no flit, v+1 VLink v) steers the flit to receiving termination v
// (vlink_rx), which rebuilds the word and hands it to interconnect clock
// clk_ic[v].
//
// Each termination reports with a pulse every word its interconnect side has
// taken. The credit returner counts these per VLink and sends one credit per
// TSV cycle back on the reverse control TSVs (cr_tag_o, same tag encoding),
// taking the VLinks with pending credits in round-robin order; a credit freed
// in this cycle can leave at once. At most one
// word completes per TSV cycle, so one returned credit per cycle keeps up on
// average; pending counts never exceed a VLink's buffer depth.
//
// Per-VLink widths and buffer types follow the same parameters as
// vlink_mux_tx and must match the sending half.
//
// Timing: a flit on the TSVs at edge t is captured at edge t; a word whose last
// flit arrives then is in the buffer after edge t+1.
module vlink_demux_rx
  import tsvhub_pkg::*;
#(
  parameter int unsigned K          = 6,
  parameter int unsigned ND         = 21,
  parameter int unsigned MMAX       = 55,
  parameter logic [K-1:0][31:0] M   = {32'd49, 32'd42, 32'd55, 32'd49, 32'd42, 32'd55},
  parameter logic [K-1:0] IS_FIFO   = 6'b010_010,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SYNC       = 1,
  localparam int unsigned TW        = tag_width(K)
) (
  input  logic                      clk_tsv,
  input  logic                      rst_tsv_n,
  input  logic [ND-1:0]             tsv_data_i,
  input  logic [TW-1:0]             tsv_tag_i,
  output logic [TW-1:0]             cr_tag_o,

  input  logic                      clk_ic    [K],
  input  logic                      rst_ic_n  [K],
  output logic [K-1:0]              out_valid,
  input  logic [K-1:0]              out_ready,
  output logic [K-1:0][MMAX-1:0]    out_data
);
  localparam int unsigned PW = $clog2(FIFO_DEPTH + 2);
  localparam int unsigned VW = (K > 1) ? $clog2(K) : 1;

  logic [ND-1:0]        data_q;
  logic [TW-1:0]        tag_q;
  logic [K-1:0]         freed;
  logic [K-1:0][PW-1:0] pend_q;
  logic [VW-1:0]        rr_q;

  always_ff @(posedge clk_tsv or negedge rst_tsv_n) begin
    if (!rst_tsv_n) begin
      data_q <= '0;
      tag_q  <= '0;
    end else begin
      data_q <= tsv_data_i;
      tag_q  <= tsv_tag_i;
    end
  end

  for (genvar v = 0; v < int'(K); v++) begin : g_vl
    vlink_rx #(
      .M(M[v]), .ND(ND), .IS_FIFO(IS_FIFO[v]), .DEPTH(FIFO_DEPTH), .SYNC(SYNC)
    ) u_rx (
      .clk_tsv(clk_tsv), .rst_tsv_n(rst_tsv_n),
      .flit_valid(tag_q == TW'(v + 1)), .flit(data_q), .credit_out(freed[v]),
      .clk_ic(clk_ic[v]), .rst_ic_n(rst_ic_n[v]),
      .out_valid(out_valid[v]), .out_ready(out_ready[v]),
      .out_data(out_data[v][M[v]-1:0]));
    if (M[v] < MMAX) begin : g_pad
      assign out_data[v][MMAX-1:M[v]] = '0;
    end
  end

  // credit returner: round-robin over VLinks with pending credits
  logic [K-1:0]  sent;
  logic [TW-1:0] cr_tag_n;
  logic [VW-1:0] rr_n;
  always_comb begin
    sent     = '0;
    cr_tag_n = '0;
    rr_n     = rr_q;
    for (int i = 0; i < int'(K); i++) begin
      if (cr_tag_n == '0 && (pend_q[(int'(rr_q) + i) % int'(K)] != '0 ||
                            freed[(int'(rr_q) + i) % int'(K)])) begin
        sent[(int'(rr_q) + i) % int'(K)] = 1'b1;
        cr_tag_n = TW'((int'(rr_q) + i) % int'(K) + 1);
        rr_n     = VW'((int'(rr_q) + i + 1) % int'(K));
      end
    end
  end

  always_ff @(posedge clk_tsv or negedge rst_tsv_n) begin
    if (!rst_tsv_n) begin
      pend_q   <= '0;
      rr_q     <= '0;
      cr_tag_o <= '0;
    end else begin
      for (int v = 0; v < int'(K); v++)
        pend_q[v] <= pend_q[v] + PW'(freed[v]) - PW'(sent[v]);
      rr_q     <= rr_n;
      cr_tag_o <= cr_tag_n;
    end
  end

endmodule
