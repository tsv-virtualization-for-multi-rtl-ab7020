// vlink_mux_tx -- sending half of one shared TSV array.
//
// K VLink terminations (vlink_tx) each serialize their words into ND-bit
// flits. The arbiter (tdma_arbiter) picks at most one VLink per TSV cycle and
// the multiplexer puts that VLink's flit on the ND data TSVs together with a
// tag on the control TSVs: tag 0 means no flit, tag v+1 means VLink v. Data
// and tag leave through a register clocked by clk_tsv, so the TSVs are driven
// straight from flip-flops.
//
// Flow control comes back on the reverse control TSVs as a credit tag with
// the same encoding (0 none, v+1 one credit for VLink v); it goes straight
// to the credit counter of VLink v. VLink v starts with as many credits as its
// receiving termination holds words: FIFO_DEPTH for a FIFO VLink, one for a
// handshake-register VLink.
//
// Per-VLink word widths are given in the packed parameter M (M[v] bits,
// at most MMAX); in_data[v] uses the low M[v] bits. Each VLink has its own
// interconnect clock clk_ic[v].
//
// Timing: a flit granted in cycle t is on the TSVs from edge t+1 on.
module vlink_mux_tx
  import tsvhub_pkg::*;
#(
  parameter int unsigned K          = 6,
  parameter int unsigned ND         = 21,
  parameter int unsigned MMAX       = 55,
  parameter logic [K-1:0][31:0] M   = {32'd49, 32'd42, 32'd55, 32'd49, 32'd42, 32'd55},
  parameter logic [K-1:0] IS_FIFO   = 6'b010_010,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SYNC       = 1,
  parameter int unsigned NFIXED     = 0,
  parameter logic [15:0][7:0] FIXED_OWNER = '0,
  localparam int unsigned TW        = tag_width(K)
) (
  input  logic                      clk_ic    [K],
  input  logic                      rst_ic_n  [K],
  input  logic [K-1:0]              in_valid,
  output logic [K-1:0]              in_ready,
  input  logic [K-1:0][MMAX-1:0]    in_data,

  input  logic                      clk_tsv,
  input  logic                      rst_tsv_n,
  output logic [ND-1:0]             tsv_data_o,
  output logic [TW-1:0]             tsv_tag_o,
  input  logic [TW-1:0]             cr_tag_i
);
  logic [K-1:0]          req, grant, credit;
  logic [K-1:0][ND-1:0]  flit;

  for (genvar v = 0; v < int'(K); v++) begin : g_vl
    vlink_tx #(
      .M(M[v]), .ND(ND), .IS_FIFO(IS_FIFO[v]), .DEPTH(FIFO_DEPTH), .SYNC(SYNC),
      .CREDITS(rx_depth(IS_FIFO[v], FIFO_DEPTH))
    ) u_tx (
      .clk_ic(clk_ic[v]), .rst_ic_n(rst_ic_n[v]),
      .in_valid(in_valid[v]), .in_ready(in_ready[v]), .in_data(in_data[v][M[v]-1:0]),
      .clk_tsv(clk_tsv), .rst_tsv_n(rst_tsv_n),
      .req(req[v]), .flit(flit[v]), .grant(grant[v]),
      .credit_in(credit[v]));
    assign credit[v] = (cr_tag_i == TW'(v + 1));
  end

  tdma_arbiter #(.K(K), .NFIXED(NFIXED), .FIXED_OWNER(FIXED_OWNER)) u_arb (
    .clk(clk_tsv), .rst_n(rst_tsv_n), .req(req), .grant(grant), .fixed_slot());

  // multiplexer onto the data TSVs
  logic [ND-1:0] mux_data;
  logic [TW-1:0] mux_tag;
  always_comb begin
    mux_data = '0;
    mux_tag  = '0;
    for (int v = 0; v < int'(K); v++) begin
      if (grant[v]) begin
        mux_data = flit[v];
        mux_tag  = TW'(v + 1);
      end
    end
  end

  always_ff @(posedge clk_tsv or negedge rst_tsv_n) begin
    if (!rst_tsv_n) begin
      tsv_data_o <= '0;
      tsv_tag_o  <= '0;
    end else begin
      tsv_data_o <= mux_data;
      tsv_tag_o  <= mux_tag;
    end
  end

endmodule
