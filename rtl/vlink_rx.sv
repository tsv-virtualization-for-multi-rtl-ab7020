// vlink_rx -- receiving termination of one virtual link (VLink).
//
// It collects the NF = ceil(M/ND) flits of a word that arrive on the TSV
// clock, reassembles the M-bit word (flit j holds bits [j*ND +: ND]) and hands
// it to the interconnect side on clk_ic through a mesochronous FIFO
// (IS_FIFO=1, DEPTH words) or a mesochronous handshake register (IS_FIFO=0).
//
// Flits of one VLink arrive in order but may be interleaved with flits of
// other VLinks on the shared TSV array; each termination only counts its own.
// The sender reserves buffer space with credits before it sends the first
// flit of a word, so the buffer always has room for a completed word.
// credit_out pulses on clk_tsv once for every word the interconnect side has
// taken out of the buffer; the hub returns these pulses to the sender.
//
// Timing: the completed word is written into the buffer in the cycle its last
// flit arrives and appears on the interconnect side after the buffer's
// synchronizer delay (SYNC or SYNC+1 clk_ic edges).
module vlink_rx
  import tsvhub_pkg::*;
#(
  parameter int unsigned M       = 55,
  parameter int unsigned ND      = 21,
  parameter bit          IS_FIFO = 1'b0,
  parameter int unsigned DEPTH   = 4,
  parameter int unsigned SYNC    = 1
) (
  input  logic          clk_tsv,
  input  logic          rst_tsv_n,
  input  logic          flit_valid,
  input  logic [ND-1:0] flit,
  output logic          credit_out,

  input  logic          clk_ic,
  input  logic          rst_ic_n,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [M-1:0]  out_data
);
  localparam int unsigned NF = num_flits(M, ND);
  localparam int unsigned FW = (NF > 1) ? $clog2(NF) : 1;

  logic [NF-1:0][ND-1:0] word_q, word_n;
  logic [FW-1:0]         idx_q;
  logic [NF*ND-1:0]      word_flat;
  logic                  w_valid, w_ready;

  assign word_flat = word_n;

  always_comb begin
    word_n        = word_q;
    word_n[idx_q] = flit;
  end

  assign w_valid = flit_valid && (idx_q == FW'(NF - 1));

  always_ff @(posedge clk_tsv or negedge rst_tsv_n) begin
    if (!rst_tsv_n) begin
      idx_q  <= '0;
      word_q <= '0;
    end else if (flit_valid) begin
      word_q <= word_n;
      idx_q  <= w_valid ? '0 : idx_q + 1'b1;
    end
  end

  if (IS_FIFO) begin : g_fifo
    meso_fifo #(.W(M), .DEPTH(DEPTH), .SYNC(SYNC)) u_sync (
      .clk_w(clk_tsv), .rst_w_n(rst_tsv_n), .w_valid(w_valid), .w_ready(w_ready),
      .w_data(word_flat[M-1:0]), .w_freed(credit_out),
      .clk_r(clk_ic), .rst_r_n(rst_ic_n), .r_valid(out_valid), .r_ready(out_ready),
      .r_data(out_data));
  end else begin : g_reg
    meso_reg_hs #(.W(M), .SYNC(SYNC)) u_sync (
      .clk_w(clk_tsv), .rst_w_n(rst_tsv_n), .w_valid(w_valid), .w_ready(w_ready),
      .w_data(word_flat[M-1:0]), .w_freed(credit_out),
      .clk_r(clk_ic), .rst_r_n(rst_ic_n), .r_valid(out_valid), .r_ready(out_ready),
      .r_data(out_data));
  end

  // Credit-based flow control guarantees room for every completed word.
  assert property (@(posedge clk_tsv) disable iff (!rst_tsv_n) w_valid |-> w_ready)
    else $error("vlink_rx: word arrived without buffer space");

endmodule
