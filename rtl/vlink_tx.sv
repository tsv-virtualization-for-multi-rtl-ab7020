// vlink_tx -- sending termination of one virtual link (VLink).
//
// It takes M-bit words from the interconnect side on clk_ic, moves them into
// the TSV clock domain, and cuts each word into NF = ceil(M/ND) flits of ND
// bits, one per TSV cycle that the arbiter grants. This is the serializer
// without a crossbar described in the document: flit j carries word bits
// [j*ND +: ND]; the unused high bits of the last flit are sent as zeros.
//
// Buffering and clock crossing use a mesochronous FIFO (IS_FIFO=1, DEPTH
// words) or a mesochronous handshake register (IS_FIFO=0), as the document
// prescribes per channel type. SYNC is their number of synchronizer stages
// (1 for mesochronous clocks, 2 for unrelated clocks, 0 for clocks with
// coinciding edges).
//
// Flow control (this design's choice, the document only says that control
// TSVs carry signalling and flow control): a credit counter starts at
// CREDITS, the number of words the receiving termination can hold. A word is
// only started when a credit is left; each credit_in pulse returns one.
// Because a word is only started with its space reserved at the far end, no
// flit is ever dropped.
//
// Interface (TSV side, clk_tsv): req is high while a word is being sent;
// flit is the flit that a grant in this cycle sends. A grant moves to the
// next flit; after the last flit the next word may
// start in the very next cycle.
module vlink_tx
  import tsvhub_pkg::*;
#(
  parameter int unsigned M       = 55,
  parameter int unsigned ND      = 21,
  parameter bit          IS_FIFO = 1'b0,
  parameter int unsigned DEPTH   = 4,
  parameter int unsigned SYNC    = 1,
  parameter int unsigned CREDITS = 1
) (
  input  logic          clk_ic,
  input  logic          rst_ic_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [M-1:0]  in_data,

  input  logic          clk_tsv,
  input  logic          rst_tsv_n,
  output logic          req,
  output logic [ND-1:0] flit,
  input  logic          grant,
  input  logic          credit_in
);
  localparam int unsigned NF  = num_flits(M, ND);
  localparam int unsigned FW  = (NF > 1) ? $clog2(NF) : 1;
  localparam int unsigned CW  = $clog2(CREDITS + 1);

  // clock crossing into the TSV domain
  logic         c_valid, c_ready, c_freed_unused;
  logic [M-1:0] c_data;

  if (IS_FIFO) begin : g_fifo
    meso_fifo #(.W(M), .DEPTH(DEPTH), .SYNC(SYNC)) u_sync (
      .clk_w(clk_ic), .rst_w_n(rst_ic_n), .w_valid(in_valid), .w_ready(in_ready),
      .w_data(in_data), .w_freed(c_freed_unused),
      .clk_r(clk_tsv), .rst_r_n(rst_tsv_n), .r_valid(c_valid), .r_ready(c_ready),
      .r_data(c_data));
  end else begin : g_reg
    meso_reg_hs #(.W(M), .SYNC(SYNC)) u_sync (
      .clk_w(clk_ic), .rst_w_n(rst_ic_n), .w_valid(in_valid), .w_ready(in_ready),
      .w_data(in_data), .w_freed(c_freed_unused),
      .clk_r(clk_tsv), .rst_r_n(rst_tsv_n), .r_valid(c_valid), .r_ready(c_ready),
      .r_data(c_data));
  end

  // serializer
  logic [NF*ND-1:0] word_q;
  logic [FW-1:0]    idx_q;
  logic             busy_q;
  logic [CW-1:0]    cred_q;
  logic             last, done, load;

  assign req   = busy_q;
  assign flit  = word_q[idx_q*ND +: ND];
  assign last  = (idx_q == FW'(NF - 1));
  assign done  = busy_q && grant && last;
  assign load  = c_valid && (cred_q != '0) && (!busy_q || done);
  assign c_ready = load;

  always_ff @(posedge clk_tsv or negedge rst_tsv_n) begin
    if (!rst_tsv_n) begin
      busy_q <= 1'b0;
      idx_q  <= '0;
      cred_q <= CW'(CREDITS);
      word_q <= '0;
    end else begin
      cred_q <= cred_q - CW'(load) + CW'(credit_in);
      if (load) begin
        busy_q <= 1'b1;
        idx_q  <= '0;
        word_q <= (NF*ND)'(c_data);
      end else if (done) begin
        busy_q <= 1'b0;
        idx_q  <= '0;
      end else if (busy_q && grant) begin
        idx_q <= idx_q + 1'b1;
      end
    end
  end

  // A credit can never come back that was not taken.
  assert property (@(posedge clk_tsv) disable iff (!rst_tsv_n)
                   !(credit_in && cred_q == CW'(CREDITS) && !load))
    else $error("vlink_tx: credit returned beyond CREDITS");

endmodule
