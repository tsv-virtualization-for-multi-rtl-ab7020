// meso_reg_hs -- mesochronous register with handshake, the one-word VLink
// termination used for the AXI address and write-response channels.
//
// One word crosses from the write clock to the read clock. The document uses
// this cheaper termination where a small extra delay costs little (address
// channels that are idle during bursts). Its insides are this design's choice:
// a two-phase (toggle) handshake.
//
// How it works: a write loads the data register and flips the request toggle.
// The toggle reaches the read domain through SYNC flip-flops (1 by default,
// for mesochronous clocks with a fixed phase; 2 or more for unrelated clocks;
// 0 for the synchronous/ratiochronous flavour, clocks with coinciding edges); a differing
// toggle means "word available". The data register does not change while a
// word is pending, so the reader samples stable data. A read flips the
// acknowledge toggle, which returns through SYNC flip-flops and frees the
// register for the next write.
//
// Interface: valid/ready on both sides, like meso_fifo. w_freed pulses on
// clk_w once when the register becomes free again (used as a credit).
//
// Timing: a write at clk_w edge t is visible to the reader SYNC or SYNC+1
// clk_r edges later; after the read, w_ready rises SYNC or SYNC+1 clk_w edges
// later. One word is
// in flight at a time, so throughput is one word per round trip.
module meso_reg_hs #(
  parameter int unsigned W    = 49,
  parameter int unsigned SYNC = 1
) (
  input  logic         clk_w,
  input  logic         rst_w_n,
  input  logic         w_valid,
  output logic         w_ready,
  input  logic [W-1:0] w_data,
  output logic         w_freed,

  input  logic         clk_r,
  input  logic         rst_r_n,
  output logic         r_valid,
  input  logic         r_ready,
  output logic [W-1:0] r_data
);
  logic [W-1:0] data_q;
  logic         req_tog, ack_tog;
  localparam int unsigned NS = (SYNC == 0) ? 1 : SYNC;  // stages built
  logic [NS-1:0] ack_sync, req_sync;
  logic         ack_w, req_r;    // toggles after the synchronizers
  logic         ack_seen;

  if (SYNC == 0) begin : g_sync
    assign ack_w = ack_tog;
    assign req_r = req_tog;
  end else begin : g_sync
    assign ack_w = ack_sync[SYNC-1];
    assign req_r = req_sync[SYNC-1];
  end

  // write domain
  assign w_ready = (req_tog == ack_w);
  assign w_freed = (ack_seen != ack_w);

  always_ff @(posedge clk_w or negedge rst_w_n) begin
    if (!rst_w_n) begin
      req_tog  <= 1'b0;
      ack_sync <= '0;
      ack_seen <= 1'b0;
    end else begin
      if (w_valid && w_ready) req_tog <= ~req_tog;
      ack_sync <= NS'({ack_sync, ack_tog});
      ack_seen <= ack_w;
    end
  end

  always_ff @(posedge clk_w) begin
    if (w_valid && w_ready) data_q <= w_data;
  end

  // read domain
  assign r_valid = (req_r != ack_tog);
  assign r_data  = data_q;

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) begin
      ack_tog  <= 1'b0;
      req_sync <= '0;
    end else begin
      if (r_valid && r_ready) ack_tog <= ~ack_tog;
      req_sync <= NS'({req_sync, req_tog});
    end
  end

endmodule
