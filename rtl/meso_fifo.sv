// meso_fifo -- mesochronous FIFO, the buffering VLink termination used for
// the AXI data channels.
//
// A word written on the write clock is read on the read clock. In the TSV-Hub
// the two clocks come from one source (mesochronous: same frequency or an
// integer ratio, unknown phase), and the FIFO has to cover the round trip of
// data and flow control through the synchronizer so that data can stream
// without gaps. The document uses 4-word FIFOs; DEPTH defaults to 4.
//
// How it works (this design's choice; the document only names the
// synchronizer type): the storage is a register array written on clk_w. Write
// and read pointers are DEPTH-modulo-2 counters kept in Gray code; each is
// passed to the other domain through SYNC flip-flops. A Gray pointer changes
// one bit per step, so a pointer sampled mid-change is off by at most one.
// SYNC defaults to 1: with mesochronous clocks the phase between the domains
// is fixed, so static timing can guarantee that one retiming stage settles,
// and the short delay lets 4 words cover the round trip of data and credits.
// With SYNC = 2 or more the same circuit is an ordinary asynchronous FIFO for
// unrelated clocks, at the price of a longer round trip. SYNC = 0 uses the
// other domain's pointer directly: the synchronous/ratiochronous flavour, for
// one clock or for clocks of an integer ratio whose edges coincide, where
// static timing covers every crossing path in one period of the faster
// clock. The stage registers then exist but are unused.
//
// Interface: valid/ready on both sides; a word moves when both are high on a
// rising edge of that side's clock. r_data is valid whenever r_valid is high.
// w_freed pulses on clk_w once for every slot the reader has released, as
// seen after synchronization; a sender across the TSVs uses these pulses as
// credits.
//
// Timing: a word written at edge t of clk_w becomes visible at the read side
// SYNC or SYNC+1 rising edges of clk_r later (depending on edge alignment); a
// freed slot becomes visible on the write side likewise after SYNC or SYNC+1
// edges of clk_w.
module meso_fifo #(
  parameter int unsigned W     = 42,
  parameter int unsigned DEPTH = 4,  // power of two, at least 2
  parameter int unsigned SYNC  = 1   // synchronizer stages per pointer
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
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned NS = (SYNC == 0) ? 1 : SYNC;  // stages built

  logic [W-1:0] mem [DEPTH];

  // ---------------- write domain ----------------
  logic [AW:0] wbin, wgray;
  logic [AW:0] rbin, rgray;
  logic [AW:0] rgray_sync [NS];
  logic [AW:0] rgray_w;      // read pointer (Gray) after the synchronizer
  logic [AW:0] rbin_w;       // read pointer as seen by the writer
  logic [AW:0] freed_bin;    // slots already reported through w_freed

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  if (SYNC == 0) begin : g_rsync
    assign rgray_w = rgray;
  end else begin : g_rsync
    assign rgray_w = rgray_sync[SYNC-1];
  end
  assign rbin_w  = gray2bin(rgray_w);
  assign w_ready = (wbin - rbin_w) != (AW+1)'(DEPTH);
  assign w_freed = freed_bin != rbin_w;

  always_ff @(posedge clk_w or negedge rst_w_n) begin
    if (!rst_w_n) begin
      wbin      <= '0;
      wgray     <= '0;
      freed_bin <= '0;
      for (int i = 0; i < int'(NS); i++) rgray_sync[i] <= '0;
    end else begin
      if (w_valid && w_ready) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
      if (w_freed) freed_bin <= freed_bin + 1'b1;
      rgray_sync[0] <= rgray;
      for (int i = 1; i < int'(NS); i++) rgray_sync[i] <= rgray_sync[i-1];
    end
  end

  always_ff @(posedge clk_w) begin
    if (w_valid && w_ready) mem[wbin[AW-1:0]] <= w_data;
  end

  // ---------------- read domain ----------------
  logic [AW:0] wgray_sync [NS];
  logic [AW:0] wgray_r;      // write pointer (Gray) after the synchronizer

  if (SYNC == 0) begin : g_wsync
    assign wgray_r = wgray;
  end else begin : g_wsync
    assign wgray_r = wgray_sync[SYNC-1];
  end
  assign r_valid = rgray != wgray_r;
  assign r_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) begin
      rbin  <= '0;
      rgray <= '0;
      for (int i = 0; i < int'(NS); i++) wgray_sync[i] <= '0;
    end else begin
      if (r_valid && r_ready) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
      wgray_sync[0] <= wgray;
      for (int i = 1; i < int'(NS); i++) wgray_sync[i] <= wgray_sync[i-1];
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("meso_fifo: DEPTH must be a power of two >= 2");
  end

endmodule
