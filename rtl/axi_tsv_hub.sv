// axi_tsv_hub -- TSV-Hub that continues NLINK independent AXI links from chip
// layer 1 (where the AXI masters sit) to chip layer 2 (where the slaves sit)
// over two shared TSV arrays.
//
// Idea: instead of one TSV per AXI wire (195 TSVs per 32-bit link), every AXI
// channel becomes a virtual link (VLink). The VLinks of one direction are
// serialized and time-multiplexed onto one TSV array that runs on a fast TSV
// clock (1.6 GHz against a 400 MHz interconnect clock in the reference
// configuration, ratio 4).
//
//   downstream array, ND_DN data TSVs, layer 1 -> layer 2:
//     VLink 3l+0  write address (55 bits), handshake register
//     VLink 3l+1  write data (DATA_W+10 bits), 4-word FIFO
//     VLink 3l+2  read address (49 bits), handshake register
//   upstream array, ND_UP data TSVs, layer 2 -> layer 1:
//     VLink 2l+0  read data (DATA_W+8 bits), 4-word FIFO
//     VLink 2l+1  write response (9 bits), handshake register
//
// Defaults are the document's reference hub: two 32-bit links, 21 downstream
// and 20 upstream data TSVs, FIFO depth 4. Channel widths, the split into
// FIFO and register terminations and the TSV counts follow the document; the
// control-TSV encoding (VLink tag, returned credits), the arbitration order and
// the synchronizer circuits are this design's choices.
//
// Each AXI channel keeps AXI's valid/ready handshake at both ends; the payload
// is the channel's signals other than VALID and READY, packed by the attached
// master or slave in any fixed order, and arrives bit-exact. The AXI adaptor
// of each link is therefore only this wiring of its five channels to five
// VLinks.
//
// The TSV arrays themselves are physical structures and are outside this
// module: *_o ports drive TSVs, *_i ports receive them, and a 3D integration
// (or a testbench) connects dn_tsv_*_o to dn_tsv_*_i and so on. Per array
// there are ND data TSVs, a flit tag of clog2(K+1) TSVs and, in the opposite
// direction, a credit tag of the same width. clk_tsv is the TSV clock, which
// the hub carries to layer 2 on a dedicated clock TSV; both halves use it.
// clk_ic1[l] and clk_ic2[l] are the interconnect clocks of link l on each layer.
//
// The terminations are mesochronous: every interconnect clock is assumed to
// have the TSV clock's source and a fixed phase to it, so one retiming stage
// (SYNC = 1) suffices. SYNC = 2 turns every synchronizer into a plain
// two-flop asynchronous one for unrelated clocks, at lower throughput because
// the 4-word FIFOs then no longer cover the credit round trip. SYNC = 0 is
// the synchronous/ratiochronous flavour without retiming stages, for
// interconnect clocks whose edges coincide with TSV clock edges.
//
// Latency (defaults, no contention): a write address travels the handshake
// register (about 3 clk_tsv cycles), 3 flits, two TSV registers and the
// receiving register (about 3 clk_ic2 cycles).
module axi_tsv_hub
  import tsvhub_pkg::*;
#(
  parameter int unsigned NLINK      = 2,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned ND_DN      = 21,
  parameter int unsigned ND_UP      = 20,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SYNC       = 1,
  parameter int unsigned DN_NFIXED  = 0,
  parameter logic [15:0][7:0] DN_FIXED_OWNER = '0,
  parameter int unsigned UP_NFIXED  = 0,
  parameter logic [15:0][7:0] UP_FIXED_OWNER = '0,
  localparam int unsigned K_DN      = 3 * NLINK,
  localparam int unsigned K_UP      = 2 * NLINK,
  localparam int unsigned TW_DN     = tag_width(K_DN),
  localparam int unsigned TW_UP     = tag_width(K_UP),
  localparam int unsigned W_AW      = W_WADDR,
  localparam int unsigned W_AR      = W_RADDR,
  localparam int unsigned W_W       = w_wdata(DATA_W),
  localparam int unsigned W_R       = w_rdata(DATA_W),
  localparam int unsigned W_B       = W_WRESP
) (
  input  logic                   clk_tsv,
  input  logic                   rst_tsv_n,

  // ---- chip layer 1: AXI slave ports facing the masters ----
  input  logic                   clk_ic1    [NLINK],
  input  logic                   rst_ic1_n  [NLINK],
  input  logic [NLINK-1:0]       s_aw_valid,
  output logic [NLINK-1:0]       s_aw_ready,
  input  logic [NLINK-1:0][W_AW-1:0] s_aw_payload,
  input  logic [NLINK-1:0]       s_w_valid,
  output logic [NLINK-1:0]       s_w_ready,
  input  logic [NLINK-1:0][W_W-1:0]  s_w_payload,
  input  logic [NLINK-1:0]       s_ar_valid,
  output logic [NLINK-1:0]       s_ar_ready,
  input  logic [NLINK-1:0][W_AR-1:0] s_ar_payload,
  output logic [NLINK-1:0]       s_r_valid,
  input  logic [NLINK-1:0]       s_r_ready,
  output logic [NLINK-1:0][W_R-1:0]  s_r_payload,
  output logic [NLINK-1:0]       s_b_valid,
  input  logic [NLINK-1:0]       s_b_ready,
  output logic [NLINK-1:0][W_B-1:0]  s_b_payload,

  // ---- chip layer 2: AXI master ports facing the slaves ----
  input  logic                   clk_ic2    [NLINK],
  input  logic                   rst_ic2_n  [NLINK],
  output logic [NLINK-1:0]       m_aw_valid,
  input  logic [NLINK-1:0]       m_aw_ready,
  output logic [NLINK-1:0][W_AW-1:0] m_aw_payload,
  output logic [NLINK-1:0]       m_w_valid,
  input  logic [NLINK-1:0]       m_w_ready,
  output logic [NLINK-1:0][W_W-1:0]  m_w_payload,
  output logic [NLINK-1:0]       m_ar_valid,
  input  logic [NLINK-1:0]       m_ar_ready,
  output logic [NLINK-1:0][W_AR-1:0] m_ar_payload,
  input  logic [NLINK-1:0]       m_r_valid,
  output logic [NLINK-1:0]       m_r_ready,
  input  logic [NLINK-1:0][W_R-1:0]  m_r_payload,
  input  logic [NLINK-1:0]       m_b_valid,
  output logic [NLINK-1:0]       m_b_ready,
  input  logic [NLINK-1:0][W_B-1:0]  m_b_payload,

  // ---- TSV array terminals ----
  output logic [ND_DN-1:0]       dn_tsv_data_o,   // layer 1 drives
  output logic [TW_DN-1:0]       dn_tsv_tag_o,
  input  logic [ND_DN-1:0]       dn_tsv_data_i,   // layer 2 receives
  input  logic [TW_DN-1:0]       dn_tsv_tag_i,
  output logic [TW_DN-1:0]       dn_cr_tag_o,     // layer 2 drives
  input  logic [TW_DN-1:0]       dn_cr_tag_i,     // layer 1 receives
  output logic [ND_UP-1:0]       up_tsv_data_o,   // layer 2 drives
  output logic [TW_UP-1:0]       up_tsv_tag_o,
  input  logic [ND_UP-1:0]       up_tsv_data_i,   // layer 1 receives
  input  logic [TW_UP-1:0]       up_tsv_tag_i,
  output logic [TW_UP-1:0]       up_cr_tag_o,     // layer 1 drives
  input  logic [TW_UP-1:0]       up_cr_tag_i      // layer 2 receives
);
  localparam int unsigned MMAX_DN = (W_W > W_AW) ? W_W : W_AW;
  localparam int unsigned MMAX_UP = W_R;
  localparam logic [K_DN-1:0][31:0] M_DN = {NLINK{W_AR, W_W, W_AW}};
  localparam logic [K_UP-1:0][31:0] M_UP = {NLINK{W_B, W_R}};
  localparam logic [K_DN-1:0] FIFO_DN = {NLINK{3'b010}};
  localparam logic [K_UP-1:0] FIFO_UP = {NLINK{2'b01}};

  // per-VLink clocks, valid/ready and payload, in VLink order
  logic                      dn_clk1 [K_DN], dn_rst1_n [K_DN];
  logic                      dn_clk2 [K_DN], dn_rst2_n [K_DN];
  logic                      up_clk1 [K_UP], up_rst1_n [K_UP];
  logic                      up_clk2 [K_UP], up_rst2_n [K_UP];
  logic [K_DN-1:0]           dn_in_valid, dn_in_ready, dn_out_valid, dn_out_ready;
  logic [K_DN-1:0][MMAX_DN-1:0] dn_in_data, dn_out_data;
  logic [K_UP-1:0]           up_in_valid, up_in_ready, up_out_valid, up_out_ready;
  logic [K_UP-1:0][MMAX_UP-1:0] up_in_data, up_out_data;

  // AXI adaptors: one channel per VLink
  for (genvar l = 0; l < int'(NLINK); l++) begin : g_link
    for (genvar c = 0; c < 3; c++) begin : g_dn_clk
      assign dn_clk1[3*l+c]   = clk_ic1[l];
      assign dn_rst1_n[3*l+c] = rst_ic1_n[l];
      assign dn_clk2[3*l+c]   = clk_ic2[l];
      assign dn_rst2_n[3*l+c] = rst_ic2_n[l];
    end
    for (genvar c = 0; c < 2; c++) begin : g_up_clk
      assign up_clk1[2*l+c]   = clk_ic1[l];
      assign up_rst1_n[2*l+c] = rst_ic1_n[l];
      assign up_clk2[2*l+c]   = clk_ic2[l];
      assign up_rst2_n[2*l+c] = rst_ic2_n[l];
    end
    // layer 1, downstream in
    assign dn_in_valid[3*l+0] = s_aw_valid[l];
    assign dn_in_valid[3*l+1] = s_w_valid[l];
    assign dn_in_valid[3*l+2] = s_ar_valid[l];
    assign dn_in_data[3*l+0]  = MMAX_DN'(s_aw_payload[l]);
    assign dn_in_data[3*l+1]  = MMAX_DN'(s_w_payload[l]);
    assign dn_in_data[3*l+2]  = MMAX_DN'(s_ar_payload[l]);
    assign s_aw_ready[l]      = dn_in_ready[3*l+0];
    assign s_w_ready[l]       = dn_in_ready[3*l+1];
    assign s_ar_ready[l]      = dn_in_ready[3*l+2];
    // layer 2, downstream out
    assign m_aw_valid[l]      = dn_out_valid[3*l+0];
    assign m_w_valid[l]       = dn_out_valid[3*l+1];
    assign m_ar_valid[l]      = dn_out_valid[3*l+2];
    assign m_aw_payload[l]    = dn_out_data[3*l+0][W_AW-1:0];
    assign m_w_payload[l]     = dn_out_data[3*l+1][W_W-1:0];
    assign m_ar_payload[l]    = dn_out_data[3*l+2][W_AR-1:0];
    assign dn_out_ready[3*l+0] = m_aw_ready[l];
    assign dn_out_ready[3*l+1] = m_w_ready[l];
    assign dn_out_ready[3*l+2] = m_ar_ready[l];
    // layer 2, upstream in
    assign up_in_valid[2*l+0] = m_r_valid[l];
    assign up_in_valid[2*l+1] = m_b_valid[l];
    assign up_in_data[2*l+0]  = MMAX_UP'(m_r_payload[l]);
    assign up_in_data[2*l+1]  = MMAX_UP'(m_b_payload[l]);
    assign m_r_ready[l]       = up_in_ready[2*l+0];
    assign m_b_ready[l]       = up_in_ready[2*l+1];
    // layer 1, upstream out
    assign s_r_valid[l]       = up_out_valid[2*l+0];
    assign s_b_valid[l]       = up_out_valid[2*l+1];
    assign s_r_payload[l]     = up_out_data[2*l+0][W_R-1:0];
    assign s_b_payload[l]     = up_out_data[2*l+1][W_B-1:0];
    assign up_out_ready[2*l+0] = s_r_ready[l];
    assign up_out_ready[2*l+1] = s_b_ready[l];
  end

  // downstream: send in layer 1, receive in layer 2
  vlink_mux_tx #(
    .K(K_DN), .ND(ND_DN), .MMAX(MMAX_DN), .M(M_DN), .IS_FIFO(FIFO_DN),
    .FIFO_DEPTH(FIFO_DEPTH), .SYNC(SYNC), .NFIXED(DN_NFIXED), .FIXED_OWNER(DN_FIXED_OWNER)
  ) u_dn_tx (
    .clk_ic(dn_clk1), .rst_ic_n(dn_rst1_n),
    .in_valid(dn_in_valid), .in_ready(dn_in_ready), .in_data(dn_in_data),
    .clk_tsv(clk_tsv), .rst_tsv_n(rst_tsv_n),
    .tsv_data_o(dn_tsv_data_o), .tsv_tag_o(dn_tsv_tag_o), .cr_tag_i(dn_cr_tag_i));

  vlink_demux_rx #(
    .K(K_DN), .ND(ND_DN), .MMAX(MMAX_DN), .M(M_DN), .IS_FIFO(FIFO_DN),
    .FIFO_DEPTH(FIFO_DEPTH), .SYNC(SYNC)
  ) u_dn_rx (
    .clk_tsv(clk_tsv), .rst_tsv_n(rst_tsv_n),
    .tsv_data_i(dn_tsv_data_i), .tsv_tag_i(dn_tsv_tag_i), .cr_tag_o(dn_cr_tag_o),
    .clk_ic(dn_clk2), .rst_ic_n(dn_rst2_n),
    .out_valid(dn_out_valid), .out_ready(dn_out_ready), .out_data(dn_out_data));

  // upstream: send in layer 2, receive in layer 1
  vlink_mux_tx #(
    .K(K_UP), .ND(ND_UP), .MMAX(MMAX_UP), .M(M_UP), .IS_FIFO(FIFO_UP),
    .FIFO_DEPTH(FIFO_DEPTH), .SYNC(SYNC), .NFIXED(UP_NFIXED), .FIXED_OWNER(UP_FIXED_OWNER)
  ) u_up_tx (
    .clk_ic(up_clk2), .rst_ic_n(up_rst2_n),
    .in_valid(up_in_valid), .in_ready(up_in_ready), .in_data(up_in_data),
    .clk_tsv(clk_tsv), .rst_tsv_n(rst_tsv_n),
    .tsv_data_o(up_tsv_data_o), .tsv_tag_o(up_tsv_tag_o), .cr_tag_i(up_cr_tag_i));

  vlink_demux_rx #(
    .K(K_UP), .ND(ND_UP), .MMAX(MMAX_UP), .M(M_UP), .IS_FIFO(FIFO_UP),
    .FIFO_DEPTH(FIFO_DEPTH), .SYNC(SYNC)
  ) u_up_rx (
    .clk_tsv(clk_tsv), .rst_tsv_n(rst_tsv_n),
    .tsv_data_i(up_tsv_data_i), .tsv_tag_i(up_tsv_tag_i), .cr_tag_o(up_cr_tag_o),
    .clk_ic(up_clk1), .rst_ic_n(up_rst1_n),
    .out_valid(up_out_valid), .out_ready(up_out_ready), .out_data(up_out_data));

endmodule
