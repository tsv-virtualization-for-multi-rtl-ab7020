// tb_axi_tsv_hub -- end-to-end testbench of the TSV-Hub with two AXI links.
//
// The hub runs at its default sizes (2 links, 32-bit data, 21 downstream and
// 20 upstream data TSVs, 4-word FIFOs) except that the downstream arbiter gets
// two fixed TDMA slots, owned by the write-data VLinks of link 0 and link 1,
// so that fixed and dynamic slots both occur. The TSV arrays are modelled as
// plain wires. The TSV clock has period 2, the interconnect clocks period 8
// (ratio 4 as in the reference configuration); layer 2 clocks are shifted in
// phase against layer 1 (mesochronous).
//
// Every AXI channel of both links carries its own numbered stream of words
// (tb_chan_src / tb_chan_snk); each word is checked for content and order at
// the far end. Three phases: random traffic, full load on all ten channels,
// and slow receivers. The testbench counts how often each mechanism of the hub
// happened and fails if one never did: multi-flit serialization, flit
// interleaving of different VLinks on one array, fixed TDMA slots, dynamic
// dTDMA slots, contention between VLinks, senders stopped for lack of
// credits, back-pressure from the AXI receivers, and both termination types
// (FIFO and handshake register) on both arrays.
module tb_axi_tsv_hub;
  timeunit 1ns; timeprecision 1ps;
  import tsvhub_pkg::*;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  localparam int unsigned NLINK = 2, DATA_W = 32, ND_DN = 21, ND_UP = 20, N = 300;
  localparam int unsigned K_DN = 3 * NLINK, K_UP = 2 * NLINK;
  localparam int unsigned TW_DN = tag_width(K_DN), TW_UP = tag_width(K_UP);
  localparam int unsigned W_AW = W_WADDR, W_AR = W_RADDR, W_W = w_wdata(DATA_W),
                          W_R = w_rdata(DATA_W), W_B = W_WRESP;

  logic clk_tsv = 0, rst_tsv_n = 0;
  logic clk_ic1 [NLINK], clk_ic2 [NLINK], rst_ic1_n [NLINK], rst_ic2_n [NLINK];
  logic c1 = 0, c2 = 0, rst_ic_n = 0;
  always #1 clk_tsv = ~clk_tsv;
  always #4 c1 = ~c1;
  initial begin #1.5; forever #4 c2 = ~c2; end
  for (genvar l = 0; l < int'(NLINK); l++) begin : g_clk
    assign clk_ic1[l] = c1;
    assign clk_ic2[l] = c2;
    assign rst_ic1_n[l] = rst_ic_n;
    assign rst_ic2_n[l] = rst_ic_n;
  end

  logic [NLINK-1:0] s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_ar_valid, s_ar_ready;
  logic [NLINK-1:0] s_r_valid, s_r_ready, s_b_valid, s_b_ready;
  logic [NLINK-1:0][W_AW-1:0] s_aw_payload, m_aw_payload;
  logic [NLINK-1:0][W_W-1:0]  s_w_payload, m_w_payload;
  logic [NLINK-1:0][W_AR-1:0] s_ar_payload, m_ar_payload;
  logic [NLINK-1:0][W_R-1:0]  s_r_payload, m_r_payload;
  logic [NLINK-1:0][W_B-1:0]  s_b_payload, m_b_payload;
  logic [NLINK-1:0] m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_ar_valid, m_ar_ready;
  logic [NLINK-1:0] m_r_valid, m_r_ready, m_b_valid, m_b_ready;

  logic [ND_DN-1:0] dn_tsv_data_o, dn_tsv_data_i;
  logic [TW_DN-1:0] dn_tsv_tag_o, dn_tsv_tag_i, dn_cr_tag_o, dn_cr_tag_i;
  logic [ND_UP-1:0] up_tsv_data_o, up_tsv_data_i;
  logic [TW_UP-1:0] up_tsv_tag_o, up_tsv_tag_i, up_cr_tag_o, up_cr_tag_i;

  // the TSV arrays: wires between the layers
  assign dn_tsv_data_i = dn_tsv_data_o;
  assign dn_tsv_tag_i  = dn_tsv_tag_o;
  assign dn_cr_tag_i   = dn_cr_tag_o;
  assign up_tsv_data_i = up_tsv_data_o;
  assign up_tsv_tag_i  = up_tsv_tag_o;
  assign up_cr_tag_i   = up_cr_tag_o;

  axi_tsv_hub #(.DN_NFIXED(2), .DN_FIXED_OWNER({112'd0, 8'd4, 8'd1})) dut (.*);

  int unsigned src_prob = 50, snk_prob = 50;
  int unsigned cnt [NLINK][5], err [NLINK][5], stl [NLINK][5], scnt [NLINK][5];

  for (genvar l = 0; l < int'(NLINK); l++) begin : g_link
    int unsigned c_aw, c_w, c_ar, c_r, c_b, e_aw, e_w, e_ar, e_r, e_b;
    int unsigned s_aw, s_w, s_ar, s_r, s_b, o_aw, o_w, o_ar, o_r, o_b;
    tb_chan_src #(.W(W_AW), .SEED(10*l+1), .N(N)) u_aw_src (.clk(c1), .rst_n(rst_ic_n), .prob(src_prob),
      .valid(s_aw_valid[l]), .ready(s_aw_ready[l]), .payload(s_aw_payload[l]), .count(o_aw));
    tb_chan_src #(.W(W_W), .SEED(10*l+2), .N(N)) u_w_src (.clk(c1), .rst_n(rst_ic_n), .prob(src_prob),
      .valid(s_w_valid[l]), .ready(s_w_ready[l]), .payload(s_w_payload[l]), .count(o_w));
    tb_chan_src #(.W(W_AR), .SEED(10*l+3), .N(N)) u_ar_src (.clk(c1), .rst_n(rst_ic_n), .prob(src_prob),
      .valid(s_ar_valid[l]), .ready(s_ar_ready[l]), .payload(s_ar_payload[l]), .count(o_ar));
    tb_chan_src #(.W(W_R), .SEED(10*l+4), .N(N)) u_r_src (.clk(c2), .rst_n(rst_ic_n), .prob(src_prob),
      .valid(m_r_valid[l]), .ready(m_r_ready[l]), .payload(m_r_payload[l]), .count(o_r));
    tb_chan_src #(.W(W_B), .SEED(10*l+5), .N(N)) u_b_src (.clk(c2), .rst_n(rst_ic_n), .prob(src_prob),
      .valid(m_b_valid[l]), .ready(m_b_ready[l]), .payload(m_b_payload[l]), .count(o_b));

    tb_chan_snk #(.W(W_AW), .SEED(10*l+1)) u_aw_snk (.clk(c2), .rst_n(rst_ic_n), .prob(snk_prob),
      .valid(m_aw_valid[l]), .ready(m_aw_ready[l]), .payload(m_aw_payload[l]), .count(c_aw), .errors(e_aw), .stalls(s_aw));
    tb_chan_snk #(.W(W_W), .SEED(10*l+2)) u_w_snk (.clk(c2), .rst_n(rst_ic_n), .prob(snk_prob),
      .valid(m_w_valid[l]), .ready(m_w_ready[l]), .payload(m_w_payload[l]), .count(c_w), .errors(e_w), .stalls(s_w));
    tb_chan_snk #(.W(W_AR), .SEED(10*l+3)) u_ar_snk (.clk(c2), .rst_n(rst_ic_n), .prob(snk_prob),
      .valid(m_ar_valid[l]), .ready(m_ar_ready[l]), .payload(m_ar_payload[l]), .count(c_ar), .errors(e_ar), .stalls(s_ar));
    tb_chan_snk #(.W(W_R), .SEED(10*l+4)) u_r_snk (.clk(c1), .rst_n(rst_ic_n), .prob(snk_prob),
      .valid(s_r_valid[l]), .ready(s_r_ready[l]), .payload(s_r_payload[l]), .count(c_r), .errors(e_r), .stalls(s_r));
    tb_chan_snk #(.W(W_B), .SEED(10*l+5)) u_b_snk (.clk(c1), .rst_n(rst_ic_n), .prob(snk_prob),
      .valid(s_b_valid[l]), .ready(s_b_ready[l]), .payload(s_b_payload[l]), .count(c_b), .errors(e_b), .stalls(s_b));

    always_comb begin
      cnt[l] = '{c_aw, c_w, c_ar, c_r, c_b};
      err[l] = '{e_aw, e_w, e_ar, e_r, e_b};
      stl[l] = '{s_aw, s_w, s_ar, s_r, s_b};
      scnt[l] = '{o_aw, o_w, o_ar, o_r, o_b};
    end
  end

  // ---------------- mechanism counters ----------------
  localparam int unsigned NF_DN [3] = '{num_flits(W_AW, ND_DN), num_flits(W_W, ND_DN),
                                        num_flits(W_AR, ND_DN)};
  localparam int unsigned NF_UP [2] = '{num_flits(W_R, ND_UP), num_flits(W_B, ND_UP)};
  int multi_flit = 0, interleave = 0, fixed_grants = 0, dyn_grants = 0, contention = 0;
  int credit_stall = 0, fifo_words = 0, reg_words = 0;
  int dn_part [K_DN], up_part [K_UP];
  initial begin
    foreach (dn_part[i]) dn_part[i] = 0;
    foreach (up_part[i]) up_part[i] = 0;
  end

  always @(posedge clk_tsv) if (rst_tsv_n) begin
    int v, nf;
    if (dut.u_dn_tx.u_arb.fixed_slot && dut.u_dn_tx.grant != '0) fixed_grants++;
    if (!dut.u_dn_tx.u_arb.fixed_slot && dut.u_dn_tx.grant != '0) dyn_grants++;
    if ($countones(dut.u_dn_tx.req) > 1 || $countones(dut.u_up_tx.req) > 1) contention++;
    // downstream flits seen on the TSVs, decoded independently of the hub
    if (dn_tsv_tag_o != '0) begin
      v = int'(dn_tsv_tag_o) - 1;
      nf = int'(NF_DN[v % 3]);
      for (int u = 0; u < int'(K_DN); u++) if (u != v && dn_part[u] != 0) interleave++;
      dn_part[v] = (dn_part[v] + 1) % nf;
      if (dn_part[v] == 0) begin
        if (nf > 1) multi_flit++;
        if (v % 3 == 1) fifo_words++; else reg_words++;
      end
    end
    if (up_tsv_tag_o != '0) begin
      v = int'(up_tsv_tag_o) - 1;
      nf = int'(NF_UP[v % 2]);
      for (int u = 0; u < int'(K_UP); u++) if (u != v && up_part[u] != 0) interleave++;
      up_part[v] = (up_part[v] + 1) % nf;
      if (up_part[v] == 0) begin
        if (nf > 1) multi_flit++;
        if (v % 2 == 0) fifo_words++; else reg_words++;
      end
    end
  end

  for (genvar v = 0; v < int'(K_DN); v++) begin : g_cs_dn
    always @(posedge clk_tsv)
      if (rst_tsv_n && dut.u_dn_tx.g_vl[v].u_tx.c_valid && dut.u_dn_tx.g_vl[v].u_tx.cred_q == '0)
        credit_stall++;
  end
  for (genvar v = 0; v < int'(K_UP); v++) begin : g_cs_up
    always @(posedge clk_tsv)
      if (rst_tsv_n && dut.u_up_tx.g_vl[v].u_tx.c_valid && dut.u_up_tx.g_vl[v].u_tx.cred_q == '0)
        credit_stall++;
  end

  function automatic bit all_done(input int unsigned n);
    for (int l = 0; l < int'(NLINK); l++)
      for (int c = 0; c < 5; c++) if (cnt[l][c] < n) return 0;
    return 1;
  endfunction

  initial begin
    int backpressure;
    #20 rst_tsv_n = 1; rst_ic_n = 1;
    // phase 1: random traffic
    while (!all_done(N / 3)) @(posedge c1);
    // phase 2: full load
    src_prob = 100; snk_prob = 100;
    while (!all_done(2 * N / 3)) @(posedge c1);
    // phase 3: slow receivers
    src_prob = 100; snk_prob = 10;
    while (!all_done(N)) @(posedge c1);
    repeat (40) @(posedge c1);
    backpressure = 0;
    for (int l = 0; l < int'(NLINK); l++)
      for (int c = 0; c < 5; c++) begin
        checks += int'(cnt[l][c]);
        check(cnt[l][c] == N && scnt[l][c] == N,
              $sformatf("link %0d channel %0d: %0d of %0d words", l, c, cnt[l][c], N));
        check(err[l][c] == 0, $sformatf("link %0d channel %0d: %0d bad words", l, c, err[l][c]));
        failures += int'(err[l][c]);
        backpressure += int'(stl[l][c]);
      end
    $display("mechanisms: multi_flit=%0d interleave=%0d fixed_slot=%0d dyn_slot=%0d contention=%0d credit_stall=%0d backpressure=%0d fifo_words=%0d reg_words=%0d",
             multi_flit, interleave, fixed_grants, dyn_grants, contention, credit_stall,
             backpressure, fifo_words, reg_words);
    check(multi_flit > 0, "multi-flit serialization never happened");
    check(interleave > 0, "flit interleaving never happened");
    check(fixed_grants > 0, "fixed TDMA slot never used");
    check(dyn_grants > 0, "dynamic slot never used");
    check(contention > 0, "no contention between VLinks");
    check(credit_stall > 0, "no credit stall");
    check(backpressure > 0, "no back-pressure from receivers");
    check(fifo_words > 0 && reg_words > 0, "a termination type was never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    for (int l = 0; l < int'(NLINK); l++) for (int c = 0; c < 5; c++) $display("link %0d ch %0d sent %0d rcvd %0d", l, c, scnt[l][c], cnt[l][c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
