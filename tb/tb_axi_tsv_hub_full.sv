// tb_axi_tsv_hub_full -- AXI burst workload on the TSV-Hub at its default
// sizes (two 32-bit AXI links, 21 downstream and 20 upstream data TSVs,
// 4-word FIFOs, dynamic arbitration only).
//
// Layer 1 holds one AXI master model per link, layer 2 one memory slave
// model per link. The payload layout of the channels is this testbench's
// choice (AXI4-style 8-bit burst length so that 32-beat bursts exist):
//   AW/AR: addr[31:0], id[35:32], len[43:36], size[46:44], burst[48:47]
//   W:     data[31:0], strb[35:32], last[36], id[40:37]
//   R:     data[31:0], id[35:32], resp[37:36], last[38]
//   B:     id[3:0], resp[5:4]
// For burst lengths 1, 2, 4 and 32 both links first write 256 beats
// (AW + W, slave answers B) and then read them back (AR, slave answers R).
// The master checks every read beat against the data written and the LAST
// flag position; the slave checks WLAST and counts responses.
//
// Throughput: as in the reference comparison, data beats per interconnect
// cycle and link, where a plain AXI link moves one beat per cycle. Writes
// load the downstream array (AW 3 flits + 2 flits per W beat), reads the
// upstream array (2 flits per R beat) plus AR flits downstream. At burst 32
// the downstream array needs 2 x (3 + 64) flits for 2 x 32 beats in
// 2 x 32 x 4 TSV cycles: at most 128/134 = 0.955, the 95% of the reference
// point. The test requires at least 0.93 downstream and 0.95 upstream at
// burst 32, and prints all measured values.
module tb_axi_tsv_hub_full;
  timeunit 1ns; timeprecision 1ps;
  import tsvhub_pkg::*;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  localparam int unsigned NLINK = 2, DATA_W = 32, ND_DN = 21, ND_UP = 20;
  localparam int unsigned K_DN = 3 * NLINK, K_UP = 2 * NLINK;
  localparam int unsigned TW_DN = tag_width(K_DN), TW_UP = tag_width(K_UP);
  localparam int unsigned W_AW = W_WADDR, W_AR = W_RADDR, W_W = w_wdata(DATA_W),
                          W_R = w_rdata(DATA_W), W_B = W_WRESP;
  localparam int unsigned BEATS = 256;

  logic clk_tsv = 0, rst_tsv_n = 0;
  logic clk_ic1 [NLINK], clk_ic2 [NLINK], rst_ic1_n [NLINK], rst_ic2_n [NLINK];
  logic c1 = 0, c2 = 0, rst_ic_n = 0;
  always #1 clk_tsv = ~clk_tsv;
  always #4 c1 = ~c1;
  initial begin #2.5; forever #4 c2 = ~c2; end
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

  assign dn_tsv_data_i = dn_tsv_data_o;
  assign dn_tsv_tag_i  = dn_tsv_tag_o;
  assign dn_cr_tag_i   = dn_cr_tag_o;
  assign up_tsv_data_i = up_tsv_data_o;
  assign up_tsv_tag_i  = up_tsv_tag_o;
  assign up_cr_tag_i   = up_cr_tag_o;

  axi_tsv_hub dut (.*);

  function automatic logic [31:0] wdata_of(input int l, input logic [31:0] addr);
    logic [31:0] x;
    x = addr * 32'h9E3779B9 ^ (32'(l) * 32'h85EBCA6B);
    return x ^ (x >> 13);
  endfunction

  // workload control
  int burst = 1;
  bit do_write = 0, do_read = 0;
  int wr_beats_slv [NLINK], rd_beats_mst [NLINK], bresp [NLINK];
  int first_w [NLINK], last_w [NLINK], first_r [NLINK], last_r [NLINK];
  int cyc2 = 0, cyc1 = 0;
  always @(posedge c2) cyc2++;
  always @(posedge c1) cyc1++;

  for (genvar l = 0; l < int'(NLINK); l++) begin : g_link
    // ---------------- master (layer 1) ----------------
    int aw_sent = 0, w_sent = 0, ar_sent = 0, r_rcvd = 0, w_beat = 0;
    always @(posedge c1 or negedge rst_ic_n) begin
      if (!rst_ic_n) begin
        s_aw_valid[l] <= 0; s_w_valid[l] <= 0; s_ar_valid[l] <= 0;
        s_r_ready[l] <= 0; s_b_ready[l] <= 0;
      end else begin
        logic [31:0] a;
        s_r_ready[l] <= 1'b1;
        s_b_ready[l] <= 1'b1;
        // write address
        if (s_aw_valid[l] && s_aw_ready[l]) aw_sent++;
        if (!s_aw_valid[l] || s_aw_ready[l]) begin
          if (do_write && aw_sent < int'(BEATS) / burst) begin
            a = 32'((aw_sent) * burst * 4);
            s_aw_valid[l]   <= 1'b1;
            s_aw_payload[l] <= W_AW'({2'b01, 3'd2, 8'(burst - 1), 4'(l), a});
          end else s_aw_valid[l] <= 1'b0;
        end
        // write data
        if (s_w_valid[l] && s_w_ready[l]) w_sent++;
        if (!s_w_valid[l] || s_w_ready[l]) begin
          int n;
          n = w_sent;
          if (do_write && n < int'(BEATS)) begin
            a = 32'(n * 4);
            s_w_valid[l]   <= 1'b1;
            s_w_payload[l] <= W_W'({4'(l), (n % burst) == burst - 1, 4'hF, wdata_of(l, a)});
          end else s_w_valid[l] <= 1'b0;
        end
        // read address
        if (s_ar_valid[l] && s_ar_ready[l]) ar_sent++;
        if (!s_ar_valid[l] || s_ar_ready[l]) begin
          if (do_read && ar_sent < int'(BEATS) / burst) begin
            a = 32'((ar_sent) * burst * 4);
            s_ar_valid[l]   <= 1'b1;
            s_ar_payload[l] <= W_AR'({2'b01, 3'd2, 8'(burst - 1), 4'(l), a});
          end else s_ar_valid[l] <= 1'b0;
        end
        // read data, in order
        if (s_r_valid[l] && s_r_ready[l]) begin
          a = 32'(r_rcvd * 4);
          check(s_r_payload[l][31:0] == wdata_of(l, a), $sformatf("link %0d read beat %0d data %h exp %h", l, r_rcvd, s_r_payload[l][31:0], wdata_of(l, a)));
          check(s_r_payload[l][38] == ((r_rcvd % burst) == burst - 1), $sformatf("link %0d RLAST %0d", l, r_rcvd));
          check(s_r_payload[l][35:32] == 4'(l) && s_r_payload[l][37:36] == 2'b00, $sformatf("link %0d RID/RRESP", l));
          if (rd_beats_mst[l] == 0) first_r[l] = cyc1;
          last_r[l] = cyc1;
          r_rcvd++;
          rd_beats_mst[l]++;
        end
        if (s_b_valid[l] && s_b_ready[l]) begin
          check(s_b_payload[l][3:0] == 4'(l) && s_b_payload[l][5:4] == 2'b00, $sformatf("link %0d BID/BRESP", l));
          bresp[l]++;
        end
      end
    end

    // ---------------- slave (layer 2) ----------------
    logic [31:0] mem [int];
    logic [W_AW-1:0] awq [$];
    logic [W_AR-1:0] arq [$];
    int wb = 0, rb = 0, bpend = 0;
    always @(posedge c2 or negedge rst_ic_n) begin
      if (!rst_ic_n) begin
        m_aw_ready[l] <= 0; m_w_ready[l] <= 0; m_ar_ready[l] <= 0;
        m_r_valid[l] <= 0; m_b_valid[l] <= 0;
      end else begin
        logic [W_AW-1:0] aw;
        logic [W_AR-1:0] ar;
        m_aw_ready[l] <= 1'b1;
        m_ar_ready[l] <= 1'b1;
        if (m_aw_valid[l] && m_aw_ready[l]) awq.push_back(m_aw_payload[l]);
        if (m_ar_valid[l] && m_ar_ready[l]) arq.push_back(m_ar_payload[l]);
        // write data needs its address first
        if (m_w_valid[l] && m_w_ready[l]) begin
          aw = awq[0];
          mem[aw[31:0] + 32'(wb * 4)] = m_w_payload[l][31:0];
          check(m_w_payload[l][36] == (wb == int'(aw[43:36])), $sformatf("link %0d WLAST", l));
          if (wr_beats_slv[l] == 0) first_w[l] = cyc2;
          last_w[l] = cyc2;
          wr_beats_slv[l]++;
          if (wb == int'(aw[43:36])) begin wb = 0; void'(awq.pop_front()); bpend++; end
          else wb++;
        end
        m_w_ready[l] <= awq.size() > 0;
        if (m_b_valid[l] && m_b_ready[l]) bpend--;
        m_b_valid[l]   <= bpend > 0;
        m_b_payload[l] <= W_B'({2'b00, 4'(l)});
        // read data
        if (m_r_valid[l] && m_r_ready[l]) begin
          ar = arq[0];
          if (rb == int'(ar[43:36])) begin rb = 0; void'(arq.pop_front()); end
          else rb++;
        end
        if (arq.size() > 0) begin
          ar = arq[0];
          m_r_valid[l]   <= 1'b1;
          m_r_payload[l] <= W_R'({rb == int'(ar[43:36]), 2'b00, 4'(l),
                                  mem.exists(ar[31:0] + 32'(rb * 4)) ? mem[ar[31:0] + 32'(rb * 4)] : 32'hDEAD_BEEF});
        end else m_r_valid[l] <= 1'b0;
      end
    end
  end

  function automatic bit writes_done();
    for (int l = 0; l < int'(NLINK); l++)
      if (wr_beats_slv[l] < int'(BEATS) || bresp[l] < int'(BEATS) / burst) return 0;
    return 1;
  endfunction
  function automatic bit reads_done();
    for (int l = 0; l < int'(NLINK); l++) if (rd_beats_mst[l] < int'(BEATS)) return 0;
    return 1;
  endfunction

  initial begin
    int bl [4] = '{1, 2, 4, 32};
    real down, up;
    #20 rst_tsv_n = 1; rst_ic_n = 1;
    foreach (bl[i]) begin
      burst = bl[i];
      for (int l = 0; l < int'(NLINK); l++) begin
        wr_beats_slv[l] = 0; rd_beats_mst[l] = 0; bresp[l] = 0;
        g_link[0].aw_sent = 0;
      end
      g_link[0].aw_sent = 0; g_link[0].w_sent = 0; g_link[0].ar_sent = 0; g_link[0].r_rcvd = 0;
      g_link[1].aw_sent = 0; g_link[1].w_sent = 0; g_link[1].ar_sent = 0; g_link[1].r_rcvd = 0;
      do_write = 1;
      while (!writes_done()) @(posedge c1);
      do_write = 0;
      do_read = 1;
      while (!reads_done()) @(posedge c1);
      do_read = 0;
      repeat (20) @(posedge c1);
      down = 0.0; up = 0.0;
      for (int l = 0; l < int'(NLINK); l++) begin
        down += real'(BEATS) / real'(last_w[l] - first_w[l] + 1) / real'(NLINK);
        up   += real'(BEATS) / real'(last_r[l] - first_r[l] + 1) / real'(NLINK);
        check(bresp[l] == int'(BEATS) / burst, $sformatf("link %0d write responses", l));
      end
      $display("burst %0d: downstream (write) throughput %0.3f, upstream (read) throughput %0.3f",
               burst, down, up);
      if (burst == 32) begin
        check(down >= 0.93, $sformatf("burst 32 write throughput %0.3f below 0.93", down));
        check(up >= 0.95, $sformatf("burst 32 read throughput %0.3f below 0.95", up));
      end
      check(down > 0.2 && up > 0.2, "throughput collapsed");
      // flits cannot beat the array: per link and burst 3 + 2*burst flits for
      // burst beats, two links sharing 4 TSV cycles per interconnect cycle
      check(down <= 4.0 * burst / (2.0 * (3 + 2 * burst)) + 0.02,
            $sformatf("burst %0d write throughput %0.3f above the TSV bound", burst, down));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
