// tb_hub_workload -- AXI burst workload on one TSV-Hub configuration, used
// by tb_axi_tsv_hub_sweep to run the compositions and TSV counts that the
// hub's evaluation covers (one or two links, 32 or 64 data bits, several
// data-TSV counts).
//
// The traffic is the same as in tb_axi_tsv_hub_full: per link one AXI master
// model on layer 1 and one memory slave model on layer 2; for each burst
// length both links write BEATS beats and read them back, and every read beat
// is compared with the data written. Payload layout (this testbench's
// choice, sized for any DATA_W that is a multiple of 8):
//   AW/AR: addr[31:0], id[35:32], len[43:36], size[46:44], burst[48:47]
//   W:     data[DATA_W-1:0], strb[DATA_W/8], last at bit DATA_W+DATA_W/8
//   R:     data[DATA_W-1:0], id[+:4], resp[+:2], last at bit DATA_W+6
//   B:     id[3:0], resp[5:4]
//
// Throughput is data beats per interconnect cycle and link (1.0 = a direct
// AXI link). The expected value is the flit bound of the array, worked out
// from the widths alone: per link and burst of N beats the downstream array
// carries ceil(55/ND_DN) + N*ceil(W_W/ND_DN) flits during the write phase,
// the upstream array N*ceil(W_R/ND_UP) during the read phase (write responses
// travel in the write phase), and each array offers 4 TSV cycles per
// interconnect cycle to NLINK links. For N = 32 the measured value must reach
// MIN_FRAC (default 95%) of min(1, bound); for every N it may not exceed the bound by more than
// 0.02. The testbench reports done, checks and failures instead of finishing.
//
// Clocks: TSV clock period 2 ns, interconnect clocks 8 ns. By default the
// layer-2 interconnect clock is shifted by 2.5 ns and no interconnect edge
// meets a TSV edge (mesochronous, unknown phase); with ALIGNED every
// interconnect edge coincides with a TSV edge, as the synchronous and
// ratiochronous terminations (SYNC = 0) require.
module tb_hub_workload #(
  parameter int unsigned NLINK  = 2,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ND_DN  = 21,
  parameter int unsigned ND_UP  = 20,
  parameter int unsigned SYNC   = 1,
  parameter real         MIN_FRAC = 0.95,
  parameter bit          ALIGNED = 0,  // clock edges coincide (ratiochronous)
  parameter string       NAME   = "hub"
) (
  output bit done,
  output int checks,
  output int failures,
  output real down32,
  output real up32
);
  timeunit 1ns; timeprecision 1ps;
  import tsvhub_pkg::*;

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s: %s", NAME, msg); end
  endfunction

  localparam int unsigned K_DN = 3 * NLINK, K_UP = 2 * NLINK;
  localparam int unsigned TW_DN = tag_width(K_DN), TW_UP = tag_width(K_UP);
  localparam int unsigned W_AW = W_WADDR, W_AR = W_RADDR, W_W = w_wdata(DATA_W),
                          W_R = w_rdata(DATA_W), W_B = W_WRESP;
  localparam int unsigned SB = DATA_W / 8;
  localparam int unsigned BEATS = 256;
  localparam int unsigned F_AW = num_flits(W_AW, ND_DN), F_W = num_flits(W_W, ND_DN);
  localparam int unsigned F_R = num_flits(W_R, ND_UP);

  logic clk_tsv = ALIGNED, rst_tsv_n = 0;
  logic clk_ic1 [NLINK], clk_ic2 [NLINK], rst_ic1_n [NLINK], rst_ic2_n [NLINK];
  logic c1 = 0, c2 = 0, rst_ic_n = 0;
  always #1 clk_tsv = ~clk_tsv;
  always #4 c1 = ~c1;
  initial begin #(ALIGNED ? 0.0 : 2.5); forever #4 c2 = ~c2; end
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

  axi_tsv_hub #(.NLINK(NLINK), .DATA_W(DATA_W), .ND_DN(ND_DN), .ND_UP(ND_UP), .SYNC(SYNC)) dut (.*);

  function automatic logic [DATA_W-1:0] wdata_of(input int l, input logic [31:0] addr);
    logic [31:0] x;
    logic [DATA_W-1:0] y;
    x = addr * 32'h9E3779B9 ^ (32'(l) * 32'h85EBCA6B);
    for (int i = 0; i < int'(DATA_W); i += 32) begin
      x = x ^ (x >> 13) ^ 32'(i);
      y = (y << 32) | DATA_W'(x);
    end
    return y;
  endfunction

  // workload control
  int burst = 1;
  bit do_write = 0, do_read = 0, clear = 0;
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
      end else if (clear) begin
        aw_sent = 0; w_sent = 0; ar_sent = 0; r_rcvd = 0;
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
            s_w_payload[l] <= W_W'({(n % burst) == burst - 1, {SB{1'b1}}, wdata_of(l, a)});
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
          check(s_r_payload[l][DATA_W-1:0] == wdata_of(l, a), $sformatf("link %0d read beat %0d data", l, r_rcvd));
          check(s_r_payload[l][DATA_W+6] == ((r_rcvd % burst) == burst - 1), $sformatf("link %0d RLAST %0d", l, r_rcvd));
          check(s_r_payload[l][DATA_W +: 4] == 4'(l) && s_r_payload[l][DATA_W+4 +: 2] == 2'b00, $sformatf("link %0d RID/RRESP", l));
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
    logic [DATA_W-1:0] mem [int];
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
          mem[aw[31:0] + 32'(wb * 4)] = m_w_payload[l][DATA_W-1:0];
          check(m_w_payload[l][DATA_W+SB] == (wb == int'(aw[43:36])), $sformatf("link %0d WLAST", l));
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
                                  mem.exists(ar[31:0] + 32'(rb * 4)) ? mem[ar[31:0] + 32'(rb * 4)] : DATA_W'(32'hDEAD_BEEF)});
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
    int bl [3] = '{1, 4, 32};
    real down, up, bdn, bup;
    checks = 0; failures = 0; done = 0;
    #20 rst_tsv_n = 1; rst_ic_n = 1;
    foreach (bl[i]) begin
      burst = bl[i];
      for (int l = 0; l < int'(NLINK); l++) begin
        wr_beats_slv[l] = 0; rd_beats_mst[l] = 0; bresp[l] = 0;
      end
      @(negedge c1) clear = 1;
      @(negedge c1) clear = 0;
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
      bdn = 4.0 * burst / (real'(NLINK) * (F_AW + burst * F_W));
      bup = 4.0 / (real'(NLINK) * F_R);
      if (bdn > 1.0) bdn = 1.0;
      if (bup > 1.0) bup = 1.0;
      $display("%s: burst %0d: write %0.3f (flit bound %0.3f), read %0.3f (flit bound %0.3f)",
               NAME, burst, down, bdn, up, bup);
      check(down <= bdn + 0.02, $sformatf("burst %0d write throughput above the bound", burst));
      check(up <= bup + 0.02, $sformatf("burst %0d read throughput above the bound", burst));
      if (burst == 32) begin
        down32 = down; up32 = up;
        check(down >= MIN_FRAC * bdn, $sformatf("burst 32 write throughput %0.3f below %0.2f of %0.3f", down, MIN_FRAC, bdn));
        check(up >= MIN_FRAC * bup, $sformatf("burst 32 read throughput %0.3f below %0.2f of %0.3f", up, MIN_FRAC, bup));
      end
    end
    done = 1;
  end
endmodule
