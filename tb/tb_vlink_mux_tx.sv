// tb_vlink_mux_tx -- self-checking testbench for vlink_mux_tx.
//
// Three VLinks with the widths of one AXI link's downstream channels (write
// address 55 bits / register, write data 42 bits / 4-word FIFO, read address
// 49 bits / register) share 21 data TSVs; the interconnect clock is a quarter
// of the TSV clock. A model of the far end decodes the tag TSVs, rebuilds the
// words of each VLink, compares them with what was sent, models each VLink's
// buffer (depth 4 or 1) draining at random, and returns credits one per cycle
// on the credit tag. Checks: content and order per VLink, no buffer overflow
// at the far end, that ceil(M/ND) flits make a word, that flits of different
// VLinks interleaved, and the TSV utilization while all VLinks are saturated.
module tb_vlink_mux_tx;
  timeunit 1ns; timeprecision 1ps;
  import tsvhub_pkg::*;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  localparam int unsigned K = 3, ND = 21, MMAX = 55, NW = 150;
  localparam logic [K-1:0][31:0] M = {32'd49, 32'd42, 32'd55};
  localparam logic [K-1:0] IS_FIFO = 3'b010;
  localparam int unsigned TW = tag_width(K);

  logic clk_tsv = 0, rst_tsv_n = 0;
  logic clk_ic [K], rst_ic_n [K];
  logic ic = 0, ric_n = 0;
  always #1 clk_tsv = ~clk_tsv;
  always #4 ic = ~ic;
  for (genvar v = 0; v < int'(K); v++) begin : g_clk
    assign clk_ic[v] = ic;
    assign rst_ic_n[v] = ric_n;
  end

  logic [K-1:0] in_valid = '0, in_ready;
  logic [K-1:0][MMAX-1:0] in_data = '0;
  logic [ND-1:0] tsv_data_o;
  logic [TW-1:0] tsv_tag_o, cr_tag_i = '0;

  vlink_mux_tx #(.K(K), .ND(ND), .MMAX(MMAX), .M(M), .IS_FIFO(IS_FIFO), .FIFO_DEPTH(4)) dut (.*);

  logic [MMAX-1:0] q [K][$];
  int sent [K], rcvd [K], fidx [K], occ [K], pend [K];
  logic [3*ND-1:0] acc [K];
  int interleaved = 0, busy_cycles = 0, sat_cycles = 0;
  int last_tag = 0, saturate = 0;
  int tagc [K] = '{0, 0, 0};

  initial for (int v = 0; v < int'(K); v++) begin sent[v] = 0; rcvd[v] = 0; fidx[v] = 0; occ[v] = 0; pend[v] = 0; end

  always @(posedge ic) if (ric_n) begin
    for (int v = 0; v < int'(K); v++) begin
      if (in_valid[v] && in_ready[v]) begin q[v].push_back(in_data[v]); sent[v]++; end
      if (!in_valid[v] || in_ready[v]) begin
        if (sent[v] + int'(in_valid[v] && in_ready[v]) < int'(NW) &&
            (saturate == 1 || ($urandom % 100) < 50)) begin
          in_valid[v] <= 1'b1;
          in_data[v]  <= MMAX'(M[v] == 55 ? {$urandom, $urandom} & 64'h7F_FFFF_FFFF_FFFF :
                               M[v] == 42 ? {$urandom, $urandom} & 64'h3FF_FFFF_FFFF :
                                            {$urandom, $urandom} & 64'h1_FFFF_FFFF_FFFF);
        end else in_valid[v] <= 1'b0;
      end
    end
  end

  // far-end model
  always @(posedge clk_tsv) if (rst_tsv_n) begin
    int t, nf, depth;
    t = int'(tsv_tag_o);
    check(t <= int'(K), "tag in range");
    if (saturate == 1 && rst_tsv_n) begin sat_cycles++; if (t != 0) busy_cycles++; if (t != 0) tagc[t-1]++; end
    if (t != 0) begin
      int v;
      v = t - 1;
      nf = num_flits(M[v], ND);
      if (last_tag != 0 && last_tag != t && fidx[last_tag-1] != 0) interleaved++;
      if (fidx[v] == 0) acc[v] = '0;
      acc[v][fidx[v]*ND +: ND] = tsv_data_o;
      fidx[v]++;
      if (fidx[v] == nf) begin
        fidx[v] = 0;
        depth = IS_FIFO[v] ? 4 : 1;
        occ[v]++;
        check(occ[v] <= depth, $sformatf("vlink %0d far buffer overflow", v));
        check(q[v].size() > 0 && ((64'(acc[v]) ^ 64'(q[v][0])) & (64'hFFFF_FFFF_FFFF_FFFF >> (64 - M[v]))) == '0
              && (64'(acc[v]) >> M[v]) == '0,
              $sformatf("vlink %0d word %0d", v, rcvd[v]));
        if (q[v].size() > 0) void'(q[v].pop_front());
        rcvd[v]++;
      end
    end
    last_tag = t;
    // far buffers drain at random, one credit back per cycle
    for (int v = 0; v < int'(K); v++)
      if (occ[v] > 0 && ($urandom % 100) < (saturate == 1 ? 100 : 15)) begin occ[v]--; pend[v]++; end
    cr_tag_i <= '0;
    for (int v = 0; v < int'(K); v++)
      if (pend[v] > 0) begin cr_tag_i <= TW'(v + 1); pend[v]--; break; end
  end

  initial begin
    saturate = 1;
    #20 rst_tsv_n = 1; ric_n = 1;
    repeat (40) @(posedge clk_tsv);
    sat_cycles = 0; busy_cycles = 0;
    repeat (200) @(posedge clk_tsv);
    saturate = 2;
    wait (rcvd[0] == int'(NW) && rcvd[1] == int'(NW) && rcvd[2] == int'(NW));
    repeat (10) @(posedge clk_tsv);
    for (int v = 0; v < int'(K); v++)
      check(q[v].size() == 0 && fidx[v] == 0, $sformatf("vlink %0d complete", v));
    check(interleaved > 0, $sformatf("flits interleaved (%0d)", interleaved));
    // saturated: 3 VLinks offer 3+2+3 flits per 4 TSV cycles; the handshake
    // registers limit the address VLinks, the array must still be busy most cycles
    check(busy_cycles * 100 >= sat_cycles * 50,
          $sformatf("TSV utilization %0d of %0d cycles", busy_cycles, sat_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
