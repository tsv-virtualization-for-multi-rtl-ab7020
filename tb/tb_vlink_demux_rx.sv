// tb_vlink_demux_rx -- self-checking testbench for vlink_demux_rx.
//
// Two VLinks with the widths of one AXI link's upstream channels (read data
// 40 bits / 4-word FIFO, write response 9 bits / register) share 20 data TSVs.
// A sender model on the TSV clock serializes random words, interleaves the
// flits of both VLinks at random, and only starts a word when it holds a
// credit; credits start at the buffer depths and come back on the credit tag.
// The interconnect side (a quarter of the TSV clock) reads with a random
// ready. Checks: content and order per VLink, credits returned equal words
// read, and that credits ran out at least once for each VLink.
module tb_vlink_demux_rx;
  timeunit 1ns; timeprecision 1ps;
  import tsvhub_pkg::*;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  localparam int unsigned K = 2, ND = 20, MMAX = 40, NW = 200;
  localparam logic [K-1:0][31:0] M = {32'd9, 32'd40};
  localparam logic [K-1:0] IS_FIFO = 2'b01;
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

  logic [ND-1:0] tsv_data_i = '0;
  logic [TW-1:0] tsv_tag_i = '0, cr_tag_o;
  logic [K-1:0] out_valid, out_ready = '0;
  logic [K-1:0][MMAX-1:0] out_data;

  vlink_demux_rx #(.K(K), .ND(ND), .MMAX(MMAX), .M(M), .IS_FIFO(IS_FIFO), .FIFO_DEPTH(4)) dut (.*);

  logic [MMAX-1:0] q [K][$];
  logic [2*ND-1:0] cur [K];
  int sent [K] = '{0, 0}, rcvd [K] = '{0, 0}, fidx [K] = '{0, 0};
  int cred [K] = '{4, 1}, ncr [K] = '{0, 0}, starved [K] = '{0, 0};

  always @(posedge clk_tsv) if (rst_tsv_n) begin
    int v, nf;
    if (cr_tag_o != '0) begin cred[cr_tag_o - 1]++; ncr[cr_tag_o - 1]++; end
    for (int i = 0; i < int'(K); i++)
      if (fidx[i] == 0 && sent[i] < int'(NW) && cred[i] == 0) starved[i]++;
    tsv_tag_i <= '0;
    tsv_data_i <= '0;
    v = $urandom % K;
    nf = num_flits(M[v], ND);
    if (($urandom % 100) < 80) begin
      bit go;
      go = fidx[v] != 0;
      if (fidx[v] == 0 && sent[v] < int'(NW) && cred[v] > 0) begin
        cur[v] = (2*ND)'(MMAX'({$urandom, $urandom}) & (MMAX'({MMAX{1'b1}}) >> (MMAX - M[v])));
        q[v].push_back(MMAX'(cur[v]));
        cred[v]--;
        sent[v]++;
        go = 1;
      end
      if (go) begin
        tsv_tag_i  <= TW'(v + 1);
        tsv_data_i <= cur[v][fidx[v]*ND +: ND];
        fidx[v] = (fidx[v] + 1 == nf) ? 0 : fidx[v] + 1;
      end
    end
  end

  always @(posedge ic) if (ric_n) begin
    for (int i = 0; i < int'(K); i++) begin
      if (out_valid[i] && out_ready[i]) begin
        check(q[i].size() > 0 && out_data[i] == q[i][0], $sformatf("vlink %0d word %0d", i, rcvd[i]));
        if (q[i].size() > 0) void'(q[i].pop_front());
        rcvd[i]++;
      end
      out_ready[i] <= ($urandom % 100) < 35;
    end
  end

  initial begin
    #20 rst_tsv_n = 1; ric_n = 1;
    wait (rcvd[0] == int'(NW) && rcvd[1] == int'(NW));
    repeat (40) @(posedge clk_tsv);
    for (int i = 0; i < int'(K); i++) begin
      check(q[i].size() == 0, $sformatf("vlink %0d complete", i));
      check(ncr[i] == int'(NW), $sformatf("vlink %0d credits %0d", i, ncr[i]));
      check(starved[i] > 0, $sformatf("vlink %0d ran out of credits", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
