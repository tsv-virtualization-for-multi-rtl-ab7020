// tb_vlink_rx -- self-checking testbench for vlink_rx.
//
// Two instances: a FIFO VLink of 40 bits on 20 data TSVs (2 flits, 4 words
// deep) and a handshake-register VLink of 49 bits on 21 TSVs (3 flits, 1
// word). A sender model on the TSV clock cuts random words into flits with
// random gaps, keeping no more words under way than it holds credits, and
// takes a credit back for every credit_out pulse. The interconnect side (a
// quarter of the TSV clock) reads with a random ready. Checks: word content
// and order, one credit per word read, and that the sender was held back by
// missing credits at least once (the buffer filled up).
module tb_vlink_rx;
  timeunit 1ns; timeprecision 1ps;
  import tsvhub_pkg::*;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  logic clk_ic = 0, clk_tsv = 0, rst_ic_n = 0, rst_tsv_n = 0;
  always #4 clk_ic  = ~clk_ic;
  always #1 clk_tsv = ~clk_tsv;

  localparam int unsigned NW = 200;
  int done_cnt = 0;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int unsigned M  = (g == 0) ? 40 : 49;
    localparam int unsigned ND = (g == 0) ? 20 : 21;
    localparam bit          IS_FIFO = (g == 0);
    localparam int unsigned DEPTH = (g == 0) ? 4 : 1;
    localparam int unsigned NF = num_flits(M, ND);

    logic          flit_valid = 0, credit_out, out_valid, out_ready = 0;
    logic [ND-1:0] flit = '0;
    logic [M-1:0]  out_data;

    vlink_rx #(.M(M), .ND(ND), .IS_FIFO(IS_FIFO), .DEPTH(4)) dut (
      .clk_tsv, .rst_tsv_n, .flit_valid, .flit, .credit_out,
      .clk_ic, .rst_ic_n, .out_valid, .out_ready, .out_data);

    logic [M-1:0] q[$];
    logic [NF*ND-1:0] cur;
    int sent = 0, rcvd = 0, credits = int'(DEPTH), fidx = 0, nfreed = 0, starved = 0;

    always @(posedge clk_tsv) if (rst_tsv_n) begin
      if (credit_out) begin credits++; nfreed++; end
      flit_valid <= 1'b0;
      if (fidx == 0 && sent < int'(NW) && credits == 0) starved++;
      if (($urandom % 100) < 70) begin
        if (fidx == 0 && sent < int'(NW) && credits > 0) begin
          cur = (NF*ND)'(M'({$urandom, $urandom}));
          q.push_back(cur[M-1:0]);
          credits--;
          sent++;
          flit_valid <= 1'b1;
          flit <= cur[0 +: ND];
          fidx = (NF == 1) ? 0 : 1;
        end else if (fidx != 0) begin
          flit_valid <= 1'b1;
          flit <= cur[fidx*ND +: ND];
          fidx = (fidx + 1 == int'(NF)) ? 0 : fidx + 1;
        end
      end
    end

    always @(posedge clk_ic) if (rst_ic_n) begin
      if (out_valid && out_ready) begin
        check(q.size() > 0 && out_data == q[0], $sformatf("cfg%0d word %0d", g, rcvd));
        if (q.size() > 0) void'(q.pop_front());
        rcvd++;
      end
      out_ready <= ($urandom % 100) < 40;
    end

    initial begin
      wait (rst_tsv_n);
      wait (rcvd == int'(NW));
      repeat (20) @(posedge clk_ic);
      check(q.size() == 0, $sformatf("cfg%0d all words delivered", g));
      check(nfreed == int'(NW), $sformatf("cfg%0d credits returned %0d", g, nfreed));
      check(starved > 0, $sformatf("cfg%0d buffer filled up", g));
      done_cnt++;
    end
  end

  initial begin
    #20 rst_ic_n = 1; rst_tsv_n = 1;
    wait (done_cnt == 2);
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
