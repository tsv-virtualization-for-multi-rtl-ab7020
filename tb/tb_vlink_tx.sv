// tb_vlink_tx -- self-checking testbench for vlink_tx.
//
// Two instances: a FIFO VLink of 55 bits on 21 data TSVs (3 flits per word,
// 2 credits) and a handshake-register VLink of 9 bits on 20 TSVs (1 flit, 1
// credit). The interconnect clock runs at a quarter of the TSV clock. A
// receiver model grants flits at random, rebuilds each word from its flits,
// compares it with the words sent, checks that the padding bits of the last
// flit are zero and that never more words are under way than the credits
// allow, and returns a credit some random cycles after each word. It also
// checks that each word takes exactly ceil(M/ND) grants and that a stall for
// lack of credits happened.
module tb_vlink_tx;
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
    localparam int unsigned M  = (g == 0) ? 55 : 9;
    localparam int unsigned ND = (g == 0) ? 21 : 20;
    localparam bit          IS_FIFO = (g == 0);
    localparam int unsigned CREDITS = (g == 0) ? 2 : 1;
    localparam int unsigned NF = num_flits(M, ND);

    logic          in_valid = 0, in_ready, req, grant = 0, credit_in = 0;
    logic [M-1:0]  in_data = '0;
    logic [ND-1:0] flit;

    vlink_tx #(.M(M), .ND(ND), .IS_FIFO(IS_FIFO), .DEPTH(4), .CREDITS(CREDITS)) dut (
      .clk_ic, .rst_ic_n, .in_valid, .in_ready, .in_data,
      .clk_tsv, .rst_tsv_n, .req, .flit, .grant, .credit_in);

    logic [M-1:0] q[$];
    int sent = 0, rcvd = 0, outstanding = 0, nflit = 0, stalls = 0;
    logic [NF*ND-1:0] acc;
    int cr_delay[$];

    // interconnect side
    always @(posedge clk_ic) if (rst_ic_n) begin
      if (in_valid && in_ready) begin q.push_back(in_data); sent++; end
      if (!in_valid || in_ready) begin
        if (sent + int'(in_valid && in_ready) < int'(NW) && ($urandom % 100) < 80) begin
          in_valid <= 1'b1;
          in_data  <= M'({$urandom, $urandom});
        end else in_valid <= 1'b0;
      end
    end

    // receiver model on the TSV side
    always @(negedge clk_tsv) grant = rst_tsv_n && req && (($urandom % 100) < 70);

    always @(posedge clk_tsv) if (rst_tsv_n) begin
      credit_in <= 1'b0;
      if (dut.c_valid && !req && dut.cred_q == '0) stalls++;
      if (grant) begin
        if (nflit == 0) begin
          outstanding++;
          check(outstanding <= int'(CREDITS), $sformatf("cfg%0d credits exceeded", g));
        end
        acc[nflit*ND +: ND] = flit;
        nflit++;
        if (nflit == int'(NF)) begin
          nflit = 0;
          check(q.size() > 0 && acc[M-1:0] == q[0],
                $sformatf("cfg%0d word %0d", g, rcvd));
          if (NF * ND > M) check(acc[NF*ND-1:M] == '0, $sformatf("cfg%0d padding", g));
          if (q.size() > 0) void'(q.pop_front());
          rcvd++;
          cr_delay.push_back(2 + ($urandom % 12));
        end
      end
      // credits come back after a random delay, in order
      if (cr_delay.size() > 0) begin
        if (cr_delay[0] == 0) begin
          void'(cr_delay.pop_front());
          credit_in <= 1'b1;
          outstanding--;
        end else cr_delay[0]--;
      end
    end

    initial begin
      wait (rst_tsv_n);
      wait (rcvd == int'(NW));
      repeat (10) @(posedge clk_tsv);
      check(q.size() == 0 && nflit == 0, $sformatf("cfg%0d all words sent", g));
      check(stalls > 0, $sformatf("cfg%0d credit stall seen (%0d)", g, stalls));
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
