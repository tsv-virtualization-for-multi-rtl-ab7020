// tb_tdma_arbiter -- self-checking testbench for tdma_arbiter.
//
// Two instances with K = 4 VLinks: one with three fixed TDMA slots owned by
// VLinks 2, 0, 2 followed by the dynamic part, one purely dynamic. Random
// requests drive both. A cycle-accurate reference written from the
// arbitration rules predicts every grant: fixed slot s goes to its owner only
// (and stays unused if the owner is idle); the dynamic part serves, once each
// and in index order, the VLinks that requested when it began. Further checks:
// with all VLinks requesting, VLink 2 gets its guaranteed 2 of every 7 cycles
// plus its dynamic share, and the purely dynamic arbiter never leaves a cycle
// idle while a request is pending.
module tb_tdma_arbiter;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  localparam int unsigned K = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  int phase_full = 0;   // 1: all VLinks request all the time
  int done_cnt = 0;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int unsigned NFIXED = (g == 0) ? 3 : 0;
    localparam logic [15:0][7:0] OWN = {104'd0, 8'd2, 8'd0, 8'd2};

    logic [K-1:0] req = '0, grant;
    logic         fixed_slot;

    if (NFIXED > 0) begin : g_fixed
      tdma_arbiter #(.K(K), .NFIXED(3), .FIXED_OWNER(OWN)) dut (
        .clk, .rst_n, .req, .grant, .fixed_slot);
    end else begin : g_dyn
      tdma_arbiter #(.K(K)) dut (.clk, .rst_n, .req, .grant, .fixed_slot);
    end

    // reference state
    bit in_fixed = (NFIXED > 0);
    int slot = 0;
    logic [K-1:0] set = '0;
    bit started = 0;
    int cycles = 0, gcount[K], idle_with_req = 0;

    function automatic logic [K-1:0] expect_grant(output bit fx);
      logic [K-1:0] eff, gr;
      gr = '0;
      fx = in_fixed;
      if (in_fixed) begin
        if (req[OWN[slot]]) gr[OWN[slot]] = 1'b1;
        if (slot == int'(NFIXED) - 1) begin in_fixed = 0; slot = 0; started = 0; end
        else slot++;
      end else begin
        eff = '0;
        if (started && (set & req) != '0) eff = set & req;
        else if (!started || NFIXED == 0) eff = req;
        for (int v = 0; v < int'(K); v++)
          if (eff[v] && gr == '0) gr[v] = 1'b1;
        set = eff & ~gr;
        started = 1;
        if (set == '0) begin started = 0; if (NFIXED > 0) in_fixed = 1; end
      end
      return gr;
    endfunction

    always @(negedge clk) if (rst_n) begin
      logic [K-1:0] e;
      bit fx;
      e = expect_grant(fx);
      check(grant == e, $sformatf("cfg%0d cycle %0d: grant %b expected %b (req %b)",
                                  g, cycles, grant, e, req));
      check(fixed_slot == fx, $sformatf("cfg%0d cycle %0d fixed_slot", g, cycles));
      if (phase_full == 1) for (int v = 0; v < int'(K); v++) gcount[v] += int'(grant[v]);
      if (NFIXED == 0 && req != '0 && grant == '0) idle_with_req++;
      cycles++;
    end

    // requests change after the clock edge; a granted VLink may drop its request
    always @(posedge clk) if (rst_n) begin
      #0.2;
      if (phase_full == 1) req = '1;
      else for (int v = 0; v < int'(K); v++) req[v] = ($urandom % 100) < 45;
    end

    initial begin
      wait (rst_n);
      repeat (2000) @(posedge clk);
      // full load: 7 rounds of (3 fixed + 4 dynamic) for cfg0, 7 rounds of 4 for cfg1
      @(negedge clk);
      wait (phase_full == 1);
      repeat (2) @(posedge clk);
      wait (phase_full == 2);
      if (g == 0) begin
        check(gcount[2] >= 3 * gcount[1] - 3, $sformatf("cfg0 guaranteed share: v2 %0d v1 %0d",
                                                         gcount[2], gcount[1]));
      end else begin
        check(gcount[0] - gcount[3] <= 1 && gcount[3] - gcount[0] <= 1,
              $sformatf("cfg1 equal shares %0d %0d", gcount[0], gcount[3]));
      end
      check(idle_with_req == 0, $sformatf("cfg%0d idle cycles with requests %0d", g, idle_with_req));
      done_cnt++;
    end
  end

  initial begin
    #10 rst_n = 1;
    repeat (2010) @(posedge clk);
    phase_full = 1;
    repeat (700) @(posedge clk);
    #0.5 phase_full = 2;
    wait (done_cnt == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
