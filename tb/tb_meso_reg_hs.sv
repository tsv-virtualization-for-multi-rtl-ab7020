// tb_meso_reg_hs -- self-checking testbench for meso_reg_hs.
//
// Runs two phases with clocks of ratio 4 (as interconnect and TSV clock in the
// hub): slow writer / fast reader, then fast writer / slow reader. Random
// valid and ready patterns move random words; a queue model checks order and
// content. It also checks that exactly one word is accepted while the
// reader is held, that a word written into an empty register becomes readable
// within SYNC..SYNC+1 read-clock edges, that the register is free again SYNC..SYNC+1 write-clock edges after a read,, and that w_freed pulses once per word
// read.
module tb_meso_reg_hs;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned W = 49, DEPTH = 1, SYNC = 2, N = 300;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int half_w = 4, half_r = 1;
  logic clk_w = 0, clk_r = 0, rst_w_n = 0, rst_r_n = 0;
  always #(half_w) clk_w = ~clk_w;
  always #(half_r) clk_r = ~clk_r;

  logic w_valid = 0, w_ready, w_freed, r_valid, r_ready = 0;
  logic [W-1:0] w_data = '0, r_data;

  meso_reg_hs #(.W(W), .SYNC(SYNC)) dut (.*);

  logic [W-1:0] q[$];
  int sent = 0, rcvd = 0, freed = 0, wprob = 60, rprob = 60;
  bit hold_reader = 0, run = 0;

  always @(posedge clk_w) if (rst_w_n) begin
    if (w_freed) freed++;
    if (w_valid && w_ready) begin q.push_back(w_data); sent++; end
    if (!w_valid || w_ready) begin
      if (run && sent + int'(w_valid && w_ready) < N && ($urandom % 100) < wprob) begin
        w_valid <= 1'b1;
        w_data  <= {$urandom, $urandom};
      end else w_valid <= 1'b0;
    end
  end

  always @(posedge clk_r) if (rst_r_n) begin
    if (r_valid && r_ready) begin
      check(q.size() > 0 && r_data == q[0], $sformatf("word %0d data", rcvd));
      if (q.size() > 0) void'(q.pop_front());
      rcvd++;
    end
    r_ready <= !hold_reader && (($urandom % 100) < rprob);
  end

  task automatic do_reset();
    rst_w_n = 0; rst_r_n = 0; w_valid = 0; r_ready = 0; run = 0;
    sent = 0; rcvd = 0; freed = 0; q.delete();
    #20; rst_w_n = 1; rst_r_n = 1; #20;
  endtask

  task automatic phase(input string name);
    int lat;
    // latency of a word into an empty register, counted in read-clock edges
    hold_reader = 1;
    @(negedge clk_w); w_data = 42'h1234; w_valid = 1;
    @(posedge clk_w);
    #0.1 w_valid = 0;
    lat = 0;
    while (!r_valid && lat < 20) begin @(posedge clk_r); lat++; end
    check(lat >= int'(SYNC) && lat <= int'(SYNC) + 1, $sformatf("%s latency %0d", name, lat));
    // fill while the reader is held: exactly DEPTH words fit
    run = 1; wprob = 100;
    repeat (40) @(posedge clk_w);
    check(sent == int'(DEPTH), $sformatf("%s accepted %0d words while full", name, sent));
    check(!w_ready, {name, " full"});
    // release one read and time the return of w_ready on the write clock
    run = 0;
    @(posedge clk_r); #0.1 force r_ready = 1'b1;
    @(posedge clk_r); #0.1 release r_ready; r_ready = 1'b0;
    lat = 0;
    @(posedge clk_w);
    while (!w_ready && lat < 20) begin @(posedge clk_w); lat++; end
    check(lat >= int'(SYNC) - 1 && lat <= int'(SYNC) + 1, $sformatf("%s ack latency %0d", name, lat));
    run = 1;
    hold_reader = 0; wprob = 60;
    wait (sent == N && rcvd == N);
    repeat (20) @(posedge clk_w);
    check(q.size() == 0, {name, " all words delivered"});
    check(freed == N, $sformatf("%s freed pulses %0d of %0d", name, freed, N));
    run = 0;
  endtask

  initial begin
    do_reset();
    phase("slow-writer");
    half_w = 1; half_r = 4;
    do_reset();
    phase("fast-writer");
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
