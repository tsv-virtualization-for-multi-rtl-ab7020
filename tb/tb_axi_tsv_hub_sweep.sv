// tb_axi_tsv_hub_sweep -- runs the AXI burst workload (tb_hub_workload) on the
// hub compositions and TSV counts of the hub's evaluation, side by side in one
// simulation:
//   1x32 21/20  one 32-bit link on the reference TSV counts
//   2x32 42/40  two 32-bit links on the TSV counts quoted for full throughput
//   1x64 21/20  one 64-bit link on the reference TSV counts
//   2x64 21/20  two 64-bit links on the reference TSV counts
//   2x64 37/37  two 64-bit links on 37 data TSVs, quoted at 97% for 32-beat
//               bursts; the downstream flit bound is 4*32/(2*(2+2*32)) = 0.970
//   2x32 21/20 with SYNC = 2, the asynchronous flavour of the terminations:
//               the longer credit round trip no longer fits the 4-word FIFOs,
//               so only 75% of the bound is required, and it must stay below
//               the mesochronous hub's 0.93
//   2x32 21/20 with SYNC = 0 and coinciding clock edges, the synchronous /
//               ratiochronous flavour: 95% of the bound, as for SYNC = 1
// The two-32-bit-link reference point itself is tb_axi_tsv_hub_full.
//
// Each instance checks data integrity of every beat and its throughput
// against the flit bound of its own configuration (see tb_hub_workload). This
// testbench sums the checks, prints the burst-32 results of each
// configuration, and adds checks for the SYNC = 2 cost and for the 2x32 42/40 point reaching full
// throughput (at least 0.99 both ways). A watchdog ends a hung run.
module tb_axi_tsv_hub_sweep;
  timeunit 1ns; timeprecision 1ps;

  localparam int NCFG = 7;
  bit  done [NCFG];
  int  chk [NCFG], fail [NCFG];
  real dn [NCFG], up [NCFG];

  tb_hub_workload #(.NLINK(1), .DATA_W(32), .ND_DN(21), .ND_UP(20), .NAME("1x32 21/20"))
    u_1x32 (.done(done[0]), .checks(chk[0]), .failures(fail[0]), .down32(dn[0]), .up32(up[0]));
  tb_hub_workload #(.NLINK(2), .DATA_W(32), .ND_DN(42), .ND_UP(40), .NAME("2x32 42/40"))
    u_2x32w (.done(done[1]), .checks(chk[1]), .failures(fail[1]), .down32(dn[1]), .up32(up[1]));
  tb_hub_workload #(.NLINK(1), .DATA_W(64), .ND_DN(21), .ND_UP(20), .NAME("1x64 21/20"))
    u_1x64 (.done(done[2]), .checks(chk[2]), .failures(fail[2]), .down32(dn[2]), .up32(up[2]));
  tb_hub_workload #(.NLINK(2), .DATA_W(64), .ND_DN(21), .ND_UP(20), .NAME("2x64 21/20"))
    u_2x64 (.done(done[3]), .checks(chk[3]), .failures(fail[3]), .down32(dn[3]), .up32(up[3]));
  tb_hub_workload #(.NLINK(2), .DATA_W(64), .ND_DN(37), .ND_UP(37), .NAME("2x64 37/37"))
    u_2x64n (.done(done[4]), .checks(chk[4]), .failures(fail[4]), .down32(dn[4]), .up32(up[4]));
  tb_hub_workload #(.NLINK(2), .DATA_W(32), .ND_DN(21), .ND_UP(20), .SYNC(2), .MIN_FRAC(0.75),
                    .NAME("2x32 21/20 SYNC=2"))
    u_async (.done(done[5]), .checks(chk[5]), .failures(fail[5]), .down32(dn[5]), .up32(up[5]));
  tb_hub_workload #(.NLINK(2), .DATA_W(32), .ND_DN(21), .ND_UP(20), .SYNC(0), .ALIGNED(1),
                    .NAME("2x32 21/20 SYNC=0"))
    u_ratio (.done(done[6]), .checks(chk[6]), .failures(fail[6]), .down32(dn[6]), .up32(up[6]));

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    int checks, failures;
    #100;
    while (!all_done()) #100;
    checks = 0; failures = 0;
    foreach (chk[i]) begin checks += chk[i]; failures += fail[i]; end
    for (int i = 0; i < NCFG; i++)
      $display("configuration %0d: burst 32 write %0.3f, read %0.3f", i, dn[i], up[i]);
    checks++;
    if (dn[5] >= 0.93) begin
      failures++;
      $display("FAIL: two synchronizer stages did not cost write throughput");
    end
    checks++;
    if (dn[1] < 0.99 || up[1] < 0.99) begin
      failures++;
      $display("FAIL: 2x32 42/40 below full throughput");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
