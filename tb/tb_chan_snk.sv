// tb_chan_snk -- testbench helper: valid/ready sink that checks a word stream
// made by tb_chan_src with the same SEED. READY is raised at random (PROB
// percent); every accepted word is compared with pattern(SEED, index).
// count is the number of words taken, errors the number that differed, and
// stalls the cycles in which a word waited because READY was low.
module tb_chan_snk #(
  parameter int unsigned W    = 8,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int unsigned  prob,
  input  logic         valid,
  output logic         ready,
  input  logic [W-1:0] payload,
  output int unsigned  count,
  output int unsigned  errors,
  output int unsigned  stalls
);
  function automatic logic [W-1:0] pattern(input int unsigned seed, input int unsigned i);
    logic [255:0] r;
    logic [31:0]  x;
    for (int b = 0; b < 8; b++) begin
      x = (seed * 32'h9E3779B9) ^ (i * 32'h85EBCA6B) ^ (b * 32'hC2B2AE35);
      x = x ^ (x >> 16); x = x * 32'h7FEB352D; x = x ^ (x >> 15);
      r[b*32 +: 32] = x;
    end
    return r[W-1:0];
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= 1'b0; count <= 0; errors <= 0; stalls <= 0;
    end else begin
      if (valid && ready) begin
        count <= count + 1;
        if (payload != pattern(SEED, count)) begin
          errors <= errors + 1;
          $display("FAIL: stream %0d word %0d: got %h expected %h", SEED, count, payload,
                   pattern(SEED, count));
        end
      end
      if (valid && !ready) stalls <= stalls + 1;
      ready <= ($urandom % 100) < prob;
    end
  end
endmodule
