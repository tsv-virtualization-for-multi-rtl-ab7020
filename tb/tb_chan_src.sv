// tb_chan_src -- testbench helper: valid/ready source of a numbered word
// stream. Word i is pattern(SEED, i), a hash of seed and index, so a sink can
// recompute every expected word without sharing state with the source. VALID
// is raised at random (PROB percent) and held with stable payload until READY.
module tb_chan_src #(
  parameter int unsigned W    = 8,
  parameter int unsigned SEED = 1,
  parameter int unsigned N    = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int unsigned  prob,
  output logic         valid,
  input  logic         ready,
  output logic [W-1:0] payload,
  output int unsigned  count
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
      valid <= 1'b0; count <= 0; payload <= '0;
    end else begin
      if (valid && ready) count <= count + 1;
      if (!valid || ready) begin
        if (count + int'(valid && ready) < N && ($urandom % 100) < prob) begin
          valid   <= 1'b1;
          payload <= pattern(SEED, count + int'(valid && ready));
        end else valid <= 1'b0;
      end
    end
  end
endmodule
