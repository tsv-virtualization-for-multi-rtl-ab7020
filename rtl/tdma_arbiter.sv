// tdma_arbiter -- shares the TSV cycles of one TSV array among K VLinks.
//
// Following the document, the arbiter combines two schemes. A round starts
// with NFIXED fixed TDMA slots (at most 16); slot s belongs to VLink
// FIXED_OWNER[s] and is
// granted only to that VLink, which gives it a guaranteed share of the TSV
// bandwidth (a fixed slot whose owner has nothing to send stays unused). Then
// come dynamic (dTDMA) slots: one slot for each VLink that holds data, so the
// number of slots in a round grows and shrinks with the number of non-empty
// queues. The set of VLinks is sampled when the dynamic part starts; they are
// served in index order, a VLink that stops requesting is skipped, and the
// round ends when the set is used up. With NFIXED = 0 (the default, the
// document gives no schedule for its AXI hub) every slot is dynamic and the
// dynamic part restarts in the cycle the set runs out, so no cycle is lost
// while any VLink requests.
//
// Interface: req[v] is high while VLink v has a flit to send; grant is
// one-hot or zero, combinational from req and the state, and valid in the
// same cycle; fixed_slot is high when the current cycle is a fixed slot.
// One grant sends one flit.
module tdma_arbiter #(
  parameter int unsigned K      = 6,
  parameter int unsigned NFIXED = 0,
  parameter logic [15:0][7:0] FIXED_OWNER = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] req,
  output logic [K-1:0] grant,
  output logic         fixed_slot
);
  localparam int unsigned SW = (NFIXED > 1) ? $clog2(NFIXED) : 1;

  logic          in_fixed_q, in_fixed_n;
  logic [SW-1:0] slot_q, slot_n;
  logic [K-1:0]  set_q, set_n;     // VLinks still to be served this round
  logic          started_q, started_n;

  function automatic logic [K-1:0] lowest(input logic [K-1:0] v);
    return v & (~v + 1'b1);
  endfunction

  always_comb begin
    logic [K-1:0] eff;
    grant      = '0;
    in_fixed_n = in_fixed_q;
    slot_n     = slot_q;
    set_n      = set_q;
    started_n  = started_q;
    eff        = '0;
    fixed_slot = in_fixed_q;

    if (in_fixed_q) begin
      for (int v = 0; v < int'(K); v++)
        if (FIXED_OWNER[slot_q] == 8'(v) && req[v]) grant[v] = 1'b1;
      if (slot_q == SW'(NFIXED - 1)) begin
        in_fixed_n = 1'b0;
        slot_n     = '0;
        started_n  = 1'b0;
      end else begin
        slot_n = slot_q + 1'b1;
      end
    end else begin
      // dynamic part: sample the requesting set at its start
      if (started_q && (set_q & req) != '0) eff = set_q & req;
      else if (!started_q || NFIXED == 0) eff = req;
      grant = lowest(eff);
      set_n = eff & ~grant;
      started_n = 1'b1;
      if (set_n == '0) begin
        // round over
        started_n = 1'b0;
        if (NFIXED > 0) in_fixed_n = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_fixed_q <= (NFIXED > 0);
      slot_q     <= '0;
      set_q      <= '0;
      started_q  <= 1'b0;
    end else begin
      in_fixed_q <= in_fixed_n;
      slot_q     <= slot_n;
      set_q      <= set_n;
      started_q  <= started_n;
    end
  end

  initial begin
    assert (NFIXED <= 16) else $error("tdma_arbiter: at most 16 fixed slots");
    for (int s = 0; s < int'(NFIXED); s++)
      assert (32'(FIXED_OWNER[s]) < K) else $error("tdma_arbiter: slot owner out of range");
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
