// tsvhub_pkg -- constants and helper functions shared by the TSV-Hub RTL.
//
// The AXI channel widths are the totals of the document's channel-width table
// (32-bit and 64-bit data): read address 49, write address 55, write data
// DATA_W+10, read data DATA_W+8, write response 9 bits. Each total is the
// payload that one virtual link (VLink) carries per AXI transfer; VALID and
// READY are not part of it, they become the VLink handshake. How the AXI fields
// are laid out inside a payload is left to the attached master and slave: the
// hub transports the payload bit-exactly.
//
// Control TSV encoding (this design's own choice): a flit on a data array is
// tagged with a VLink identifier of clog2(K+1) bits, where 0 means "no flit"
// and v+1 means VLink v. Credits are returned in the opposite direction with
// the same encoding.
package tsvhub_pkg;

  // Channel widths (bits) of one AXI link, from the channel-width table.
  localparam int unsigned W_RADDR = 49;
  localparam int unsigned W_WADDR = 55;
  localparam int unsigned W_WRESP = 9;

  function automatic int unsigned w_wdata(input int unsigned data_w);
    return data_w + 10;
  endfunction

  function automatic int unsigned w_rdata(input int unsigned data_w);
    return data_w + 8;
  endfunction

  // Number of n_d-bit flits that carry one m-bit word: ceil(m / n_d).
  function automatic int unsigned num_flits(input int unsigned m, input int unsigned nd);
    return (m + nd - 1) / nd;
  endfunction

  // Width of a VLink tag on the control TSVs for K VLinks (0 = idle).
  function automatic int unsigned tag_width(input int unsigned k);
    return $clog2(k + 1);
  endfunction

  // Number of words a receiving VLink buffer holds: 4 for a FIFO, 1 for a
  // handshake register.
  function automatic int unsigned rx_depth(input bit is_fifo, input int unsigned fifo_depth);
    return is_fifo ? fifo_depth : 1;
  endfunction

endpackage
