// fireaxe_pkg: constants and helpers shared by the partitioned-simulation blocks.
//
// LINK_W_DEFAULT is the width of one beat on an inter-FPGA token stream. 512 bits
// matches the width of the host PCIe DMA interface that partitions can exchange
// tokens through; the width of the Aurora/QSFP stream is not fixed by the design
// and is a parameter everywhere it is used.
//
// link_beats() gives how many stream beats one token of tok_w bits occupies: this
// is the (de)serialization cost that grows with the width of the partition
// boundary.
package fireaxe_pkg;

  localparam int unsigned LINK_W_DEFAULT = 512;

  function automatic int unsigned link_beats(int unsigned tok_w, int unsigned link_w);
    return (tok_w + link_w - 1) / link_w;
  endfunction

  // Width of a channel index, at least one bit.
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
