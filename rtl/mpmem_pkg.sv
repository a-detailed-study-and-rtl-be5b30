// mpmem_pkg: sizes shared by the multi-ported memory organisations.
//
// The reference configuration is a 32-word by 8-bit memory reached through four
// ports. The XOR organisation is shown as a two-write, one-read memory. Every
// module takes these values as parameter defaults; the address width is always
// derived from the depth with $clog2.
package mpmem_pkg;
  localparam int unsigned MEM_DEPTH = 32;  // words in the logical memory
  localparam int unsigned MEM_WIDTH = 8;   // bits per word
  localparam int unsigned MEM_PORTS = 4;   // ports of the replicated, banked, pumped and LVT memories
  localparam int unsigned XOR_NW    = 2;   // write ports of the XOR memory
  localparam int unsigned XOR_NR    = 1;   // read ports of the XOR memory
endpackage
