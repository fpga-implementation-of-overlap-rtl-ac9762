// rpc_pkg: field widths of the RPC strip-to-angle converter and the type of
// one converted cluster. The defaults are those of the converter
// description: C=2 chamber bits, P=4 partition bits, T=3 delay bits, D=8
// strips per partition, L=2 clusters kept, M=3 strips maximum cluster width,
// N=2 bits of cluster width, A=10 angle bits.
package rpc_pkg;
  localparam int C = 2;   // chamber-number bits in a link word
  localparam int P = 4;   // partition-number bits
  localparam int T = 3;   // delay bits
  localparam int D = 8;   // strips of one partition
  localparam int L = 2;   // clusters kept after sorting
  localparam int M = 3;   // widest accepted cluster (strips)
  localparam int N = 2;   // bits of a cluster width
  localparam int A = 10;  // angle bits

  // Compressed-stream word of one partition, as recovered from the link.
  typedef struct packed {
    logic [C-1:0] cham;
    logic [P-1:0] part;
    logic [T-1:0] ptime;
    logic [D-1:0] data;
  } lb_word_t;
endpackage
