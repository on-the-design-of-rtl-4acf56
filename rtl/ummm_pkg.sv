// ummm_pkg: types and constants shared by the unified matrix-matrix multiplier.
//
// The array works in one of two configurations selected by an opmode:
//   OP_GMMM  generic (dense) N x N matrix-matrix multiplication, one line per cycle
//   OP_BMMM  band matrix-matrix multiplication on the Kung-Leiserson schedule,
//            one band row every BMMM_SLOT cycles
// The opmode encoding, the accumulator width and the memory chunk width default
// below are this design's choices except CHUNK_BITS, which is the 256-bit memory
// transfer width of the target platform. Checked on its own, the package
// reports its constants as unused; the modules that import it use them.
package ummm_pkg;

  typedef enum logic {
    OP_GMMM = 1'b0,
    OP_BMMM = 1'b1
  } opmode_e;

  // A KLPE in the band configuration is busy one cycle in three.
  localparam int unsigned BMMM_SLOT = 3;

  // Width of one memory transfer (data chunk).
  localparam int unsigned CHUNK_BITS = 256;

endpackage
