// sobel_pkg: constants shared by the edge-detection datapath and the
// multiplier.
//
// MULT_N is the operand width of the compressor multiplier (8 bits, the only
// size the design is built for). GX_MASK and GY_MASK are the two 3x3 Sobel
// kernels, indexed [row][column] with row 0 at the top of the window and
// column 0 at its left. GY_MASK (-1 -2 -1 / 0 0 0 / 1 2 1) responds to
// horizontal edges, i.e. the gradient in the vertical direction; GX_MASK
// (1 0 -1 / 2 0 -2 / 1 0 -1) responds to vertical edges.
package sobel_pkg;

  localparam int unsigned MULT_N = 8;

  typedef int signed mask3x3_t [3][3];

  localparam mask3x3_t GX_MASK = '{'{1, 0, -1},
                                   '{2, 0, -2},
                                   '{1, 0, -1}};

  localparam mask3x3_t GY_MASK = '{'{-1, -2, -1},
                                   '{ 0,  0,  0},
                                   '{ 1,  2,  1}};

endpackage
