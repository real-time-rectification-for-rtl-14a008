// stereo_pkg: types and constants shared by the rectification and SDPS
// correspondence blocks.
//
// Visibility states of a Cyclopean image point follow the predecessor codes
// printed for the B-state minimum of the disparity calculator: 00 = B
// (binocular), 01 = MR (monocular right), 11 = ML (monocular left). The
// one-bit predecessor codes of the MR and ML minima use 0 = B and 1 = the
// monocular state itself, also as printed there. PRED_W is used by the
// matcher and the back-track module; lint flags it as unused when a file
// imports the package only for the types.
package stereo_pkg;

  typedef enum logic [1:0] {
    VIS_B  = 2'b00,
    VIS_MR = 2'b01,
    VIS_ML = 2'b11
  } vis_t;

  // Predecessor record of one cost-array cell (x, d): 4 bits.
  typedef struct packed {
    logic       ml;   // predecessor of ML: 0 = B at (x-2,d), 1 = ML at (x-1,d-1)
    logic [1:0] b;    // predecessor of B : vis_t code
    logic       mr;   // predecessor of MR: 0 = B at (x-1,d+1), 1 = MR at (x-1,d+1)
  } pred_t;

  localparam int PRED_W = $bits(pred_t);

endpackage
