// dirc_pkg: default sizes shared by the DIRC (delay-insensitive redundant
// check) QDI pipeline modules.
//
// A 1-of-n word is a bundle of n rails; value v is carried by rail v being
// high, and the all-low bundle is the null spacer of the 4-phase protocol.
// The defaults are the main configuration evaluated for the design: 1-of-4
// rails, CN = 2 data words per DIRC group, G = 64 groups (N = G * CN = 128
// data channels) and a 4-stage pipeline.
package dirc_pkg;

  localparam int unsigned DEF_RAILS  = 4;   // 1-of-4 code (1-of-2 also supported)
  localparam int unsigned DEF_CN     = 2;   // data words per DIRC group
  localparam int unsigned DEF_GROUPS = 64;  // G groups, N = 128 data channels
  localparam int unsigned DEF_STAGES = 4;   // pipeline depth

endpackage
