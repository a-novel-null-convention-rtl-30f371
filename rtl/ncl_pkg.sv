// ncl_pkg: product-term tables for the NCL threshold gates built with the
// qdi_ncl_gate architecture.
//
// A gate's set function F_NCL-SET is a sum of products. Each product is one
// mask over the gate's inputs: bit i set means input i is an input of that
// AND gate. Input 0 is A, input 1 is B, input 2 is C, input 3 is D.
//
// The three tables below are the three gates of the library:
//   TH23     : Z set by AB + BC + AC
//   TH24comp : Z set by AC + AD + BC + BD
//   THand0   : Z set by AB + BC + AD
// The equations are the gates' published set functions; the mask encoding and
// the bit order are this design's own choice.
package ncl_pkg;

  localparam int unsigned TH23_N      = 3;
  localparam int unsigned TH23_NTERMS = 3;
  localparam logic [TH23_NTERMS-1:0][TH23_N-1:0] TH23_TERMS = '{
    3'b101,   // AC
    3'b110,   // BC
    3'b011    // AB
  };

  localparam int unsigned TH24COMP_N      = 4;
  localparam int unsigned TH24COMP_NTERMS = 4;
  localparam logic [TH24COMP_NTERMS-1:0][TH24COMP_N-1:0] TH24COMP_TERMS = '{
    4'b1010,  // BD
    4'b0110,  // BC
    4'b1001,  // AD
    4'b0101   // AC
  };

  localparam int unsigned THAND0_N      = 4;
  localparam int unsigned THAND0_NTERMS = 3;
  localparam logic [THAND0_NTERMS-1:0][THAND0_N-1:0] THAND0_TERMS = '{
    4'b1001,  // AD
    4'b0110,  // BC
    4'b0011   // AB
  };

endpackage
