// cma_pkg: constants shared by the CMA adaptive-antenna processor.
//
// Holds the one-bit phase-shifter patterns of the four-beam circular array
// (element phases of +/-47.7 degrees that steer the main beam to 45, 135,
// 225 and 315 degrees) and the array size. The beam table follows the document's phase table;
// the bit encoding (1 = +47.7 deg, element 1 on bit 0) is this design's own.
package cma_pkg;

  // Number of elements and beams of the four-beam phased array.
  localparam int unsigned NUM_ELEM  = 4;
  localparam int unsigned NUM_BEAMS = 4;

  // Phase-shifter control word per beam: bit e = 1 selects +47.7 deg on
  // element e+1, 0 selects -47.7 deg.
  //   beam 0:  45 deg  -> -,+,+,-
  //   beam 1: 135 deg  -> -,-,+,+
  //   beam 2: 225 deg  -> +,-,-,+
  //   beam 3: 315 deg  -> +,+,-,-
  localparam logic [NUM_ELEM-1:0] BEAM_PS [NUM_BEAMS] = '{
    4'b0110, 4'b1100, 4'b1001, 4'b0011
  };

endpackage
