// csa_pkg -- sizes of the 16-bit square-root carry-select adder.
//
// The adder is cut into five stages of 2, 2, 3, 4 and 5 bits, growing
// roughly with the square root of the bit position so that the ripple
// delay inside a stage and the carry delay through the chain of stage
// multiplexers arrive at about the same time. Stage 1 is a plain ripple
// adder; stages 2..5 are carry-select stages with a binary-to-excess-1
// converter. The widths are the published ones; gathering them in a
// package is this design's own arrangement.
package csa_pkg;

  localparam int unsigned ADDER_W  = 16;
  localparam int unsigned N_STAGES = 5;

  // Width of each stage, least significant stage first.
  localparam int unsigned STAGE_W [N_STAGES] = '{2, 2, 3, 4, 5};

  // Bit position of the least significant bit of stage s.
  function automatic int unsigned stage_lsb(int unsigned s);
    int unsigned pos = 0;
    for (int unsigned i = 0; i < s; i++) pos += STAGE_W[i];
    return pos;
  endfunction

endpackage
