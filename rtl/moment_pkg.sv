// moment_pkg: control word that travels through the image-moment pipeline.
//
// Every clock the input sequencer issues one sample into the power core.
// The control word goes along with it, stage by stage, on the line that in
// the processor selects between the bits of m and n: sel_m is that select
// (1 while the sample is the line index x, which is raised to the power m;
// 0 while it is a column index y, raised to n and multiplied by the pixel).
// valid marks a real sample; first and last mark the first and last sample
// of an image, which the accumulator uses to clear and to finish its sums.
// The first/last/valid flags are this design's own framing; the select line
// follows the processor's block diagram.
package moment_pkg;

  typedef struct packed {
    logic valid;
    logic sel_m;
    logic first;
    logic last;
  } ctl_t;

  localparam ctl_t CTL_IDLE = '{valid: 1'b0, sel_m: 1'b0, first: 1'b0, last: 1'b0};

endpackage
