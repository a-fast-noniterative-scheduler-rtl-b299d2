// sra_pkg: constants shared by the SRA (single round-robin arbitration)
// switch fabric.
//
// The defaults describe the main configuration: a 16 x 16 input-queued
// switch whose crossbar has K = 3 row links per input port, so that an input
// can deliver up to three cells in one time slot.  Port count and K follow
// the published design; cell width and VOQ depth are this implementation's
// own choices (the design leaves them open).
package sra_pkg;

  // Number of input ports and of output ports (the switch is N x N).
  localparam int unsigned N_PORTS   = 16;
  // Crossbar row links per input port = concurrent VOQ-memory reads per slot.
  localparam int unsigned K_ROWS    = 3;
  // Width of one fixed-size cell, transferred as one word per time slot.
  localparam int unsigned CELL_W    = 64;
  // Cells each virtual output queue can hold.
  localparam int unsigned VOQ_DEPTH = 64;

endpackage
