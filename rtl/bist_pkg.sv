// bist_pkg: constants shared by the RF built-in self-test blocks.
// The numbers marked "document" are the design values of the reference
// implementation (26 MHz reference, wf = 22, 15-bit two-tone generator,
// CIC decimation 32, averaging 256, 9-bit k_f). The others are this
// design's own choices.
package bist_pkg;
  localparam int WF      = 22;   // fractional accumulator word length (document)
  localparam int NI_W    = 8;    // integer division ratio width (own choice)
  localparam int GEN_W   = 15;   // generator word length (document)
  localparam int GEN_L   = 2;    // tones per generator (document)
  localparam int DEC_R   = 32;   // CIC decimation factor (document)
  localparam int AVG_R   = 256;  // averager decimation factor (document)
  localparam int KF_W    = 9;    // bandpass frequency coefficient width (document)
  localparam int KBW_W   = 9;    // bandpass damping coefficient width (own choice)
  localparam int DEC_OW  = 12;   // CIC output width: +/-R^2 = +/-1024 needs 12 bits
  localparam int BP_OW   = DEC_OW + 2;          // bandpass output width
  localparam int AMP_W   = BP_OW + $clog2(AVG_R); // amplitude estimate width

  // Per-tone settings of the multitone generator.
  typedef struct packed {
    logic [13:0]        b;    // b coefficient, b = b/2^16
    logic [GEN_W-1:0]   xa0;  // initial condition x_a(0), signed
  } tone_cfg_t;
endpackage
