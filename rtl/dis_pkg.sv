// Shared widths and record types of the Digital Image Synthesizer (DIS).
//
// The DIS synthesises a false-target radar echo: every phase sample taken
// from the intercepted radar pulse is rotated, converted to I/Q, scaled and
// summed by a cascade of identical range bin processors (RBPs). The widths
// below follow the document: 5-bit phase samples, 5-bit phase increments,
// 4-bit gain codes, 9-bit RBP addresses, 16-bit I/Q partial sums, 8-bit I/Q
// DRFM samples and a 12-bit self-test vector count. The 8-bit width of the
// sine/cosine table and the record layouts are this design's own choices.
package dis_pkg;

  localparam int unsigned PH_W    = 5;   // phase sample / phase increment
  localparam int unsigned GAIN_W  = 4;   // gain code
  localparam int unsigned ADDR_W  = 9;   // RBP address (512 RBPs)
  localparam int unsigned SUM_W   = 16;  // I/Q partial sums
  localparam int unsigned LUT_W   = 8;   // sine/cosine table entries
  localparam int unsigned IQ_W    = 8;   // DRFM I/Q samples
  localparam int unsigned CNT_W   = 12;  // self-test vector count
  localparam int unsigned DROP_LSB = 5;  // LSBs dropped after gain shifting

  typedef logic [PH_W-1:0]   phase_t;
  typedef logic [GAIN_W-1:0] gain_t;

  // A phase sample with its Phase Sample Valid flag (6 bits, as steered by
  // the 4-to-1 path multiplexer: bit 5 is PSV).
  typedef struct packed {
    logic   psv;
    phase_t phase;
  } sample_t;

  // Programming word that ripples along the RBP cascade.
  typedef struct packed {
    logic              prb;   // Program Range Bin: Sel/Gain/PInc/URB are valid
    logic              unp;   // Use New Programming: copy preload -> active
    logic              urb;   // Use Range Bin: coefficient enabling the bin
    logic [ADDR_W-1:0] sel;   // address of the RBP to program
    gain_t             gain;  // gain code
    phase_t            pinc;  // phase increment
  } prog_t;

  // Running I/Q partial sum with overflow flags and Output Data Valid.
  typedef struct packed {
    logic signed [SUM_W-1:0] i;
    logic signed [SUM_W-1:0] q;
    logic                    iof;
    logic                    qof;
    logic                    odv;
  } sum_t;

  // Coefficients held by one RBP.
  typedef struct packed {
    logic   urb;
    gain_t  gain;
    phase_t pinc;
  } coef_t;

endpackage
