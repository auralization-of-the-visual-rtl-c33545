// aural_pkg: constants and types shared by the video-to-audio pipeline.
//
// Holds the frame geometry of the camera image, the grid it is cut into,
// the audio word width, the arctangent table used by every CORDIC rotator and
// the records exchanged between the control unit and the sequencer.  Values
// marked "assumed" in the module headers are this design's own choices.
package aural_pkg;

  // Image geometry: 1024 x 768 pixels, cut into vertical bands, each band
  // cut into 16 horizontal sections.
  localparam int unsigned H_PIX   = 1024;
  localparam int unsigned V_PIX   = 768;
  localparam int unsigned N_HBAND = 16;
  localparam int unsigned N_VBAND = 16;   // assumed: 4 + 4 bits of the 8-bit cell address

  localparam int unsigned AUDIO_W = 16;

  // atan(2^-i) as a fraction of a full turn, scaled by 2^32.
  localparam logic [31:0] ATAN_TURN32 [24] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331,
    32'd21354465,  32'd10679838,  32'd5340245,   32'd2670163,  32'd1335087,
    32'd667544,    32'd333772,    32'd166886,    32'd83443,    32'd41722,
    32'd20861,     32'd10430,     32'd5215,      32'd2608,     32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81};

  // 1/K of a CORDIC with many iterations, Q16.
  localparam int unsigned CORDIC_INV_GAIN_Q16 = 39797;

  // Controls from the hardware input translation to the sequencer.
  typedef struct packed {
    logic [3:0] memory_address;
    logic       store_sample;
    logic       clear_sample;
    logic       play_sample;
    logic       tempo;
    logic [3:0] step_address;
    logic       store_step;
    logic       clear_step;
    logic       mode_select;   // 0: continuous, 1: sequencer
  } seq_ctrl_t;

  // What one sequencer step plays.
  typedef enum logic [1:0] {STEP_REST = 2'd0, STEP_CURRENT = 2'd1, STEP_SLOT = 2'd2} step_kind_e;

  typedef struct packed {
    step_kind_e kind;
    logic [3:0] slot;
  } step_t;

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
