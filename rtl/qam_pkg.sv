// qam_pkg: types and constants shared by the QAM cable receiver.
//
// All data paths after the ADC carry two's-complement fixed-point samples of DW bits.
// A complex sample is a packed struct of real and imaginary parts. The
// equalizer coefficients are CW bits wide. The widths are this design's own
// choice; the 64-QAM constellation and the 24+24 equalizer taps follow the
// receiver's specification.
package qam_pkg;
  // sample width of the data path (ADC and after)
  localparam int DW = 12;
  // equalizer coefficient width
  localparam int CW = 16;
  // 64-QAM: 3 bits per dimension, levels -7,-5,..,+7
  localparam int BITS_PER_DIM = 3;
  // fixed-point weight of one constellation unit in a DW-bit sample: level 7
  // is 7*LVL = 896 of 2047, leaving room for the corners (radius 1267) to be
  // rotated by any carrier phase without clipping. A power of two.
  localparam int LVL = 128;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } coef_t;

  // operating phases of the joint acquisition (Sec. "joint operation")
  typedef enum logic [1:0] {
    MODE_ACQ   = 2'd3,  // timing acquisition, equalizer frozen
    MODE_CMA   = 2'd0,  // CMA update, four-corners carrier, linear path p1
    MODE_LMS   = 2'd1,  // DD-LMS update, linear path p1
    MODE_DFE   = 2'd2   // DD-LMS update, decision feedback path p2
  } eq_mode_e;

  // saturate a wide signed value to DW bits
  function automatic logic signed [DW-1:0] sat_dw(input logic signed [47:0] v);
    localparam logic signed [47:0] MAXV = 48'sd2 ** (DW - 1) - 48'sd1;
    localparam logic signed [47:0] MINV = -(48'sd2 ** (DW - 1));
    if (v > MAXV)      return MAXV[DW-1:0];
    else if (v < MINV) return MINV[DW-1:0];
    else               return v[DW-1:0];
  endfunction
endpackage
