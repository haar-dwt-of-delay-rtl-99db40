// haar_pkg: constants shared by the Haar wavelet datapaths.
//
// PIX_W is the 8-bit grey-level pixel, N_POINTS the length of the 1-D
// transform vector (the eight-element example of the forward step), and
// IMG_W / IMG_H the 256x256 standard frame the 2-D path processes.
// FRAC_BITS is the number of fractional bits of the Q-format used inside the
// 2-D path; the frame size and vector length follow the source description,
// the fractional width is a choice of this design.
package haar_pkg;
  localparam int PIX_W     = 8;
  localparam int N_POINTS  = 8;
  localparam int IMG_W     = 256;
  localparam int IMG_H     = 256;
  localparam int FRAC_BITS = 2;
endpackage
