// subband_addsub: the four 2-D Haar sub-bands of a 2x2 window.
//
// With the window  w00 w01 / w10 w11  (DW-bit unsigned) two levels of
// Ladner-Fischer adder/subtractors form
//   row sums / differences:  st = w00 + w01, sb = w10 + w11,
//                            dt = w00 - w01, db = w10 - w11
//   sub-bands:               LL = st + sb   (average, low-low)
//                            LH = st - sb   (top minus bottom row)
//                            HL = dt + db   (left minus right column)
//                            HH = dt - db   (diagonal)
// eight add/subtract units in all, no multiplier. Results are SW-bit two's
// complement (default DW + 3, no overflow); they are not yet scaled (the
// factor 1/4 is applied by coef_shifter). Purely combinational.
// Forming all four bands with adders and subtractors follows the source
// description; the two-level arrangement and the band naming are this
// design's choices.
module subband_addsub
  import haar_pkg::*;
#(
  parameter int DW = PIX_W + FRAC_BITS,
  parameter int SW = PIX_W + FRAC_BITS + 3
) (
  input  logic [DW-1:0] w00,
  input  logic [DW-1:0] w01,
  input  logic [DW-1:0] w10,
  input  logic [DW-1:0] w11,
  output logic [SW-1:0] ll,
  output logic [SW-1:0] lh,
  output logic [SW-1:0] hl,
  output logic [SW-1:0] hh
);
  logic [SW-1:0] st, sb, dt, db;

  lf_addsub #(.WIDTH(SW)) u_st (.a(SW'(w00)), .b(SW'(w01)), .sub(1'b0), .result(st), .cout());
  lf_addsub #(.WIDTH(SW)) u_sb (.a(SW'(w10)), .b(SW'(w11)), .sub(1'b0), .result(sb), .cout());
  lf_addsub #(.WIDTH(SW)) u_dt (.a(SW'(w00)), .b(SW'(w01)), .sub(1'b1), .result(dt), .cout());
  lf_addsub #(.WIDTH(SW)) u_db (.a(SW'(w10)), .b(SW'(w11)), .sub(1'b1), .result(db), .cout());

  lf_addsub #(.WIDTH(SW)) u_ll (.a(st), .b(sb), .sub(1'b0), .result(ll), .cout());
  lf_addsub #(.WIDTH(SW)) u_lh (.a(st), .b(sb), .sub(1'b1), .result(lh), .cout());
  lf_addsub #(.WIDTH(SW)) u_hl (.a(dt), .b(db), .sub(1'b0), .result(hl), .cout());
  lf_addsub #(.WIDTH(SW)) u_hh (.a(dt), .b(db), .sub(1'b1), .result(hh), .cout());
endmodule
