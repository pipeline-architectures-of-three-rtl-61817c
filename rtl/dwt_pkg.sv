// dwt_pkg: types and constants shared by the 3-D Daubechies wavelet transform.
//
// Samples travel through the design as signed DW-bit integers. Filter
// coefficients are signed CW-bit fixed-point numbers with FRAC fraction bits,
// rounded from the closed-form Daub4 and Daub6 scaling coefficients
//   Daub4: h0..h3 = (1+r3, 3+r3, 3-r3, 1-r3) / (4*sqrt(2)),  r3 = sqrt(3)
//   Daub6: h0..h5 = (1+z1+z2, 5+z1+3z2, 10-2z1+2z2, 10-2z1-2z2, 5+z1-3z2,
//                    1+z1-z2) / (16*sqrt(2)),  z1 = sqrt(10), z2 = sqrt(5+2z1)
// each multiplied by 2**FRAC and rounded to the nearest integer. The wavelet
// (high-pass) coefficients follow the usual quadrature-mirror rule
//   g_j = (-1)**j * h_(TAPS-1-j).
// The closed forms are the standard Daubechies ones; the word widths and the
// Q2.14 coefficient format are choices of this design.
package dwt_pkg;

  parameter int DW   = 18;   // sample / coefficient-output width (signed)
  parameter int CW   = 16;   // filter coefficient width (signed)
  parameter int FRAC = 14;   // fraction bits of the filter coefficients

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;

  // round(h_j * 2**14) for Daub4 and Daub6
  localparam coef_t D4_H [4] = '{16'sd7913, 16'sd13705, 16'sd3672, -16'sd2120};
  localparam coef_t D6_H [6] = '{16'sd5450, 16'sd13220, 16'sd7535, -16'sd2212,
                                 -16'sd1400, 16'sd577};

  // Scaling (low-pass) coefficient j of a TAPS-tap Daubechies filter.
  function automatic coef_t h_coef(input int taps, input int j);
    return (taps == 6) ? D6_H[j] : D4_H[j];
  endfunction

  // Wavelet (high-pass) coefficient j: g_j = (-1)^j h_(TAPS-1-j).
  function automatic coef_t g_coef(input int taps, input int j);
    coef_t h;
    h = h_coef(taps, taps - 1 - j);
    return (j % 2 == 0) ? h : coef_t'(-h);
  endfunction

  // Width of a sum of TAPS products of a sample and a coefficient.
  localparam int PW = DW + CW + 3;

  // Round a full-precision inner product back to a sample (round half up).
  function automatic sample_t round_acc(input logic signed [PW-1:0] acc);
    logic signed [PW-1:0] r;
    r = (acc + (PW'(1) <<< (FRAC - 1))) >>> FRAC;
    return sample_t'(r);
  endfunction

endpackage
