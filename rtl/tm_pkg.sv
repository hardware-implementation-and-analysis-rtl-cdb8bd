// tm_pkg: shared sizes, fixed-point formats and arithmetic helpers of the
// temporal interference mitigation accelerator.
//
// Every number in the datapath is a signed two's-complement fixed-point value
// written "W_I": W bits in total, I of them integer bits (sign included), so
// F = W - I fractional bits and the value is raw / 2**F. The per-accelerator
// formats below are the "hybrid" selection of the precision study (conjugate
// transpose 16_1, the two long multiplications 32_1, inverse 16_7, the
// multiplication inside the inverse 32_5, its addition 32_7, the 4x4
// multiplication 32_7, the 4x4 by 4x64 multiplication 32_5, the subtraction
// 32_5). The matrix sizes (4 receivers, 64 samples) are the ones evaluated.
//
// Converting between formats (requant) follows the default behaviour of the
// usual HLS fixed-point type: extra fractional bits are truncated toward minus
// infinity and the integer part wraps on overflow. Which quantisation and
// overflow mode was used is not stated, so this is a choice of this design.
package tm_pkg;

  // Matrix sizes: NR receive antennas (rows), NS samples (columns).
  localparam int NR = 4;
  localparam int NS = 64;

  // Width of the intermediate signed values handled by requant.
  localparam int XW = 128;

  // Hybrid per-accelerator formats (word length, integer bits).
  localparam int HERM_W = 16, HERM_I = 1;   // conjugate transpose
  localparam int MM64_W = 32, MM64_I = 1;   // 4x64 * 64x4 multiplications
  localparam int INV_W  = 16, INV_I  = 7;   // adjugate real inverse
  localparam int IMUL_W = 32, IMUL_I = 5;   // real multiplication in the inverse
  localparam int IADD_W = 32, IADD_I = 7;   // real addition in the inverse
  localparam int MM44_W = 32, MM44_I = 7;   // 4x4 * 4x4 multiplication
  localparam int MM4N_W = 32, MM4N_I = 5;   // 4x4 * 4x64 multiplication
  localparam int SUB_W  = 32, SUB_I  = 5;   // final subtraction
  // Format of Z and X as they are loaded (widest integer part of the chain).
  localparam int IN_W   = 32, IN_I   = 7;

  // Re-express value v, which has frac_in fractional bits, with frac_out
  // fractional bits and w_out total bits: shift (floor on right shifts), then
  // keep the low w_out bits and sign-extend them (wrap on overflow).
  function automatic logic signed [XW-1:0] requant(
      input logic signed [XW-1:0] v,
      input int                   frac_in,
      input int                   w_out,
      input int                   frac_out);
    logic signed [XW-1:0] s;
    if (frac_in >= frac_out) s = v >>> (frac_in - frac_out);
    else                     s = v <<< (frac_out - frac_in);
    s = (s <<< (XW - w_out)) >>> (XW - w_out);
    return s;
  endfunction

endpackage
