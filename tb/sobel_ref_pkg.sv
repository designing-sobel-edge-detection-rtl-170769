// sobel_ref_pkg - reference model used by the Sobel testbenches.
//
// Computes the Sobel gradients by direct multiply-accumulate of a 3x3
// neighbourhood with integer kernel tables, independently of the adder
// form the RTL uses, and the expected magnitude / edge outputs.
package sobel_ref_pkg;

  typedef int nbhd_t [3][3];

  localparam int KX [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  localparam int KY [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  function automatic int conv3(nbhd_t p, int k [3][3]);
    int acc = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        acc += p[r][c] * k[r][c];
    return acc;
  endfunction

  function automatic int ref_gx(nbhd_t p);
    return conv3(p, KX);
  endfunction

  function automatic int ref_gy(nbhd_t p);
    return conv3(p, KY);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int ref_mag(nbhd_t p);
    return iabs(ref_gx(p)) + iabs(ref_gy(p));
  endfunction

  function automatic int ref_mag8(int mag);
    return (mag > 255) ? 255 : mag;
  endfunction

endpackage
