// tb_lbc_util_pkg: helpers shared by the cipher testbenches.
//
// mk() builds a matrix from a 128-bit literal written row by row, E11 in
// the leftmost byte and E44 in the rightmost, which is how the expected
// values are written in the testbenches. labels() gives the matrix whose
// byte (r,c) is the hexadecimal label "rc" (11h .. 44h), so that a
// permutation can be read off directly. rand_matrix() fills all 16 bytes
// from $urandom.
package tb_lbc_util_pkg;
  import lbc_pkg::*;

  function automatic matrix_t mk(logic [127:0] v);
    matrix_t m;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = v[127 - 8*(4*r + c) -: 8];
    return m;
  endfunction

  function automatic matrix_t labels();
    matrix_t m;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = 8'((r + 1) * 16 + (c + 1));
    return m;
  endfunction

  function automatic matrix_t rand_matrix();
    matrix_t m;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = 8'($urandom);
    return m;
  endfunction

  function automatic string fmt(matrix_t m);
    string s = "";
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) s = {s, $sformatf("%02h ", m[r][c])};
      if (r < 3) s = {s, "/ "};
    end
    return s;
  endfunction
endpackage
