// fkp_tb_pkg: reference arithmetic shared by the testbenches.
//
// rom_word gives the contents of the cosine/sine ROM: address bit 12 selects
// sine (1) or cosine (0), bits 11..0 are the angle in radians as a 12-bit
// two's complement 4.8 number, and the word is the function value rounded to
// the nearest 1/256. fx_mul is the exact signed product of two 8.8 words
// truncated back to 8.8. fk_fixed computes the 12 transform terms the way the
// processor does, in 8.8 arithmetic, written out as equations; fk_real gives
// the same terms in real arithmetic from the closed-form transform.
package fkp_tb_pkg;
  import fkp_pkg::*;

  function automatic real to_real(input fix16_t v);
    return real'(v) / 256.0;
  endfunction

  function automatic fix16_t from_real(input real r);
    real s;
    s = r * 256.0;
    return fix16_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic fix16_t rom_word(input logic [12:0] addr);
    logic signed [11:0] ang;
    real a;
    ang = addr[11:0];
    a = real'(ang) / 256.0;
    return from_real(addr[12] ? $sin(a) : $cos(a));
  endfunction

  function automatic fix16_t fx_cos(input fix16_t a);
    return rom_word({1'b0, a[15], a[10:0]});
  endfunction

  function automatic fix16_t fx_sin(input fix16_t a);
    return rom_word({1'b1, a[15], a[10:0]});
  endfunction

  function automatic fix16_t fx_mul(input fix16_t a, input fix16_t b);
    logic signed [31:0] p;
    p = 32'(a) * 32'(b);
    return p[23:8];
  endfunction

  // Result order: Nx Ny Nz Sx Sy Sz Ax Ay Az Px Py Pz (registers 20..31).
  typedef fix16_t nsap_t [12];

  function automatic nsap_t fk_fixed(input fix16_t a0, a1, a2, a3, d1,
                                     input fix16_t t1, t2, t3, t4);
    nsap_t  r;
    fix16_t c1, s1, c2, s2, t23, t234, c23, s23, c234, s234, k;
    c1 = fx_cos(t1);  s1 = fx_sin(t1);
    c2 = fx_cos(t2);  s2 = fx_sin(t2);
    t23  = t2 + t3;   c23  = fx_cos(t23);  s23  = fx_sin(t23);
    t234 = t23 + t4;  c234 = fx_cos(t234); s234 = fx_sin(t234);
    k = fx_mul(a2, c2) + fx_mul(a3, c23) + a1;
    r[0]  = fx_mul(c1, c234);
    r[1]  = fx_mul(s1, c234);
    r[2]  = s234;
    r[3]  = -fx_mul(c1, s234);
    r[4]  = -fx_mul(s1, s234);
    r[5]  = c234;
    r[6]  = s1;
    r[7]  = -c1;
    r[8]  = 16'sd0;
    r[9]  = fx_mul(k, c1) + a0;
    r[10] = fx_mul(k, s1);
    r[11] = fx_mul(a3, s23) + fx_mul(a2, s2) + d1;
    return r;
  endfunction

  typedef real nsap_real_t [12];

  function automatic nsap_real_t fk_real(input real a0, a1, a2, a3, d1,
                                         input real t1, t2, t3, t4);
    nsap_real_t r;
    real k;
    k = a1 + a2 * $cos(t2) + a3 * $cos(t2 + t3);
    r[0]  =  $cos(t1) * $cos(t2 + t3 + t4);
    r[1]  =  $sin(t1) * $cos(t2 + t3 + t4);
    r[2]  =  $sin(t2 + t3 + t4);
    r[3]  = -$cos(t1) * $sin(t2 + t3 + t4);
    r[4]  = -$sin(t1) * $sin(t2 + t3 + t4);
    r[5]  =  $cos(t2 + t3 + t4);
    r[6]  =  $sin(t1);
    r[7]  = -$cos(t1);
    r[8]  =  0.0;
    r[9]  =  a0 + $cos(t1) * k;
    r[10] =  $sin(t1) * k;
    r[11] =  a2 * $sin(t2) + a3 * $sin(t2 + t3) + d1;
    return r;
  endfunction

endpackage
