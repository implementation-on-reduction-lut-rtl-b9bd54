// pdds_tb_pkg: reference model of the chirp for the testbenches. It computes
// the phase word of any sample straight from the closed form
//   phi[n] = n*F0 + K*n*(n-1)/2  (mod 2^32)
// and the ideal quantised amplitude A*sin/cos(2*pi*(p + 1/2)/2^PB) with
// A = 2^(OUT_W-1) - 1, rounded to nearest, without any quarter-wave folding.
package pdds_tb_pkg;

  function automatic logic [31:0] ref_phase(longint unsigned n, logic [31:0] f0,
                                            logic [31:0] k);
    longint unsigned tri_n;
    tri_n = (n * (n - 1)) / 2;
    if (n == 0) tri_n = 0;
    return 32'(n * longint'(f0) + tri_n * longint'(k));
  endfunction

  // is_cos = 0 : sine, 1 : cosine; pb phase bits, ow output width
  function automatic int ref_amp(int unsigned p, bit is_cos, int pb = 10, int ow = 10);
    real th, v, a;
    int  mag;
    th  = 2.0 * 3.14159265358979323846 * (real'(p) + 0.5) / real'(2 ** pb);
    a   = real'((2 ** (ow - 1)) - 1);
    v   = is_cos ? a * $cos(th) : a * $sin(th);
    mag = $rtoi(((v < 0.0) ? -v : v) + 0.5);
    return (v < 0.0) ? -mag : mag;
  endfunction

endpackage
