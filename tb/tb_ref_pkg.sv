// tb_ref_pkg -- reference models shared by the testbenches.
//
// Written independently of the RTL: the CRC is computed by polynomial long
// division over a bit array (an INIT of all ones is equivalent to inverting
// the first 12 message bits), the convolutional code by direct convolution
// of the input history with the generator taps.
package tb_ref_pkg;

  // CRC-12, g(x) = x^12+x^11+x^10+x^9+x^8+x^4+x+1, register preset to ones.
  function automatic logic [11:0] crc12_ref(input logic msg [], input int n);
    logic        work [];
    logic [12:0] g;
    logic [11:0] r;
    g = 13'b1_1111_0001_0011;
    work = new[n + 12];
    for (int i = 0; i < n + 12; i++) work[i] = (i < n) ? msg[i] : 1'b0;
    for (int i = 0; i < 12 && i < n; i++) work[i] = ~work[i];
    for (int i = 0; i < n; i++) begin
      if (work[i]) for (int t = 0; t <= 12; t++) work[i + t] ^= g[12 - t];
    end
    for (int t = 0; t < 12; t++) r[11 - t] = work[n + t];
    return r;
  endfunction

  // One code symbol of generator g (K taps, tap K-1 on the newest bit) given
  // the input history hist[0] = newest bit, hist[t] = bit t steps earlier.
  function automatic logic conv_sym(input logic [8:0] g, input logic hist [9], input int k);
    logic s;
    s = 1'b0;
    for (int t = 0; t < k; t++) s ^= g[k - 1 - t] & hist[t];
    return s;
  endfunction

endpackage
