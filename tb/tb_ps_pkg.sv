// tb_ps_pkg: test signal shared by the A/D model and the scoreboard.
//
// adc_sample(n) is the n-th converted value: a scrambled sequence, so a
// sample read from the wrong location or out of order gives a wrong value.
// tri_sample(n, t) is a triangle test tone, as from a signal generator.
package tb_ps_pkg;
  function automatic logic [7:0] adc_sample(int unsigned n);
    logic [31:0] h;
    h = n * 32'd2654435761;
    return h[23:16] ^ h[31:24];
  endfunction

  // Triangle wave of period t samples, 0 to 254, rising through 127 once per period.
  function automatic logic [7:0] tri_sample(int unsigned n, int unsigned t);
    int unsigned ph;
    ph = n % t;
    if (ph < t / 2) return 8'((ph * 508) / t);
    return 8'(254 - ((ph - t / 2) * 508) / t);
  endfunction
endpackage
