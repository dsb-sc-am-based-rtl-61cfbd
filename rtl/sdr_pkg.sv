// sdr_pkg: default sizes, the Costas error-selection type and the
// elaboration-time helper functions shared by the DSB-SC transmitter and
// receiver blocks.
//
// All baseband and IF samples are signed two's-complement fixed point with
// SAMPLE_W bits and SAMPLE_W-1 fraction bits (full scale = +/-1.0). Phase is an
// unsigned PHASE_W-bit fraction of one turn (2^PHASE_W = 2*pi), as in a
// conventional DDS phase accumulator.
//
// sine_q() computes one entry of the DDS sine table with integer arithmetic only
// (range reduction to the first quadrant, then an odd Taylor series to x^11 in
// Q30), so the table is built while elaborating and needs no data file. The
// sizes below are this design's own choices: the source design used vendor DDS
// and FIR generator cores whose widths are not published.
package sdr_pkg;

  localparam int unsigned SAMPLE_W = 16;   // sample width, Q1.(SAMPLE_W-1)
  localparam int unsigned PHASE_W  = 32;   // DDS phase accumulator width
  localparam int unsigned LUT_AW   = 10;   // DDS table address width (1024 entries/turn)

  // Costas phase-detector error selection.
  //   ERR_IQ_PRODUCT : e = I * Q (classic Costas, insensitive to message sign)
  //   ERR_IMAG       : e = Q      (the imaginary part alone, plain PLL error)
  typedef enum logic {ERR_IQ_PRODUCT = 1'b0, ERR_IMAG = 1'b1} err_sel_e;

  // Round(amp * sin(2*pi*(idx + 0.5)/n)) for idx in [0, n), n a power of two
  // and a multiple of 4. The half-step offset keeps the table free of exact
  // zeros and makes it symmetric, like common DDS tables.
  function automatic longint sine_q(input longint idx, input longint n, input longint amp);
    localparam longint ONE = 64'sd1 <<< 30;          // 1.0 in Q30
    localparam longint HALF_PI = 64'sd1686629713;     // pi/2 in Q30
    longint q, k, x, x2, term, acc, num, den;
    logic neg;
    // position within the turn in units of 1/(2n) turn
    num = 2 * idx + 1;
    den = 2 * n;
    // quadrant (0..3) and position inside it
    q = (num * 4) / den;
    k = num * 4 - q * den;                            // 0 < k < den
    if (q == 1 || q == 3) k = den - k;                // mirror second half of each lobe
    neg = (q >= 2);
    x = (HALF_PI * k) / den;                          // angle in Q30, 0..pi/2
    x2 = (x * x) >>> 30;
    term = x;
    acc = x;
    for (int i = 1; i <= 5; i++) begin
      term = -((term * x2) >>> 30) / ((2 * i) * (2 * i + 1));
      acc = acc + term;
    end
    acc = (acc * amp + (ONE >>> 1)) >>> 30;           // scale and round
    return neg ? -acc : acc;
  endfunction

  // Default low-pass FIR taps: a triangular (Bartlett) window of odd length n,
  // h[i] = min(i+1, n-i). For n = 15 this is the convolution of two 8-sample
  // moving averages; the taps sum to ((n+1)/2)^2.
  function automatic int tri_tap(input int i, input int n);
    return (i + 1 < n - i) ? i + 1 : n - i;
  endfunction

endpackage
