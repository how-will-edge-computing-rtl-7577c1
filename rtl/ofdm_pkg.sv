// ofdm_pkg: types and helpers shared by the OFDM downlink chain.
// One I/Q sample is 32 bits: a signed 16-bit real part and a signed 16-bit
// imaginary part, as the downlink fronthaul samples of the DU are defined.
// The twiddle helper builds the Q1.15 cos/sin constants at elaboration time,
// so no table file is needed: W(k) = cos(2*pi*k/N) - j*sin(2*pi*k/N).
package ofdm_pkg;

  localparam int unsigned SAMPLE_W = 16;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } iq_t;

  typedef struct packed {
    logic signed [15:0] c;  // round(32767 * cos(2*pi*k/N))
    logic signed [15:0] s;  // round(32767 * sin(2*pi*k/N))
  } twiddle_t;

  localparam real PI = 3.14159265358979323846;

  function automatic twiddle_t make_twiddle(int unsigned k, int unsigned n);
    real a;
    twiddle_t t;
    a   = 2.0 * PI * real'(k) / real'(n);
    t.c = 16'($rtoi($floor(32767.0 * $cos(a) + 0.5)));
    t.s = 16'($rtoi($floor(32767.0 * $sin(a) + 0.5)));
    return t;
  endfunction

  function automatic iq_t conj(iq_t x);
    iq_t y;
    y.re = x.re;
    y.im = -x.im;
    return y;
  endfunction

endpackage
