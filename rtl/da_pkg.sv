// da_pkg: constants and types shared by the distributed-arithmetic (DA) FIR
// filter blocks.
//
// The filters are written for B-bit two's-complement input samples that
// arrive bit-serially, least significant bit first, and CW-bit signed filter
// coefficients. B = 16 and CW = 8 are the sizes the filters were evaluated
// with. The coefficient values themselves are a design choice: no particular
// filter is prescribed, so DEFAULT_COEF is a fixed spread of 8-bit values,
// c[i] = ((53*i + 17) mod 256) - 128, that exercises both signs and the full
// 8-bit range. Every filter takes its coefficients as an `int` array
// parameter of MAX_TAPS entries and uses the first N of them.
package da_pkg;

  localparam int MAX_TAPS = 64;  // largest filter order evaluated
  localparam int SAMPLE_W = 16;  // B, input sample width
  localparam int COEF_W   = 8;   // CW, coefficient width

  typedef int coef_arr_t [MAX_TAPS];

  function automatic coef_arr_t make_default_coef();
    coef_arr_t c;
    for (int i = 0; i < MAX_TAPS; i++) c[i] = ((53 * i + 17) % 256) - 128;
    return c;
  endfunction

  localparam coef_arr_t DEFAULT_COEF = make_default_coef();

  // Width of a sum of n signed values of width w.
  function automatic int sum_width(int w, int n);
    return w + ((n > 1) ? $clog2(n) : 0);
  endfunction

endpackage
