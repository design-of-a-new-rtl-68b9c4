// chaos_pkg: number format and shared arithmetic of the chaos-based key generator.
//
// Every chaotic state variable is a 32-bit signed fixed-point number with 24
// fraction bits (Q8.24, range -128 .. +128).  The integer part is wide enough for
// the largest excursion of the four attractors (about 70 for the Chen z variable).
// Products are formed at 64 bits and brought back to 24 fraction bits by an
// arithmetic right shift, i.e. truncation toward minus infinity.
//
// The format and the Euler step H are choices of this design; the coefficients
// and initial conditions of the systems are the published ones.
package chaos_pkg;

  localparam int FRAC = 24;

  typedef logic signed [31:0] fix_t;   // Q8.24 state value
  typedef logic signed [63:0] wide_t;  // intermediate, 24 fraction bits

  // Q8.24 constants (value * 2^24, rounded)
  localparam fix_t FIX_0_1  = 32'sd1677722;    // 0.1
  localparam fix_t FIX_0_2  = 32'sd3355443;    // 0.2
  localparam fix_t FIX_1    = 32'sd16777216;   // 1
  localparam fix_t FIX_8_3  = 32'sd44739243;   // 8/3
  localparam fix_t FIX_5_7  = 32'sd95630131;   // 5.7
  localparam fix_t FIX_H    = 32'sd16777;      // Euler step h = 0.001

  // integer n as Q8.24
  function automatic fix_t fix_int(input int n);
    return fix_t'(n <<< FRAC);
  endfunction

  // a * b with 24 fraction bits kept, at 64 bits
  function automatic wide_t fmul(input wide_t a, input wide_t b);
    wide_t p;
    p = a * b;
    return p >>> FRAC;
  endfunction

  // Euler update v + h*d, truncated back to the 32-bit state format
  function automatic fix_t euler(input fix_t v, input wide_t d, input fix_t h);
    wide_t s;
    s = wide_t'(v) + fmul(wide_t'(h), d);
    return fix_t'(s);
  endfunction

  // 2-bit selection codes of the mixing rule
  typedef enum logic [1:0] {
    SYS_LORENZ = 2'b00,
    SYS_ROSSLER = 2'b01,
    SYS_CHEN = 2'b10,
    SYS_LU = 2'b11
  } sys_sel_e;

  typedef enum logic [1:0] {
    VAR_X = 2'b00,
    VAR_Y = 2'b01,
    VAR_Z = 2'b10,
    VAR_X_ALT = 2'b11
  } var_sel_e;

endpackage
