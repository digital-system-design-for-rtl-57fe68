// faddeev_pkg: number format, stream tags and arithmetic shared by the
// Faddeev systolic arrays.
//
// Every matrix element travels through the arrays as a signed two's
// complement fixed-point word of WIDTH bits with FRAC fraction bits
// (Q15.16 by default). The original description gives the cell equations
// (multiply,
// divide, square root) but no number format; fixed point was chosen here so
// that every operator is plain synthesizable integer logic. All operators are
// combinational functions; the cells register their results.
//
// A word never travels alone: a tag (valid, first-row-of-problem, phase)
// rides along with it, so cells know which of the two phases of the
// algorithm a row belongs to and when a new problem starts.
package faddeev_pkg;

  localparam int unsigned WIDTH = 32;  // word width
  localparam int unsigned FRAC  = 16;  // fraction bits

  typedef logic signed [WIDTH-1:0] fx_t;

  localparam fx_t FX_ONE  = fx_t'(1) <<< FRAC;
  localparam fx_t FX_MAX  = {1'b0, {(WIDTH-1){1'b1}}};
  localparam fx_t FX_MIN  = {1'b1, {(WIDTH-1){1'b0}}};

  // Phase of a row. PH_TRI: rows of [A B], triangularised (Givens rotation
  // in the Nash array, neighbour-pivoting elimination in the Chuang-He
  // array). PH_ELIM: rows of [-C D], annulled by ordinary Gaussian
  // elimination against the stored triangle.
  typedef enum logic {PH_TRI = 1'b0, PH_ELIM = 1'b1} phase_e;

  typedef struct packed {
    logic   valid;  // a row element is present this cycle
    logic   first;  // first row of a new problem: cell state restarts at 0
    phase_e phase;
  } tag_t;

  localparam tag_t TAG_IDLE = '{valid: 1'b0, first: 1'b0, phase: PH_TRI};

  // Saturate a wide intermediate result to the word range.
  function automatic fx_t fx_sat(input logic signed [2*WIDTH-1:0] v);
    if (v > (2*WIDTH)'(FX_MAX))      return FX_MAX;
    else if (v < (2*WIDTH)'(FX_MIN)) return FX_MIN;
    else                           return fx_t'(v);
  endfunction

  // a*b, truncated toward minus infinity, saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*WIDTH-1:0] p;
    p = (2*WIDTH)'(a) * (2*WIDTH)'(b);
    return fx_sat(p >>> FRAC);
  endfunction

  // a/b, truncated toward zero, saturated; a/0 gives 0 (callers avoid it).
  function automatic fx_t fx_div(input fx_t a, input fx_t b);
    logic signed [2*WIDTH-1:0] n;
    logic signed [2*WIDTH-1:0] d;
    if (b == '0) return '0;
    n = (2*WIDTH)'(a) <<< FRAC;
    d = (2*WIDTH)'(b);
    return fx_sat(n / d);
  endfunction

  // Square root of a non-negative wide value held with 2*FRAC fraction
  // bits (as produced by a full-precision a*a + b*b); the result has FRAC
  // fraction bits. Digit-by-digit (restoring) square root: each of the WIDTH
  // iterations brings down two bits of v and decides one result bit by a
  // trial subtraction; the loop unrolls into combinational logic.
  function automatic fx_t fx_sqrt2(input logic [2*WIDTH-1:0] v);
    logic [WIDTH+1:0] rem;
    logic [WIDTH+1:0] trial;
    logic [WIDTH-1:0] root;
    logic             ge;
    rem  = '0;
    root = '0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      rem   = {rem[WIDTH-1:0], v[2*i+1], v[2*i]};
      trial = {root, 2'b01};
      ge    = (rem >= trial);
      if (ge) rem = rem - trial;
      root  = {root[WIDTH-2:0], ge};
    end
    if (root[WIDTH-1]) return FX_MAX;
    return fx_t'(root);
  endfunction

  function automatic fx_t fx_abs(input fx_t a);
    if (a == FX_MIN) return FX_MAX;
    return (a < 0) ? -a : a;
  endfunction

endpackage
