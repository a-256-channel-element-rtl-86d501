// cor_pkg: constants, widths and the result address map shared by the
// multi-tau correlator.
//
// A correlator element has 8 stages. Stage 1 works on the raw 5-bit photon
// count per sample period tau; stage s (2..8) works on sums of 2^(s-1)
// consecutive samples, so its data is 4+s bits wide (5, 6, ... 12 bits).
// Every stage keeps an 8-entry delay line. Stage 1 correlates against all 8
// entries (8 lags), stages 2..8 against entries 5..8 (4 lags each): 36 lags.
//
// For every lag the element accumulates three 64-bit sums: G (sum of
// products), intp (sum of the delayed operands) and intf (sum of the current
// operands). Together with term (number of samples) and intc (sum of all
// samples) they are stored in the order of the 128-word result memory:
//   0..35     G for lags 1..36 (stage 1 first)
//   36..43    intp of stage 1,  44..51 intf of stage 1
//   52+8(s-2) .. +3  intp of stage s,  56+8(s-2) .. +3 intf of stage s
//   108       term,   109  intc
package cor_pkg;

  localparam int unsigned NSTAGE   = 8;    // stages per element
  localparam int unsigned PIPE_LEN = 8;    // delay-line entries per stage
  localparam int unsigned NLAG     = 36;   // lags per element
  localparam int unsigned DIN_W    = 5;    // photon count per pixel per tau
  localparam int unsigned ACC_W    = 64;   // result word width
  localparam int unsigned NWORDS   = 110;  // result words per element
  localparam int unsigned RAM_DEPTH = 128; // result memory depth per element
  localparam int unsigned WORD_TERM = 108;
  localparam int unsigned WORD_INTC = 109;

  typedef logic [ACC_W-1:0] acc_t;
  typedef acc_t [NWORDS-1:0] acc_vec_t;

  // Data width of stage s (1-based).
  function automatic int unsigned stage_w(input int unsigned s);
    return 4 + s;
  endfunction

  // Bit offset of stage s's delay line in the flat pipe vector.
  function automatic int unsigned pipe_off(input int unsigned s);
    int unsigned o = 0;
    for (int unsigned i = 1; i < s; i++) o += PIPE_LEN * stage_w(i);
    return o;
  endfunction

  localparam int unsigned PIPE_BITS = pipe_off(NSTAGE + 1);  // 544

  typedef logic [PIPE_BITS-1:0] pipe_vec_t;

  // Number of lags computed by stage s.
  function automatic int unsigned stage_nlag(input int unsigned s);
    return (s == 1) ? 8 : 4;
  endfunction

  // Result-word addresses for lag j (0-based within the stage) of stage s.
  function automatic int unsigned addr_g(input int unsigned s, input int unsigned j);
    return (s == 1) ? j : 8 + 4 * (s - 2) + j;
  endfunction
  function automatic int unsigned addr_intp(input int unsigned s, input int unsigned j);
    return (s == 1) ? 36 + j : 52 + 8 * (s - 2) + j;
  endfunction
  function automatic int unsigned addr_intf(input int unsigned s, input int unsigned j);
    return (s == 1) ? 44 + j : 56 + 8 * (s - 2) + j;
  endfunction

endpackage
