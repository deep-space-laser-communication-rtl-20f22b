// sdpm_pkg: constants and types shared by the pulse modulator.
//
// A pulse time is carried as a "time vector": the value of the free-running
// coarse counter on whose clock edge the pulse is launched, plus a fine delay
// in picoseconds that the two delay chains add after that edge. The coarse
// counter steps every 5 ns, so the fine part always lies in 0..CLK_PS-1.
// The 5 ns step follows the document; the 32-bit counter width is this
// design's choice (about 21 s between wraps, all comparisons are wrap-safe).
`timescale 1ps/1fs
package sdpm_pkg;
  localparam int unsigned CLK_PS = 5000;   // coarse counter period in ps
  localparam int unsigned CNT_W  = 32;     // coarse counter width
  localparam int unsigned FINE_W = 13;     // fine delay width, holds 0..8191 ps
  localparam int unsigned SET_W  = 9;      // one delay chain: 512 settings

  typedef logic [CNT_W-1:0]  coarse_t;
  typedef logic [FINE_W-1:0] fine_t;
  typedef logic [SET_W-1:0]  chain_set_t;

  // Pulse time before the chain settings are known.
  typedef struct packed {
    coarse_t coarse;
    fine_t   fine;
  } time_vec_t;

  // Pulse time ready for the timing hardware: counter value and the two
  // delay-chain settings.
  typedef struct packed {
    coarse_t    coarse;
    chain_set_t set_b;
    chain_set_t set_a;
  } launch_vec_t;

  // Wrap-safe "a is later than or equal to b" on the coarse counter.
  function automatic logic coarse_ge(coarse_t a, coarse_t b);
    coarse_t d;
    d = a - b;
    return ~d[CNT_W-1];
  endfunction
endpackage
