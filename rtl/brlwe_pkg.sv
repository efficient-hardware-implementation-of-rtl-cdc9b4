// brlwe_pkg: constants and types shared by the AB + C datapath for binary
// Ring-LWE (R_q = Z_q[x]/(x^n + 1), B binary).
//
// The defaults are the main configuration: n = 512, u = 1, q = 128, so every
// integer coefficient is log2 q = 7 bits wide in two's complement. Because q
// is a power of two and values are kept in the centred range [-q/2, q/2 - 1],
// plain wrap-around addition is the modular addition: no reduction step is
// ever needed. The controller state type is defined here as well.
package brlwe_pkg;

  parameter int unsigned N_DEFAULT    = 512; // security size n
  parameter int unsigned U_DEFAULT    = 1;   // parallel groups u (n = u*v)
  parameter int unsigned LOGQ_DEFAULT = 7;   // log2 q, q = 128

  // Controller phases. LOAD shifts B and C in (and the previous W out),
  // COMP runs the v = n/u accumulation cycles, DRAIN only shifts W out.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_LOAD  = 2'd1,
    ST_COMP  = 2'd2,
    ST_DRAIN = 2'd3
  } ctrl_state_e;

endpackage
