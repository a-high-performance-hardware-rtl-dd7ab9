// less_pkg: constants and helper functions shared by the LESS matrix engine.
//
// The code parameters of the three NIST levels (n generator columns, k
// generator rows, field modulus q = 127) follow the LESS parameter tables.
// Level 1 (LESS-1b: n = 252, k = 126) is the default build of every module;
// levels 3 and 5 are selected by overriding N and K.
//
// The helper functions are evaluated at elaboration time or as small
// combinational look-up logic: modular multiply, subtract and the modular
// inverse by Fermat's little theorem (a^(q-2) mod q, q prime).
package less_pkg;

  // Field modulus (all parameter sets)
  localparam int unsigned Q_LESS = 127;

  // NIST level 1 (default), 3 and 5 code parameters
  localparam int unsigned N_L1 = 252;
  localparam int unsigned K_L1 = 126;
  localparam int unsigned N_L3 = 400;
  localparam int unsigned K_L3 = 200;
  localparam int unsigned N_L5 = 548;
  localparam int unsigned K_L5 = 274;

  // Row arithmetic operation codes
  typedef enum logic {
    OP_RESCALE = 1'b0,   // row * inverse(row[pivot column])
    OP_REDUCE  = 1'b1    // row - row[pivot column] * pivot row
  } row_op_e;

  // Modular inverse of a in F_q (q prime); inverse of 0 is defined as 0.
  function automatic int unsigned mod_inv(input int unsigned a, input int unsigned q);
    int unsigned result;
    int unsigned base;
    int unsigned e;
    result = 1;
    base   = a % q;
    e      = q - 2;
    if (base == 0) return 0;
    while (e != 0) begin
      if (e[0]) result = (result * base) % q;
      base = (base * base) % q;
      e    = e >> 1;
    end
    return result;
  endfunction

endpackage
