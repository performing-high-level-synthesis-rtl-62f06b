// slf_pkg: types and constants shared by the example single-loop-form (SLF) program.
//
// An SLF program has the shape PROGRAM o_init (LOCVAR v_init (WHILE c (PARTIALIZE a))):
// its state is a triple (x, o, v) of the data part x (loaded from the circuit input), the
// output part o (started at o_init, driven to the circuit output) and the local part v
// (started at v_init). The generic IMP1 circuit (imp1.sv) keeps the three parts as plain
// vectors; this package gives them their meaning for the example program built here,
// Euclid's greatest common divisor by repeated subtraction:
//   x = (p, q), the two operands, o = the result, v = a done flag.
// The choice of program, the operand width and the encoding are this design's own; the
// general SLF shape and the roles of x, o and v follow the method the circuit implements.
package slf_pkg;

  // Operand width of the example program.
  localparam int unsigned GCD_W = 16;

  typedef logic [GCD_W-1:0] word_t;

  // Data part x: the two operands, updated by the loop body.
  typedef struct packed {
    word_t p;
    word_t q;
  } gcd_x_t;

  // Output part o and local part v.
  typedef word_t gcd_o_t;
  typedef logic  gcd_v_t;

  // Whole SLF state, the type a maps onto itself and c reads.
  typedef struct packed {
    gcd_x_t x;
    gcd_o_t o;
    gcd_v_t v;
  } gcd_state_t;

  localparam int unsigned GCD_XW = $bits(gcd_x_t);
  localparam int unsigned GCD_OW = $bits(gcd_o_t);
  localparam int unsigned GCD_VW = $bits(gcd_v_t);

  // The constants of PROGRAM o_init and LOCVAR v_init.
  localparam gcd_o_t GCD_O_INIT = '0;
  localparam gcd_v_t GCD_V_INIT = 1'b0;

endpackage
