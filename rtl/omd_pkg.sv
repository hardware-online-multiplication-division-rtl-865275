// omd_pkg: types shared by the radix-2 online multiplier-divider units.
//
// Quotient digits are binary signed digits (BSD) in {-1, 0, 1}. Each digit
// travels as a (p, n) bit pair: 1 = (1,0), -1 = (0,1), 0 = (0,0); (1,1) is
// never produced. This is the two-wire code the design uses between its
// units and on its ports. The sign-estimate class of the constant-divisor
// unit and a few small helpers live here as well.
package omd_pkg;

  // One binary signed digit, coded as a positive and a negative wire.
  typedef struct packed {
    logic p;  // digit is +1
    logic n;  // digit is -1
  } bsd_t;

  localparam bsd_t BSD_ZERO = '{p: 1'b0, n: 1'b0};
  localparam bsd_t BSD_POS  = '{p: 1'b1, n: 1'b0};
  localparam bsd_t BSD_NEG  = '{p: 1'b0, n: 1'b1};

  // Three-way result of the residue sign estimate ES(RS, RC).
  typedef enum logic [1:0] {
    EST_UNSURE = 2'b00,
    EST_POS    = 2'b01,
    EST_NEG    = 2'b10
  } est_t;

  // Integer value of a digit.
  function automatic int bsd_value(bsd_t d);
    return int'(d.p) - int'(d.n);
  endfunction

endpackage
