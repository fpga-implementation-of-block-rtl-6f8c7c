// mpic_pkg: constants and types shared by the BP-DF-MPIC detector.
//
// The system sizes follow the reference configuration of the detector: 10 users,
// complex spreading sequences of 32 chips, 4 interference cancellation stages and
// 16-bit data words. The default block size is 5 users per block (BP5-DF-MPIC),
// the configuration singled out as the best trade-off between BER and area.
// The chip encoding, the quantisation shift and the sign convention of the hard
// decisions are choices of this design, not fixed by the algorithm.
package mpic_pkg;

  localparam int unsigned K_USERS         = 10;  // number of users K
  localparam int unsigned NC_CHIPS        = 32;  // spreading factor Nc
  localparam int unsigned M_STAGES        = 4;   // cancellation stages M
  localparam int unsigned USERS_PER_BLOCK = 5;   // users per block (BP5)
  localparam int unsigned DATA_W          = 16;  // received chips and channel coefficients
  localparam int unsigned Q_W             = 16;  // quantised Rake outputs and correlations
  // Right shift applied to the full-precision Rake outputs and correlation
  // entries before they are saturated to Q_W bits. Both use the same shift so
  // that z = y - R0*b stays consistent.
  localparam int unsigned Q_SHIFT         = 12;

  // One complex spreading chip c = (+-1) + j(+-1). A set bit means that part is -1.
  typedef struct packed {
    logic re_neg;
    logic im_neg;
  } chip_t;

  // Number of users-blocks for K users grouped U at a time.
  function automatic int unsigned num_blocks(int unsigned k, int unsigned u);
    return (k + u - 1) / u;
  endfunction

endpackage
