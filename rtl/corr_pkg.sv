// corr_pkg: widths and shared types of the digital auto-correlator.
//
// The sample word is 6 bits (64 quantisation levels). Register S holds the
// sample plus one dummy least-significant bit (7 bits). Register R must hold
// (2r+1)*32 = 4064 at most, so it is 12 bits. The accumulator is 13 bits, so
// its carry out of the MSB divides the running sum by 2*N^2 = 8192. The
// tau_m memory has 18 stages, giving delays 0..18 sampling intervals. Both
// counters are six decades of BCD. All of these numbers follow the original instrument;
// the struct of control strobes is this design's own packaging.
package corr_pkg;
  localparam int unsigned AD_W       = 6;
  localparam int unsigned S_W        = AD_W + 1;
  localparam int unsigned R_W        = 2 * AD_W;
  localparam int unsigned ACC_W      = 13;
  localparam int unsigned TAU_STAGES = 18;
  localparam int unsigned DIGITS     = 6;
  localparam int unsigned N_CP       = 14;

  typedef logic [3:0] bcd_t;

  // Control pulses decoded from the 4-bit control counter. a, b and c are
  // levels of the current counter state; the others are one-clock strobes.
  typedef struct packed {
    logic a;      // control pulse A: register S and R load instead of shift
    logic b;      // control pulse B: unconditional addition (step 1)
    logic c;      // control pulse C: register R shifts in a 1 (forms 2r+1)
    logic f1_up;  // leading edge of F1: shift/load strobe for S and R
    logic add_t;  // ADD.T strobe: half-addition stage of the accumulator
    logic ca_t;   // Ca.T strobe: carry stage of the accumulator
    logic t14;    // T14 strobe: end of one computation
  } ctrl_t;
endpackage
