// rdlms_pkg: shared constants, types and fixed-point helpers of the 8-bit
// retimed delayed-LMS (RDLMS) adaptive filter.
//
// Number format: samples (x, d), filter output y, error e and weights w are
// DATA_W-bit two's-complement fractions (Q1.7 for 8 bits, range [-1, 1)).
// A product of two such words is a 2*DATA_W-bit Q2.14 value. The 8-bit word
// length and the 4-tap order come from the design being described; the
// Q1.7 scaling, round-half-up rescaling and saturation are choices of this
// implementation. The step size 2*mu is a power of two, 2^-MU_SHIFT, so the
// "2mu" multiplier of the architecture is an arithmetic shift.
package rdlms_pkg;

  // Default word length and filter order.
  localparam int unsigned DEF_DATA_W      = 8;
  localparam int unsigned DEF_N_TAPS      = 4;
  // Register stages after each multiplier ("2D" in the architecture).
  localparam int unsigned DEF_MULT_STAGES = 2;
  // Step size 2*mu = 2^-MU_SHIFT.
  localparam int unsigned DEF_MU_SHIFT    = 3;

  // Adaptation delay m of the delayed coefficient update, in samples, for a
  // given multiplier depth: MULT_STAGES for the filter product, one for the
  // transposed adder chain, one for the output register, one for the error
  // register and MULT_STAGES for the update product.
  function automatic int unsigned adapt_delay(int unsigned mult_stages);
    return 2 * mult_stages + 3;
  endfunction

  // Latency from a sample x(k) on the input to y(k) in the output register.
  function automatic int unsigned y_latency(int unsigned mult_stages);
    return mult_stages + 2;
  endfunction

endpackage
