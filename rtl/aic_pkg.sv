// aic_pkg: types and constants shared by the adaptive interference canceler.
//
// Numbers inside the canceler are sign-magnitude: one sign bit (1 = negative)
// and an unsigned magnitude. The "8-bit format" word has an 8-bit magnitude
// scaled so that 128 represents 1.0 (value = magnitude * 2/256); a product of
// two such words is a "16-bit format" word with a 16-bit magnitude in which
// 2^14 represents 1.0. Both formats and the scale follow the document; the
// struct packing (sign above magnitude) is this design's choice.
package aic_pkg;

  localparam int unsigned DATA_W = 8;          // magnitude bits of a sample/weight
  localparam int unsigned PROD_W = 2 * DATA_W; // magnitude bits of a product

  // Sign-magnitude word in 8-bit format.
  typedef struct packed {
    logic              sign;
    logic [DATA_W-1:0] mag;
  } sm8_t;

  // Sign-magnitude word in 16-bit (product) format.
  typedef struct packed {
    logic              sign;
    logic [PROD_W-1:0] mag;
  } sm16_t;

  // Phase of one canceler iteration, one CLOCK1 period per step except
  // FILT and UPD, which last ORDER/2 periods each.
  typedef enum logic [3:0] {
    PH_IDLE  = 4'd0,  // waiting for the next sampling instant
    PH_PRIME = 4'd1,  // after reset: start the very first conversion
    PH_RD    = 4'd2,  // read the converted sample from the ADC
    PH_WR    = 4'd3,  // start the next conversion, shift the delay line
    PH_FILT  = 4'd4,  // PROCESSOR1: accumulate filter output, two taps per step
    PH_ERR   = 4'd5,  // form error e = x - y
    PH_UPD   = 4'd6,  // PROCESSOR2: update two weights per step
    PH_OUT   = 4'd7,  // load the output register (the DAC code)
    PH_DONE  = 4'd8   // end of iteration, COUNTER1 returns to zero
  } phase_t;

endpackage
