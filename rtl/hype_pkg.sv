// hype_pkg: constants and types shared by the HyPE neuron RTL.
// A neuron keeps an 8-bit two's complement running value whose MSB is the
// sign bit (the threshold never exceeds 128, so 8 bits hold it). The
// single block neuron takes a 7-bit threshold magnitude. latch_kind_e
// names the two output latch circuits of the single block neuron.
package hype_pkg;
  localparam int unsigned VAL_W = 8;  // running value / threshold width
  localparam int unsigned THR_W = 7;  // threshold pads of the single block neuron
  typedef logic signed [VAL_W-1:0] val_t;
  typedef logic [THR_W-1:0] thr_t;     // threshold as loaded (T-1)
  typedef enum logic {LATCH_TSPC = 1'b0, LATCH_UCDCS = 1'b1} latch_kind_e;
endpackage
