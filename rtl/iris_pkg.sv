// iris_pkg: widths, number formats, mode codes and fixed-point helpers shared
// by the 3-2-1 multilayer-perceptron iris recognizer.
//
// Number formats (all signed two's complement unless stated):
//   pixel / feature     8 bit unsigned, 0..255 (grey-level range of the features)
//   normalized input    16 bit, Q.15 (32768 = 1.0): n = (v - 134) * 240
//   weight              16 bit, Q.10 (1024 = 1.0); random init in -1024..1022
//   weighted sum        40 bit, Q.25 (product of Q.15 and Q.10)
//   sigmoid argument    Q.8 (256 = 1.0), weighted sum shifted right by 17
//   hidden output       8 bit unsigned, 256 = 1.0
//   network output      10 bit unsigned, 1024 = 1.0, same unit as the iris signature
//   deltas              Q.10
// The mode codes 01 (weight init), 10 (training) and 11 (testing) follow the
// documented operating modes; 00 (idle) is this design's own addition. The
// normalization constants 134 and 240 reproduce the values of the design's
// published simulation trace; all other formats are this design's choice.
package iris_pkg;

  localparam int PIX_W    = 8;    // feature / pixel width
  localparam int N_W      = 16;   // normalized value width (Q.15)
  localparam int W_W      = 16;   // weight register width (Q.10)
  localparam int ACC_W    = 40;   // weighted-sum width (Q.25), room for 255 inputs
  localparam int HID_W    = 8;    // hidden neuron output width
  localparam int SIG_W    = 10;   // network output and iris signature width
  localparam int DELTA_W  = 16;   // delta width (Q.10)

  localparam int N_INPUTS = 3;    // input layer neurons (default configuration)
  localparam int N_HIDDEN = 2;    // hidden layer neurons (default configuration)

  localparam int NORM_OFFSET = 134;   // subtracted from a value before scaling
  localparam int NORM_SCALE  = 240;   // scale factor of the normalization circuit
  localparam logic signed [N_W-1:0] BIAS_IN = 16'sd32767; // constant 1.0 input of the threshold

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic signed [N_W-1:0]     norm_t;
  typedef logic signed [W_W-1:0]     weight_t;
  typedef logic signed [ACC_W-1:0]   acc_t;
  typedef logic [HID_W-1:0]          hid_t;
  typedef logic [SIG_W-1:0]          sig_t;
  typedef logic signed [DELTA_W-1:0] delta_t;

  typedef enum logic [1:0] {
    MODE_IDLE  = 2'b00,
    MODE_INIT  = 2'b01,   // random weight generation
    MODE_TRAIN = 2'b10,   // forward pass + backpropagation
    MODE_TEST  = 2'b11    // forward pass only, result matching
  } mode_e;

  // Saturate a wide signed value into a weight register.
  function automatic weight_t sat_weight(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[W_W-1:0];
  endfunction

endpackage
