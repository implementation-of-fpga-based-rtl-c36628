// ann_pkg: constants and types shared by the character-recognition network.
//
// The network classifies a 4x4 binary grid (16 inputs) into one of 29
// character classes with a three-layer perceptron computed entirely in
// IEEE-754 single precision. The input and class counts follow the design
// description; the hidden-layer size and learning rate are this design's
// own choices and are exposed as parameters of ann_core.
package ann_pkg;

  typedef logic [31:0] fp32_t;

  // Frequently used single-precision constants.
  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_HALF = 32'h3F00_0000;

  // Training targets: 0.9 for the pattern's class, 0.1 for the others. The
  // piecewise-linear sigmoid reaches exactly 0 and 1, where its slope term
  // y*(1-y) vanishes; targets inside (0,1) keep the outputs away from there.
  localparam fp32_t FP_T_HI = 32'h3F66_6666;   // 0.9
  localparam fp32_t FP_T_LO = 32'h3DCC_CCCD;   // 0.1

  localparam int unsigned N_INPUTS  = 16;  // 16 toggle switches, 4x4 grid
  localparam int unsigned N_CLASSES = 29;  // 20 English + 9 Arabic letters
  localparam int unsigned CLASS_W   = 5;   // $clog2(N_CLASSES)

  // Phases of the network core.
  typedef enum logic [2:0] {
    PH_IDLE,   // waiting for a command
    PH_INIT,   // writing random starting weights
    PH_FH,     // forward pass, hidden layer
    PH_FO,     // forward pass, output layer (plus output deltas when training)
    PH_BH,     // back-propagate deltas to the hidden layer
    PH_UW2,    // update hidden-to-output weights
    PH_UW1,    // update input-to-hidden weights
    PH_DONE    // signal completion
  } phase_e;

  function automatic logic fp_is_zero(fp32_t v);
    return v[30:23] == 8'd0;
  endfunction

  // a > b for finite single-precision values (zero of either sign equal).
  function automatic logic fp_gt(fp32_t a, fp32_t b);
    logic az, bz;
    az = fp_is_zero(a);
    bz = fp_is_zero(b);
    if (az && bz) return 1'b0;
    if (az) return b[31];
    if (bz) return !a[31];
    if (a[31] != b[31]) return b[31];
    if (!a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

endpackage
