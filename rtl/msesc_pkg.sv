// msesc_pkg: constants and types shared by the multi-standard early stopping
// criterion (MSESC) blocks.
//
// The defaults describe the host decoder the criterion was evaluated in: 22
// processing elements (PEs), every WiMAX and WiFi LDPC code (largest parity
// check matrix: M = 1152 rows, the WiMAX N=2304 rate-1/2 code) and 10-bit
// internal LLR quantisation. The iteration counter width and the encoding of
// the stop reason are choices of this design.
package msesc_pkg;

  // Number of processing elements of the host decoder.
  localparam int unsigned P_DEF      = 22;
  // Largest number of parity check rows of a supported code.
  localparam int unsigned M_MAX_DEF  = 1152;
  // Total LLR width (bits_tot); magnitudes are LLR_W_DEF-1 bits wide.
  localparam int unsigned LLR_W_DEF  = 10;
  // Width of the iteration counter and of the It_max setting.
  localparam int unsigned IT_W_DEF   = 6;
  // Consecutive "CNMM down and SYN up" iterations that flag impossible decoding.
  localparam int unsigned IT_ESC_DEF = 2;

  // Why the decoder is told to stop.
  typedef enum logic [2:0] {
    STOP_NONE       = 3'd0,  // keep iterating
    STOP_SUCCESS    = 3'd1,  // syndrome is zero: valid codeword
    STOP_IMPOSSIBLE = 3'd2,  // CNT reached It_ESC
    STOP_SLOW_CONV  = 3'd3,  // i >= 0.6*It_max and SYN > T1
    STOP_MAX_ITER   = 3'd4   // It_max iterations done, nothing else fired
  } stop_reason_e;

  // Number of bits needed to hold the value v.
  function automatic int unsigned bits_for(input int unsigned v);
    return (v < 2) ? 1 : $clog2(v + 1);
  endfunction

endpackage
