// nr_pkg: types, constants and the quantisation operator shared by the
// noise-reduction core.
//
// Number format: data and Parcor coefficients are 16-bit two's complement
// fractions (one sign bit, 15 fraction bits). A product of two such words
// therefore carries 30 fraction bits; the quantiser brings a wide result back
// to a data word by dropping FRAC fraction bits with sign-magnitude
// truncation (the magnitude is truncated, i.e. rounding toward zero), the
// quantisation operator the design specifies. Saturation to the symmetric
// range +/-(2^(W-1)-1) on overflow is this design's own choice.
package nr_pkg;

  // Arithmetic-unit accumulate modes.
  typedef enum logic [1:0] {
    AU_CLR = 2'd0,   // acc = +/- c*x
    AU_ACC = 2'd1,   // acc = acc +/- c*x
    AU_ADD = 2'd2    // acc = (addend << FRAC) +/- c*x
  } au_mode_e;

  // One command to an arithmetic unit for one macro-cycle.
  typedef struct packed {
    logic     valid;
    au_mode_e mode;
    logic     sub;
  } au_cmd_t;

  // Sign-magnitude truncation of a wide signed value by FRAC bits, with
  // symmetric saturation to a W_OUT-bit result.
  function automatic logic signed [31:0] sm_trunc(input logic signed [63:0] v,
                                                  input int unsigned frac,
                                                  input int unsigned w_out);
    logic        [63:0] mag;
    logic        [63:0] lim;
    mag = v[63] ? 64'(-v) : 64'(v);
    mag = mag >> frac;
    lim = (64'd1 << (w_out - 1)) - 64'd1;
    if (mag > lim) mag = lim;
    return v[63] ? -32'(mag) : 32'(mag);
  endfunction

  // Micro-instruction of one arithmetic unit for one macro-cycle: the
  // filter stage (0 = stage 1) and the operation within the stage.
  typedef struct packed {
    logic       valid;
    logic [3:0] stage;
    logic [2:0] op;
  } uop_t;

  // Decorrelator operations, in the order issued within a stage.
  localparam logic [2:0] D_FWD   = 3'd0;  // f_i  = f_{i-1} - k_i*b_{i-1}[n-1]
  localparam logic [2:0] D_BWD   = 3'd1;  // b_i  = b_{i-1}[n-1] - k_i*f_{i-1}
  localparam logic [2:0] D_POW0  = 3'd2;  // e    = f_{i-1}^2
  localparam logic [2:0] D_POW1  = 3'd3;  // e   += b_{i-1}[n-1]^2, then eta acc
  localparam logic [2:0] D_CRS0  = 3'd4;  // c    = f_i*b_{i-1}[n-1]
  localparam logic [2:0] D_CRS1  = 3'd5;  // c   += b_i*f_{i-1}, then k acc

  // Analysis / synthesis operations.
  localparam logic [2:0] A_FWD   = 3'd0;  // f_i = f_{i-1} - k_i*b'
  localparam logic [2:0] A_BWD   = 3'd1;  // b_i = b' - k_i*f_{i-1}
  localparam logic [2:0] A_BETA  = 3'd2;  // b'' = beta*b_i (input of next delay)
  localparam logic [2:0] S_FWD   = 3'd3;  // f_{i-1} = f_i + k_i*b'
  localparam logic [2:0] S_BWD   = 3'd4;  // b_i = b' - k_i*f_{i-1}
  localparam logic [2:0] S_GAMMA = 3'd5;  // b'' = gamma*b_i

endpackage
