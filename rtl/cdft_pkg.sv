// cdft_pkg: types and constants shared by the CDFT (combined 2-D DFT / IDFT)
// accelerator.
//
// Samples are signed fixed point, 32 bits for the real part and 32 bits for the
// imaginary part, kept as two separate words (a 64-bit complex value split in
// two). The 32-bit width follows the accelerator description; the split into
// 16 integer and 16 fraction bits is this design's choice. Twiddle factors
// (cosine and sine values) are 18-bit signed with 16 fraction bits, so +1.0
// and -1.0 are exact; 18 bits matches one DSP multiplier input.
package cdft_pkg;

  localparam int unsigned DATA_W    = 32;  // width of one real or imaginary word
  localparam int unsigned DATA_FRAC = 16;  // fraction bits of a sample
  localparam int unsigned COEF_W    = 18;  // width of a twiddle value
  localparam int unsigned COEF_FRAC = 16;  // fraction bits of a twiddle value
  localparam int unsigned PROD_W    = DATA_W + COEF_W + 1; // sum of two products

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // Operation selected by the host for one run.
  typedef enum logic {
    MODE_DFT  = 1'b0,  // forward 2-D DFT, real input (imaginary input ignored)
    MODE_IDFT = 1'b1   // inverse 2-D DFT, complex input, scaled by 1/(M*N)
  } mode_e;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    coef_t cos_v;
    coef_t sin_v;
  } twiddle_t;

  // Host-side buffer access used between the AXI slave and the buffers.
  // Reads return data one cycle after the request.
  typedef struct packed {
    logic        en;     // access strobe
    logic        we;     // 1 = write, 0 = read
    logic        im;     // 1 = imaginary word, 0 = real word
    logic [15:0] addr;   // sample index, x*N + y (input) or u*N + v (output)
    sample_t     wdata;
  } host_req_t;

endpackage
