// fp_pkg: floating-point formats shared by the arithmetic units and the top.
//
// Three formats are built: FP32 (8-bit exponent, 23-bit fraction), FP16
// (5-bit exponent, 10-bit fraction) and bfloat16 (8-bit exponent, 7-bit
// fraction). A word is laid out sign | exponent | fraction, most significant
// bit first. The field widths follow the studied formats; the exponent bias
// of 2^(WE-1)-1 and the hidden leading one of the significand are the usual
// IEEE-754 conventions, assumed here.
//
// The units work in the "normal" mode of a simplified format in which zero,
// infinity and NaN are signalled by two separate mode bits rather than by
// reserved exponent codes. Those mode bits are fixed to normal on the inputs
// and not produced on the outputs, so every exponent code, 0 and all-ones
// included, is an ordinary normal number and there are no subnormals.
package fp_pkg;

  localparam int unsigned FP32_WE = 8;
  localparam int unsigned FP32_WF = 23;
  localparam int unsigned FP16_WE = 5;
  localparam int unsigned FP16_WF = 10;
  localparam int unsigned BF16_WE = 8;
  localparam int unsigned BF16_WF = 7;

  // Output register levels added behind each unit (one level in the
  // energy-saving configuration; zero gives the purely combinational unit).
  localparam int unsigned DEFAULT_STAGES = 1;

  typedef struct packed {
    logic                sign;
    logic [FP32_WE-1:0]  exp;
    logic [FP32_WF-1:0]  frac;
  } fp32_t;

  typedef struct packed {
    logic                sign;
    logic [FP16_WE-1:0]  exp;
    logic [FP16_WF-1:0]  frac;
  } fp16_t;

  typedef struct packed {
    logic                sign;
    logic [BF16_WE-1:0]  exp;
    logic [BF16_WF-1:0]  frac;
  } bf16_t;

  // Exponent bias of a format with a WE-bit exponent field.
  function automatic int unsigned bias(input int unsigned we);
    return (1 << (we - 1)) - 1;
  endfunction

endpackage
