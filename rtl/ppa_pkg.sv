// ppa_pkg: types and constants shared by the one-bit processing array.
//
// Streams are one-bit, bipolar-coded fractions: a stream whose bits are 1
// with probability p stands for the value 2p-1 in [-1, 1]. Multibit values
// at the I/O registers are 8-bit two's complement fractions V/128.
//
// A processing unit is configured by a pu_cfg_t word: two selector/multiplier
// stages (F1, F2) and one combining stage (F3). The operation list follows the
// unit's function table (fractional arithmetic, single-stream functions,
// window logic and control logic); the bit encodings are this design's own.
package ppa_pkg;

  // Value resolution of the I/O registers (design summary: 8 bit).
  localparam int unsigned VAL_W = 8;

  // Candidate inputs of F1/F2 inside a cell: the four streams arriving from
  // the neighbours, then the four registered unit outputs of the same cell.
  localparam int unsigned NCAND = 8;
  localparam int unsigned SEL_W = $clog2(NCAND);

  // Direction indices, used for cell ports and for the four units of a cell.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // F1 / F2: pick stream sel_a; when mul is set, multiply it by stream
  // sel_b (bipolar product = XNOR); inv negates the result.
  typedef struct packed {
    logic [SEL_W-1:0] sel_a;
    logic [SEL_W-1:0] sel_b;
    logic             mul;
    logic             inv;
  } fsel_cfg_t;

  // F3 operations.
  typedef enum logic [3:0] {
    F3_PASS = 4'd0,  // y = F1                       (routing, MUL, INVERT)
    F3_AVE  = 4'd1,  // y = (F1 + F2) / 2            (AVE, SUB, MUL-and-ADD)
    F3_ADD  = 4'd2,  // y = sat(F1 + F2)             (ADD, MUL by 2), loop filter
    F3_HALF = 4'd3,  // y = F1 / 2                   (DIV by 2)
    F3_DIV  = 4'd4,  // y = sat(F1 / F2), F2 > 0     (feedback loop through y*F2)
    F3_SQR  = 4'd5,  // y = F1 * F1(previous sample) (SQR)
    F3_LUT2 = 4'd6,  // y = lut[{F1,F2}]             (window logic, SET, CLEAR)
    F3_LUT3 = 4'd7,  // y = lut[{F1,F2,y}]           (control logic with feedback)
    F3_SQRT = 4'd8   // y = sqrt(F1), F1 >= 0        (dithered feedback loop)
  } f3_op_e;

  typedef struct packed {
    fsel_cfg_t   f1;
    fsel_cfg_t   f2;
    f3_op_e      op;
    logic [7:0]  lut;
  } pu_cfg_t;

  localparam int unsigned PU_CFG_W = $bits(pu_cfg_t);

  // I/O register stream source.
  typedef enum logic [1:0] {
    IO_PASS     = 2'd0,  // forward the stream arriving at the register
    IO_DITHER   = 2'd1,  // dithered stream of the stored multibit value
    IO_ZERO     = 2'd2,  // alternating stream, value 0
    IO_REDITHER = 2'd3 // filtered arriving stream, dithered again (decorrelates)
  } io_mode_e;

  typedef struct packed {
    io_mode_e   mode;
    logic [3:0] iir_shift;  // IIR time constant 2^iir_shift cycles (0 read as 1)
  } io_cfg_t;

  localparam int unsigned IO_CFG_W = $bits(io_cfg_t);

  // Helpers to build configurations (used by testbenches and by software
  // that prepares the serial configuration stream).
  function automatic fsel_cfg_t fsel(input logic [SEL_W-1:0] a, input logic [SEL_W-1:0] b,
                                     input logic m, input logic i);
    fsel_cfg_t c;
    c.sel_a = a;
    c.sel_b = b;
    c.mul   = m;
    c.inv   = i;
    return c;
  endfunction

  function automatic pu_cfg_t pu_cfg(input fsel_cfg_t f1, input fsel_cfg_t f2,
                                     input f3_op_e op, input logic [7:0] lut);
    pu_cfg_t c;
    c.f1  = f1;
    c.f2  = f2;
    c.op  = op;
    c.lut = lut;
    return c;
  endfunction

endpackage
