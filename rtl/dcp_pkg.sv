// dcp_pkg: types and constants shared by the digital curvature processors.
//
// A range map sample is one 32-bit big-endian word: an unused bit, a
// valid/invalid flag and three unsigned 10.3 fixed-point fields Z, Y, X.
// The processors take eight consecutive samples of a row at once; that
// 256-bit vector is an ascending packed array, so sample 0 sits in the most
// significant word, as in a big-endian memory. Curvature signs are 2-bit
// two's complement numbers (0 = 00, + = 01, - = 11). The classification word
// carries the sign of H in byte 1 and the sign of K in byte 0; the upper two
// bytes are left zero for labels added later by software.
package dcp_pkg;

  localparam int unsigned LANES      = 8;   // samples per range vector
  localparam int unsigned RW         = 10;  // range field word length
  localparam int unsigned RF         = 3;   // range field fraction length
  localparam int unsigned DW         = 13;  // derivative word length seen by the HK logic

  typedef struct packed {
    logic            empty;
    logic            valid;
    logic [RW-1:0]   z;
    logic [RW-1:0]   y;
    logic [RW-1:0]   x;
  } range_word_t;

  typedef range_word_t [0:LANES-1] rvec_t;

  typedef logic [1:0] sign2_t;
  localparam sign2_t SIGN_ZERO = 2'b00;
  localparam sign2_t SIGN_POS  = 2'b01;
  localparam sign2_t SIGN_NEG  = 2'b11;

  typedef struct packed {
    logic [15:0] label;
    logic [5:0]  pad_h;
    sign2_t      sign_h;
    logic [5:0]  pad_k;
    sign2_t      sign_k;
  } class_word_t;

  typedef class_word_t [0:LANES-1] cvec_t;

  typedef logic signed [DW-1:0] deriv_t;

  typedef struct packed {
    deriv_t zx;
    deriv_t zy;
    deriv_t zxx;
    deriv_t zyy;
    deriv_t zxy;
  } grad_t;

  function automatic class_word_t make_class(sign2_t sh, sign2_t sk);
    class_word_t c;
    c        = '0;
    c.sign_h = sh;
    c.sign_k = sk;
    return c;
  endfunction

endpackage
