// fcu_pkg: sizes, carry-save types and the control word shared by the
// flexible DSP accelerator.
//
// Number format. Data words are DW = 16-bit two's complement numbers. A
// carry-save (CS) number is a pair of CW = DW+1 = 17-bit words {c, s} whose
// value is (c + s) mod 2^CW read as a CW-bit two's complement number. The
// arithmetic is modular and is exact as long as every value fits DW bits;
// the extra guard bit lets the multiplier recode a CS operand into Booth
// digits with no carry chain. Operand width (16) and the 17-bit product
// follow the architecture description; the guard-bit reading of the 17-bit
// width is this design's choice.
//
// Control word. One word per control step (one clock cycle) drives every
// FCU (configuration, operand register indices, result register), the data
// port input, the CS-to-binary converter and the end of the program. The
// number of FCUs and registers are design-time choices of this
// implementation (the architecture leaves both to the designer).
package fcu_pkg;

  parameter int DW      = 16;          // data / operand width
  parameter int CW      = DW + 1;      // width of each word of a CS pair
  parameter int NUM_FCU = 2;           // FCUs in the accelerator
  parameter int NREG    = 16;          // scratch registers in the bank
  parameter int RAW     = $clog2(NREG);
  parameter int PDEPTH  = 32;          // control steps the control unit holds
  parameter int PAW     = $clog2(PDEPTH);
  parameter int ND      = DW / 2;      // radix-4 Booth digits of a DW-bit value

  // A carry-save number.
  typedef struct packed {
    logic [CW-1:0] c;
    logic [CW-1:0] s;
  } cs_t;

  // A modified Booth digit in -2..2: |d| = 1 (one) or 2 (two), sign neg.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } mb_digit_t;

  // FCU configuration word d[3:0].
  typedef struct packed {
    logic sub2;    // d[3]: final adder subtracts (product - operand)
    logic mux2_n;  // d[2]: final adder operand is N* = X*+/-Y* (else K*)
    logic mux1_n;  // d[1]: multiplier operand is N* (else K*)
    logic sub1;    // d[0]: first adder computes X*-Y* (else X*+Y*)
  } fcu_cfg_t;

  // Per-FCU part of a control word.
  typedef struct packed {
    fcu_cfg_t       cfg;
    logic [RAW-1:0] x;    // register holding X*
    logic [RAW-1:0] y;    // register holding Y*
    logic [RAW-1:0] k;    // register holding K*
    logic [RAW-1:0] a;    // register holding A (binary, c word zero)
    logic           we;   // write W* back this step
    logic [RAW-1:0] dst;  // register receiving W*
  } fcu_ctl_t;

  typedef struct packed {
    logic                         last;    // final step of the kernel
    logic                         in_en;   // take one input sample
    logic [RAW-1:0]               in_dst;  // register receiving it
    logic                         cb_out;  // send CStoBin result to output
    logic                         cb_wb;   // write CStoBin result back (binary)
    logic [RAW-1:0]               cb_src;  // register converted by CStoBin
    logic [RAW-1:0]               cb_dst;  // register receiving the write-back
    fcu_ctl_t [NUM_FCU-1:0]       fcu;
  } ctrl_word_t;

  // Write ports of the register bank: one per FCU, the input, the write-back.
  parameter int NWR    = NUM_FCU + 2;
  parameter int WP_IN  = NUM_FCU;
  parameter int WP_CB  = NUM_FCU + 1;

endpackage
