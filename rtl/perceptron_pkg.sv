// perceptron_pkg: types and constants shared by the perceptron accelerator.
//
// All real-valued quantities (inputs x1, x2 and the weights w1, w2, b) are
// held as 16-bit two's-complement numbers that stand for the real value times
// 512, i.e. fixed point with 9 fractional bits. The label is held unscaled
// (0 or 1). The scale factor 512 and the 16-bit word follow the document; the
// signed (two's-complement) reading of the word is this design's choice, and
// gives a real range of [-64, 64) in steps of 1/512.
//
// A memory request (mem_req_t) bundles the Table-I control pins of one
// memory unit: enable, write(1)/read(0), 8-bit address and 16-bit write data.
package perceptron_pkg;

  localparam int unsigned DATA_W    = 16;  // memory word width
  localparam int unsigned ADDR_W    = 8;   // memory address width
  localparam int unsigned FRAC_BITS = 9;   // scale factor 2**9 = 512
  localparam int unsigned PROD_W    = 2 * DATA_W;  // one 16x16 product
  localparam int unsigned SUM_W     = PROD_W + 2;  // two products plus bias

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic        [ADDR_W-1:0] addr_t;

  // Weight layout inside the weight memory (mem-w).
  localparam addr_t W1_ADDR = 8'd0;
  localparam addr_t W2_ADDR = 8'd1;
  localparam addr_t B_ADDR  = 8'd2;
  localparam int unsigned NUM_WEIGHTS = 3;

  typedef struct packed {
    logic  ena;   // access this cycle
    logic  w;     // 1: write din at addr, 0: read addr
    addr_t addr;
    word_t din;
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '{ena: 1'b0, w: 1'b0, addr: '0, din: '0};

  // Saturate a wider signed value into one 16-bit word.
  function automatic word_t sat_word(input logic signed [DATA_W+1:0] v);
    localparam logic signed [DATA_W+1:0] MAXV = (DATA_W+2)'(2**(DATA_W-1) - 1);
    localparam logic signed [DATA_W+1:0] MINV = -(DATA_W+2)'(2**(DATA_W-1));
    if (v > MAXV)      return word_t'(MAXV);
    else if (v < MINV) return word_t'(MINV);
    else               return word_t'(v);
  endfunction

endpackage
