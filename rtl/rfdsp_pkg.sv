// rfdsp_pkg: types and constants shared by the RF-DSP blocks.
//
// A 16-bit instruction carries, from bit 0 upwards: immi (1 bit, 1 = last
// instruction of an operation, results also go out), opcode (2 bits),
// sel-reg (3 bits, one-hot x / mid / y), sel-func (3 bits, the algorithm
// step), adder-tree (1 bit) and order (6 bits). Field positions and codes
// follow the published instruction format; opcode 11 (LOAD, moves data from
// the data cache into the arrays) and the NOP encoding are this design's own.
// Two 16-bit instructions are packed in one 32-bit instruction word.
package rfdsp_pkg;

  typedef enum logic [1:0] {
    OP_MUL  = 2'b00,
    OP_ADD  = 2'b01,
    OP_SUB  = 2'b10,
    OP_LOAD = 2'b11
  } opcode_e;

  typedef enum logic [2:0] {
    F_FIR   = 3'b000,
    F_IIR   = 3'b001,
    F_LMS_W = 3'b010,
    F_LMS_U = 3'b011,
    F_FFT   = 3'b100,
    F_IFFT  = 3'b101,
    F_MAT   = 3'b110,
    F_RSVD  = 3'b111
  } func_e;

  // sel-reg bit positions (one-hot codes 001 x, 010 mid, 100 y)
  localparam int SR_X = 0;
  localparam int SR_M = 1;
  localparam int SR_Y = 2;

  typedef struct packed {
    logic [5:0] order;   // bits 15:10
    logic       tree;    // bit 9
    func_e      func;    // bits 8:6
    logic [2:0] selreg;  // bits 5:3
    opcode_e    op;      // bits 2:1
    logic       immi;    // bit 0
  } instr_t;

  // Array targets of the data load block
  typedef enum logic [1:0] {
    ARR_X = 2'd0,
    ARR_M = 2'd1,
    ARR_Y = 2'd2,
    ARR_W = 2'd3
  } arr_e;

  // How a pre-process write lands in an array
  typedef enum logic [1:0] {
    WM_SHIFT = 2'd0,  // value enters element 0, the others move down
    WM_BCAST = 2'd1,  // value written to every element
    WM_INDEX = 2'd2   // value written to element idx
  } wmode_e;

  function automatic logic is_nop(instr_t i);
    return (i.op != OP_LOAD) && (i.selreg == 3'b000);
  endfunction

  // number of adder-tree levels for an order-N summation: ceil(log2 N), min 1
  function automatic logic [2:0] tree_levels(logic [5:0] n);
    logic [2:0] l;
    l = 3'd1;
    for (int k = 1; k < 7; k++)
      if ((7'(1) << k) < 7'(n)) l = 3'(k + 1);
    return l;
  endfunction

endpackage
