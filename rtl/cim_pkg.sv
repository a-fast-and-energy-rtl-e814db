// cim_pkg: types and constants shared by the CiM-PN (computing-in-memory
// prototypical network) blocks.
//
// An array operation ("micro-operation") is one read-compute-shift step or
// one write step of a CiM array. Reads activate one or two rows; the sense
// amplifiers form bitwise results of the activated words, the operation
// selectors pick one of them (or the carry-look-ahead sum), and the
// logarithmic shifter shifts it on its way to the OUT latch. Writes put
// either the OUT latch (copy buffers) or external data (bitline drivers)
// into one row.
//
// The opcode list follows the operations the sense amplifiers and adder
// produce (ADD, XOR, OR/READ, NOR/NOT, AND, NAND). The binary encodings, the
// 8-bit row address field and the shift-mask bit order are this design's
// choices; the mask order is worked out from the two mask examples printed
// for the shifter (see shift_mask below).
package cim_pkg;

  // Default array geometry: 64 x 64 arrays.
  localparam int unsigned CIM_M = 64;   // rows (wordlines)
  localparam int unsigned CIM_N = 64;   // columns (bits per word)
  localparam int unsigned ROW_AW = 8;   // row address field width (M <= 256)

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,   // A + B + cin through the in-memory CLA
    OP_XOR  = 3'd1,   // A ^ B
    OP_OR   = 3'd2,   // A | B, or READ when one row is activated
    OP_NOR  = 3'd3,   // ~(A | B), or NOT when one row is activated
    OP_AND  = 3'd4,   // A & B
    OP_NAND = 3'd5    // ~(A & B)
  } cim_op_e;

  // One array micro-operation. rd and wr are never set together: reads and
  // writes share the bitlines.
  typedef struct packed {
    logic              rd;      // activate row_a (and row_b), latch result in OUT
    cim_op_e           op;      // operation selector code
    logic [ROW_AW-1:0] row_a;   // row decoder A address (also the write row)
    logic              en_b;    // activate row decoder B as well
    logic [ROW_AW-1:0] row_b;   // row decoder B address
    logic              cin;     // carry-in of the CLA
    logic [14:0]       mask;    // shift mask S15..S1 (bit k-1 is S_k)
    logic              wr;      // write row_a
    logic              wr_ext;  // 1: write data_in (bitline drivers), 0: OUT (copy buffers)
  } cim_uop_t;

  // Shift mask: three bits per shifter level, level k shifting by 2**k.
  // Within level k, S(3k+1) selects the left path, S(3k+2) no shift and
  // S(3k+3) the right path, so 15'b010010010010010 passes the word through
  // and 15'b010010010100010 shifts it right by two.
  localparam logic [14:0] MASK_NONE = 15'b010_010_010_010_010;

  function automatic logic [14:0] shift_mask(input logic left, input logic [4:0] amt);
    logic [14:0] m;
    m = '0;
    for (int k = 0; k < 5; k++) begin
      if (!amt[k])   m[3*k+1] = 1'b1;
      else if (left) m[3*k]   = 1'b1;
      else           m[3*k+2] = 1'b1;
    end
    return m;
  endfunction

  // Helpers that build common micro-operations.
  function automatic cim_uop_t uop_nop();
    cim_uop_t u;
    u = '0;
    u.op = OP_OR;
    u.mask = MASK_NONE;
    return u;
  endfunction

  function automatic cim_uop_t uop_rd(input cim_op_e op, input logic [ROW_AW-1:0] ra,
                                      input logic en_b, input logic [ROW_AW-1:0] rb,
                                      input logic cin, input logic [14:0] mask);
    cim_uop_t u;
    u = uop_nop();
    u.rd = 1'b1;
    u.op = op;
    u.row_a = ra;
    u.en_b = en_b;
    u.row_b = rb;
    u.cin = cin;
    u.mask = mask;
    return u;
  endfunction

  function automatic cim_uop_t uop_wr(input logic [ROW_AW-1:0] row, input logic ext);
    cim_uop_t u;
    u = uop_nop();
    u.wr = 1'b1;
    u.row_a = row;
    u.wr_ext = ext;
    return u;
  endfunction

endpackage
