// dsp_pkg: types and constants shared by the DSP processor.
//
// Numbers are 16-bit two's-complement fixed point with 6 fraction bits
// (Q10.6): 13.75 is 0000001101.110000. Results are 32 bits wide with the
// same 6 fraction bits (Q26.6) and are stored as an LSB half and an MSB half.
// The 16-bit width, the 6 fraction bits and the opcode bit fields come from
// the processor's instruction set; the sign convention, the result format and
// the instruction word layout are choices of this implementation.
//
// Opcode (8 bits): [7] multiple operation, [6] multiply, [5] add, [4] subtract,
// [3] shift signal one, [2] shift direction (0 right, 1 left), [1:0] unused.
//
// Instruction word (OPC_W + 5*ADDR_W bits, 48 with 8-bit addresses), MSB first:
// opcode | length | signal-1 start | signal-2 start | signal-3 start | result start
package dsp_pkg;

  localparam int DATA_W = 16;  // sample width
  localparam int FRAC_W = 6;   // binary places of a sample
  localparam int RES_W  = 32;  // result width (two memory halves)
  localparam int OPC_W  = 8;   // opcode width
  localparam int ADDR_W = 8;   // memory address / signal length width
  localparam int IW     = OPC_W + 5*ADDR_W;  // instruction word width

  typedef logic [DATA_W-1:0] sample_t;
  typedef logic [RES_W-1:0]  result_t;
  typedef logic [OPC_W-1:0]  opcode_t;

  typedef logic [ADDR_W-1:0] addr_t;

  // One instruction: apply op to len samples of each signal, starting at the
  // given MEM1 addresses, and store the len results from res_base in MEM2.
  typedef struct packed {
    opcode_t op;
    addr_t   len;
    addr_t   s1_base;
    addr_t   s2_base;
    addr_t   s3_base;
    addr_t   res_base;
  } instr_t;

  // Opcode bit positions.
  localparam int OP_MULTI = 7;
  localparam int OP_MUL   = 6;
  localparam int OP_ADD   = 5;
  localparam int OP_SUB   = 4;
  localparam int OP_SHEN  = 3;
  localparam int OP_SHL   = 2;

  // An opcode whose upper six bits are all zero stops the program (HLT).
  // The 17 instructions; the low two bits are don't-care and shown as 0.
  // 8'hEC (multiply, add, shift left) is called MAL here so that it does not
  // clash with MAS (8'hD0, multiply and subtract).
  typedef enum logic [OPC_W-1:0] {
    MUL = 8'h40, MAD = 8'hE0, MAS = 8'hD0, MRS = 8'h48, MLS = 8'h4C,
    ADD = 8'h20, ARS = 8'h28, ALS = 8'h2C,
    SUB = 8'h10, SRS = 8'h18, SLS = 8'h1C,
    RS  = 8'h08, LS  = 8'h0C,
    MAR = 8'hE8, MAL = 8'hEC, MSR = 8'hD8, MSL = 8'hDC,
    HLT = 8'h00
  } mnemonic_e;

  // True for the upper six bits of one of the 17 instructions.
  function automatic logic opcode_legal(opcode_t op);
    case ({op[7:2], 2'b00})
      MUL, MAD, MAS, MRS, MLS, ADD, ARS, ALS, SUB, SRS, SLS,
      RS, LS, MAR, MAL, MSR, MSL: return 1'b1;
      default:                    return 1'b0;
    endcase
  endfunction

endpackage
