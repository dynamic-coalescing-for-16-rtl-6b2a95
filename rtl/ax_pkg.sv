// ax_pkg: types and constants shared by the AXThumb front end.
//
// An AX (augmenting extension) instruction is a 16-bit Thumb-encoded word whose
// top six bits are 101110, an opcode otherwise unused in Thumb. Bits [9:7] select
// one of eight AX instructions and bits [6:0] carry its operands. The field
// positions of the opcode, the operands and the 28-bit status register follow the
// published AX encoding; which 3-bit value names which AX instruction is this
// design's own choice (the order in which the instructions are listed).
//
// The status register holds what an AX instruction leaves for the Thumb
// instruction that follows it, plus the predication counter:
//   [27]    en      an AX augmentation is pending for the next Thumb instruction
//   [26:24] op      which AX instruction wrote the status
//   [23:20] ctr     predicated instruction pairs still to come (0 = normal mode)
//   [19:16] reg     register operand (setsource/setdest/setthird), or the
//                   setpred condition code
//   [15:9]  imm     setimm constant (7-bit two's complement)
//   [8:5]   shamt   setshift amount
//   [4:2]   shtype  setshift type
//   [1]     sbit    setsbit
//   [0]     allhigh setallhigh
package ax_pkg;

  // Bits [15:10] of every AX instruction.
  localparam logic [5:0] AX_PREFIX = 6'b101110;

  typedef enum logic [2:0] {
    AX_SETIMM     = 3'd0,
    AX_SETSHIFT   = 3'd1,
    AX_SETSBIT    = 3'd2,
    AX_SETPRED    = 3'd3,
    AX_SETSOURCE  = 3'd4,
    AX_SETDEST    = 3'd5,
    AX_SETALLHIGH = 3'd6,
    AX_SETTHIRD   = 3'd7
  } ax_op_e;

  // setshift shift types. Types 0..3 are the ARM register shifts; ROTIMM asks
  // for the 4-bit amount to be used as the rotate field of an 8-bit immediate.
  typedef enum logic [2:0] {
    SH_LSL    = 3'd0,
    SH_LSR    = 3'd1,
    SH_ASR    = 3'd2,
    SH_ROR    = 3'd3,
    SH_ROTIMM = 3'd4
  } ax_shtype_e;

  typedef struct packed {
    logic       en;
    ax_op_e     op;
    logic [3:0] ctr;
    logic [3:0] rg;
    logic [6:0] imm;
    logic [3:0] shamt;
    logic [2:0] shtype;
    logic       sbit;
    logic       allhigh;
  } ax_status_t;

  localparam int unsigned STATUS_W = $bits(ax_status_t);

  // Buffer states of the instruction buffer (T = Thumb, A = AX in ib2):
  // S1 empty, S2 T, S3 T T, S4 T A, S5 T T T, S6 T A T.
  typedef enum logic [2:0] {
    BUF_S1 = 3'd1,
    BUF_S2 = 3'd2,
    BUF_S3 = 3'd3,
    BUF_S4 = 3'd4,
    BUF_S5 = 3'd5,
    BUF_S6 = 3'd6
  } buf_state_e;

  // One buffered instruction and its halfword address.
  typedef struct packed {
    logic [15:0] instr;
    logic [31:0] pc;
  } ib_entry_t;

  // ARM condition codes.
  localparam logic [3:0] COND_AL = 4'hE;

  function automatic logic is_ax(input logic [15:0] instr);
    return instr[15:10] == AX_PREFIX;
  endfunction

  // ARM condition test on flags {N,Z,C,V}.
  function automatic logic cond_pass(input logic [3:0] cond, input logic [3:0] nzcv);
    logic n, z, c, v;
    {n, z, c, v} = nzcv;
    unique case (cond)
      4'h0: return z;
      4'h1: return !z;
      4'h2: return c;
      4'h3: return !c;
      4'h4: return n;
      4'h5: return !n;
      4'h6: return v;
      4'h7: return !v;
      4'h8: return c && !z;
      4'h9: return !c || z;
      4'hA: return n == v;
      4'hB: return n != v;
      4'hC: return !z && (n == v);
      4'hD: return z || (n != v);
      default: return 1'b1;
    endcase
  endfunction

endpackage
