// axthumb_decompressor: Thumb to ARM translation with AX coalescing.
//
// The decode stage feeds every Thumb instruction through this combinational
// block, which produces the equivalent 32-bit ARM instruction for the unchanged
// ARM decoder. The Thumb formats handled are those of the ARMv4T Thumb
// instruction set (shifts, add/sub, immediate ops, ALU ops, high-register ops and
// BX, PC-, SP- and register-relative loads and stores, address generation, SP
// adjust, push/pop, multiple load/store, conditional and unconditional branches,
// SWI). The two-halfword BL pair is not translated and, like every unallocated
// encoding, yields the ARM undefined instruction with undef = 1.
//
// When the status register holds a pending augmentation (status.en), the AX
// instruction that wrote it predetermines some bits of the ARM instruction:
//   setimm     the 7-bit signed constant replaces the immediate or register
//              operand: load/store offsets (negative gives a down offset),
//              ADD/SUB/CMP/CMN/MOV/AND/BIC use the opposite opcode for a
//              negative constant, other ALU ops take it zero-extended, and
//              register shifts take its low five bits as the shift amount
//   setshift   the shift type and amount are applied to the register operand
//              of ALU, move and register-offset load/store instructions; on an
//              8-bit immediate the amount becomes the ARM rotate field
//   setsbit    the S bit of a data-processing instruction is set
//   setsource  the 4-bit register replaces the source / base register
//   setdest    the 4-bit register replaces the destination register (in the
//              two-address Thumb forms also the first source)
//   setthird   the 4-bit register becomes the second source, the Thumb source
//              register the first one, making a three-address instruction
//   setallhigh the 8-bit register list of push/pop/ldmia/stmia names r8..r15
// Which Thumb formats each AX instruction applies to beyond the published
// examples, and the handling of negative setimm constants, are this design's own
// choices, as is keeping the S bit of flag-setting Thumb forms after coalescing
// (the published examples write the coalesced ARM without S). The augmented
// output is simply status.en: every pending augmentation is consumed by the
// next Thumb instruction, whether or not its format uses it. Branch offsets are passed in Thumb (halfword) units: the ARM decoder
// in Thumb state scales them and uses the Thumb PC, as in a Thumb-capable core.
module axthumb_decompressor
  import ax_pkg::*;
(
  input  logic [15:0] thumb,
  input  ax_status_t  status,
  output logic [31:0] arm,
  output logic        undef,      // no ARM translation
  output logic        augmented   // a pending AX augmentation was applied
);

  // ARM data-processing opcodes
  localparam logic [3:0] OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
                         OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_TST = 4'h8,
                         OP_CMP = 4'hA, OP_CMN = 4'hB, OP_ORR = 4'hC, OP_MOV = 4'hD,
                         OP_BIC = 4'hE, OP_MVN = 4'hF;
  localparam logic [31:0] ARM_UNDEF = 32'hE7F000F0;

  function automatic logic [31:0] dp(input logic i, input logic [3:0] opc, input logic s,
                                     input logic [3:0] rn, input logic [3:0] rd,
                                     input logic [11:0] op2);
    return {COND_AL, 2'b00, i, opc, s, rn, rd, op2};
  endfunction

  function automatic logic [11:0] reg_op2(input logic [4:0] amt, input logic [1:0] sh,
                                          input logic [3:0] rm);
    return {amt, sh, 1'b0, rm};
  endfunction

  // A compare/test keeps Rd = 0; MOV/MVN keep Rn = 0.
  function automatic logic no_rd(input logic [3:0] opc);
    return opc inside {OP_TST, 4'h9, OP_CMP, OP_CMN};
  endfunction

  // AX requests
  logic a_imm, a_shift, a_sbit, a_src, a_dst, a_third, a_high;
  assign a_imm   = status.en && status.op == AX_SETIMM;
  assign a_shift = status.en && status.op == AX_SETSHIFT;
  assign a_sbit  = status.en && status.op == AX_SETSBIT;
  assign a_src   = status.en && status.op == AX_SETSOURCE;
  assign a_dst   = status.en && status.op == AX_SETDEST;
  assign a_third = status.en && status.op == AX_SETTHIRD;
  assign a_high  = status.en && status.op == AX_SETALLHIGH;
  assign augmented = status.en;

  // setimm constant: signed value, magnitude and complement
  logic [7:0] sv, mag, inv;
  logic       neg;
  assign sv  = {status.imm[6], status.imm};
  assign neg = status.imm[6];
  assign mag = neg ? (~sv + 8'd1) : sv;
  assign inv = ~sv;

  // setshift operand shift for register operands
  logic [4:0] s_amt;
  logic [1:0] s_typ;
  assign s_amt = (a_shift && !status.shtype[2]) ? {1'b0, status.shamt} : 5'd0;
  assign s_typ = (a_shift && !status.shtype[2]) ? status.shtype[1:0] : 2'b00;

  // Data-processing instruction with a register second operand, with the
  // setimm / setshift / setsbit / setthird rules applied.
  // rn_first: first source; rd: destination; rm: Thumb second operand.
  function automatic logic [31:0] dp_reg(input logic [3:0] opc, input logic s,
                                         input logic [3:0] rn_first, input logic [3:0] rd,
                                         input logic [3:0] rm,
                                         input logic imm_ok, input logic third_ok);
    logic [3:0] o, n, d;
    logic       ss;
    o  = opc;
    n  = (opc == OP_MOV || opc == OP_MVN) ? 4'd0 : rn_first;
    d  = no_rd(opc) ? 4'd0 : rd;
    ss = s || a_sbit || no_rd(opc);
    if (a_imm && imm_ok) begin
      logic [7:0] v;
      v = {1'b0, status.imm};
      if (neg) begin
        unique case (opc)
          OP_ADD: begin o = OP_SUB; v = mag; end
          OP_SUB: begin o = OP_ADD; v = mag; end
          OP_CMP: begin o = OP_CMN; v = mag; end
          OP_CMN: begin o = OP_CMP; v = mag; end
          OP_MOV: begin o = OP_MVN; v = inv; end
          OP_MVN: begin o = OP_MOV; v = inv; end
          OP_AND: begin o = OP_BIC; v = inv; end
          OP_BIC: begin o = OP_AND; v = inv; end
          default: v = {1'b0, status.imm};
        endcase
      end
      return dp(1'b1, o, ss, n, d, {4'h0, v});
    end else if (a_third && third_ok && !no_rd(opc)) begin
      // three-address: d = Thumb source op third
      return dp(1'b0, o, ss, (opc == OP_MOV || opc == OP_MVN) ? 4'd0 : rm, d,
                reg_op2(5'd0, 2'b00, status.rg));
    end else begin
      return dp(1'b0, o, ss, n, d, reg_op2(s_amt, s_typ, rm));
    end
  endfunction

  // Single data transfer (word/byte) with immediate or register offset.
  function automatic logic [31:0] sdt(input logic l, input logic b, input logic [3:0] rn,
                                      input logic [3:0] rd, input logic reg_off,
                                      input logic [11:0] off_imm, input logic [3:0] rm);
    if (a_imm)
      return {COND_AL, 2'b01, 1'b0, 1'b1, !neg, b, 1'b0, l, rn, rd, {4'h0, mag}};
    else if (reg_off)
      return {COND_AL, 2'b01, 1'b1, 1'b1, 1'b1, b, 1'b0, l, rn, rd, reg_op2(s_amt, s_typ, rm)};
    else
      return {COND_AL, 2'b01, 1'b0, 1'b1, 1'b1, b, 1'b0, l, rn, rd, off_imm};
  endfunction

  // Halfword / signed transfer; sh = {S,H} of the ARM encoding.
  function automatic logic [31:0] hdt(input logic l, input logic [1:0] sh, input logic [3:0] rn,
                                      input logic [3:0] rd, input logic reg_off,
                                      input logic [7:0] off_imm, input logic [3:0] rm);
    if (a_imm)
      return {COND_AL, 3'b000, 1'b1, !neg, 1'b1, 1'b0, l, rn, rd, mag[7:4], 1'b1, sh, 1'b1, mag[3:0]};
    else if (reg_off)
      return {COND_AL, 3'b000, 1'b1, 1'b1, 1'b0, 1'b0, l, rn, rd, 4'h0, 1'b1, sh, 1'b1, rm};
    else
      return {COND_AL, 3'b000, 1'b1, 1'b1, 1'b1, 1'b0, l, rn, rd, off_imm[7:4], 1'b1, sh, 1'b1, off_imm[3:0]};
  endfunction

  // Register replaced by setsource / setdest.
  function automatic logic [3:0] src(input logic [3:0] r);
    return a_src ? status.rg : r;
  endfunction
  function automatic logic [3:0] dst(input logic [3:0] r);
    return a_dst ? status.rg : r;
  endfunction

  logic [3:0] r0, r3, r8;   // low registers in bits [2:0], [5:3], [8:6]
  logic [3:0] r10;          // low register in bits [10:8]
  assign r0  = {1'b0, thumb[2:0]};
  assign r3  = {1'b0, thumb[5:3]};
  assign r8  = {1'b0, thumb[8:6]};
  assign r10 = {1'b0, thumb[10:8]};

  always_comb begin
    arm   = ARM_UNDEF;
    undef = 1'b0;
    priority casez (thumb[15:10])
      // F2: add/subtract, register or 3-bit immediate
      6'b000110, 6'b000111: begin
        logic [3:0] opc;
        opc = thumb[9] ? OP_SUB : OP_ADD;
        if (thumb[10] && !a_imm)
          arm = dp(1'b1, opc, 1'b1, src(r3), dst(r0), {9'd0, thumb[8:6]});
        else
          arm = dp_reg(opc, 1'b1, src(r3), dst(r0), r8, 1'b1, 1'b0);
      end
      // F1: move shifted register
      6'b000???: begin
        if (a_imm)
          arm = dp(1'b0, OP_MOV, 1'b1, 4'd0, dst(r0),
                   reg_op2(status.imm[4:0], thumb[12:11], src(r3)));
        else
          arm = dp(1'b0, OP_MOV, 1'b1, 4'd0, dst(r0),
                   reg_op2(thumb[10:6], thumb[12:11], src(r3)));
      end
      // F3: move/compare/add/subtract 8-bit immediate
      6'b001???: begin
        logic [3:0] rd, rn;
        logic [3:0] rot;
        rd  = dst(r10);
        rn  = a_src ? status.rg : rd;
        rot = a_shift ? status.shamt : 4'h0;
        unique case (thumb[12:11])
          2'd0: arm = dp(1'b1, OP_MOV, 1'b1, 4'd0, rd, {rot, thumb[7:0]});
          2'd1: arm = dp(1'b1, OP_CMP, 1'b1, rn, 4'd0, {rot, thumb[7:0]});
          2'd2: arm = dp(1'b1, OP_ADD, 1'b1, rn, rd, {rot, thumb[7:0]});
          default: arm = dp(1'b1, OP_SUB, 1'b1, rn, rd, {rot, thumb[7:0]});
        endcase
      end
      // F4: ALU operations
      6'b010000: begin
        logic [3:0] rd, rs;
        rd = dst(r0);
        rs = src(r3);
        unique case (thumb[9:6])
          4'h0: arm = dp_reg(OP_AND, 1'b1, rd, rd, rs, 1'b1, 1'b1);
          4'h1: arm = dp_reg(OP_EOR, 1'b1, rd, rd, rs, 1'b1, 1'b1);
          4'h5: arm = dp_reg(OP_ADC, 1'b1, rd, rd, rs, 1'b1, 1'b1);
          4'h6: arm = dp_reg(OP_SBC, 1'b1, rd, rd, rs, 1'b1, 1'b1);
          4'h8: arm = dp_reg(OP_TST, 1'b1, rd, rd, rs, 1'b1, 1'b0);
          4'hA: arm = dp_reg(OP_CMP, 1'b1, rd, rd, rs, 1'b1, 1'b0);
          4'hB: arm = dp_reg(OP_CMN, 1'b1, rd, rd, rs, 1'b1, 1'b0);
          4'hC: arm = dp_reg(OP_ORR, 1'b1, rd, rd, rs, 1'b1, 1'b1);
          4'hE: arm = dp_reg(OP_BIC, 1'b1, rd, rd, rs, 1'b1, 1'b1);
          4'hF: arm = dp_reg(OP_MVN, 1'b1, rd, rd, rs, 1'b1, 1'b0);
          4'h2, 4'h3, 4'h4, 4'h7: begin
            // LSL, LSR, ASR, ROR by register: MOVS rd, rd, <sh> rs
            logic [1:0] sh;
            sh = (thumb[9:6] == 4'h2) ? 2'd0 : (thumb[9:6] == 4'h3) ? 2'd1 :
                 (thumb[9:6] == 4'h4) ? 2'd2 : 2'd3;
            if (a_imm)
              arm = dp(1'b0, OP_MOV, 1'b1, 4'd0, rd, reg_op2(status.imm[4:0], sh, rd));
            else if (a_third)
              arm = dp(1'b0, OP_MOV, 1'b1, 4'd0, rd, {status.rg, 1'b0, sh, 1'b1, rs});
            else
              arm = dp(1'b0, OP_MOV, 1'b1, 4'd0, rd, {rs, 1'b0, sh, 1'b1, rd});
          end
          4'h9: arm = dp(1'b1, OP_RSB, 1'b1, rs, rd, 12'd0);     // NEG
          default: begin                                          // MUL
            logic [3:0] m;
            m = a_third ? status.rg : rd;
            arm = {COND_AL, 7'b0000000, 1'b1, rd, 4'h0, m, 4'b1001, rs};
          end
        endcase
      end
      // F5: high-register operations and BX
      6'b010001: begin
        logic [3:0] hd, hs;
        hd = dst({thumb[7], thumb[2:0]});
        hs = src({thumb[6], thumb[5:3]});
        unique case (thumb[9:8])
          2'd0: arm = dp_reg(OP_ADD, 1'b0, hd, hd, hs, 1'b1, 1'b1);
          2'd1: arm = dp_reg(OP_CMP, 1'b1, hd, hd, hs, 1'b1, 1'b0);
          2'd2: arm = dp_reg(OP_MOV, 1'b0, hd, hd, hs, 1'b1, 1'b0);
          default: arm = {COND_AL, 24'h12FFF1, {thumb[6], thumb[5:3]}};
        endcase
      end
      // F6: PC-relative load
      6'b01001?: arm = sdt(1'b1, 1'b0, 4'd15, dst(r10), 1'b0, {2'b00, thumb[7:0], 2'b00}, 4'd0);
      // F7 / F8: load/store with register offset
      6'b0101??: begin
        if (!thumb[9])
          arm = sdt(thumb[11], thumb[10], src(r3), dst(r0), 1'b1, 12'd0, r8);
        else begin
          unique case (thumb[11:10])
            2'b00: arm = hdt(1'b0, 2'b01, src(r3), dst(r0), 1'b1, 8'd0, r8); // STRH
            2'b10: arm = hdt(1'b1, 2'b01, src(r3), dst(r0), 1'b1, 8'd0, r8); // LDRH
            2'b01: arm = hdt(1'b1, 2'b10, src(r3), dst(r0), 1'b1, 8'd0, r8); // LDSB
            default: arm = hdt(1'b1, 2'b11, src(r3), dst(r0), 1'b1, 8'd0, r8); // LDSH
          endcase
        end
      end
      // F9: load/store with 5-bit immediate offset
      6'b011???: begin
        logic [11:0] off;
        off = thumb[12] ? {7'd0, thumb[10:6]} : {5'd0, thumb[10:6], 2'b00};
        arm = sdt(thumb[11], thumb[12], src(r3), dst(r0), 1'b0, off, 4'd0);
      end
      // F10: load/store halfword with immediate offset
      6'b1000??: arm = hdt(thumb[11], 2'b01, src(r3), dst(r0), 1'b0,
                           {2'b00, thumb[10:6], 1'b0}, 4'd0);
      // F11: SP-relative load/store
      6'b1001??: arm = sdt(thumb[11], 1'b0, 4'd13, dst(r10), 1'b0,
                           {2'b00, thumb[7:0], 2'b00}, 4'd0);
      // F12: load address (ADD rd, PC/SP, #imm*4)
      6'b1010??: arm = dp(1'b1, OP_ADD, a_sbit, thumb[11] ? 4'd13 : 4'd15, dst(r10),
                          {4'hF, thumb[7:0]});
      // F13 (add offset to SP), F14 (push/pop), AX space and unallocated
      6'b1011??: begin
        if (thumb[11:8] == 4'b0000) begin
          arm = dp(1'b1, thumb[7] ? OP_SUB : OP_ADD, a_sbit, 4'd13, 4'd13,
                   {4'hF, 1'b0, thumb[6:0]});
        end else if (thumb[10:9] == 2'b10) begin
          logic [15:0] list;
          list = a_high ? {thumb[7:0], 8'h00} : {8'h00, thumb[7:0]};
          if (!thumb[11]) begin
            list[14] = list[14] | thumb[8];                   // push LR
            arm = {COND_AL, 3'b100, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 4'd13, list}; // STMDB sp!
          end else begin
            list[15] = list[15] | thumb[8];                   // pop PC
            arm = {COND_AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 4'd13, list}; // LDMIA sp!
          end
        end else begin
          undef = 1'b1;
        end
      end
      // F15: multiple load/store
      6'b1100??: begin
        logic [15:0] list;
        list = a_high ? {thumb[7:0], 8'h00} : {8'h00, thumb[7:0]};
        arm  = {COND_AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b1, thumb[11], src(r10), list};
      end
      // F16 / F17: conditional branch, SWI
      6'b1101??: begin
        if (thumb[11:8] == 4'hF)
          arm = {COND_AL, 4'hF, 16'd0, thumb[7:0]};
        else if (thumb[11:8] == 4'hE)
          undef = 1'b1;
        else
          arm = {thumb[11:8], 4'b1010, {16{thumb[7]}}, thumb[7:0]};
      end
      // F18: unconditional branch
      6'b11100?: arm = {COND_AL, 4'b1010, {13{thumb[10]}}, thumb[10:0]};
      // BL halves and unallocated
      default: undef = 1'b1;
    endcase
  end

endmodule
