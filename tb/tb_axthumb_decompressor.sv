// tb_axthumb_decompressor: directed check of the Thumb-to-ARM translation.
//
// Each vector is a Thumb instruction, the status left by a preceding AX
// instruction (or none), and the ARM encoding worked out by hand from the ARM and
// Thumb instruction formats. Covers every AX instruction kind on the examples of
// the AX instruction set (shift folded into sub, negative store offset, S bit on
// a move, high base register, high-register push/pop, third operand, immediate
// on a high-register add or an AND, rotated immediate) plus plain translations of
// each Thumb format and the undefined cases.
//
// A second part sweeps all 65536 16-bit encodings without augmentation against
// ref_arm, a reference translation written here format by format from the Thumb
// and ARM encoding tables, with the undefined set (BL halves, unallocated 1011
// and 1101 1110 space, the AX opcode itself) checked too. Then whole formats are
// swept with each AX kind: setsbit on high-register ADD/MOV, setallhigh on
// push/pop/ldmia/stmia, setdest on the 8-bit immediate forms, setsource, setimm
// (every constant) and setshift on loads and stores, and setthird on the
// two-address ALU operations. The expected value is the reference translation
// with the fields the AX instruction predetermines replaced.
module tb_axthumb_decompressor;
  import ax_pkg::*;

  logic [15:0] thumb;
  ax_status_t  status;
  logic [31:0] arm;
  logic        undef, augmented;

  int checks = 0, failures = 0;

  axthumb_decompressor dut (.thumb, .status, .arm, .undef, .augmented);

  function automatic ax_status_t st_none();
    return '0;
  endfunction
  function automatic ax_status_t st(input ax_op_e op, input logic [6:0] imm = '0,
                                    input logic [3:0] rg = '0, input logic [2:0] sht = '0,
                                    input logic [3:0] sha = '0);
    ax_status_t s;
    s = '0; s.en = 1'b1; s.op = op; s.imm = imm; s.rg = rg; s.shtype = sht; s.shamt = sha;
    s.sbit = (op == AX_SETSBIT); s.allhigh = (op == AX_SETALLHIGH);
    return s;
  endfunction

  task automatic chk(input string name, input logic [15:0] t, input ax_status_t s,
                     input logic [31:0] exp, input logic exp_undef = 1'b0);
    thumb = t; status = s;
    #1;
    checks++;
    if (undef !== exp_undef || (!exp_undef && arm !== exp)) begin
      failures++;
      $display("FAIL %s: thumb=%h arm=%h undef=%b expected %h undef=%b", name, t, arm, undef,
               exp, exp_undef);
    end
    checks++;
    if (augmented !== s.en) begin
      failures++;
      $display("FAIL %s: augmented=%b", name, augmented);
    end
  endtask


  // ---------------------------------------------------------------- reference
  function automatic logic [31:0] sx(input int bits, input logic [31:0] v);
    return (v[bits-1]) ? (v | ~((32'd1 << bits) - 1)) : v;
  endfunction

  // ARM translation of a Thumb instruction without augmentation; undef_o set
  // for encodings that have none.
  function automatic logic [31:0] ref_arm(input logic [15:0] t, output bit undef_o);
    logic [31:0] rd, rs, rn, rb, i8, a;
    undef_o = 0;
    rd = 32'(t[2:0]); rs = 32'(t[5:3]); rn = 32'(t[8:6]); rb = rs; i8 = 32'(t[7:0]);
    a = 32'hE7F000F0;
    if (t[15:11] == 5'b00011) begin                                   // add/sub
      a = (t[10] ? 32'hE2100000 : 32'hE0100000) | ((t[9] ? 32'd2 : 32'd4) << 21)
          | (rs << 16) | (rd << 12) | rn;
    end else if (t[15:13] == 3'b000) begin                            // shift imm
      a = 32'hE1B00000 | (rd << 12) | (32'(t[10:6]) << 7) | (32'(t[12:11]) << 5) | rs;
    end else if (t[15:13] == 3'b001) begin                            // imm8 ops
      logic [31:0] r;
      r = 32'(t[10:8]);
      case (t[12:11])
        2'd0: a = 32'hE3B00000 | (r << 12) | i8;
        2'd1: a = 32'hE3500000 | (r << 16) | i8;
        2'd2: a = 32'hE2900000 | (r << 16) | (r << 12) | i8;
        default: a = 32'hE2500000 | (r << 16) | (r << 12) | i8;
      endcase
    end else if (t[15:10] == 6'b010000) begin                         // ALU
      logic [31:0] dn;
      dn = (rd << 16) | (rd << 12) | rs;
      case (t[9:6])
        4'h0: a = 32'hE0100000 | dn;
        4'h1: a = 32'hE0300000 | dn;
        4'h2: a = 32'hE1B00010 | (rd << 12) | (rs << 8) | rd;
        4'h3: a = 32'hE1B00030 | (rd << 12) | (rs << 8) | rd;
        4'h4: a = 32'hE1B00050 | (rd << 12) | (rs << 8) | rd;
        4'h5: a = 32'hE0B00000 | dn;
        4'h6: a = 32'hE0D00000 | dn;
        4'h7: a = 32'hE1B00070 | (rd << 12) | (rs << 8) | rd;
        4'h8: a = 32'hE1100000 | (rd << 16) | rs;
        4'h9: a = 32'hE2700000 | (rs << 16) | (rd << 12);
        4'hA: a = 32'hE1500000 | (rd << 16) | rs;
        4'hB: a = 32'hE1700000 | (rd << 16) | rs;
        4'hC: a = 32'hE1900000 | dn;
        4'hD: a = 32'hE0100090 | (rd << 16) | (rd << 8) | rs;
        4'hE: a = 32'hE1D00000 | dn;
        default: a = 32'hE1F00000 | (rd << 12) | rs;
      endcase
    end else if (t[15:10] == 6'b010001) begin                         // hi regs, BX
      logic [31:0] hd, hs;
      hd = 32'({t[7], t[2:0]}); hs = 32'({t[6], t[5:3]});
      case (t[9:8])
        2'd0: a = 32'hE0800000 | (hd << 16) | (hd << 12) | hs;
        2'd1: a = 32'hE1500000 | (hd << 16) | hs;
        2'd2: a = 32'hE1A00000 | (hd << 12) | hs;
        default: a = 32'hE12FFF10 | hs;
      endcase
    end else if (t[15:11] == 5'b01001) begin                          // ldr pc-rel
      a = 32'hE59F0000 | (32'(t[10:8]) << 12) | (i8 << 2);
    end else if (t[15:12] == 4'b0101) begin                           // reg offset
      if (!t[9])
        a = 32'hE7800000 | (32'(t[10]) << 22) | (32'(t[11]) << 20) | (rb << 16) | (rd << 12) | rn;
      else
        case (t[11:10])
          2'd0: a = 32'hE18000B0 | (rb << 16) | (rd << 12) | rn;
          2'd1: a = 32'hE19000D0 | (rb << 16) | (rd << 12) | rn;
          2'd2: a = 32'hE19000B0 | (rb << 16) | (rd << 12) | rn;
          default: a = 32'hE19000F0 | (rb << 16) | (rd << 12) | rn;
        endcase
    end else if (t[15:13] == 3'b011) begin                            // imm offset
      a = 32'hE5800000 | (32'(t[12]) << 22) | (32'(t[11]) << 20) | (rb << 16) | (rd << 12)
          | (t[12] ? 32'(t[10:6]) : 32'(t[10:6]) << 2);
    end else if (t[15:12] == 4'b1000) begin                           // halfword imm
      logic [31:0] off;
      off = 32'(t[10:6]) << 1;
      a = 32'hE1C000B0 | (32'(t[11]) << 20) | (rb << 16) | (rd << 12) | ((off >> 4) << 8)
          | (off & 32'hF);
    end else if (t[15:12] == 4'b1001) begin                           // sp-rel
      a = 32'hE58D0000 | (32'(t[11]) << 20) | (32'(t[10:8]) << 12) | (i8 << 2);
    end else if (t[15:12] == 4'b1010) begin                           // load address
      a = (t[11] ? 32'hE28D0F00 : 32'hE28F0F00) | (32'(t[10:8]) << 12) | i8;
    end else if (t[15:8] == 8'b10110000) begin                        // sp adjust
      a = (t[7] ? 32'hE24DDF00 : 32'hE28DDF00) | 32'(t[6:0]);
    end else if (t[15:12] == 4'b1011 && t[10:9] == 2'b10) begin       // push / pop
      a = t[11] ? (32'hE8BD0000 | (32'(t[8]) << 15) | i8)
                : (32'hE92D0000 | (32'(t[8]) << 14) | i8);
    end else if (t[15:12] == 4'b1100) begin                           // ldmia/stmia
      a = 32'hE8A00000 | (32'(t[11]) << 20) | (32'(t[10:8]) << 16) | i8;
    end else if (t[15:12] == 4'b1101 && t[11:8] == 4'hF) begin        // swi
      a = 32'hEF000000 | i8;
    end else if (t[15:12] == 4'b1101 && t[11:8] != 4'hE) begin        // b<cond>
      a = (32'(t[11:8]) << 28) | 32'h0A000000 | (sx(8, i8) & 32'h00FFFFFF);
    end else if (t[15:11] == 5'b11100) begin                          // b
      a = 32'hEA000000 | (sx(11, 32'(t[10:0])) & 32'h00FFFFFF);
    end else begin
      undef_o = 1;
    end
    return a;
  endfunction

  int n_sweep = 0;

  task automatic chk_sweep(input logic [15:0] t, input ax_status_t s, input logic [31:0] exp,
                           input bit exp_undef);
    thumb = t; status = s;
    #1;
    checks++;
    n_sweep++;
    if (undef !== exp_undef || (!exp_undef && arm !== exp)) begin
      failures++;
      if (failures < 20)
        $display("FAIL sweep thumb=%h op=%0d: arm=%h undef=%b expected %h undef=%b", t,
                 s.op, arm, undef, exp, exp_undef);
    end
  endtask

  task automatic sweeps();
    bit u;
    logic [31:0] e;
    ax_status_t s;
    // every encoding, no augmentation
    for (int i = 0; i < 65536; i++) begin
      e = ref_arm(16'(i), u);
      chk_sweep(16'(i), st_none(), e, u);
    end
    // setsbit: high-register ADD and MOV gain the S bit
    for (int i = 0; i < 256; i++) begin
      for (int op = 0; op <= 2; op += 2) begin
        logic [15:0] t;
        t = {6'b010001, 2'(op), 8'(i)};
        e = ref_arm(t, u);
        chk_sweep(t, st(AX_SETSBIT), e | 32'h00100000, 0);
      end
    end
    // setallhigh: the register list moves to r8..r15 (push, pop, ldmia, stmia)
    for (int i = 0; i < 65536; i++) begin
      logic [15:0] t;
      t = 16'(i);
      if ((t[15:12] == 4'b1011 && t[10:9] == 2'b10) || t[15:12] == 4'b1100) begin
        e = ref_arm(t, u);
        chk_sweep(t, st(AX_SETALLHIGH), (e & 32'hFFFFFF00) | (32'(t[7:0]) << 8), 0);
      end
    end
    // setdest: 8-bit immediate forms write (and for add/sub/cmp read) the AX register
    for (int i = 0; i < 8192; i += 7) begin
      logic [15:0] t;
      logic [3:0] h;
      t = {3'b001, 13'(i)};
      h = 4'($urandom);
      e = ref_arm(t, u);
      case (t[12:11])
        2'd0: e = (e & ~32'h0000F000) | (32'(h) << 12);
        2'd1: e = (e & ~32'h000F0000) | (32'(h) << 16);
        default: e = (e & ~32'h000FF000) | (32'(h) << 16) | (32'(h) << 12);
      endcase
      chk_sweep(t, st(AX_SETDEST, .rg(h)), e, 0);
    end
    // setsource, setimm and setshift on word/byte loads and stores
    for (int i = 0; i < 16384; i += 3) begin
      logic [15:0] t;
      logic [3:0] h;
      logic [6:0] c;
      t = {3'b011, 13'(i)};
      h = 4'($urandom);
      e = ref_arm(t, u);
      chk_sweep(t, st(AX_SETSOURCE, .rg(h)), (e & ~32'h000F0000) | (32'(h) << 16), 0);
      c = 7'($urandom);
      s = st(AX_SETIMM, .imm(c));
      chk_sweep(t, s, (e & 32'hFF7FF000) | (c[6] ? 32'(-$signed(c)) & 32'hFF : 32'h00800000 | 32'(c)), 0);
    end
    for (int i = 0; i < 2048; i++) begin
      logic [15:0] t;
      logic [2:0] ty;
      logic [3:0] am;
      t = {4'b0101, 2'(i >> 9), 1'b0, 9'(i)};
      ty = 3'($urandom_range(3)); am = 4'($urandom);
      e = ref_arm(t, u);
      chk_sweep(t, st(AX_SETSHIFT, .sht(ty), .sha(am)),
                e | (32'(am) << 7) | (32'(ty[1:0]) << 5), 0);
    end
    // setthird: two-address ALU operations become rd = rs op third
    for (int i = 0; i < 1024; i++) begin
      logic [15:0] t;
      logic [3:0] h;
      t = {6'b010000, 10'(i)};
      if (t[9:6] inside {4'h0, 4'h1, 4'h5, 4'h6, 4'hC, 4'hE}) begin
        h = 4'($urandom);
        e = ref_arm(t, u);
        chk_sweep(t, st(AX_SETTHIRD, .rg(h)),
                  (e & 32'hFFF00000) | (32'(t[5:3]) << 16) | (32'(t[2:0]) << 12) | 32'(h), 0);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ax_status_t p;
    // plain translations
    chk("lsl imm",      16'h0091, st_none(), 32'hE1B01102);
    chk("sub reg",      16'h1A89, st_none(), 32'hE0511002);
    chk("str imm",      16'h6018, st_none(), 32'hE5830000);
    chk("mov hi",       16'h4690, st_none(), 32'hE1A08002);
    chk("ldr imm",      16'h6E45, st_none(), 32'hE5905064);
    chk("push lo",      16'hB40F, st_none(), 32'hE92D000F);
    chk("push lr",      16'hB5F0, st_none(), 32'hE92D40F0);
    chk("add hi",       16'h4411, st_none(), 32'hE0811002);
    chk("strh",         16'h8048, st_none(), 32'hE1C100B2);
    chk("b back",       16'hE7FE, st_none(), 32'hEAFFFFFE);
    chk("beq",          16'hD004, st_none(), 32'h0A000004);
    chk("bx lr",        16'h4770, st_none(), 32'hE12FFF1E);
    chk("neg",          16'h4251, st_none(), 32'hE2721000);
    chk("lsl reg",      16'h4091, st_none(), 32'hE1B01211);
    chk("cmp imm",      16'h2B00, st_none(), 32'hE3530000);
    chk("add sp addr",  16'hA802, st_none(), 32'hE28D0F02);
    chk("ldr sp",       16'h9A01, st_none(), 32'hE59D2004);
    chk("ldr pc",       16'h4902, st_none(), 32'hE59F1008);
    chk("sub sp",       16'hB084, st_none(), 32'hE24DDF04);
    chk("swi",          16'hDF12, st_none(), 32'hEF000012);
    chk("bl undef",     16'hF000, st_none(), 32'h0, 1'b1);
    chk("cond e undef", 16'hDE00, st_none(), 32'h0, 1'b1);
    // AX coalescing
    chk("setshift+sub",   16'h1A89, st(AX_SETSHIFT, .sht(3'd0), .sha(4'd2)), 32'hE0511102);
    chk("setimm-4+str",   16'h6018, st(AX_SETIMM, .imm(7'h7C)), 32'hE5030004);
    chk("setsbit+mov",    16'h4690, st(AX_SETSBIT), 32'hE1B08002);
    chk("setsource+ldr",  16'h6E45, st(AX_SETSOURCE, .rg(4'd9)), 32'hE5995064);
    chk("setallhigh+push",16'hB40F, st(AX_SETALLHIGH), 32'hE92D0F00);
    chk("setallhigh+pop", 16'hBC0F, st(AX_SETALLHIGH), 32'hE8BD0F00);
    chk("setthird+add",   16'h4411, st(AX_SETTHIRD, .rg(4'd3)), 32'hE0821003);
    chk("setimm+add hi",  16'h4480, st(AX_SETIMM, .imm(7'd5)), 32'hE2888005);
    chk("setdest+add imm",16'h3005, st(AX_SETDEST, .rg(4'd8)), 32'hE2988005);
    chk("setimm+and",     16'h4001, st(AX_SETIMM, .imm(7'd15)), 32'hE211100F);
    chk("setimm-16+and",  16'h4001, st(AX_SETIMM, .imm(7'h70)), 32'hE3D1100F);
    chk("setshift rot",   16'h21FF, st(AX_SETSHIFT, .sht(3'd4), .sha(4'd4)), 32'hE3B014FF);
    chk("setshift ldr reg",16'h5888, st(AX_SETSHIFT, .sht(3'd0), .sha(4'd2)), 32'hE7910102);
    // a setpred status does not augment the next instruction
    p = '0; p.op = AX_SETPRED; p.ctr = 4'd2; p.rg = 4'h0;
    chk("setpred no aug", 16'h1A89, p, 32'hE0511002);
    sweeps();
    $display("%0d swept encodings", n_sweep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
