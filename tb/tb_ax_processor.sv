// tb_ax_processor: directed check of the AX processor and its status register.
//
// The buffer entries are driven directly. Checked: a Thumb pair consumes one
// entry; a Thumb + AX pair consumes two and writes each AX kind's operand fields
// into the status register for the next cycle; the pending augmentation is
// cleared after one instruction; setpred enters predication mode for the given
// number of pairs (0 meaning 8), selects ib1 or ib2 from the condition on the
// flags, waits without consuming while the pair or the flags are not ready; an
// AX instruction in ib1 is absorbed alone; hold freezes everything; flush and
// restore write the status register.
//
// A random phase then drives 4000 cycles of buffer contents (0..3 valid entries,
// a third of them AX instructions of any kind and operand), random flags, flag
// waits, holds, flushes and restores, and compares consume, issue_valid, select
// and the whole status register every cycle with a reference model kept here as
// separate fields and written from the rules above.
module tb_ax_processor;
  import ax_pkg::*;

  logic       clk = 0, rst_n = 0, flush = 0, hold = 0;
  ib_entry_t  ib [3];
  logic [2:0] ib_valid = 0;
  logic [3:0] flags_nzcv = 0;
  logic       flags_valid = 1;
  logic [1:0] consume;
  logic       issue_valid, select;
  ax_status_t status;
  logic       restore_en = 0;
  ax_status_t restore_data = '0;
  logic       ev_coalesce, ev_pred_true, ev_pred_false, ev_pred_wait, ev_ax_alone;

  int checks = 0, failures = 0;

  ax_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [15:0] T1 = 16'h1A89;   // a Thumb sub
  function automatic logic [15:0] ax(input logic [2:0] op, input logic [6:0] opnd);
    return {6'b101110, op, opnd};
  endfunction

  task automatic set_ib(input logic [2:0] v, input logic [15:0] a, input logic [15:0] b = 0,
                        input logic [15:0] c = 0);
    ib_valid = v;
    ib[0] = '{instr: a, pc: 0}; ib[1] = '{instr: b, pc: 2}; ib[2] = '{instr: c, pc: 4};
  endtask

  task automatic expect_now(input string name, input logic [1:0] c, input logic iv, input logic sel);
    #1;
    checks++;
    if (consume !== c || issue_valid !== iv || (iv && select !== sel)) begin
      failures++;
      $display("FAIL %s: consume=%0d issue=%b select=%b exp %0d %b %b", name, consume,
               issue_valid, select, c, iv, sel);
    end
  endtask

  task automatic expect_status(input string name, input ax_status_t s);
    checks++;
    if (status !== s) begin
      failures++;
      $display("FAIL %s: status=%h exp %h", name, status, s);
    end
  endtask

  function automatic ax_status_t mk(input ax_op_e op);
    ax_status_t s;
    s = '0; s.en = 1; s.op = op;
    return s;
  endfunction


  // ---------------------------------------------------------------- random phase
  function automatic bit ref_cond(input logic [3:0] c, input logic [3:0] f);
    bit n, z, cy, v, r;
    {n, z, cy, v} = f;
    case (c[3:1])
      3'd0: r = z;
      3'd1: r = cy;
      3'd2: r = n;
      3'd3: r = v;
      3'd4: r = cy && !z;
      3'd5: r = n == v;
      3'd6: r = !z && (n == v);
      default: return 1;                 // al (and the unused code 15)
    endcase
    return c[0] ? !r : r;
  endfunction

  task automatic random_phase(input int cycles);
    // reference status fields
    bit         m_en, m_sbit, m_high;
    logic [2:0] m_op, m_sht;
    logic [3:0] m_ctr, m_rg, m_sha;
    logic [6:0] m_imm;
    int n_pair = 0, n_coal = 0, n_alone = 0, n_wait = 0;
    m_en = 0; m_sbit = 0; m_high = 0; m_op = 0; m_sht = 0; m_ctr = 0; m_rg = 0; m_sha = 0;
    m_imm = 0;
    flush = 1;
    @(negedge clk);
    flush = 0;
    for (int cyc = 0; cyc < cycles; cyc++) begin
      logic [15:0] w [3];
      int nv;
      logic [1:0]  e_cons;
      bit          e_iss, e_sel, wr;
      logic [15:0] axw;
      for (int i = 0; i < 3; i++)
        w[i] = ($urandom_range(2) == 0) ? {6'b101110, 10'($urandom)} : 16'($urandom_range(16'hB7FF));
      nv = $urandom_range(3);
      set_ib(3'((1 << nv) - 1), w[0], w[1], w[2]);
      flags_nzcv  = 4'($urandom);
      flags_valid = ($urandom_range(4) != 0);
      hold        = ($urandom_range(9) == 0);
      flush       = ($urandom_range(39) == 0);
      restore_en  = ($urandom_range(59) == 0);
      restore_data = ax_status_t'(28'($urandom));
      #1;
      // expected decisions
      e_cons = 0; e_iss = 0; e_sel = 0; wr = 0; axw = 0;
      if (hold) begin
      end else if (m_ctr != 0) begin
        if (nv >= 2 && flags_valid) begin
          e_iss = 1; e_cons = 2; e_sel = !ref_cond(m_rg, flags_nzcv);
        end
      end else if (nv >= 1 && w[0][15:10] == 6'b101110) begin
        e_cons = 1; wr = 1; axw = w[0];
      end else if (nv >= 1) begin
        e_iss = 1;
        if (nv >= 2 && w[1][15:10] == 6'b101110) begin
          e_cons = 2; wr = 1; axw = w[1];
        end else e_cons = 1;
      end
      if (e_iss && m_ctr != 0) n_pair++;
      if (wr && e_iss) n_coal++;
      if (wr && !e_iss) n_alone++;
      if (!hold && m_ctr != 0 && !e_iss) n_wait++;
      checks++;
      if (consume !== e_cons || issue_valid !== e_iss || (e_iss && select !== e_sel)) begin
        failures++;
        if (failures < 20)
          $display("FAIL random cycle %0d: consume=%0d issue=%b select=%b exp %0d %b %b", cyc,
                   consume, issue_valid, select, e_cons, e_iss, e_sel);
      end
      @(posedge clk);
      // reference update
      if (flush) begin
        {m_en, m_op, m_ctr, m_rg, m_imm, m_sha, m_sht, m_sbit, m_high} = '0;
      end else if (restore_en) begin
        {m_en, m_op, m_ctr, m_rg, m_imm, m_sha, m_sht, m_sbit, m_high} = restore_data;
      end else if (!hold && m_ctr != 0) begin
        if (e_iss) m_ctr = m_ctr - 1;
      end else if (wr) begin
        {m_en, m_op, m_ctr, m_rg, m_imm, m_sha, m_sht, m_sbit, m_high} = '0;
        m_op = axw[9:7];
        case (axw[9:7])
          3'd0: begin m_en = 1; m_imm = axw[6:0]; end
          3'd1: begin m_en = 1; m_sht = axw[6:4]; m_sha = axw[3:0]; end
          3'd2: begin m_en = 1; m_sbit = 1; end
          3'd3: begin m_rg = axw[6:3]; m_ctr = (axw[2:0] == 0) ? 4'd8 : {1'b0, axw[2:0]}; end
          3'd6: begin m_en = 1; m_high = 1; end
          default: begin m_en = 1; m_rg = axw[6:3]; end
        endcase
      end else if (e_iss) begin
        {m_en, m_op, m_ctr, m_rg, m_imm, m_sha, m_sht, m_sbit, m_high} = '0;
      end
      @(negedge clk);
      checks++;
      if (status !== ax_status_t'({m_en, m_op, m_ctr, m_rg, m_imm, m_sha, m_sht, m_sbit, m_high})) begin
        failures++;
        if (failures < 20)
          $display("FAIL random cycle %0d: status=%h exp %h", cyc, status,
                   {m_en, m_op, m_ctr, m_rg, m_imm, m_sha, m_sht, m_sbit, m_high});
      end
    end
    hold = 0; flush = 0; restore_en = 0;
    $display("random phase: %0d pairs, %0d coalesced, %0d AX alone, %0d pair waits", n_pair,
             n_coal, n_alone, n_wait);
    checks++;
    if (n_pair == 0 || n_coal == 0 || n_alone == 0 || n_wait == 0) begin
      failures++;
      $display("FAIL random phase did not reach every case");
    end
  endtask

  initial begin
    ax_status_t s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_status("reset", '0);
    // Thumb, Thumb: one consumed
    set_ib(3'b111, T1, T1, T1);
    expect_now("TT", 2'd1, 1'b1, 1'b0);
    checks++; if (ev_coalesce) begin failures++; $display("FAIL TT coalesce"); end
    // Thumb + each AX kind (setpred handled below)
    for (int op = 0; op < 8; op++) begin
      if (op == 3) continue;
      @(negedge clk);
      set_ib(3'b011, T1, ax(3'(op), 7'b1011010));
      expect_now($sformatf("TA op %0d", op), 2'd2, 1'b1, 1'b0);
      checks++; if (!ev_coalesce) begin failures++; $display("FAIL coalesce strobe"); end
      @(negedge clk);
      s = mk(ax_op_e'(op));
      case (op)
        0: s.imm = 7'b1011010;
        1: begin s.shtype = 3'b101; s.shamt = 4'b1010; end
        2: s.sbit = 1;
        6: s.allhigh = 1;
        default: s.rg = 4'b1011;
      endcase
      expect_status($sformatf("status op %0d", op), s);
      // the next instruction uses it, and it is cleared afterwards
      set_ib(3'b011, T1, T1);
      expect_now("use", 2'd1, 1'b1, 1'b0);
      @(negedge clk);
      expect_status("cleared", '0);
    end
    // setpred EQ, 2 pairs
    set_ib(3'b111, T1, ax(3'd3, {4'h0, 3'd2}), T1);
    expect_now("T setpred", 2'd2, 1'b1, 1'b0);
    @(negedge clk);
    s = '0; s.op = AX_SETPRED; s.rg = 4'h0; s.ctr = 4'd2;
    expect_status("setpred", s);
    // pair not complete: wait
    set_ib(3'b001, 16'h1111, 16'h2222);
    expect_now("pair incomplete", 2'd0, 1'b0, 1'b0);
    checks++; if (!ev_pred_wait) begin failures++; $display("FAIL wait strobe"); end
    // flags not valid: wait
    set_ib(3'b011, 16'h1111, 16'h2222);
    flags_valid = 0;
    expect_now("flags invalid", 2'd0, 1'b0, 1'b0);
    @(negedge clk);
    flags_valid = 1;
    flags_nzcv = 4'b0100;              // Z set: EQ holds, first of pair
    expect_now("pair true", 2'd2, 1'b1, 1'b0);
    checks++; if (!ev_pred_true) begin failures++; $display("FAIL true strobe"); end
    @(negedge clk);
    flags_nzcv = 4'b0000;              // EQ fails: second of pair
    expect_now("pair false", 2'd2, 1'b1, 1'b1);
    checks++; if (!ev_pred_false) begin failures++; $display("FAIL false strobe"); end
    @(negedge clk);
    // back to normal mode: ib2 Thumb not selected, one consumed
    set_ib(3'b011, T1, T1);
    expect_now("after pred", 2'd1, 1'b1, 1'b0);
    @(negedge clk);
    // count field 0 means 8 pairs
    set_ib(3'b011, T1, ax(3'd3, {4'h1, 3'd0}));
    expect_now("setpred 8", 2'd2, 1'b1, 1'b0);
    @(negedge clk);
    checks++; if (status.ctr !== 4'd8) begin failures++; $display("FAIL ctr=%0d", status.ctr); end
    for (int k = 0; k < 8; k++) begin
      set_ib(3'b011, 16'h1111, 16'h2222);
      flags_nzcv = 4'b0000;            // NE holds
      expect_now("ne pair", 2'd2, 1'b1, 1'b0);
      @(negedge clk);
    end
    checks++; if (status.ctr !== 4'd0) begin failures++; $display("FAIL ctr end=%0d", status.ctr); end
    // AX in ib1: absorbed alone
    set_ib(3'b011, ax(3'd2, 0), T1);
    expect_now("AX in ib1", 2'd1, 1'b0, 1'b0);
    checks++; if (!ev_ax_alone) begin failures++; $display("FAIL alone strobe"); end
    @(negedge clk);
    expect_status("alone status", mk(AX_SETSBIT) | ax_status_t'(28'h2));
    // hold
    hold = 1;
    set_ib(3'b011, T1, ax(3'd0, 7'd3));
    expect_now("hold", 2'd0, 1'b0, 1'b0);
    @(negedge clk);
    hold = 0;
    checks++; if (status.op !== AX_SETSBIT) begin failures++; $display("FAIL hold kept status"); end
    // flush
    flush = 1;
    @(negedge clk);
    flush = 0;
    expect_status("flush", '0);
    // restore
    restore_en = 1; restore_data = 28'hABCDEF1;
    ib_valid = 0;
    @(negedge clk);
    restore_en = 0;
    expect_status("restore", 28'hABCDEF1);
    random_phase(4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
