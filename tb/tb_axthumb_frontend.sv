// tb_axthumb_frontend: end-to-end check of the fetch and AX decode front end.
//
// The testbench writes a random AXThumb program into its instruction memory
// model and, while generating it, the ARM instruction stream the front end must
// issue, worked out from the ARM encodings of the few instruction kinds used:
//   plain Thumb      mov rd,#imm8 and mov Hd,Rs
//   AX + Thumb       setsbit + mov Hd,Rs, setshift #rot + mov rd,#imm8,
//                    setdest Hd + mov rd,#imm8 (each issued as one ARM instruction)
//   predicated block setpred cond,#n followed by n interleaved (true, false) pairs
//   branch           b <forward target>, which may be an upper halfword; the
//                    skipped halfwords hold random junk that must never issue
// The model of the rest of the pipeline redirects fetch one cycle after a branch
// issues. Each issued instruction is compared with the expected stream; for a
// predicated pair the expected member is chosen from the flags of that cycle.
//
// Run A is clean: memory always hits, no stalls, flags always valid, and the
// program keeps the compiler rules (Thumb at a branch target and the one after
// it, and after a predicated block). There the only cycles without an issued instruction may be
// the three after a redirect and the first ones after reset, which checks that
// AX instructions and predicated pairs cost no cycles. Run B adds memory misses,
// decode stalls, flags that are not yet valid and rule-breaking AX instructions
// in ib1, and context switches that save the status register, flush the front
// end and restore the status while an augmentation or a predicated block is
// pending. After each run the pipeline switches to ARM state and 16 ARM words must
// pass straight through. Every mechanism (coalescing, both predication outcomes,
// pair waits, AX alone in ib1, context switches, redirects, upper-halfword targets, full fetch
// queue, misses, stalls, ARM state, buffer states S1..S6) is counted and must
// occur. The front end runs with its default parameters.
module tb_axthumb_frontend;
  import ax_pkg::*;

  localparam int MEM_HW   = 4096;          // program memory, halfwords
  localparam int ARM_BASE = 32'h1800;      // ARM-state words live here

  logic        clk = 0, rst_n = 0;
  logic        imem_req, imem_rvalid;
  logic [31:0] imem_addr, imem_rdata;
  logic        id_stall = 0, redirect_valid = 0, redirect_thumb = 1;
  logic [31:0] redirect_pc = 0;
  logic [3:0]  flags_nzcv = 0;
  logic        flags_valid = 1;
  logic        status_restore_en = 0;
  logic [STATUS_W-1:0] status_restore_data = '0, status_out;
  logic        out_valid, out_thumb, out_undef, out_augmented;
  logic [31:0] out_arm, out_pc;
  logic [15:0] out_thumb_instr;
  logic [2:0]  buf_state;
  logic        ifq_full, ev_coalesce, ev_pred_true, ev_pred_false, ev_pred_wait, ev_ax_alone;

  // a context switch (below) redirects too, merged into the redirect ports
  logic        ctx_valid = 0;
  logic [31:0] ctx_pc = 0;

  axthumb_frontend dut (.*,
                        .redirect_valid(redirect_valid || ctx_valid),
                        .redirect_pc(ctx_valid ? ctx_pc : redirect_pc),
                        .redirect_thumb(redirect_thumb || ctx_valid));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------------ memory
  logic [15:0] mem [MEM_HW];
  logic        dirty;        // run B: misses, stalls, flag waits
  assign imem_rdata  = {mem[(imem_addr >> 1) % MEM_HW + 1], mem[(imem_addr >> 1) % MEM_HW]};

  // ------------------------------------------------------------------ expected stream
  typedef struct {
    bit          pair;
    logic [31:0] pc0, arm0, pc1, arm1;
    logic [3:0]  cond;
    bit          aug;
  } exp_t;
  exp_t exp_q [$];

  int hw;                // next free halfword
  logic [31:0] end_pc;

  function automatic bit cond_holds(input logic [3:0] c, input logic [3:0] f);
    // N Z C V
    case (c)
      4'h0: return f[2];
      4'h1: return !f[2];
      4'h2: return f[1];
      4'h3: return !f[1];
      4'h4: return f[3];
      4'h5: return !f[3];
      default: return 1'b1;
    endcase
  endfunction

  task automatic put(input logic [15:0] v);
    mem[hw] = v;
    hw++;
  endtask

  task automatic add_single(input logic [31:0] pc, input logic [31:0] arm, input bit aug);
    exp_t e;
    e.pair = 0; e.pc0 = pc; e.arm0 = arm; e.aug = aug; e.pc1 = 0; e.arm1 = 0; e.cond = 0;
    exp_q.push_back(e);
  endtask

  // plain Thumb instruction: mov rd,#imm8 or mov Hd,Rs
  task automatic gen_plain();
    logic [31:0] pc;
    pc = hw * 2;
    if ($urandom_range(1) != 0) begin
      logic [2:0] rd; logic [7:0] imm;
      rd = 3'($urandom); imm = 8'($urandom);
      put({5'b00100, rd, imm});
      add_single(pc, 32'hE3B00000 | (32'(rd) << 12) | 32'(imm), 0);
    end else begin
      logic [2:0] hd, rs;
      hd = 3'($urandom); rs = 3'($urandom);
      put({8'b01000110, 1'b1, 1'b0, rs, hd});
      add_single(pc, 32'hE1A00000 | (32'({1'b1, hd}) << 12) | 32'(rs), 0);
    end
  endtask

  // AX instruction followed by the Thumb instruction it augments
  task automatic gen_ax_pair();
    logic [31:0] pc;
    int k;
    pc = hw * 2 + 2;
    k = $urandom_range(2);
    if (k == 0) begin                       // setsbit + mov Hd,Rs
      logic [2:0] hd, rs;
      hd = 3'($urandom); rs = 3'($urandom);
      put({6'b101110, 3'd2, 7'd0});
      put({8'b01000110, 1'b1, 1'b0, rs, hd});
      add_single(pc, 32'hE1B00000 | (32'({1'b1, hd}) << 12) | 32'(rs), 1);
    end else if (k == 1) begin              // setshift #rot + mov rd,#imm8
      logic [2:0] rd; logic [7:0] imm; logic [3:0] rot;
      rd = 3'($urandom); imm = 8'($urandom); rot = 4'($urandom);
      put({6'b101110, 3'd1, 3'd4, rot});
      put({5'b00100, rd, imm});
      add_single(pc, 32'hE3B00000 | (32'(rd) << 12) | (32'(rot) << 8) | 32'(imm), 1);
    end else begin                          // setdest Hd + mov rd,#imm8
      logic [2:0] rd; logic [7:0] imm; logic [3:0] h;
      rd = 3'($urandom); imm = 8'($urandom); h = 4'($urandom_range(15, 8));
      put({6'b101110, 3'd5, h, 3'd0});
      put({5'b00100, rd, imm});
      add_single(pc, 32'hE3B00000 | (32'(h) << 12) | 32'(imm), 1);
    end
  endtask

  // setpred cond,#n and n interleaved pairs
  task automatic gen_pred();
    int n;
    logic [3:0] c;
    n = $urandom_range(8, 1);
    c = 4'($urandom_range(5));
    put({6'b101110, 3'd3, c, 3'(n % 8)});
    for (int i = 0; i < n; i++) begin
      exp_t e;
      logic [2:0] r0, r1; logic [7:0] i0, i1;
      r0 = 3'($urandom); r1 = 3'($urandom); i0 = 8'($urandom); i1 = 8'($urandom);
      e.pair = 1; e.cond = c; e.aug = 0;
      e.pc0 = hw * 2;     put({5'b00100, r0, i0});
      e.pc1 = hw * 2;     put({5'b00100, r1, i1});
      e.arm0 = 32'hE3B00000 | (32'(r0) << 12) | 32'(i0);
      e.arm1 = 32'hE3B00000 | (32'(r1) << 12) | 32'(i1);
      exp_q.push_back(e);
    end
  endtask

  // b forward over 0..5 junk halfwords
  task automatic gen_branch();
    int skip;
    logic [31:0] pc;
    logic [10:0] off;
    pc   = hw * 2;
    skip = $urandom_range(5);
    // target = pc + 4 + 2*off  =>  off = skip - 1 (skip halfwords after the branch)
    off  = 11'(skip - 1);
    put({5'b11100, off});
    add_single(pc, 32'hEA000000 | 32'({{13{off[10]}}, off}), 0);
    for (int i = 0; i < skip; i++) put(16'($urandom));
  endtask

  task automatic gen_program(input bit break_rules, input int items);
    int need_thumb;
    hw = 0;
    exp_q = {};
    for (int i = 0; i < MEM_HW; i++) mem[i] = 16'($urandom);
    need_thumb = 1;
    for (int i = 0; i < items; i++) begin
      int k;
      k = $urandom_range(99);
      if (need_thumb > 0 && !(break_rules && $urandom_range(4) == 0)) begin
        gen_plain();
        need_thumb--;
      end else if (k < 30) begin
        gen_plain();
      end else if (k < 65) begin
        gen_ax_pair();
      end else if (k < 80) begin
        gen_pred();
        need_thumb = 1;
      end else begin
        gen_branch();
        // an upper-halfword target arrives alone in ib1, so the instruction
        // after it is not seen in ib2 either: keep both Thumb
        need_thumb = 2;
      end
    end
    end_pc = hw * 2;
    put(16'hE7FE);                             // b .  (end of program)
    add_single(end_pc, 32'hEAFFFFFE, 0);
    // ARM-state code
    for (int i = 0; i < 32; i++) mem[ARM_BASE / 2 + i] = 16'(32'hA5A50000 + i * 16'h1357);
  endtask

  // ------------------------------------------------------------------ pipeline model
  int n_issue, n_coalesce, n_true, n_false, n_wait, n_alone, n_redirect, n_odd, n_full,
      n_miss, n_stall, n_arm, n_bubble_bad;
  int st_seen [7];
  int since_redirect;
  bit done_thumb;

  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_coalesce) n_coalesce++;
      if (ev_pred_true) n_true++;
      if (ev_pred_false) n_false++;
      if (ev_pred_wait) n_wait++;
      if (ev_ax_alone) n_alone++;
      if (ifq_full) n_full++;
      if (imem_req && !imem_rvalid) n_miss++;
      if (id_stall) n_stall++;
      if (out_thumb) st_seen[buf_state]++;
    end
  end

  // checker for Thumb-state issue, and branch redirect
  always @(posedge clk) begin
    bit is_branch;
    is_branch = 0;
    if (rst_n && out_valid && out_thumb && !done_thumb) begin
      exp_t e;
      logic [31:0] epc, earm;
      n_issue++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected issue pc=%h arm=%h", out_pc, out_arm);
      end else begin
        e = exp_q.pop_front();
        if (e.pair) begin
          bit c;
          c    = cond_holds(e.cond, flags_nzcv);
          epc  = c ? e.pc0 : e.pc1;
          earm = c ? e.arm0 : e.arm1;
        end else begin
          epc = e.pc0; earm = e.arm0;
        end
        if (out_pc !== epc || out_arm !== earm || out_augmented !== e.aug || out_undef) begin
          failures++;
          $display("FAIL issue pc=%h arm=%h aug=%b expected pc=%h arm=%h aug=%b", out_pc,
                   out_arm, out_augmented, epc, earm, e.aug);
        end
        if (out_pc == end_pc) done_thumb = 1;
      end
      if (out_thumb_instr[15:11] == 5'b11100 && !done_thumb) begin
        logic [31:0] tgt;
        tgt = out_pc + 32'd4 + {{20{out_thumb_instr[10]}}, out_thumb_instr[10:0], 1'b0};
        is_branch = 1;
        redirect_pc    <= tgt;
        redirect_thumb <= 1'b1;
        n_redirect++;
        if (tgt[1]) n_odd++;
      end
    end
    if (rst_n && !done_thumb) redirect_valid <= is_branch;
  end

  // environment randomisation
  always @(posedge clk) begin
    imem_rvalid <= !dirty || ($urandom_range(99) >= 15);
    id_stall    <= dirty && ($urandom_range(99) < 8);
    flags_valid <= !dirty || ($urandom_range(99) >= 20);
    flags_nzcv  <= 4'($urandom);
  end

  // context switch (run B): while an augmentation or a predicated block is
  // pending, the status is saved, a redirect to the next instruction due flushes
  // the front end and its status register, and one cycle later the saved status
  // is restored. The issue checks then show that the augmentation or the rest of
  // the block survives.
  int n_ctx_aug, n_ctx_pred;
  bit ctx_restore = 0;
  ax_status_t ctx_saved;

  always @(negedge clk) begin
    ax_status_t st_now;
    st_now = ax_status_t'(status_out);
    status_restore_en <= 1'b0;
    ctx_valid         <= 1'b0;
    if (ctx_restore) begin
      status_restore_en   <= 1'b1;
      status_restore_data <= ctx_saved;
      ctx_restore         <= 1'b0;
    end else if (rst_n && dirty && !done_thumb && !redirect_valid && !ctx_valid
                 && exp_q.size() > 1
                 && (st_now.en || st_now.ctr != 0) && $urandom_range(99) < 10) begin
      ctx_saved = st_now;
      if (st_now.en) n_ctx_aug++;
      else n_ctx_pred++;
      ctx_valid      <= 1'b1;
      ctx_pc         <= exp_q[0].pc0;
      ctx_restore    <= 1'b1;
    end
  end

  // bubble check for the clean run
  always @(posedge clk) begin
    if (!rst_n || redirect_valid) since_redirect <= 0;
    else if (since_redirect < 100) since_redirect <= since_redirect + 1;
    if (rst_n && !dirty && !done_thumb && out_thumb && !out_valid && !redirect_valid
        && since_redirect >= 3
        && exp_q.size() != 0) begin
      n_bubble_bad++;
      failures++;
      $display("FAIL bubble at %0t (buffer S%0d)", $time, buf_state);
    end
  end

  // ------------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit break_rules, input int items);
    int guard;
    rst_n = 0;
    done_thumb = 0;
    dirty = break_rules;
    gen_program(break_rules, items);
    redirect_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    guard = 0;
    while (!done_thumb && guard < 50000) begin
      @(posedge clk);
      guard++;
    end
    checks++;
    if (!done_thumb || exp_q.size() != 0) begin
      failures++;
      $display("FAIL program did not complete: %0d expected left", exp_q.size());
    end
    // ARM state: redirect to ARM code, 16 words must pass straight through
    @(negedge clk);
    redirect_valid = 1; redirect_pc = ARM_BASE; redirect_thumb = 0;
    @(negedge clk);
    redirect_valid = 0;
    for (int i = 0; i < 16; ) begin
      @(posedge clk);
      if (out_valid) begin
        logic [31:0] w;
        w = {mem[ARM_BASE / 2 + 2 * i + 1], mem[ARM_BASE / 2 + 2 * i]};
        checks++;
        if (out_thumb || out_arm !== w || out_pc !== ARM_BASE + 4 * i) begin
          failures++;
          $display("FAIL ARM word %0d: %h at %h, expected %h", i, out_arm, out_pc, w);
        end
        n_arm++;
        i++;
      end
    end
    @(negedge clk);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    run(0, 400);
    $display("run A: %0d issued, coalesced %0d, pred true/false %0d/%0d, redirects %0d",
             n_issue, n_coalesce, n_true, n_false, n_redirect);
    run(1, 600);
    $display("totals: issued %0d coalesce %0d pred_true %0d pred_false %0d pred_wait %0d ax_alone %0d",
             n_issue, n_coalesce, n_true, n_false, n_wait, n_alone);
    $display("        redirects %0d odd_targets %0d ifq_full %0d misses %0d stalls %0d arm %0d",
             n_redirect, n_odd, n_full, n_miss, n_stall, n_arm);
    $display("        context switches: %0d during an augmentation, %0d in a predicated block",
             n_ctx_aug, n_ctx_pred);
    $display("        buffer states S1..S6: %0d %0d %0d %0d %0d %0d", st_seen[1], st_seen[2],
             st_seen[3], st_seen[4], st_seen[5], st_seen[6]);
    need("coalesce", n_coalesce);
    need("predicated pair, true", n_true);
    need("predicated pair, false", n_false);
    need("predicated pair wait", n_wait);
    need("AX alone in ib1", n_alone);
    need("redirect", n_redirect);
    need("upper-halfword target", n_odd);
    need("fetch queue full", n_full);
    need("memory miss", n_miss);
    need("decode stall", n_stall);
    need("ARM state", n_arm);
    need("context switch during an augmentation", n_ctx_aug);
    need("context switch during a predicated block", n_ctx_pred);
    for (int s = 1; s <= 6; s++) need($sformatf("buffer state S%0d", s), st_seen[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
