// ax_processor: the AX processor of the AX decode stage, with its status register.
//
// Each cycle the Thumb instruction in ib1 goes to the decompressor together with
// the status register as it stood at the start of the cycle. In parallel this
// block examines ib2: when it holds an AX instruction, the instruction is fully
// handled here (its operands are written into the status register at the end of
// the cycle) and both ib1 and ib2 are consumed, so the AX instruction costs no
// cycle. Otherwise only ib1 is consumed and the pending augmentation is cleared,
// since an AX instruction augments exactly the one instruction after it.
//
// Predication: setpred writes a condition and a pair count. While the counter is
// non-zero, ib1 and ib2 hold an interleaved (true, false) pair; the select output
// picks ib1 when the condition holds on the current flags and ib2 otherwise, both
// entries are consumed, and the counter counts down. A pair waits while it is not
// completely in the buffer or while flags_valid is low (the pipeline has a flag
// update still in flight); that wait condition is this design's choice, as is the
// count encoding (a count field of 0 means 8 pairs).
//
// An AX instruction found in ib1 (only possible when the compiler breaks the rule
// that a branch target is a Thumb instruction) is still honoured: it is written
// into the status register and costs one cycle with nothing issued. This
// fallback is this design's own choice.
//
// The status register can be read (status) and written (restore_en/restore_data)
// so that it can be saved and restored on a context switch.
//
// Timing: purely combinational decisions from ib1/ib2, status and flags; the
// status register updates at the clock edge. hold (downstream stall) freezes
// everything; flush (taken branch) clears the status register.
module ax_processor
  import ax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        hold,
  input  ib_entry_t   ib   [3],
  input  logic [2:0]  ib_valid,
  input  logic [3:0]  flags_nzcv,
  input  logic        flags_valid,
  // decisions for this cycle
  output logic [1:0]  consume,
  output logic        issue_valid,
  output logic        select,       // 0: ib1, 1: ib2 (predication only)
  output ax_status_t  status,       // status seen by the decompressor this cycle
  // context save/restore
  input  logic        restore_en,
  input  ax_status_t  restore_data,
  // event strobes
  output logic        ev_coalesce,  // AX in ib2 handled together with ib1
  output logic        ev_pred_true, // predicated pair, first instruction taken
  output logic        ev_pred_false,// predicated pair, second instruction taken
  output logic        ev_pred_wait, // predicated pair waiting for buffer or flags
  output logic        ev_ax_alone   // AX found in ib1, handled on its own
);

  ax_status_t status_q, status_d;

  function automatic ax_status_t decode_ax(input logic [15:0] instr);
    ax_status_t s;
    s    = '0;
    s.op = ax_op_e'(instr[9:7]);
    s.en = 1'b1;
    unique case (ax_op_e'(instr[9:7]))
      AX_SETIMM:     s.imm = instr[6:0];
      AX_SETSHIFT:   begin s.shtype = instr[6:4]; s.shamt = instr[3:0]; end
      AX_SETSBIT:    s.sbit = 1'b1;
      AX_SETPRED:    begin
        s.en  = 1'b0;
        s.rg  = instr[6:3];
        s.ctr = (instr[2:0] == 3'd0) ? 4'd8 : {1'b0, instr[2:0]};
      end
      AX_SETALLHIGH: s.allhigh = 1'b1;
      default:       s.rg = instr[6:3];   // setsource, setdest, setthird
    endcase
    return s;
  endfunction

  logic pred_mode, pair_ready, taken;

  assign status     = status_q;
  assign pred_mode  = (status_q.ctr != 4'd0);
  assign pair_ready = ib_valid[0] && ib_valid[1] && flags_valid;
  assign taken      = cond_pass(status_q.rg, flags_nzcv);

  always_comb begin
    consume       = 2'd0;
    issue_valid   = 1'b0;
    select        = 1'b0;
    status_d      = status_q;
    ev_coalesce   = 1'b0;
    ev_pred_true  = 1'b0;
    ev_pred_false = 1'b0;
    ev_pred_wait  = 1'b0;
    ev_ax_alone   = 1'b0;
    if (hold) begin
      // stalled: nothing moves
    end else if (pred_mode) begin
      if (pair_ready) begin
        issue_valid   = 1'b1;
        select        = !taken;
        consume       = 2'd2;
        status_d.ctr  = status_q.ctr - 4'd1;
        ev_pred_true  = taken;
        ev_pred_false = !taken;
      end else begin
        ev_pred_wait = 1'b1;
      end
    end else if (ib_valid[0] && is_ax(ib[0].instr)) begin
      status_d    = decode_ax(ib[0].instr);
      consume     = 2'd1;
      ev_ax_alone = 1'b1;
    end else if (ib_valid[0]) begin
      issue_valid = 1'b1;
      if (ib_valid[1] && is_ax(ib[1].instr)) begin
        status_d    = decode_ax(ib[1].instr);
        consume     = 2'd2;
        ev_coalesce = 1'b1;
      end else begin
        status_d = '0;
        consume  = 2'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          status_q <= '0;
    else if (flush)      status_q <= '0;
    else if (restore_en) status_q <= restore_data;
    else                 status_q <= status_d;
  end

  // A predicated pair is always issued as one instruction taken from ib1 or ib2.
  a_select_only_in_pred: assert property (@(posedge clk) disable iff (!rst_n)
    select |-> pred_mode);

endmodule
