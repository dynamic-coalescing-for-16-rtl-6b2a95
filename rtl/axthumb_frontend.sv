// axthumb_frontend: fetch and AX decode front end of a Thumb-capable ARM pipeline.
//
// Fetch reads 32 bits per cycle, two Thumb instructions, while decode issues at
// most one instruction per cycle. The AX decode stage spends that spare fetch
// bandwidth: an AX instruction sitting right behind a Thumb instruction is
// absorbed in the same cycle, its operands written into a status register and
// merged into the ARM translation of the next Thumb instruction, so the AX+Thumb
// pair behaves as one ARM instruction and costs one cycle. The same spare
// bandwidth lets the stage pick one instruction out of each interleaved
// (true, false) pair after a setpred, so predicated code costs one cycle per pair.
//
// Structure (one instance each):
//   fetch_unit            32-bit fetch into an 8-word instruction fetch queue
//   instr_buffer          ib1..ib3, 48 bits, filled by whole words
//   ax_processor          examines ib2, owns the status register, decides how
//                         many entries are consumed and drives the pair select
//   select mux            ib1, or ib2 for the second instruction of a pair
//   axthumb_decompressor  Thumb + status -> 32-bit ARM instruction
// In ARM state the queue head bypasses the buffer and goes straight out, one
// word per cycle, as in the original 32-bit path to the ARM decoder.
//
// The ARM decoder and the execute, memory and write-back stages are outside this
// block. They see out_valid/out_arm/out_pc, and drive back: id_stall (hold the
// decode stage), redirect_* (a taken branch or a state change: flushes the queue,
// the buffer and the status register), and flags_nzcv/flags_valid (condition
// flags for predicated pairs; flags_valid low makes a pair wait).
//
// Timing: a word returned by instruction memory in cycle t is in the queue at
// t+1 and in the buffer at t+2 at the earliest, so the first instruction after a
// redirect issues three cycles after it. In steady state one instruction issues
// per cycle, with AX instructions adding none. The split into these blocks, the
// buffer and status register follow the published design; the memory handshake,
// the redirect/stall/flag interface and the ARM-state bypass control are this
// design's own.
module axthumb_frontend
  import ax_pkg::*;
#(
  parameter int unsigned IFQ_DEPTH   = 8,
  parameter logic [31:0] RESET_PC    = 32'h0,
  parameter bit          RESET_THUMB = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic        imem_rvalid,
  input  logic [31:0] imem_rdata,
  // from the rest of the pipeline
  input  logic        id_stall,
  input  logic        redirect_valid,
  input  logic [31:0] redirect_pc,
  input  logic        redirect_thumb,   // state after the redirect: 1 Thumb, 0 ARM
  input  logic [3:0]  flags_nzcv,
  input  logic        flags_valid,
  // status register save/restore (context switch)
  input  logic        status_restore_en,
  input  logic [STATUS_W-1:0] status_restore_data,
  output logic [STATUS_W-1:0] status_out,
  // to the ARM decoder
  output logic        out_valid,
  output logic [31:0] out_arm,
  output logic [31:0] out_pc,
  output logic        out_thumb,        // instruction came from Thumb code
  output logic [15:0] out_thumb_instr,  // the Thumb instruction it came from
  output logic        out_undef,
  output logic        out_augmented,    // an AX instruction was coalesced into it
  // observation
  output logic [2:0]  buf_state,        // 1..6 = S1..S6
  output logic        ifq_full,
  output logic        ev_coalesce,
  output logic        ev_pred_true,
  output logic        ev_pred_false,
  output logic        ev_pred_wait,
  output logic        ev_ax_alone
);

  logic thumb_q;

  // fetch
  logic        q_valid, q_lo_valid, q_pop;
  logic [31:0] q_word, q_pc;

  fetch_unit #(.DEPTH(IFQ_DEPTH), .RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .redirect_valid, .redirect_pc,
    .imem_req, .imem_addr, .imem_rvalid, .imem_rdata,
    .q_valid, .q_word, .q_pc, .q_lo_valid, .q_pop,
    .q_full(ifq_full)
  );

  // instruction buffer
  ib_entry_t  ib [3];
  logic [2:0] ib_valid;
  logic [1:0] consume;
  logic       can_accept, dep_valid;
  ib_entry_t  dep_e0, dep_e1;
  buf_state_e bstate;

  assign dep_valid = thumb_q && q_valid;
  assign dep_e0    = q_lo_valid ? '{instr: q_word[15:0],  pc: q_pc}
                                : '{instr: q_word[31:16], pc: q_pc + 32'd2};
  assign dep_e1    = '{instr: q_word[31:16], pc: q_pc + 32'd2};

  instr_buffer u_ib (
    .clk, .rst_n,
    .flush(redirect_valid),
    .consume, .can_accept,
    .dep_valid, .dep_two(q_lo_valid), .dep_e0, .dep_e1,
    .ib, .ib_valid, .state(bstate)
  );
  assign buf_state = bstate;

  // AX processor
  logic       issue_valid, select;
  ax_status_t status;

  ax_processor u_axp (
    .clk, .rst_n,
    .flush(redirect_valid),
    .hold(id_stall || !thumb_q),
    .ib, .ib_valid,
    .flags_nzcv, .flags_valid,
    .consume, .issue_valid, .select, .status,
    .restore_en(status_restore_en),
    .restore_data(ax_status_t'(status_restore_data)),
    .ev_coalesce, .ev_pred_true, .ev_pred_false, .ev_pred_wait, .ev_ax_alone
  );
  assign status_out = status;

  // predication select mux and decompressor
  ib_entry_t   sel_e;
  logic [31:0] dc_arm;
  logic        dc_undef, dc_aug;

  assign sel_e = select ? ib[1] : ib[0];

  axthumb_decompressor u_dc (
    .thumb(sel_e.instr), .status,
    .arm(dc_arm), .undef(dc_undef), .augmented(dc_aug)
  );

  // queue pop: a whole word into the buffer in Thumb state, one ARM word per
  // issued instruction in ARM state
  logic arm_issue;
  assign arm_issue = !thumb_q && q_valid && !id_stall && !redirect_valid;
  assign q_pop     = thumb_q ? (q_valid && can_accept) : arm_issue;

  always_comb begin
    if (thumb_q) begin
      out_valid       = issue_valid && !redirect_valid;
      out_arm         = dc_arm;
      out_pc          = sel_e.pc;
      out_thumb_instr = sel_e.instr;
      out_undef       = dc_undef;
      out_augmented   = dc_aug;
    end else begin
      out_valid       = arm_issue;
      out_arm         = q_word;
      out_pc          = q_pc;
      out_thumb_instr = '0;
      out_undef       = 1'b0;
      out_augmented   = 1'b0;
    end
  end
  assign out_thumb = thumb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              thumb_q <= RESET_THUMB;
    else if (redirect_valid) thumb_q <= redirect_thumb;
  end

endmodule
