// instr_buffer: the 48-bit instruction buffer of the AX decode stage.
//
// Three 16-bit entries ib1, ib2, ib3 hold up to three consecutive instructions,
// the oldest in ib1. Each cycle the AX processor consumes 0, 1 or 2 entries from
// the ib1 end (1 for a Thumb instruction alone, 2 for a Thumb instruction plus a
// following AX instruction or for a predicated pair). The remaining entries shift
// down so that the first unprocessed instruction is in ib1. A fetched word (two
// instructions, or one after a branch to an upper halfword) is written behind the
// remaining entries, so it lands in (ib1, ib2) or (ib2, ib3). A word is accepted
// only when at least two entries are free after the shift (can_accept); the
// caller pops the fetch queue with the same condition.
//
// The buffer state S1..S6 (empty; T; T T; T A; T T T; T A T) is reported for
// observation: it follows from the entry count and whether ib2 holds an AX
// instruction. All of this follows the published buffer design; the entry count
// register and the per-entry address are this design's own bookkeeping.
//
// Timing: consume and deposit act at the same clock edge; flush empties the
// buffer at the next edge and wins over both.
module instr_buffer
  import ax_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic [1:0] consume,     // entries taken from the ib1 end this cycle
  output logic       can_accept,  // two entries free after this cycle's shift
  input  logic       dep_valid,   // deposit a fetched word this cycle
  input  logic       dep_two,     // 1: two instructions, 0: only dep_e0
  input  ib_entry_t  dep_e0,      // earlier instruction of the word
  input  ib_entry_t  dep_e1,      // later instruction of the word
  output ib_entry_t  ib   [3],    // ib[0] = ib1, ib[1] = ib2, ib[2] = ib3
  output logic [2:0] ib_valid,    // bit i: ib[i] holds an instruction
  output buf_state_e state
);

  ib_entry_t  ent [3];
  logic [1:0] count;
  logic [1:0] left;      // entries remaining after the shift

  assign left       = count - consume;
  assign can_accept = (left <= 2'd1);

  always_comb begin
    ib = ent;
    for (int i = 0; i < 3; i++) ib_valid[i] = (2'(i) < count);
  end

  always_comb begin
    unique case (count)
      2'd0:    state = BUF_S1;
      2'd1:    state = BUF_S2;
      2'd2:    state = is_ax(ent[1].instr) ? BUF_S4 : BUF_S3;
      default: state = is_ax(ent[1].instr) ? BUF_S6 : BUF_S5;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (flush) begin
      count <= '0;
    end else begin
      count <= left + ((dep_valid && can_accept) ? (dep_two ? 2'd2 : 2'd1) : 2'd0);
    end
  end

  always_ff @(posedge clk) begin
    ib_entry_t nxt [3];
    for (int i = 0; i < 3; i++) begin
      // shift by the number consumed
      if (i + int'(consume) < 3) nxt[i] = ent[i + int'(consume)];
      else                       nxt[i] = ent[i];
    end
    if (dep_valid && can_accept && !flush) begin
      nxt[left] = dep_e0;
      if (dep_two && left == 2'd0) nxt[1] = dep_e1;
      if (dep_two && left == 2'd1) nxt[2] = dep_e1;
    end
    ent <= nxt;
  end

  // Never consume more than is held.
  a_consume_held: assert property (@(posedge clk) disable iff (!rst_n || flush)
    consume <= count);

endmodule
