// fetch_unit: instruction fetch with an instruction fetch queue (IFQ).
//
// The fetch side of the processor reads one aligned 32-bit word per cycle, that
// is two Thumb instructions, and appends it to a FIFO of DEPTH words (eight, as in
// the evaluated processor). The decode stage takes words from the head of the
// queue: a whole word in Thumb state when its instruction buffer has two free
// entries, one word per ARM instruction in ARM state.
//
// Memory port: while the queue has room the unit drives imem_req with the word
// address in imem_addr. The memory answers in the same cycle with imem_rvalid
// and imem_rdata; a low imem_rvalid (a miss) makes the unit ask again for the
// same address on the next cycle. The memory timing is this design's choice.
//
// Redirect: a taken branch (redirect_valid, redirect_pc) flushes the queue and
// restarts fetch at the word holding the target. When the target is the upper
// halfword of a word, the first queued word is marked with lo_valid = 0 so that
// only its upper instruction is delivered; that instruction then lands in ib1.
//
// Timing: a word fetched in cycle t is at the queue head in cycle t+1 at the
// earliest. Reset empties the queue and starts fetch at RESET_PC.
module fetch_unit
  import ax_pkg::*;
#(
  parameter int unsigned DEPTH    = 8,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  // redirect from a taken branch
  input  logic        redirect_valid,
  input  logic [31:0] redirect_pc,
  // instruction memory
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic        imem_rvalid,
  input  logic [31:0] imem_rdata,
  // queue head towards decode
  output logic        q_valid,
  output logic [31:0] q_word,
  output logic [31:0] q_pc,      // address of the word (bits [1:0] = 0)
  output logic        q_lo_valid, // lower halfword is part of the stream
  input  logic        q_pop,
  // status
  output logic        q_full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic [31:0] word;
    logic [31:0] pc;
    logic        lo_valid;
  } ifq_entry_t;

  ifq_entry_t             mem [DEPTH];
  logic [PW-1:0]          rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [31:0]            fetch_pc;
  logic                   fetch_hi_only;
  logic                   push, pop;

  assign q_full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign imem_req  = !redirect_valid && !q_full;
  assign imem_addr = fetch_pc;
  assign push      = imem_req && imem_rvalid;
  assign q_valid   = (count != '0);
  assign pop       = q_pop && q_valid;

  assign q_word     = mem[rd_ptr].word;
  assign q_pc       = mem[rd_ptr].pc;
  assign q_lo_valid = mem[rd_ptr].lo_valid;

  function automatic logic [PW-1:0] ptr_inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr        <= '0;
      wr_ptr        <= '0;
      count         <= '0;
      fetch_pc      <= {RESET_PC[31:2], 2'b00};
      fetch_hi_only <= RESET_PC[1];
    end else if (redirect_valid) begin
      rd_ptr        <= '0;
      wr_ptr        <= '0;
      count         <= '0;
      fetch_pc      <= {redirect_pc[31:2], 2'b00};
      fetch_hi_only <= redirect_pc[1];
    end else begin
      if (push) begin
        wr_ptr        <= ptr_inc(wr_ptr);
        fetch_pc      <= fetch_pc + 32'd4;
        fetch_hi_only <= 1'b0;
      end
      if (pop) rd_ptr <= ptr_inc(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= '{word: imem_rdata, pc: fetch_pc, lo_valid: !fetch_hi_only};
  end

  // The queue never takes a word it has no room for.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(push && !pop && q_full));

endmodule
