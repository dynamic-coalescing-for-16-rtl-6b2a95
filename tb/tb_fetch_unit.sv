// tb_fetch_unit: random check of fetch and the instruction fetch queue.
//
// The instruction memory model returns a word computed from its address and
// misses at random. The consumer pops at random and redirects now and then to a
// random halfword address. Every popped word must be the next one of the stream
// since the last redirect (address, data, and lo_valid = 0 only for the first
// word after a redirect to an upper halfword). The queue must fill to exactly
// DEPTH words when nothing is popped, and with a memory that always hits and a
// consumer that always pops, one word must come out every cycle.
module tb_fetch_unit;
  localparam int DEPTH = 8;

  logic        clk = 0, rst_n = 0;
  logic        redirect_valid = 0;
  logic [31:0] redirect_pc = 0;
  logic        imem_req, imem_rvalid;
  logic [31:0] imem_addr, imem_rdata;
  logic        q_valid, q_lo_valid, q_pop, q_full;
  logic [31:0] q_word, q_pc;

  int checks = 0, failures = 0;
  int miss_pct = 20, pop_pct = 50;
  logic [31:0] exp_pc = 32'h100;
  logic        exp_first_hi = 1'b0;

  fetch_unit #(.DEPTH(DEPTH), .RESET_PC(32'h100)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return (a * 32'h9E3779B1) ^ 32'h5A5A0000;
  endfunction

  always_comb begin
    imem_rdata = mem_word(imem_addr);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s (time %0t)", m, $time);
  endtask

  // check every popped word
  // (a redirect restarts the expected sequence at the target word)
  always @(posedge clk) if (rst_n) begin
    if (redirect_valid) begin
      exp_pc       <= {redirect_pc[31:2], 2'b00};
      exp_first_hi <= redirect_pc[1];
    end else if (q_pop && q_valid) begin
      checks++;
      if (q_pc !== exp_pc || q_word !== mem_word(exp_pc) || q_lo_valid !== !exp_first_hi)
        fail($sformatf("pop pc=%h word=%h lo=%b exp pc=%h", q_pc, q_word, q_lo_valid, exp_pc));
      exp_pc       <= exp_pc + 4;
      exp_first_hi <= 1'b0;
    end
  end

  initial begin
    int pops;
    q_pop = 0; imem_rvalid = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill with nothing popped: exactly DEPTH words, then full
    repeat (DEPTH + 5) @(posedge clk);
    #1;
    checks++;
    if (!q_full || imem_req) fail("queue not full after filling");
    // full rate: always hit, always pop
    q_pop = 1;
    repeat (5) @(posedge clk);
    pops = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      if (q_valid) pops++;
    end
    checks++;
    if (pops != 40) fail($sformatf("full rate: %0d words in 40 cycles", pops));
    // random traffic with misses and redirects
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      imem_rvalid    = ($urandom_range(99) >= miss_pct);
      q_pop          = ($urandom_range(99) < pop_pct);
      redirect_valid = ($urandom_range(99) == 0);
      redirect_pc    = {16'h0, 15'($urandom), 1'b0};
      if (i % 5000 == 4999) pop_pct = $urandom_range(90, 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
