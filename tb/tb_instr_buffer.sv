// tb_instr_buffer: random check of the three-entry instruction buffer.
//
// Each cycle a random number of entries (no more than held, at most two) is
// consumed and a random one- or two-instruction word is offered. A queue in the
// testbench models the buffer: consumed entries leave from the front, and a word
// enters only when at least two entries are free after the shift. The entries,
// their valid bits, can_accept and the S1..S6 state (from the entry count and
// whether ib2 holds an AX instruction) are compared every cycle, and every state
// S1..S6 must be seen.
module tb_instr_buffer;
  import ax_pkg::*;

  logic       clk = 0, rst_n = 0, flush = 0;
  logic [1:0] consume = 0;
  logic       can_accept, dep_valid = 0, dep_two = 0;
  ib_entry_t  dep_e0, dep_e1;
  ib_entry_t  ib [3];
  logic [2:0] ib_valid;
  buf_state_e state;

  int checks = 0, failures = 0;
  int seen [7];
  ib_entry_t model [$];
  int cyc = 0;

  instr_buffer dut (.clk, .rst_n, .flush, .consume, .can_accept, .dep_valid, .dep_two,
                    .dep_e0, .dep_e1, .ib, .ib_valid, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] rnd_instr();
    // about one in three is an AX instruction
    if ($urandom_range(2) == 0) return {6'b101110, 10'($urandom)};
    else return {3'b000, 13'($urandom)};
  endfunction

  task automatic compare();
    int exp_state;
    checks++;
    for (int i = 0; i < 3; i++) begin
      if (ib_valid[i] !== (i < model.size())) begin
        failures++; $display("FAIL cyc %0d valid[%0d]=%b size=%0d", cyc, i, ib_valid[i], model.size());
      end else if (i < model.size() && ib[i] !== model[i]) begin
        failures++; $display("FAIL cyc %0d ib[%0d]=%h exp %h", cyc, i, ib[i], model[i]);
      end
    end
    case (model.size())
      0: exp_state = 1;
      1: exp_state = 2;
      2: exp_state = (model[1].instr[15:10] == 6'b101110) ? 4 : 3;
      default: exp_state = (model[1].instr[15:10] == 6'b101110) ? 6 : 5;
    endcase
    checks++;
    if (int'(state) != exp_state) begin
      failures++; $display("FAIL cyc %0d state=%0d exp S%0d", cyc, state, exp_state);
    end
    seen[exp_state]++;
  endtask

  initial begin
    automatic int pc = 0;
    dep_e0 = '0; dep_e1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      compare();
      consume   = 2'($urandom_range((model.size() < 2) ? model.size() : 2));
      dep_valid = ($urandom_range(3) != 0);
      dep_two   = ($urandom_range(7) != 0);
      dep_e0    = '{instr: rnd_instr(), pc: pc};
      dep_e1    = '{instr: rnd_instr(), pc: pc + 2};
      flush     = ($urandom_range(199) == 0);
      #1;
      checks++;
      if (can_accept !== ((model.size() - int'(consume)) <= 1)) begin
        failures++; $display("FAIL cyc %0d can_accept=%b", cyc, can_accept);
      end
      @(posedge clk);
      if (flush) model = {};
      else begin
        for (int k = 0; k < consume; k++) void'(model.pop_front());
        if (dep_valid && model.size() <= 1) begin
          model.push_back(dep_e0);
          if (dep_two) model.push_back(dep_e1);
          pc += 4;
        end
      end
    end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL state S%0d never seen", s); end
    end
    $display("states seen S1..S6: %0d %0d %0d %0d %0d %0d", seen[1], seen[2], seen[3], seen[4], seen[5], seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
