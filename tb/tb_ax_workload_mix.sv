// tb_ax_workload_mix: AX instruction mixes of the evaluated benchmarks through
// the front end.
//
// The benchmarks themselves (rtr, crc, adpcm, pegwit, frag, reed, drr) are
// programs for a whole processor and cannot run on the front end alone. What
// each of them asks of the front end is its mix of AX instructions: the
// benchmark table gives, per program, the share of each of the eight AX
// instructions among those executed. For every row of that table this testbench
// generates a straight-line AXThumb program in which half of the items are an
// AX instruction plus the Thumb instruction it augments, the AX kind drawn with
// the row's weights, and the other half plain Thumb instructions. A setpred item
// is followed by 1..8 interleaved (then, else) pairs and then a plain Thumb
// instruction, as the code rules require. Each AX kind is paired with one fixed
// Thumb instruction whose coalesced ARM encoding was worked out by hand:
//   setimm -4    + str r0,[r3]       -> str r0,[r3,#-4]
//   setshift lsl 2 + sub r1,r1,r2    -> subs r1,r1,r2,lsl #2
//   setsbit      + mov r8,r2         -> movs r8,r2
//   setsource r9 + ldr r5,[r0,#100]  -> ldr r5,[r9,#100]
//   setdest r8   + add r0,#5         -> adds r8,r8,#5
//   setallhigh   + push {r0-r3}      -> push {r8-r11}
//   setthird r3  + add r1,r2         -> add r1,r2,r3
// Plain and predicated instructions are mov rd,#imm8. Memory always hits, the
// pipeline never stalls and the flags are always valid; Z changes at random
// every cycle and the predicated member is chosen from the flags of its issue
// cycle.
//
// Checked for every issued instruction: the ARM encoding, its address and the
// augmented flag. Checked per program: from the first issued instruction to the
// last, an instruction issues in every cycle, so AX instructions and the
// dropped members of predicated pairs take no cycles; and every AX kind with a
// weight of at least 5% in the row occurred. The front end runs with its
// default parameters.
module tb_ax_workload_mix;
  import ax_pkg::*;

  localparam int MEM_HW = 8192;
  localparam int ITEMS  = 240;
  localparam int NROWS  = 11;

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

  axthumb_frontend dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] mem [MEM_HW];
  assign imem_rvalid = 1'b1;
  assign imem_rdata  = {mem[(imem_addr >> 1) % MEM_HW + 1], mem[(imem_addr >> 1) % MEM_HW]};

  // AX kinds in the column order of the benchmark table
  typedef enum int {K_ALLHIGH, K_PRED, K_SBIT, K_SHIFT, K_SOURCE, K_DEST, K_THIRD, K_IMM} kind_e;

  string row_name [NROWS] = '{"rtr", "crc", "adpcm.rawaudio", "adpcm.rawdaudio", "pegwit.gen",
                              "pegwit.encrypt", "pegwit.decrypt", "frag", "reed.encode",
                              "reed.decode", "drr"};
  // weights in hundredths of a percent
  int weight [NROWS][8] = '{
    '{1177,    0, 8234,  588,    0,    0,    0,    0},
    '{   0,    0,   27, 9972,    0,    0,    0,    0},
    '{   0, 3630, 3630, 1452,    0,  726,    0,  559},
    '{   0, 3447, 3447, 1379,  344, 1034,  344,    0},
    '{  17,    0, 7447,  848,  547,    0, 1139,    0},
    '{  19,    0, 8022,  501,  623,    0,  832,    0},
    '{  17,    0, 7447,  848,  547,    0, 1139,    0},
    '{ 444,    0,    0,  666, 1333,  444, 6666,  444},
    '{   1,    0,  381,    0, 6845,    0, 2771,    0},
    '{   1,    0,  109,   63, 8829,    0,  995,    0},
    '{   0,    0,10000,    0,    0,    0,    0,    0}
  };

  typedef struct {
    bit          pair;
    logic [31:0] pc0, arm0, pc1, arm1;
    logic [3:0]  cond;
    bit          aug;
  } exp_t;
  exp_t exp_q [$];

  int hw;
  int kind_count [8];

  task automatic put(input logic [15:0] v);
    mem[hw] = v;
    hw++;
  endtask

  task automatic expect1(input logic [31:0] pc, input logic [31:0] arm, input bit aug);
    exp_t e;
    e = '{pair: 0, pc0: pc, arm0: arm, pc1: 0, arm1: 0, cond: 0, aug: aug};
    exp_q.push_back(e);
  endtask

  task automatic gen_plain();
    logic [2:0] rd; logic [7:0] imm;
    rd = 3'($urandom); imm = 8'($urandom);
    expect1(32'(hw * 2), 32'hE3B00000 | (32'(rd) << 12) | 32'(imm), 0);
    put({5'b00100, rd, imm});
  endtask

  task automatic gen_ax(input int row);
    int r, acc, k;
    r = $urandom_range(9999);
    acc = 0; k = 0;
    for (int i = 0; i < 8; i++) begin
      acc += weight[row][i];
      if (r < acc) begin k = i; break; end
    end
    kind_count[k]++;
    case (kind_e'(k))
      K_PRED: begin
        int n; logic [3:0] c;
        n = $urandom_range(8, 1);
        c = 4'($urandom_range(1));            // eq or ne
        put({6'b101110, 3'd3, c, 3'(n % 8)});
        for (int i = 0; i < n; i++) begin
          exp_t e;
          logic [2:0] r0, r1; logic [7:0] i0, i1;
          r0 = 3'($urandom); r1 = 3'($urandom); i0 = 8'($urandom); i1 = 8'($urandom);
          e.pair = 1; e.cond = c; e.aug = 0;
          e.pc0 = 32'(hw * 2); put({5'b00100, r0, i0});
          e.pc1 = 32'(hw * 2); put({5'b00100, r1, i1});
          e.arm0 = 32'hE3B00000 | (32'(r0) << 12) | 32'(i0);
          e.arm1 = 32'hE3B00000 | (32'(r1) << 12) | 32'(i1);
          exp_q.push_back(e);
        end
        gen_plain();                          // Thumb right after the block
      end
      K_IMM:     begin put(16'hB87C); expect1(32'(hw * 2), 32'hE5030004, 1); put(16'h6018); end
      K_SHIFT:   begin put(16'hB882); expect1(32'(hw * 2), 32'hE0511102, 1); put(16'h1A89); end
      K_SBIT:    begin put(16'hB900); expect1(32'(hw * 2), 32'hE1B08002, 1); put(16'h4690); end
      K_SOURCE:  begin put(16'hBA48); expect1(32'(hw * 2), 32'hE5995064, 1); put(16'h6E45); end
      K_DEST:    begin put(16'hBAC0); expect1(32'(hw * 2), 32'hE2988005, 1); put(16'h3005); end
      K_ALLHIGH: begin put(16'hBB00); expect1(32'(hw * 2), 32'hE92D0F00, 1); put(16'hB40F); end
      default:   begin put(16'hBB98); expect1(32'(hw * 2), 32'hE0821003, 1); put(16'h4411); end
    endcase
  endtask

  task automatic gen_program(input int row);
    hw = 0;
    exp_q.delete();
    foreach (kind_count[i]) kind_count[i] = 0;
    gen_plain();
    for (int i = 0; i < ITEMS; i++) begin
      if ($urandom_range(1) != 0) gen_ax(row);
      else gen_plain();
    end
    // fill the rest with plain moves, fetched but never expected
    while (hw < MEM_HW) put(16'h2000);
  endtask

  function automatic bit cond_holds(input logic [3:0] c, input logic [3:0] f);
    return (c == 4'h0) ? f[2] : !f[2];        // eq / ne on Z of {N,Z,C,V}
  endfunction

  // checker: compares every issued instruction and counts cycles
  bit   running = 0;
  int   issued, cycles, ax_absorbed, dropped;
  bit   started;

  always @(posedge clk) begin
    if (running && rst_n && exp_q.size() != 0) begin
      if (started) cycles++;
      if (out_valid) begin
        exp_t e;
        logic [31:0] pc, arm;
        if (!started) begin started = 1; cycles = 1; end
        e = exp_q.pop_front();
        if (e.pair) begin
          bit t;
          t = cond_holds(e.cond, flags_nzcv);
          pc = t ? e.pc0 : e.pc1; arm = t ? e.arm0 : e.arm1;
          dropped++;
        end else begin
          pc = e.pc0; arm = e.arm0;
        end
        if (e.aug) ax_absorbed++;
        issued++;
        checks++;
        if (out_arm !== arm || out_pc !== pc || out_augmented !== e.aug || !out_thumb) begin
          failures++;
          $display("FAIL at %h: arm=%h aug=%b, expected %h at %h aug=%b", out_pc, out_arm,
                   out_augmented, arm, pc, e.aug);
        end
      end
    end
  end

  always @(negedge clk) flags_nzcv <= {1'b0, 1'($urandom), 2'b00};

  task automatic run_row(input int row);
    int guard;
    rst_n = 0;
    running = 0;
    gen_program(row);
    issued = 0; cycles = 0; ax_absorbed = 0; dropped = 0; started = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    running = 1;
    guard = 0;
    while (exp_q.size() != 0 && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
    @(negedge clk);
    running = 0;
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %s: program did not complete, %0d left", row_name[row], exp_q.size());
    end
    // no cycle without an issued instruction: AX and dropped instructions are free
    checks++;
    if (cycles != issued) begin
      failures++;
      $display("FAIL %s: %0d instructions issued in %0d cycles", row_name[row], issued, cycles);
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (weight[row][k] >= 500 && kind_count[k] == 0) begin
        failures++;
        $display("FAIL %s: AX kind %0d never generated", row_name[row], k);
      end
    end
    $display("%-16s %4d issued in %4d cycles, %3d AX coalesced, %2d setpred blocks, %3d pairs",
             row_name[row], issued, cycles, ax_absorbed, kind_count[K_PRED], dropped);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int row = 0; row < NROWS; row++) run_row(row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
