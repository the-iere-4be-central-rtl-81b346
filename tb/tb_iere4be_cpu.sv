// tb_iere4be_cpu: end-to-end test of the IERE-4BE CPU at its default configuration.
//
// A 4K x 4 memory model sits on the buses (combinational read, write latched on the
// master edge that ends the phi2 pulse when rw and data_oe are high). Programs are
// assembled into it by tasks, then the CPU runs from reset. An instruction-level model
// of the instruction set in this testbench executes the same program: every time the
// CPU starts a new opcode fetch, the model executes one instruction and A, C, Z and PC
// are compared. At HALT the whole memory is compared and the number of master clocks
// is checked against the micro-cycle count predicted per instruction (fetch 5,
// direct operand 2, indirect operand 8, execute 1..3 micro-cycles of 4 clocks each).
// Part 0 runs the two example encodings of LDA. Part 1 is a directed program that uses every opcode and makes every branch both
// taken and not taken; part 2 runs random programs. Mechanism counters (direct and
// indirect operand fetch, each branch taken / not taken, memory write, carry, zero,
// halt) must each be non-zero at the end. Throughout, phi1 and phi2 must not overlap,
// the address bus may change only at the fall of phi1, and R/W = 1 needs data_oe.
`timescale 1ns/1ps
module tb_iere4be_cpu;
  import iere4be_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [11:0] addr;
  logic [3:0]  data_in, data_out;
  logic        data_oe, rw, phi1, phi2;
  logic [3:0]  dbg_a;
  logic [11:0] dbg_pc;
  logic [1:0]  dbg_cc;
  logic [7:0]  dbg_ir, dbg_upc;
  logic        dbg_br_eval, dbg_br_taken;

  iere4be_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- memory model
  logic [3:0] mem [4096];
  assign data_in = mem[addr];
  always @(posedge clk) if (!rst && rw && data_oe && phi2) mem[addr] <= data_out;

  // ---------------------------------------------------------------- assembler
  int unsigned apc;
  task automatic put(input logic [3:0] n); mem[apc[11:0]] = n; apc++; endtask
  task automatic op2(input logic [7:0] op); put(op[7:4]); put(op[3:0]); endtask
  task automatic imm(input logic [7:0] op, input logic [3:0] n); op2(op); put(n); endtask
  task automatic inh(input logic [7:0] op); op2(op); put(4'h0); endtask
  task automatic ind(input logic [7:0] op, input logic [11:0] a);
    op2(op); put(a[3:0]); put(a[7:4]); put(a[11:8]);
  endtask
  // branch that skips exactly the following 3-nybble instruction
  task automatic bskip(input logic [7:0] op); ind(op, 12'(apc + 5 + 3)); endtask

  // ---------------------------------------------------------------- reference model
  logic [3:0]  ref_mem [4096];
  logic [3:0]  ra;
  logic        rc, rz;
  logic [11:0] rpc;
  bit          rhalt;
  int unsigned cnt_op [256];
  int unsigned cnt_taken [256], cnt_not_taken [256];

  function automatic logic [3:0] rd(input logic [11:0] a); return ref_mem[a]; endfunction

  // Executes one instruction; returns its length in micro-cycles.
  function automatic int ref_step();
    logic [7:0]  op;
    logic [3:0]  operand, res;
    logic [11:0] ea;
    logic [4:0]  wide;
    bit          cond, is_br;
    int          n;
    op  = {rd(rpc), rd(rpc + 12'd1)};
    rpc = rpc + 12'd2;
    n   = 5;
    ea  = '0;
    if (op[7]) begin
      ea      = {rd(rpc + 12'd2), rd(rpc + 12'd1), rd(rpc)};
      rpc     = rpc + 12'd3;
      operand = rd(ea);
      n += 8;
    end else begin
      operand = rd(rpc);
      rpc     = rpc + 12'd1;
      n += 2;
    end
    cnt_op[op]++;
    is_br = 0; cond = 0;
    case (op)
      OP_LDA_IMM, OP_LDA_IND: begin ra = operand; rc = 0; rz = (ra == 0); n += 3; end
      OP_STA_IND: begin ref_mem[ea] = ra; n += 3; end
      OP_ADDA_IMM, OP_ADDA_IND: begin
        wide = {1'b0, ra} + {1'b0, operand}; ra = wide[3:0]; rc = wide[4]; rz = (ra == 0); n += 3;
      end
      OP_SUBA_IMM, OP_SUBA_IND: begin
        rc = (ra < operand); ra = ra - operand; rz = (ra == 0); n += 3;
      end
      OP_CMPA_IMM, OP_CMPA_IND: begin
        rc = (ra < operand); res = ra - operand; rz = (res == 0); n += 2;
      end
      OP_ANDA_IMM, OP_ANDA_IND: begin ra = ra & operand; rz = (ra == 0); n += 3; end
      OP_ORA_IMM,  OP_ORA_IND:  begin ra = ra | operand; rz = (ra == 0); n += 3; end
      OP_ASLA: begin rc = ra[3]; ra = {ra[2:0], 1'b0}; rz = (ra == 0); n += 2; end
      OP_ASRA: begin rc = ra[0]; ra = {ra[3], ra[3:1]}; rz = (ra == 0); n += 2; end
      OP_NOTA: begin ra = ~ra; rz = (ra == 0); n += 2; end
      OP_BGT: begin is_br = 1; cond = !rc && !rz; end
      OP_BLT: begin is_br = 1; cond =  rc && !rz; end
      OP_BEQ: begin is_br = 1; cond =  rz; end
      OP_BNE: begin is_br = 1; cond = !rz; end
      OP_BGE: begin is_br = 1; cond = !rc; end
      OP_BLE: begin is_br = 1; cond =  rc; end
      OP_HALT: rhalt = 1;
      default: n += 1;
    endcase
    if (is_br) begin
      if (cond) begin rpc = ea; n += 2; cnt_taken[op]++; end
      else      begin n += 1; cnt_not_taken[op]++; end
    end
    return n;
  endfunction

  // ---------------------------------------------------------------- run one program
  int unsigned n_clk;
  int unsigned n_writes, n_direct, n_indirect, n_carry, n_zero, n_halt, n_bus_a;
  always @(posedge clk) if (!rst) begin
    n_clk++;
    if (rw && data_oe && phi2) n_writes++;
  end

  // Bus and clock-pin rules, checked every master period: phi1 and phi2 never overlap,
  // the address bus only changes at the fall of phi1, and a write always has the data
  // bus driven.
  logic        phi1_q;
  logic [11:0] addr_q;
  int unsigned n_pin_checks, n_pin_errors;
  always @(posedge clk) begin
    if (!rst) begin
      n_pin_checks++;
      if (phi1 && phi2) n_pin_errors++;
      if (addr != addr_q && !phi1_q) n_pin_errors++;
      if (rw && !data_oe) n_pin_errors++;
    end
    phi1_q <= phi1;
    addr_q <= addr;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_program(input int max_instr);
    int unsigned exp_words, instrs;
    logic [7:0] prev_upc;
    ref_mem = mem;
    ra = 0; rc = 0; rz = 0; rpc = 0; rhalt = 0;
    exp_words = 0; instrs = 0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    n_clk = 0;
    prev_upc = 8'd0;
    // The first fetch starts right after reset; every later return of the micro-program
    // address to 0 marks the end of an instruction.
    while (!rhalt && instrs < max_instr) begin
      @(negedge clk);
      if (dbg_upc == UA_DIRECT && prev_upc != UA_DIRECT) n_direct++;
      if (dbg_upc == UA_INDIRECT && prev_upc != UA_INDIRECT) n_indirect++;
      if (dbg_upc == 8'd0 && prev_upc != 8'd0) begin
        exp_words += ref_step();
        instrs++;
        check(dbg_a == ra && dbg_cc == {rc, rz} && dbg_pc == rpc,
              $sformatf("instr %0d: A=%h CC=%b PC=%h, expected A=%h CC=%b%b PC=%h",
                        instrs, dbg_a, dbg_cc, dbg_pc, ra, rc, rz, rpc));
        check(n_clk == 4 * exp_words,
              $sformatf("instr %0d: %0d clocks, expected %0d", instrs, n_clk, 4 * exp_words));
        if (rc) n_carry++;
        if (rz) n_zero++;
      end
      prev_upc = dbg_upc;
      if (dbg_upc == UA_HALT) begin
        // HALT: the model has not executed it yet.
        exp_words += ref_step();
        instrs++;
        check(rhalt, "CPU halted where the model did not");
        // The HALT word is entered after fetch and direct operand fetch.
        check(n_clk == 4 * exp_words,
              $sformatf("halt reached after %0d clocks, expected %0d", n_clk, 4 * exp_words));
        n_halt++;
        // It stays halted.
        repeat (40) @(posedge clk);
        @(negedge clk);
        check(dbg_upc == UA_HALT && dbg_pc == rpc, "CPU left HALT");
      end
    end
    check(rhalt, "program did not reach HALT");
    for (int i = 0; i < 4096; i++)
      if (mem[i] != ref_mem[i]) begin
        check(0, $sformatf("mem[%h]=%h expected %h", i, mem[i], ref_mem[i]));
      end
    checks++;
  endtask

  // ---------------------------------------------------------------- programs
  task automatic clear_mem();
    for (int i = 0; i < 4096; i++) mem[i] = 4'h0;
  endtask

  task automatic directed_program();
    int unsigned loop_top;
    clear_mem();
    mem[12'h200] = 4'h7; mem[12'h202] = 4'h8; mem[12'h203] = 4'h5;
    apc = 0;
    imm(OP_LDA_IMM, 4'h5);
    ind(OP_LDA_IND, 12'h200);      // A = 7
    imm(OP_ADDA_IMM, 4'hC);        // A = 3, C = 1
    ind(OP_STA_IND, 12'h201);
    bskip(OP_BLT); imm(OP_LDA_IMM, 4'h0);   // taken
    bskip(OP_BLE); imm(OP_LDA_IMM, 4'h0);   // taken
    bskip(OP_BGE); imm(OP_LDA_IMM, 4'h9);   // not taken, A = 9, C = 0
    bskip(OP_BGT); imm(OP_LDA_IMM, 4'h0);   // taken
    bskip(OP_BNE); imm(OP_LDA_IMM, 4'h0);   // taken
    bskip(OP_BEQ); imm(OP_ANDA_IMM, 4'h0);  // not taken, A = 0, Z = 1
    bskip(OP_BEQ); imm(OP_LDA_IMM, 4'h1);   // taken
    bskip(OP_BNE); imm(OP_ORA_IMM, 4'h6);   // not taken, A = 6
    bskip(OP_BLT); imm(OP_ORA_IMM, 4'h4);   // not taken
    inh(OP_ASLA);                           // A = C, C = 0
    inh(OP_ASLA);                           // A = 8, C = 1
    bskip(OP_BGT); imm(OP_ADDA_IMM, 4'h4);  // not taken, A = C, C = 0
    inh(OP_ASRA);                           // A = E, C = 0
    inh(OP_NOTA);                           // A = 1
    imm(OP_SUBA_IMM, 4'h5);                 // A = C, C = 1 (borrow)
    bskip(OP_BLE); imm(OP_LDA_IMM, 4'h0);   // taken
    imm(OP_CMPA_IMM, 4'hC);                 // Z = 1, C = 0
    bskip(OP_BNE); imm(OP_ADDA_IMM, 4'h1);  // not taken, A = D
    ind(OP_CMPA_IND, 12'h200);              // D - 7: C = 0, Z = 0
    bskip(OP_BLE); imm(OP_ADDA_IMM, 4'h0);  // not taken
    bskip(OP_BGE); imm(OP_LDA_IMM, 4'h0);   // taken
    ind(OP_SUBA_IND, 12'h200);              // A = 6
    ind(OP_ORA_IND, 12'h202);               // A = E
    ind(OP_ANDA_IND, 12'h203);              // A = 4
    ind(OP_ADDA_IND, 12'h200);              // A = B
    inh(OP_ASRA);                           // A = D, C = 1
    ind(OP_STA_IND, 12'h202);
    // counted loop over a memory variable
    imm(OP_LDA_IMM, 4'h4);
    ind(OP_STA_IND, 12'h210);
    loop_top = apc;
    ind(OP_LDA_IND, 12'h210);
    imm(OP_SUBA_IMM, 4'h1);
    ind(OP_STA_IND, 12'h210);
    ind(OP_BNE, 12'(loop_top));
    inh(OP_HALT);
    run_program(1000);
  endtask

  task automatic random_program(input int len);
    logic [7:0] ops [20] = '{OP_LDA_IMM, OP_LDA_IND, OP_STA_IND, OP_ADDA_IMM, OP_ADDA_IND,
                             OP_SUBA_IMM, OP_SUBA_IND, OP_ASLA, OP_ASRA, OP_CMPA_IMM,
                             OP_CMPA_IND, OP_ANDA_IMM, OP_ANDA_IND, OP_ORA_IMM, OP_ORA_IND,
                             OP_NOTA, OP_BGT, OP_BLT, OP_BEQ, OP_BNE};
    logic [7:0] brs [6] = '{OP_BGT, OP_BLT, OP_BEQ, OP_BNE, OP_BGE, OP_BLE};
    logic [7:0] op;
    clear_mem();
    for (int i = 'h800; i < 'h810; i++) mem[i] = 4'($urandom);
    apc = 0;
    for (int i = 0; i < len; i++) begin
      op = ops[$urandom_range(0, 19)];
      if (op[7:4] == 4'h8 && op[3:0] >= 4'hA) begin
        bskip(brs[$urandom_range(0, 5)]);
        imm(OP_ADDA_IMM, 4'($urandom));
      end else if (op == OP_ASLA || op == OP_ASRA || op == OP_NOTA) begin
        inh(op);
      end else if (op[7]) begin
        ind(op, 12'h800 + 12'($urandom_range(0, 15)));
      end else begin
        imm(op, 4'($urandom));
      end
    end
    inh(OP_HALT);
    run_program(10 * len);
  endtask

  // The two encodings given as examples for the instruction set: LDA #$F is [0 1 F],
  // LDA $020 is [8 1 0 2 0]. Memory holds them as raw nybbles, followed by HALT.
  task automatic example_program();
    logic [3:0] code [11] = '{4'h0, 4'h1, 4'hF, 4'h8, 4'h1, 4'h0, 4'h2, 4'h0, 4'h1, 4'h0, 4'h0};
    clear_mem();
    foreach (code[i]) mem[i] = code[i];
    mem[12'h020] = 4'h6;
    fork
      run_program(10);
      begin
        wait (dut.dbg_upc == 8'd7);            // first instruction done, second fetched
        check(dbg_a == 4'hF, $sformatf("LDA #$F gave A=%h", dbg_a));
      end
    join
    check(dbg_a == 4'h6 && dbg_pc == 12'h00B, $sformatf("LDA $020 gave A=%h PC=%h", dbg_a, dbg_pc));
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    example_program();
    directed_program();
    for (int p = 0; p < 6; p++) random_program(60);
    // every mechanism must have happened
    check(n_direct > 0,   "no direct operand fetch");
    check(n_indirect > 0, "no indirect operand fetch");
    check(n_writes > 0,   "no memory write");
    check(n_carry > 0,    "carry never set");
    check(n_zero > 0,     "zero never set");
    check(n_halt > 0,     "HALT never reached");
    check(n_pin_checks > 0 && n_pin_errors == 0,
          $sformatf("%0d clock-pin or bus timing errors", n_pin_errors));
    for (int b = 'h8A; b <= 'h8F; b++) begin
      check(cnt_taken[b] > 0,     $sformatf("branch %h never taken", b));
      check(cnt_not_taken[b] > 0, $sformatf("branch %h never fell through", b));
    end
    begin
      automatic logic [7:0] all_ops [21] = '{OP_LDA_IMM, OP_LDA_IND, OP_STA_IND, OP_ADDA_IMM,
        OP_ADDA_IND, OP_SUBA_IMM, OP_SUBA_IND, OP_ASLA, OP_ASRA, OP_CMPA_IMM, OP_CMPA_IND,
        OP_ANDA_IMM, OP_ANDA_IND, OP_ORA_IMM, OP_ORA_IND, OP_NOTA, OP_BGT, OP_BEQ, OP_BGE,
        OP_BLE, OP_HALT};
      foreach (all_ops[i]) check(cnt_op[all_ops[i]] > 0, $sformatf("opcode %h never ran", all_ops[i]));
    end
    $display("mechanisms: direct=%0d indirect=%0d writes=%0d carry=%0d zero=%0d halt=%0d",
             n_direct, n_indirect, n_writes, n_carry, n_zero, n_halt);
    for (int b = 'h8A; b <= 'h8F; b++)
      $display("branch %h: taken %0d, not taken %0d", b, cnt_taken[b], cnt_not_taken[b]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
