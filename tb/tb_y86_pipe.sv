// tb_y86_pipe: end-to-end test of the pipelined Y86-64 core at its default
// sizes.
//
// Each test assembles a program into a byte buffer, loads it through the
// instruction-memory port under reset, preloads data memory, runs the core
// until halt reaches writeback, and compares with an instruction-level
// reference model kept in this file (sequential execution, no pipeline):
// all registers, the data words used, the condition codes and the status.
// The cycle count is checked exactly against
//     cycles = N + 2 + 2*(not-taken jumps) + 3*(rets) + 1*(load/use pairs)
// where N is the number of instructions executed including halt: one cycle
// per instruction once the pipe is full, 2 extra for a mispredicted jump, 3
// extra for a ret, 1 extra for a load followed directly by a reader of the
// loaded register. The count of each stall/bubble event the core reports is
// checked against the model too, and every mechanism (load/use stall, ret
// stall, misprediction, correct prediction, forwarding from each of execute,
// memory and writeback, stopping on an invalid instruction or a bad data
// address) must have happened at least once.
//
// Programs: the short sequences the pipeline is usually explained with
// (forwarding paths, load/use, taken and not-taken jne, call/ret, two
// dependency exercises), an instruction mix with 3% not-taken jumps, 5%
// taken jumps and 1% rets whose cycles per instruction must come out as
// 1.09, and random programs with forward branches, loads, stores and calls.
`timescale 1ns/1ps
module tb_y86_pipe;
  import y86_pkg::*;

  localparam int MEMB = 1024;     // matches the core's default sizes

  logic       clk = 0;
  logic       rst = 1;
  logic       imem_we = 0;
  word_t      imem_waddr = '0;
  logic [7:0] imem_wdata = '0;
  logic       dmem_dbg_we = 0;
  word_t      dmem_dbg_addr = '0;
  logic [7:0] dmem_dbg_wdata = '0;
  logic [7:0] dmem_dbg_rdata;
  regid_t     dbg_reg = '0;
  word_t      dbg_reg_val;
  word_t      fetch_pc;
  cc_t        cc;
  stat_t      stat;
  logic       halted;
  events_t    ev;

  y86_pipe dut (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata,
    .dmem_dbg_we, .dmem_dbg_addr, .dmem_dbg_wdata, .dmem_dbg_rdata,
    .dbg_reg, .dbg_reg_val, .fetch_pc, .cc, .stat, .halted, .events (ev)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int tot_load_use = 0, tot_ret = 0, tot_mispred = 0, tot_taken = 0;
  int tot_fwd_e = 0, tot_fwd_m = 0, tot_fwd_w = 0;
  int tot_ins = 0, tot_adr = 0;

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ assembler
  logic [7:0] prog [MEMB];
  int         plen;
  logic [7:0] dinit [MEMB];

  task automatic clear_prog();
    for (int i = 0; i < MEMB; i++) prog[i] = 8'h00;
    plen = 0;
  endtask
  task automatic b8(input logic [7:0] b);
    if (plen >= MEMB) $fatal(1, "program does not fit in instruction memory");
    prog[plen] = b; plen++;
  endtask
  task automatic w64(input word_t v);
    for (int k = 0; k < 8; k++) b8(v[8*k +: 8]);
  endtask
  task automatic a_halt();                      b8(8'h00); endtask
  task automatic a_irmovq(input word_t v, input int rb);
    b8(8'h30); b8({4'hF, 4'(rb)}); w64(v);
  endtask
  task automatic a_rrmovq(input int ra, input int rb);
    b8(8'h20); b8({4'(ra), 4'(rb)});
  endtask
  task automatic a_rmmovq(input int ra, input word_t d, input int rb);   // rmmovq rA, d(rB)
    b8(8'h40); b8({4'(ra), 4'(rb)}); w64(d);
  endtask
  task automatic a_mrmovq(input word_t d, input int rb, input int ra);   // mrmovq d(rB), rA
    b8(8'h50); b8({4'(ra), 4'(rb)}); w64(d);
  endtask
  task automatic a_op(input int fn, input int ra, input int rb);
    b8({4'h6, 4'(fn)}); b8({4'(ra), 4'(rb)});
  endtask
  task automatic a_jxx(input int cond, input word_t dest);
    b8({4'h7, 4'(cond)}); w64(dest);
  endtask
  task automatic a_call(input word_t dest);     b8(8'h80); w64(dest); endtask
  task automatic a_ret();                       b8(8'h90); endtask

  // ------------------------------------------------------ reference model
  word_t      mr [15];
  logic [7:0] mm [MEMB];
  logic       mzf, msf, mof;
  stat_t      mstat;
  int         m_n, m_nt, m_tk, m_ret, m_lu;

  function automatic word_t rd64(input word_t a);
    word_t v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = mm[int'(a) + k];
    return v;
  endfunction

  task automatic wr64(input word_t a, input word_t v);
    for (int k = 0; k < 8; k++) mm[int'(a) + k] = v[8*k +: 8];
  endtask

  function automatic bit fits(input word_t a);
    return a <= word_t'(MEMB - 8);
  endfunction

  function automatic word_t c64(input int at);
    word_t v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = prog[at + k];
    return v;
  endfunction

  // Executes the program sequentially from address 0 until halt.
  task automatic model_run();
    int    pc = 0;
    int    last_load = 15;          // register loaded by the previous instruction
    bit    done = 0;
    for (int i = 0; i < 15; i++) mr[i] = '0;
    for (int i = 0; i < MEMB; i++) mm[i] = dinit[i];
    mzf = 1; msf = 0; mof = 0;
    mstat = S_AOK;
    m_n = 0; m_nt = 0; m_tk = 0; m_ret = 0; m_lu = 0;
    while (!done && m_n < 100000) begin
      logic [3:0] ic, fn, ra, rb;
      int reads [2];
      int this_load = 15;
      ic = prog[pc][7:4]; fn = prog[pc][3:0];
      ra = prog[pc+1][7:4]; rb = prog[pc+1][3:0];
      reads[0] = 15; reads[1] = 15;
      m_n++;
      // Invalid codes, and data accesses that do not fit in memory, stop
      // the program with a status instead of executing.
      if (ic > 4'h9 || (ic == 4'h6 && fn > 4'h3) || (ic == 4'h7 && fn > 4'h6) ||
          (ic != 4'h6 && ic != 4'h7 && fn != 4'h0)) begin
        mstat = S_INS; done = 1;
      end else if ((ic == 4'h4 && !fits(mr[rb] + c64(pc+2))) ||
                   (ic == 4'h5 && !fits(mr[rb] + c64(pc+2))) ||
                   (ic == 4'h8 && !fits(mr[4] - 8)) ||
                   (ic == 4'h9 && !fits(mr[4]))) begin
        mstat = S_ADR; done = 1;
      end else
      case (ic)
        4'h0: begin mstat = S_HLT; done = 1; end
        4'h1: pc += 1;
        4'h2: begin reads[0] = ra; mr[rb] = mr[ra]; pc += 2; end
        4'h3: begin mr[rb] = c64(pc+2); pc += 10; end
        4'h4: begin reads[0] = ra; reads[1] = rb;
                    wr64(mr[rb] + c64(pc+2), mr[ra]); pc += 10; end
        4'h5: begin reads[1] = rb;
                    mr[ra] = rd64(mr[rb] + c64(pc+2)); this_load = ra; pc += 10; end
        4'h6: begin
          word_t a, b, r;
          reads[0] = ra; reads[1] = rb;
          a = mr[ra]; b = mr[rb];
          case (fn)
            4'h0: begin r = b + a; mof = (a[63] == b[63]) && (r[63] != a[63]); end
            4'h1: begin r = b - a; mof = (a[63] != b[63]) && (r[63] != b[63]); end
            4'h2: begin r = b & a; mof = 0; end
            default: begin r = b ^ a; mof = 0; end
          endcase
          mzf = (r == 0); msf = r[63]; mr[rb] = r; pc += 2;
        end
        4'h7: begin
          bit t;
          case (fn)
            4'h0: t = 1;
            4'h1: t = (msf ^ mof) | mzf;
            4'h2: t = msf ^ mof;
            4'h3: t = mzf;
            4'h4: t = !mzf;
            4'h5: t = !(msf ^ mof);
            default: t = !(msf ^ mof) && !mzf;
          endcase
          if (t) begin m_tk++; pc = int'(c64(pc+1)); end
          else   begin m_nt++; pc += 9; end
        end
        4'h8: begin
          reads[1] = 4;
          mr[4] = mr[4] - 8; wr64(mr[4], word_t'(pc + 9)); pc = int'(c64(pc+1));
        end
        4'h9: begin
          reads[0] = 4; reads[1] = 4;
          m_ret++; pc = int'(rd64(mr[4])); mr[4] = mr[4] + 8;
        end
        default: done = 1;
      endcase
      if (last_load != 15 && (reads[0] == last_load || reads[1] == last_load)) m_lu++;
      last_load = this_load;
    end
  endtask

  // ------------------------------------------------------------- runner
  // Data words compared after each run: the data window and the stack top.
  localparam int DBASE = 'h100;
  localparam int STACK = 'h400;

  task automatic run_program(input string name, input bit check_mix);
    int cyc = 0;
    int lu = 0, rw = 0, mp = 0, fe = 0, fm = 0, fw = 0, ret_cnt = 0;
    int expect_cyc;
    model_run();
    // Load under reset.
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < plen + 10 && i < MEMB; i++) begin
      imem_we = 1; imem_waddr = word_t'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    for (int i = 0; i < MEMB; i++) begin
      dmem_dbg_we = 1; dmem_dbg_addr = word_t'(i); dmem_dbg_wdata = dinit[i];
      @(negedge clk);
    end
    dmem_dbg_we = 0;
    @(negedge clk);
    rst = 0;
    forever begin
      @(negedge clk);
      if (halted) break;
      cyc++;
      lu += int'(ev.load_use);  rw += int'(ev.ret_wait); mp += int'(ev.mispredict);
      fe += int'(ev.fwd_e);     fm += int'(ev.fwd_m);    fw += int'(ev.fwd_w);
      ret_cnt += int'(ev.retire);
      if (cyc > 200000) break;
    end
    expect_cyc = m_n + 2 + 2 * m_nt + 3 * m_ret + m_lu;
    check(stat == mstat, $sformatf("%s: status %0d, expected %0d", name, stat, mstat));
    if (stat == S_INS) tot_ins++;
    if (stat == S_ADR) tot_adr++;
    check(cyc == expect_cyc, $sformatf("%s: %0d cycles, expected %0d", name, cyc, expect_cyc));
    check(ret_cnt == m_n - 1, $sformatf("%s: %0d retired, expected %0d", name, ret_cnt, m_n - 1));
    check(mp == m_nt, $sformatf("%s: %0d mispredictions, expected %0d", name, mp, m_nt));
    check(lu == m_lu, $sformatf("%s: %0d load/use stalls, expected %0d", name, lu, m_lu));
    check(rw == 3 * m_ret, $sformatf("%s: %0d ret stall cycles, expected %0d", name, rw, 3 * m_ret));
    for (int r = 0; r < 15; r++) begin
      dbg_reg = regid_t'(r);
      #1;
      check(dbg_reg_val == mr[r], $sformatf("%s: %%r%0d = %h, expected %h", name, r, dbg_reg_val, mr[r]));
    end
    check(cc == '{zf: mzf, sf: msf, of: mof}, $sformatf("%s: condition codes", name));
    for (int a = DBASE; a < DBASE + 'h80; a++) begin
      dmem_dbg_addr = word_t'(a);
      #1;
      check(dmem_dbg_rdata == mm[a], $sformatf("%s: mem[%h] = %h, expected %h", name, a, dmem_dbg_rdata, mm[a]));
    end
    for (int a = STACK - 16; a < STACK; a++) begin
      dmem_dbg_addr = word_t'(a);
      #1;
      check(dmem_dbg_rdata == mm[a], $sformatf("%s: stack[%h]", name, a));
    end
    if (check_mix) begin
      // Cycles per instruction once the pipe is full: (cycles - fill) / N.
      real cpi;
      cpi = real'(cyc - 2) / real'(m_n);
      check(cpi > 1.0899 && cpi < 1.0901, $sformatf("%s: CPI %f, expected 1.09", name, cpi));
      $display("%s: %0d instructions, %0d cycles, CPI %0.3f", name, m_n, cyc, cpi);
    end
    tot_load_use += lu; tot_ret += rw; tot_mispred += mp; tot_taken += m_tk;
    tot_fwd_e += fe; tot_fwd_m += fm; tot_fwd_w += fw;
    $display("%s: N=%0d cycles=%0d nt=%0d taken=%0d ret=%0d lu=%0d fwdE/M/W=%0d/%0d/%0d",
             name, m_n, cyc, m_nt, m_tk, m_ret, m_lu, fe, fm, fw);
  endtask

  task automatic clear_data();
    for (int i = 0; i < MEMB; i++) dinit[i] = 8'h00;
  endtask

  // Register numbers.
  localparam int RAX = 0, RCX = 1, RDX = 2, RBX = 3, RSP = 4, RBP = 5, RSI = 6,
                 RDI = 7, R8 = 8, R9 = 9, R10 = 10, R11 = 11, R12 = 12, R13 = 13, R14 = 14;

  // Random program: forward jumps only, one leaf subroutine after the halt.
  task automatic make_random(input int n);
    int kind [256];
    int tgt  [256];
    int addr [257];
    int sub_addr;
    int a;
    for (int i = 0; i < n; i++) begin
      int p = $urandom_range(99);
      if      (p < 30) kind[i] = 0;   // OPq
      else if (p < 42) kind[i] = 1;   // mrmovq
      else if (p < 52) kind[i] = 2;   // rmmovq
      else if (p < 62) kind[i] = 3;   // irmovq
      else if (p < 70) kind[i] = 4;   // rrmovq
      else if (p < 86) kind[i] = 5;   // jXX
      else if (p < 92) kind[i] = 6;   // call
      else             kind[i] = 7;   // OPq into a loaded register soon after
      tgt[i] = i + 1 + $urandom_range(3);
      if (tgt[i] > n) tgt[i] = n;
    end
    // Addresses: a fixed prologue, then the body, then halt, then the subroutine.
    a = 2 * 10 + 13 * 10;           // %r14, %rsp and 13 data registers
    for (int i = 0; i < n; i++) begin
      addr[i] = a;
      case (kind[i])
        0, 4, 7: a += 2;
        1, 2, 3: a += 10;
        default: a += 9;
      endcase
    end
    addr[n] = a;                    // halt, then padding so that nothing
    sub_addr = a + 5;               // fetched after it reaches decode
    clear_prog();
    a_irmovq(word_t'(DBASE), R14);
    a_irmovq(word_t'(STACK), RSP);
    for (int r = 0; r < 15; r++)
      if (r != RSP && r != R14) a_irmovq({$urandom, $urandom} >> $urandom_range(63), r);
    for (int i = 0; i < n; i++) begin
      int ra = $urandom_range(14), rb = $urandom_range(14);
      int rd = $urandom_range(12);
      if (rd >= RSP) rd++;          // never %rsp or %r14 as destination
      case (kind[i])
        0: a_op($urandom_range(3), ra, rd);
        1: a_mrmovq(word_t'(8 * $urandom_range(15)), R14, rd);
        2: a_rmmovq(ra, word_t'(8 * $urandom_range(15)), R14);
        3: a_irmovq({$urandom, $urandom}, rd);
        4: a_rrmovq(ra, rd);
        5: a_jxx($urandom_range(6), word_t'(addr[tgt[i]]));
        6: a_call(word_t'(sub_addr));
        7: a_op($urandom_range(3), rd, rd);
      endcase
    end
    for (int k = 0; k < 5; k++) a_halt();
    // Subroutine: a load, a dependent add, a store, return.
    a_mrmovq(word_t'(8), R14, RAX);
    a_op(0, RAX, RBX);
    a_rmmovq(RBX, word_t'(16), R14);
    a_ret();
  endtask

  initial begin
    // ---------------- forwarding paths
    clear_data();
    clear_prog();
    a_irmovq(64'd800, R8); a_irmovq(64'd900, R9); a_irmovq(64'd1000, R10);
    a_op(0, R8, R9);        // addq %r8, %r9
    a_op(1, R8, R10);       // subq %r8, %r10
    a_op(3, R8, R9);        // xorq %r8, %r9
    a_op(2, R9, R8);        // andq %r9, %r8
    a_halt();
    run_program("forwarding paths", 0);

    // ---------------- load/use: mrmovq then subq of the loaded register
    clear_data();
    dinit[DBASE] = 8'd42;
    clear_prog();
    a_irmovq(word_t'(DBASE), RAX); a_irmovq(64'd5, RCX);
    a_mrmovq(64'd0, RAX, RBX);
    a_op(1, RBX, RCX);
    a_halt();
    run_program("load/use", 0);

    // ---------------- load then store of the loaded register
    clear_prog();
    a_irmovq(word_t'(DBASE), RAX); a_irmovq(word_t'(DBASE + 8), RCX);
    a_mrmovq(64'd0, RAX, RBX);
    a_rmmovq(RBX, 64'd0, RCX);
    a_halt();
    run_program("load then store", 0);

    // ---------------- jne predicted taken, actually not taken / taken
    for (int t = 0; t < 2; t++) begin
      int label;
      clear_prog();
      a_irmovq(64'd3, R8); a_irmovq(64'd4, R9);
      if (t == 0) a_op(1, R8, R8); else a_op(1, R8, R9);   // subq: ZF=1 / ZF=0
      label = plen + 9 + 2 + 2 + 1;
      a_jxx(4, word_t'(label));                            // jne LABEL
      a_op(3, R10, R11);                                   // xorq %r10, %r11
      a_op(3, R12, R13);                                   // xorq %r12, %r13
      a_halt();
      a_op(0, R8, R9);                                     // LABEL: addq %r8, %r9
      a_rmmovq(R10, 64'd0, R11);
      a_irmovq(64'd1, R11);
      a_halt();
      run_program(t == 0 ? "jne not taken" : "jne taken", 0);
    end

    // ---------------- call / ret
    clear_prog();
    a_irmovq(word_t'(STACK), RSP);
    a_irmovq(64'd7, R8);
    a_call(64'd40);
    a_op(0, R8, R9);        // addq %r8, %r9
    a_halt();
    while (plen < 40) a_halt();
    a_ret();                // empty: ret
    run_program("call/ret", 0);

    // ---------------- dependencies and hazards (1)
    clear_prog();
    a_irmovq(64'd11, RAX); a_irmovq(64'd22, RBX); a_irmovq(64'd33, RCX);
    a_op(0, RAX, RBX); a_op(1, RAX, RCX); a_irmovq(64'd100, RCX);
    a_op(0, RCX, R10); a_op(0, RBX, R10);
    a_halt();
    run_program("dependencies (1)", 0);

    // ---------------- dependencies and hazards (2)
    clear_data();
    dinit[DBASE] = 8'd9; dinit[DBASE + 16] = 8'd3;
    clear_prog();
    a_irmovq(word_t'(DBASE), RAX); a_irmovq(64'd7, RCX); a_irmovq(word_t'(DBASE), RDX);
    a_mrmovq(64'd0, RAX, RBX);
    a_op(0, RBX, RCX);
    a_jxx(4, word_t'(plen + 9));   // jne foo (foo is the next instruction)
    a_op(0, RCX, RDX);             // foo: addq %rcx, %rdx
    a_mrmovq(64'd0, RDX, RCX);
    a_halt();
    run_program("dependencies (2)", 0);

    // ---------------- instruction mix: 3% not-taken, 5% taken, 1% ret
    begin
      int subr;
      clear_data();
      clear_prog();
      a_irmovq(word_t'(STACK), RSP);
      a_op(3, RAX, RAX);                  // ZF = 1
      // 300 instructions executed: 9 not-taken jne, 15 taken je, 3 ret,
      // 273 others (prologue, calls, rrmovq, halt); 2-byte moves keep the
      // program inside the 1 KiB instruction memory.
      for (int blk = 0; blk < 3; blk++) begin
        for (int k = 0; k < 3; k++) a_jxx(4, 64'd0);                  // jne: not taken
        for (int k = 0; k < 5; k++) a_jxx(3, word_t'(plen + 9));      // je: taken
        a_call(64'd0);                                                // patched below
        for (int k = 0; k < 88; k++) a_rrmovq(k % 4 + 5, (k + 1) % 4 + 5);
      end
      for (int k = 0; k < 3; k++) a_rrmovq(R8, R9);
      for (int k = 0; k < 5; k++) a_halt();
      subr = plen;
      a_ret();
      // Patch the three call targets.
      for (int i = 0; i + 9 <= subr; i++)
        if (prog[i] == 8'h80 && c64(i + 1) == 0) begin
          for (int k = 0; k < 8; k++) prog[i + 1 + k] = 8'(subr >> (8 * k));
        end
      run_program("instruction mix", 1);
    end

    // ---------------- status: invalid instruction stops the program
    clear_data();
    clear_prog();
    a_irmovq(64'd5, RAX); a_irmovq(64'd6, RBX);
    a_op(0, RAX, RBX);
    b8(8'hC0);                       // not an instruction of this core
    a_irmovq(64'd99, RCX);           // must not take effect
    a_op(1, RAX, RAX);               // must not change the condition codes
    for (int k = 0; k < 5; k++) a_halt();
    run_program("invalid instruction", 0);

    // ---------------- status: load and store outside data memory
    for (int t = 0; t < 2; t++) begin
      clear_prog();
      a_irmovq(64'h2000, RDX); a_irmovq(64'd7, RAX);
      if (t == 0) a_mrmovq(64'd0, RDX, RBX); else a_rmmovq(RAX, 64'd0, RDX);
      a_irmovq(64'd99, RCX);
      a_op(1, RAX, RAX);
      for (int k = 0; k < 5; k++) a_halt();
      run_program(t == 0 ? "load address error" : "store address error", 0);
    end

    // ---------------- random programs
    for (int t = 0; t < 200; t++) begin
      clear_data();
      for (int i = DBASE; i < DBASE + 'h80; i++) dinit[i] = 8'($urandom);
      make_random(30 + $urandom_range(60));
      run_program($sformatf("random %0d", t), 0);
    end

    // Every mechanism must have been exercised.
    check(tot_load_use > 0, "no load/use stall happened");
    check(tot_ret > 0,      "no ret stall happened");
    check(tot_mispred > 0,  "no misprediction happened");
    check(tot_taken > 0,    "no correctly predicted jump happened");
    check(tot_fwd_e > 0,    "no forwarding from execute happened");
    check(tot_fwd_m > 0,    "no forwarding from memory happened");
    check(tot_fwd_w > 0,    "no forwarding from writeback happened");
    check(tot_ins > 0,      "no invalid-instruction stop happened");
    check(tot_adr > 0,      "no address-error stop happened");
    $display("totals: load/use %0d, ret-stall cycles %0d, mispredicts %0d, taken %0d, fwd E/M/W %0d/%0d/%0d",
             tot_load_use, tot_ret, tot_mispred, tot_taken, tot_fwd_e, tot_fwd_m, tot_fwd_w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
