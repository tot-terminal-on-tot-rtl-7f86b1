// tb_tot_top: end-to-end test of the whole machine at its default parameters.
//
// The DRAM behind the memory controller is the behavioural model
// mig_dram_model (20-cycle reads, random ready stalls) on its own 81 MHz clock;
// the processor runs at 50 MHz. Scenarios:
//   1. random programs (ALU, shifts, LUI, loads/stores over a region that
//      collides in the data cache, forward branches and JAL, code larger than the
//      instruction cache) run from address 4 until HLT; the final registers and
//      memory (cache contents merged over DRAM) are compared with an
//      instruction-level reference model written here;
//   2. a loop (backward branch, JALR call/return) summing an array;
//   3. MMIO: cache bypass on, stores reach DRAM directly, bypass off;
//   4. exceptions: illegal opcode, illegal memory access, interrupt: epc, exc
//      cause and the jump to the trap address (which holds HLT);
//   5. boot: reset into the ROM loader, a program sent over the UART line at
//      2,000,000 baud, loaded into DRAM, started and run to HLT;
//   6. the programming port writing and reading DRAM while progMode is high.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_tot_top;
  import tot_pkg::*;

  logic clk = 0, dram_clk = 0, rst = 1, dram_rst = 1;
  logic [31:0] init_pc = 32'h4;
  logic ext_irq = 0, uart_txd_in = 1;
  logic halted, cache_bypass;
  logic [31:0] epc, exc;
  logic [2:0] exc_cause;
  logic prog_mode = 0, prog_req = 0, prog_we = 0, prog_done;
  logic [31:0] prog_addr = 0, prog_wdata = 0, prog_rdata;
  logic [26:0] app_addr;
  logic [2:0] app_cmd;
  logic app_en, app_wdf_end, app_wdf_wren, app_rdy, app_wdf_rdy, app_rd_data_valid;
  logic [127:0] app_wdf_data, app_rd_data;
  logic [15:0] app_wdf_mask;

  tot_top dut (.*);
  mig_dram_model #(.READ_LATENCY(20)) u_mem (.clk(dram_clk), .app_addr, .app_cmd, .app_en, .app_wdf_data,
                                             .app_wdf_end, .app_wdf_wren, .app_wdf_mask, .app_rdy,
                                             .app_wdf_rdy, .app_rd_data, .app_rd_data_valid);

  always #10 clk = ~clk;          // 50 MHz
  always #6.15 dram_clk = ~dram_clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #300ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_hazard = 0, n_memstall = 0, n_imiss = 0, n_dhit = 0, n_wback = 0, n_fill = 0, n_bypass = 0;
  int n_jump = 0, n_both = 0, n_exc_op = 0, n_exc_mem = 0, n_exc_irq = 0, n_halt = 0;
  int n_mmio_wr = 0, n_uart_words = 0, n_prog = 0;
  logic prev_busy = 0, prev_halt = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.hazardStall) n_hazard++;
    if (dut.memStall) n_memstall++;
    if (dut.u_icache.busy && !prev_busy) n_imiss++;
    prev_busy = dut.u_icache.busy;
    if (dut.u_dcache.state == 3'd1 && dut.u_dcache.hit && dut.dc_done) n_dhit++;
    if (dut.u_dcache.state == 3'd2 && dut.memReqDone) n_wback++;
    if (dut.u_dcache.state == 3'd3 && dut.memReqDone) n_fill++;
    if (dut.u_dcache.state == 3'd4 && dut.memReqDone) n_bypass++;
    if (dut.jump) n_jump++;
    if (dut.dcReq && dut.icReq) n_both++;
    if (dut.wbExc == EXC_ILLEGAL_OP) n_exc_op++;
    if (dut.wbExc == EXC_ILLEGAL_MEM) n_exc_mem++;
    if (dut.wbExc == EXC_INTERRUPT) n_exc_irq++;
    if (halted && !prev_halt) n_halt++;
    prev_halt = halted;
    if (dut.mmio_write) n_mmio_wr++;
    if (dut.dev_valid) n_uart_words++;
    if (prog_done) n_prog++;
  end

  // ------------------------------------------------------------ reference model
  logic [31:0] ref_regs [32];
  logic [31:0] ref_mem  [logic [31:0]];   // word-aligned byte address -> word
  logic [31:0] image    [logic [31:0]];   // program image

  function automatic logic [31:0] rd_mem(logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : 32'h0;
  endfunction

  // runs the image from pc until HLT (or a step limit); returns the HLT address
  function automatic logic [31:0] iss_run(logic [31:0] pc, int limit);
    foreach (ref_regs[i]) ref_regs[i] = 0;
    for (int s = 0; s < limit; s++) begin
      logic [31:0] w = image.exists(pc) ? image[pc] : rd_mem(pc);
      logic [5:0]  op = w[31:26];
      logic [4:0]  v1 = w[25:21], v2 = w[20:16];
      logic [31:0] sx = {{16{w[15]}}, w[15:0]};
      logic [31:0] a = ref_regs[v1], b = ref_regs[v2], c = ref_regs[w[4:0]];
      logic [31:0] npc = pc + 4, res = 0;
      logic        wr = 1;
      case (op)
        6'h00: wr = 0;
        6'h3F: return pc;
        6'h01: begin ref_mem[b + sx] = a; wr = 0; end
        6'h02: res = rd_mem(b + sx);
        6'h03: res = b + c;
        6'h04: res = b - c;
        6'h05: res = b & c;
        6'h06: res = b | c;
        6'h07: res = b ^ c;
        6'h08: res = b >> c[4:0];
        6'h09: res = $unsigned($signed(b) >>> c[4:0]);
        6'h0A: res = b << c[4:0];
        6'h0B: res = {w[15:0], 16'h0};
        6'h0C: res = b + sx;
        6'h0D: res = b - sx;
        6'h0E: res = b >> sx[4:0];
        6'h0F: res = $unsigned($signed(b) >>> sx[4:0]);
        6'h10: res = b << sx[4:0];
        6'h11: begin res = pc + 4; npc = pc + sx; end
        6'h12: begin res = pc + 4; npc = b + sx; end
        6'h13: begin wr = 0; if (a >= b) npc = pc + sx; end
        6'h14: begin wr = 0; if (a <  b) npc = pc + sx; end
        6'h15: begin wr = 0; if ($signed(a) >= $signed(b)) npc = pc + sx; end
        6'h16: begin wr = 0; if ($signed(a) <  $signed(b)) npc = pc + sx; end
        6'h17: begin wr = 0; if (a == b) npc = pc + sx; end
        default: wr = 0;
      endcase
      if (wr && v1 != 0) ref_regs[v1] = res;
      pc = npc;
    end
    return 32'hFFFF_FFFF;
  endfunction

  // ------------------------------------------------------------ machine helpers
  function automatic logic [31:0] sys_word(logic [31:0] a);
    logic [8:0] idx = a[10:2];
    if (dut.u_dcache.valid[idx] && dut.u_dcache.tag_mem[idx] == a[31:11]) return dut.u_dcache.data_mem[idx];
    return u_mem.read_word(a);
  endfunction

  task automatic load_image();
    foreach (image[a]) u_mem.write_word(a, image[a]);
  endtask

  task automatic reset_machine(logic [31:0] pc0);
    init_pc = pc0;
    rst = 1; dram_rst = 1;
    repeat (4) @(posedge clk);
    @(posedge dram_clk); #1 dram_rst = 0;
    @(posedge clk); #1 rst = 0;
  endtask

  // wait for HLT and for the data cache to go idle; returns cycles taken
  task automatic run_to_halt(int max_cycles, output longint took);
    longint t0 = cycles;
    while (!(halted && dut.u_dcache.state == 3'd0) && cycles - t0 < max_cycles) @(posedge clk);
    repeat (10) @(posedge clk);
    took = cycles - t0;
  endtask

  function automatic void emit(ref logic [31:0] pc, input logic [31:0] w);
    image[pc] = w;
    pc += 4;
  endfunction

  // ------------------------------------------------------------ random program
  localparam logic [31:0 ] DATA_BASE = 32'h0000_1000;

  task automatic random_program(int n);
    logic [31:0] pc = 32'h4;
    image.delete();
    ref_mem.delete();
    u_mem.mem.delete();
    // data region: 0x1000..0x2FFF (four tags per cache index)
    for (int i = 0; i < 64; i++) begin
      automatic logic [31:0] a = DATA_BASE + 32'($urandom_range(0, 2047) * 4);
      automatic logic [31:0] d = $urandom;
      ref_mem[a] = d;
      u_mem.write_word(a, d);
    end
    emit(pc, encode(OP_LUI, 5'd1, 5'd0, 16'h0000));
    emit(pc, encode(OP_ADDI, 5'd1, 5'd1, 16'h1000));       // r1 = data base
    for (int r = 2; r < 16; r++) emit(pc, encode(OP_ADDI, 5'(r), 5'd0, 16'($urandom)));
    for (int i = 0; i < n; i++) begin
      automatic int kind = $urandom_range(0, 99);
      automatic logic [4:0] rd = 5'($urandom_range(2, 15)), ra = 5'($urandom_range(0, 15)), rb = 5'($urandom_range(0, 15));
      // 16 cache indexes x 4 tags: frequent hits, conflicts and write-backs
      automatic logic [15:0] off = 16'($urandom_range(0, 3) * 32'h800 + $urandom_range(0, 15) * 4);
      if (kind < 30) begin
        automatic opcode_e o = opcode_e'($urandom_range(3, 10));
        emit(pc, encode(o, rd, ra, {11'd0, rb}));
      end else if (kind < 45) begin
        automatic opcode_e o = opcode_e'($urandom_range(11, 16));
        emit(pc, encode(o, rd, ra, (o >= OP_SRLI && o <= OP_SLI) ? 16'($urandom_range(0, 31)) : 16'($urandom)));
      end else if (kind < 62) emit(pc, encode(OP_LD, rd, 5'd1, off));
      else if (kind < 80) emit(pc, encode(OP_ST, ra, 5'd1, off));
      else if (kind < 95) begin
        automatic opcode_e o = opcode_e'($urandom_range(19, 23));
        automatic int skip = $urandom_range(1, 4);
        if (i + skip >= n) skip = 1;
        emit(pc, encode(o, ra, rb, 16'(4 * skip)));
      end else begin
        automatic int skip = $urandom_range(1, 3);
        emit(pc, encode(OP_JAL, rd, 5'd0, 16'(4 * skip)));
      end
    end
    emit(pc, encode(OP_NOP, 5'd0, 5'd0, 16'd0));
    emit(pc, encode(OP_NOP, 5'd0, 5'd0, 16'd0));
    emit(pc, encode(OP_NOP, 5'd0, 5'd0, 16'd0));
    emit(pc, encode(OP_HLT, 5'd0, 5'd0, 16'd0));
  endtask

  task automatic compare_state(string name, logic [31:0] region_lo, logic [31:0] region_hi);
    int bad = 0;
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (dut.u_regfile.regs[r] !== ref_regs[r] && r != 0) begin
        bad++; failures++;
        if (bad < 5) $display("FAIL %s r%0d = %h, expected %h", name, r, dut.u_regfile.regs[r], ref_regs[r]);
      end
    end
    for (logic [31:0] a = region_lo; a < region_hi; a += 4) begin
      if (sys_word(a) !== rd_mem(a)) begin
        bad++; failures++;
        if (bad < 8) $display("FAIL %s mem[%h] = %h, expected %h", name, a, sys_word(a), rd_mem(a));
      end
    end
    checks++;
  endtask

  // ------------------------------------------------------------ UART sender
  task automatic uart_byte(logic [7:0] b);
    uart_txd_in = 0; #500ns;
    for (int i = 0; i < 8; i++) begin uart_txd_in = b[i]; #500ns; end
    uart_txd_in = 1; #500ns;
  endtask
  task automatic uart_word(logic [31:0] w);
    for (int k = 0; k < 4; k++) uart_byte(w[8*k +: 8]);
    #2us;
  endtask

  // ------------------------------------------------------------ scenarios
  initial begin
    longint took;
    logic [31:0] hlt_pc;
    repeat (3) @(posedge clk);

    // 1. random programs
    for (int p = 0; p < 12; p++) begin
      random_program(120);
      hlt_pc = iss_run(32'h4, 100000);
      load_image();
      reset_machine(32'h4);
      run_to_halt(200000, took);
      chk(halted && dut.pcReg == hlt_pc, $sformatf("program %0d halts at %h (pc %h)", p, hlt_pc, dut.pcReg));
      compare_state($sformatf("program %0d", p), DATA_BASE, DATA_BASE + 32'h2000);
    end
    $display("random programs done at cycle %0d", cycles);

    // 2. loop with call/return: sum of 40 words
    begin
      logic [31:0] pc = 32'h4;
      image.delete(); ref_mem.delete(); u_mem.mem.delete();
      for (int i = 0; i < 40; i++) begin ref_mem[32'h3000 + 4*i] = i * 3 + 1; u_mem.write_word(32'h3000 + 4*i, i * 3 + 1); end
      emit(pc, encode(OP_ADDI, 5'd1, 5'd0, 16'h3000));   // 0x04 r1 = pointer
      emit(pc, encode(OP_ADDI, 5'd2, 5'd0, 16'd40));     // 0x08 r2 = count
      emit(pc, encode(OP_ADDI, 5'd3, 5'd0, 16'd0));      // 0x0C r3 = sum
      emit(pc, encode(OP_LD,   5'd4, 5'd1, 16'd0));      // 0x10 loop: r4 = *r1
      emit(pc, encode(OP_JAL,  5'd31, 5'd0, 16'h0020));  // 0x14 call add at 0x34
      emit(pc, encode(OP_ADDI, 5'd1, 5'd1, 16'd4));      // 0x18
      emit(pc, encode(OP_SUBI, 5'd2, 5'd2, 16'd1));      // 0x1C
      emit(pc, encode(OP_BLT,  5'd0, 5'd2, 16'hFFF0));   // 0x20 if 0 < r2 goto 0x10
      emit(pc, encode(OP_ST,   5'd3, 5'd0, 16'h3100));   // 0x24 mem[0x3100] = sum
      emit(pc, encode(OP_HLT,  5'd0, 5'd0, 16'd0));      // 0x28
      emit(pc, encode(OP_NOP,  5'd0, 5'd0, 16'd0));      // 0x2C
      emit(pc, encode(OP_NOP,  5'd0, 5'd0, 16'd0));      // 0x30
      emit(pc, encode(OP_ADD,  5'd3, 5'd3, 16'd4));      // 0x34 add: r3 += r4
      emit(pc, encode(OP_JALR, 5'd0, 5'd31, 16'd0));     // 0x38 return
      hlt_pc = iss_run(32'h4, 10000);
      load_image();
      reset_machine(32'h4);
      run_to_halt(100000, took);
      chk(sys_word(32'h3100) == 32'd2380 && ref_mem[32'h3100] == 32'd2380, "loop sum = 2380");
      compare_state("loop", 32'h3000, 32'h3200);
      $display("loop of 40 iterations took %0d cycles", took);
    end

    // 3. MMIO cache bypass
    begin
      logic [31:0] pc = 32'h4;
      image.delete(); ref_mem.delete();
      emit(pc, encode(OP_LUI,  5'd1, 5'd0, 16'h0100));   // r1 = MMIO base
      emit(pc, encode(OP_ADDI, 5'd2, 5'd0, 16'd1));
      emit(pc, encode(OP_ST,   5'd2, 5'd1, 16'd8));      // bypass on
      emit(pc, encode(OP_ADDI, 5'd3, 5'd0, 16'h0777));
      emit(pc, encode(OP_ST,   5'd3, 5'd0, 16'h0400));   // straight to DRAM
      emit(pc, encode(OP_LD,   5'd5, 5'd1, 16'd8));      // r5 = bypass register
      emit(pc, encode(OP_ST,   5'd0, 5'd1, 16'd8));      // bypass off
      emit(pc, encode(OP_ST,   5'd3, 5'd0, 16'h0500));   // cached store
      emit(pc, encode(OP_LD,   5'd6, 5'd0, 16'h0400));
      emit(pc, encode(OP_HLT,  5'd0, 5'd0, 16'd0));
      load_image();
      reset_machine(32'h4);
      run_to_halt(20000, took);
      chk(u_mem.read_word(32'h400) == 32'h777, "bypassed store in DRAM");
      chk(u_mem.read_word(32'h500) == 32'h0 && sys_word(32'h500) == 32'h777, "normal store stays in cache");
      chk(dut.u_regfile.regs[5] == 1 && dut.u_regfile.regs[6] == 32'h777 && !cache_bypass, "MMIO read back, bypass off");
    end

    // 4. exceptions: trap address 0 holds HLT
    begin
      logic [31:0] pc = 32'h4;
      image.delete();
      image[32'h0] = encode(OP_HLT, 5'd0, 5'd0, 16'd0);
      emit(pc, encode(OP_ADDI, 5'd1, 5'd0, 16'd5));      // 0x04
      emit(pc, 32'hFC00_0000 ^ 32'h0400_0000);           // 0x08 opcode 0x3E: illegal
      emit(pc, encode(OP_ADDI, 5'd2, 5'd0, 16'd9));      // 0x0C must not execute
      emit(pc, encode(OP_HLT,  5'd0, 5'd0, 16'd0));
      load_image();
      reset_machine(32'h4);
      run_to_halt(20000, took);
      chk(exc_cause == 3'(EXC_ILLEGAL_OP) && epc == 32'h8 && dut.pcReg == 32'h0, "illegal opcode trap");
      chk(dut.u_regfile.regs[1] == 5 && dut.u_regfile.regs[2] == 0, "precise: older done, younger squashed");
      chk(exc == 32'h0000_0100 + 32'(1 * 64), "handler address for illegal opcode");

      pc = 32'h4; image.delete();
      image[32'h0] = encode(OP_HLT, 5'd0, 5'd0, 16'd0);
      emit(pc, encode(OP_LUI, 5'd1, 5'd0, 16'h1000));
      emit(pc, encode(OP_LD,  5'd2, 5'd1, 16'd0));       // 0x08 load from ROM space: illegal
      emit(pc, encode(OP_HLT, 5'd0, 5'd0, 16'd0));
      load_image();
      reset_machine(32'h4);
      run_to_halt(20000, took);
      chk(exc_cause == 3'(EXC_ILLEGAL_MEM) && epc == 32'h8, "illegal memory access trap");

      pc = 32'h4; image.delete();
      image[32'h0] = encode(OP_HLT, 5'd0, 5'd0, 16'd0);
      emit(pc, encode(OP_ADDI, 5'd1, 5'd1, 16'd1));      // 0x04 spin
      emit(pc, encode(OP_JAL,  5'd0, 5'd0, 16'hFFFC));   // 0x08
      load_image();
      reset_machine(32'h4);
      repeat (300) @(posedge clk);
      #1 ext_irq = 1; @(posedge clk); #1 ext_irq = 0;
      run_to_halt(20000, took);
      chk(exc_cause == 3'(EXC_INTERRUPT) && (epc == 32'h4 || epc == 32'h8) && dut.pcReg == 0, "interrupt trap");
      chk(dut.u_regfile.regs[1] > 10, "spin loop ran before the interrupt");
    end

    // 5. boot over UART
    begin
      logic [31:0] prog [6];
      prog[0] = encode(OP_ADDI, 5'd10, 5'd0, 16'd21);
      prog[1] = encode(OP_ADDI, 5'd11, 5'd0, 16'd2);
      prog[2] = encode(OP_SL,   5'd12, 5'd10, 16'd11);    // 84
      prog[3] = encode(OP_ST,   5'd12, 5'd0, 16'h0600);
      prog[4] = encode(OP_LD,   5'd13, 5'd0, 16'h0600);
      prog[5] = encode(OP_HLT,  5'd0, 5'd0, 16'd0);
      // clear the target area so only the loader can put the program there
      for (int i = 0; i < 8; i++) u_mem.write_word(32'h200 + 4*i, 32'h0);
      reset_machine(ROM_BASE);
      repeat (50) @(posedge clk);
      uart_word(32'h0000_0200);                          // start address
      for (int i = 0; i < 6; i++) begin
        uart_word(32'h200 + 4*i);
        uart_word(prog[i]);
      end
      uart_word(32'hFFFF_FFFF);
      run_to_halt(100000, took);
      for (int i = 0; i < 6; i++) chk(u_mem.read_word(32'h200 + 4*i) == prog[i], $sformatf("loaded word %0d", i));
      chk(dut.u_mmio.regs[1] == 32'd2, "UART_fresh = 2 after loading");
      chk(halted && dut.pcReg == 32'h214, "loaded program ran to its HLT");
      chk(dut.u_regfile.regs[12] == 84 && dut.u_regfile.regs[13] == 84, "loaded program results");
      chk(dut.u_regfile.regs[2] == 32'h00FF_FFFC, "stack pointer set by loader");
    end

    // 6. programming port
    begin
      prog_mode = 1;
      for (int i = 0; i < 4; i++) begin
        @(posedge clk); #1 prog_req = 1; prog_we = 1; prog_addr = 32'h700 + 4*i; prog_wdata = 32'hB000 + i;
        @(posedge clk); while (!prog_done) @(posedge clk);
        #1 prog_req = 0;
      end
      @(posedge clk); #1 prog_req = 1; prog_we = 0; prog_addr = 32'h708;
      @(posedge clk); while (!prog_done) @(posedge clk);
      chk(prog_rdata == 32'hB002, "programming port read");
      #1 prog_req = 0; prog_mode = 0;
      chk(u_mem.read_word(32'h70C) == 32'hB003, "programming port write");
    end

    // mechanisms
    $display("hazard stall cycles=%0d memory stall cycles=%0d icache misses=%0d dcache hits=%0d",
             n_hazard, n_memstall, n_imiss, n_dhit);
    $display("write-backs=%0d fills=%0d bypassed stores=%0d jumps/flushes=%0d cycles with both caches waiting on DRAM=%0d",
             n_wback, n_fill, n_bypass, n_jump, n_both);
    $display("exceptions: opcode=%0d memory=%0d interrupt=%0d; halts=%0d mmio writes=%0d uart words=%0d prog accesses=%0d",
             n_exc_op, n_exc_mem, n_exc_irq, n_halt, n_mmio_wr, n_uart_words, n_prog);
    chk(n_hazard > 0, "hazard stall happened");
    chk(n_memstall > 0, "memory stall happened");
    chk(n_imiss > 0, "instruction-cache miss happened");
    chk(n_dhit > 0, "data-cache hit happened");
    chk(n_wback > 0, "dirty write-back happened");
    chk(n_fill > 0, "data-cache fill happened");
    chk(n_bypass > 0, "bypassed store happened");
    chk(n_jump > 0, "jump/flush happened");
    chk(n_both > 0, "both caches contended for DRAM");
    chk(n_exc_op > 0 && n_exc_mem > 0 && n_exc_irq > 0, "all three exception sources happened");
    chk(n_halt > 0, "HLT happened");
    chk(n_mmio_wr > 0 && n_uart_words > 0, "MMIO and UART traffic happened");
    chk(n_prog > 0, "programming port used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
