// tot_top: the complete TOT machine.
//
// A five-stage in-order processor (Fetch, Decode, Execute, Memory, Writeback)
// for a 32-bit RISC-V-like instruction set, in a modified Harvard arrangement:
// a direct-mapped instruction cache (64 lines, distributed RAM) and a
// direct-mapped write-back data cache (512 lines, block RAM) share one DRAM.
//   - Hazards: reg_conflict stalls Fetch/Decode while a source register is still
//     to be written by Execute, Memory or Writeback (no forwarding).
//   - Control transfer: jumps, taken branches and exceptions commit in Writeback,
//     which flushes Decode, Execute and Memory and redirects Fetch.
//   - Memory stalls: while the data cache works the whole pipeline holds; an
//     instruction-cache miss only feeds NOPs into Decode.
//   - Memory map: DRAM below 0x0100_0000, four MMIO registers at 0x0100_0000
//     (UART_data, UART_fresh, cacheBypass, cacheBypass_fresh), boot ROM from
//     0x1000_0000 (fetch only).
//   - DRAM path: dram_req_handler (data cache before instruction cache; a
//     programming port owns DRAM while prog_mode is high) -> cdc_bridge into the
//     DRAM clock domain -> dram_interface -> memory controller user interface
//     (app_* ports, the controller and the DRAM chip are outside this design) ->
//     cdc_bridge back.
//   - UART: device_handler assembles received bytes into words and writes them to
//     UART_data, setting UART_fresh.
// Clocks: clk is the processor clock (50 MHz), dram_clk the controller's user
// interface clock; rst and dram_rst are synchronous, active high, one per domain.
// init_pc is the reset PC (4 for a program already in DRAM, 0x1000_0000 to run
// the boot loader). ext_irq requests an interrupt: a one-cycle pulse is
// latched in Fetch, rides on the next fetched slot and stays pending until
// Writeback commits it.
// halted is high once HLT has been fetched and every older instruction has left
// the pipeline. epc/exc/exc_cause show the last exception committed.
// The programming port (prog_*) reads and writes DRAM words while prog_mode is
// high; prog_req is held until prog_done pulses.
//
// Lint notes: dePC, memPC and deExc (PC and exception pipes), mem_passing
// (Memory stage), dev_readback (MMIO device read port) and exc_taken (Writeback)
// are outputs of the blocks that nothing in the top reads, and only some fields
// of the stage bundles are read here; those unused-signal warnings stand.
// Constant outputs: app_wdf_data bits 127:32, app_wdf_mask and the upper app_cmd
// bits are fixed by the one-word DRAM access scheme.
module tot_top
  import tot_pkg::*;
#(
  parameter int          CLKS_PER_BIT = 25,
  parameter int          ICACHE_LINES = 64,
  parameter int          DCACHE_INDEX = 9,
  parameter logic [31:0] TRAP_ADDR    = 32'h0000_0000,
  parameter logic [31:0] HANDLER_BASE = 32'h0000_0100
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [31:0]  init_pc,
  input  logic         ext_irq,
  input  logic         uart_txd_in,
  output logic         halted,
  output logic [31:0]  epc,
  output logic [31:0]  exc,
  output logic [2:0]   exc_cause,
  output logic         cache_bypass,
  // programming port (processor clock domain)
  input  logic         prog_mode,
  input  logic         prog_req,
  input  logic         prog_we,
  input  logic [31:0]  prog_addr,
  input  logic [31:0]  prog_wdata,
  output logic         prog_done,
  output logic [31:0]  prog_rdata,
  // memory controller user interface (DRAM clock domain)
  input  logic         dram_clk,
  input  logic         dram_rst,
  output logic [26:0]  app_addr,
  output logic [2:0]   app_cmd,
  output logic         app_en,
  output logic [127:0] app_wdf_data,
  output logic         app_wdf_end,
  output logic         app_wdf_wren,
  output logic [15:0]  app_wdf_mask,
  input  logic         app_rdy,
  input  logic         app_wdf_rdy,
  input  logic [127:0] app_rd_data,
  input  logic         app_rd_data_valid
);

  // ------------------------------------------------------------ pipeline control
  logic        jump, hazardStall, memStall;
  logic [31:0] nextPC;

  // ------------------------------------------------------------ Fetch
  logic [31:0] pcReg, f_inst, ic_inst, rom_addr, rom_data;
  logic        f_valid, ic_lookup, ic_hit, irq_taken, fetch_halted;
  exc_e        fetchExc;

  logic        icReq, fetchReqDone, memReqDone;
  logic [31:0] icAddr, dram_rdata;

  fetch u_fetch (
    .clk, .rst,
    .initPC      (init_pc),
    .jump, .nextPC, .hazardStall, .memStall,
    .ext_irq, .irq_taken,
    .pcReg,
    .inst        (f_inst),
    .validInst   (f_valid),
    .fetchExc,
    .halted      (fetch_halted),
    .ic_lookup, .ic_hit, .ic_inst,
    .rom_addr, .rom_data
  );

  inst_cache #(.LINES(ICACHE_LINES)) u_icache (
    .clk, .rst,
    .lookup       (ic_lookup),
    .pcReg,
    .hit          (ic_hit),
    .fetched_inst (ic_inst),
    .fetchReq     (icReq),
    .fetchAddr    (icAddr),
    .fetchReqDone,
    .dram_data    (dram_rdata)
  );

  boot_rom u_rom (.addr(rom_addr), .data(rom_data));

  // ------------------------------------------------------------ Decode + register file
  logic [4:0]  rs1, rs2;
  logic [31:0] rs1Val, rs2Val;
  logic        d_valid, rs1_used, rs2_used, d_illegal;
  dinst_t      dInst;

  logic        rf_we;
  logic [4:0]  rf_rd;
  logic [31:0] rf_data;

  decode u_decode (
    .clk, .rst,
    .flush       (jump),
    .hazardStall, .memStall,
    .inst        (f_inst),
    .validInst   (f_valid),
    .rs1, .rs2, .rs1Val, .rs2Val,
    .cur_valid   (d_valid),
    .rs1_used, .rs2_used,
    .dInst,
    .illegal     (d_illegal)
  );

  regfile u_regfile (
    .clk, .rst,
    .rs1, .rs2, .rs1Val, .rs2Val,
    .wbEnable (rf_we),
    .rd       (rf_rd),
    .wbData   (rf_data)
  );

  // ------------------------------------------------------------ Execute
  logic [31:0] dePC, exPC, memPC, wbPC;
  dinst_t      ex_cur;
  mem_req_t    potentialMemReq;

  execute u_execute (
    .clk, .rst,
    .flush (jump),
    .memStall,
    .dInst, .exPC,
    .cur   (ex_cur),
    .potentialMemReq
  );

  // ------------------------------------------------------------ Memory
  mem_req_t    mem_cur;
  wb_cmd_t     wbCommands, wb_cur;
  logic        mem_illegal, mem_passing;
  logic        dc_memReq, dc_we, dc_done;
  logic [31:0] dc_addr, dc_dataIn, dc_dataOut;
  logic [1:0]  mmio_id;
  logic        mmio_write;
  logic [31:0] mmio_wdata, mmio_rdata;

  memory_stage u_memory (
    .clk, .rst,
    .flush          (jump),
    .potentialMemReq,
    .cur            (mem_cur),
    .memStall,
    .illegal        (mem_illegal),
    .passing        (mem_passing),
    .wbCommands,
    .dc_memReq,
    .dc_writeEnable (dc_we),
    .dc_addr, .dc_dataIn, .dc_dataOut, .dc_done,
    .mmio_id, .mmio_write,
    .mmio_data_in   (mmio_wdata),
    .mmio_data_out  (mmio_rdata)
  );

  logic        dcReq, dcWe;
  logic [31:0] dcAddr, dcWdata;

  data_cache #(.INDEX_BITS(DCACHE_INDEX)) u_dcache (
    .clk, .rst,
    .memReq      (dc_memReq),
    .writeEnable (dc_we),
    .addr        (dc_addr),
    .dataIn      (dc_dataIn),
    .cacheBypass (cache_bypass),
    .dataOut     (dc_dataOut),
    .done        (dc_done),
    .dram_req    (dcReq),
    .dram_we     (dcWe),
    .dram_addr   (dcAddr),
    .dram_wdata  (dcWdata),
    .dram_done   (memReqDone),
    .dram_rdata  (dram_rdata)
  );

  logic        dev_id, dev_valid;
  logic [31:0] dev_word, dev_readback;

  mmio u_mmio (
    .clk, .rst,
    .proc_MMIO_id    (mmio_id),
    .proc_write      (mmio_write),
    .proc_data_in    (mmio_wdata),
    .proc_data_out   (mmio_rdata),
    .device_MMIO_id  (dev_id),
    .device_write    (dev_valid),
    .device_data_in  (dev_word),
    .device_data_out (dev_readback),
    .cacheBypass     (cache_bypass)
  );

  // ------------------------------------------------------------ Writeback
  exc_e deExc, wbExc, cause;

  writeback #(.TRAP_ADDR(TRAP_ADDR), .HANDLER_BASE(HANDLER_BASE)) u_writeback (
    .clk, .rst,
    .wbCommands, .wbExc, .wbPC,
    .cur       (wb_cur),
    .rf_we, .rf_rd, .rf_data,
    .jump, .nextPC,
    .epc, .exc,
    .exc_cause (cause),
    .exc_taken ()
  );
  assign exc_cause = cause;
  assign irq_taken = (wbExc == EXC_INTERRUPT);

  // ------------------------------------------------------------ PC and exception pipes
  pc_pipe u_pcpipe (
    .clk, .rst, .pcReg, .hazardStall, .memStall,
    .dePC, .exPC, .memPC, .wbPC
  );

  exception_pipe u_excpipe (
    .clk, .rst, .jump, .hazardStall, .memStall,
    .fetchExc,
    .decodeIllegal (d_illegal),
    .memIllegal    (mem_illegal),
    .deExc, .wbExc
  );

  // Fetch stops at a HLT, but that HLT may still be on a path an older jump will
  // flush: the machine counts as halted only once no older instruction is left.
  assign halted = fetch_halted && !d_valid && !ex_cur.valid && !mem_cur.valid &&
                  !wb_cur.jump && !memStall && wbExc == EXC_NONE;

  // ------------------------------------------------------------ hazard unit
  reg_conflict u_conflict (
    .valid        (d_valid),
    .rs1, .rs1_used, .rs2, .rs2_used,
    .rd_EX        (ex_cur.rd),
    .wbEnable_EX  (ex_cur.valid && ex_cur.wbEnable),
    .rd_MEM       (mem_cur.rd),
    .wbEnable_MEM (mem_cur.valid && mem_cur.wbEnable),
    .rd_WB        (wb_cur.rd),
    .wbEnable_WB  (wb_cur.wbEnable),
    .hazardStall
  );

  // ------------------------------------------------------------ DRAM request path
  logic        p_send, p_we, p_done;
  logic [31:0] p_addr, p_wdata;

  dram_req_handler u_reqh (
    .clk, .rst,
    .dataCacheReq   (dcReq),
    .dataCacheWe    (dcWe),
    .dataCacheAddr  (dcAddr),
    .dataCacheWdata (dcWdata),
    .memReqDone,
    .instCacheReq   (icReq),
    .instCacheAddr  (icAddr),
    .fetchReqDone,
    .progMode       (prog_mode),
    .progReq        (prog_req),
    .progWe         (prog_we),
    .progAddr       (prog_addr),
    .progWdata      (prog_wdata),
    .progReqDone    (prog_done),
    .DRAM_Req       (p_send),
    .isWrite        (p_we),
    .DRAM_Addr      (p_addr),
    .DRAM_writeData (p_wdata),
    .reqDone        (p_done),
    .reqData        (dram_rdata),
    .data_out       (prog_rdata)
  );

  dram_req_t   d_req;
  logic        d_req_valid, d_done;
  logic [31:0] d_rdata;

  cdc_bridge #(.WIDTH($bits(dram_req_t))) u_ptod (
    .src_clk   (clk),
    .src_rst   (rst),
    .send      (p_send),
    .data_in   ({p_we, p_addr, p_wdata}),
    .dst_clk   (dram_clk),
    .dst_rst   (dram_rst),
    .valid_out (d_req_valid),
    .data_out  (d_req)
  );

  dram_interface u_dramif (
    .clk     (dram_clk),
    .rst     (dram_rst),
    .req     (d_req_valid),
    .isWrite (d_req.isWrite),
    .addr    (d_req.addr),
    .wdata   (d_req.data),
    .done    (d_done),
    .rdata   (d_rdata),
    .app_addr, .app_cmd, .app_en, .app_wdf_data, .app_wdf_end, .app_wdf_wren,
    .app_wdf_mask, .app_rdy, .app_wdf_rdy, .app_rd_data, .app_rd_data_valid
  );

  cdc_bridge #(.WIDTH(32)) u_dtop (
    .src_clk   (dram_clk),
    .src_rst   (dram_rst),
    .send      (d_done),
    .data_in   (d_rdata),
    .dst_clk   (clk),
    .dst_rst   (rst),
    .valid_out (p_done),
    .data_out  (dram_rdata)
  );

  // ------------------------------------------------------------ UART device
  device_handler #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_dev (
    .clk, .rst, .uart_txd_in,
    .device_id  (dev_id),
    .word_out   (dev_word),
    .word_valid (dev_valid)
  );

endmodule
