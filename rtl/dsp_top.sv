// dsp_top: the 16-bit fixed-point DSP with its on-chip instruction cache.
//
// Two buses tie the chip together. The program memory bus carries instructions and
// fixed coefficients from the 2048 x 16 ROM (or, with EXM high, from up to 64K words of
// external memory on AB/RB); the 16-bit data bus carries one register-to-register,
// register-to-RAM or RAM-to-register move per instruction between the arithmetic unit
// (dau), the two address units (xaau for program memory, yaau for RAM), the 512 x 16
// RAM and the serial (sio) and parallel (pio) ports.
//
// A multiply/accumulate needs three things per cycle: an instruction, a variable from
// RAM and a coefficient from program memory. With only two buses that works because of
// the 15-word instruction cache: inside a "do k" loop the instructions are replayed from
// the cache, which leaves the program memory bus free to deliver the coefficient at *pt.
// Outside the cache, an instruction that reads a coefficient takes the program memory
// bus away from instruction fetch for one cycle, and the next fetch is delayed by one
// cycle (a fetch stall). A taken jump, call, return or interrupt discards the instruction
// fetched in its own cycle (one bubble).
//
// Pipeline: IR holds the instruction being executed; in the same cycle the next
// instruction is fetched into IR (from ROM/external memory at pc, or from the cache).
// The instruction set is not part of this RTL: IR is brought out on instr, the control
// unit outside decodes it combinationally and returns the decoded control word on ctl
// in the same cycle. The multiplier/accumulator pair forms a second stage inside dau.
//
// Clocking: CKI is divided by two (clk_div2); every register runs on the rising edge of
// that internal clock, which is also driven out on CKO. RSTB is an asynchronous active-
// low reset of everything but the clock divider and the memories. rom_load_* writes the
// ROM (standing in for mask programming) on internal clock edges.
//
// From the design: the block structure and the buses, ROM/RAM/cache sizes, EXM, the pin
// names of the ports. This implementation's choices: the decoded control word, single-
// edge flip-flops in place of two-phase latches, the fetch-stall and bubble rules, the
// bus encoding, and the combined interrupt request irq.
module dsp_top
  import dsp_pkg::*;
#(
  parameter int unsigned ROM_DEPTH = 2048,
  parameter int unsigned RAM_DEPTH = 512
) (
  input  logic        CKI,
  output logic        CKO,
  input  logic        RSTB,
  input  logic        EXM,
  output logic [15:0] AB,
  input  logic [15:0] RB,
  // serial I/O
  input  logic        DI,
  input  logic        ICK,
  input  logic        ILD,
  output logic        IBF,
  output logic        DO,
  input  logic        OCK,
  input  logic        OLD,
  output logic        OSE,
  output logic        DOEN,
  // parallel I/O
  input  logic [15:0] PB_I,
  output logic [15:0] PB_O,
  output logic        PB_OE,
  input  logic        PIDS_I,
  output logic        PIDS_O,
  output logic        PIDS_OE,
  input  logic        PODS_I,
  output logic        PODS_O,
  output logic        PODS_OE,
  input  logic        INT,
  output logic        IACK,
  // ROM programming
  input  logic                          rom_load_we,
  input  logic [$clog2(ROM_DEPTH)-1:0]  rom_load_addr,
  input  logic [15:0]                   rom_load_data,
  // control unit
  output logic [15:0] instr,
  output logic        instr_valid,
  input  ctl_t        ctl,
  output logic        irq,
  output logic        fetch_stall,
  output logic        replay
);

  logic clk, rst_n;
  clk_div2 u_clk (.cki(CKI), .clk_out(clk));
  assign CKO   = clk;
  assign rst_n = RSTB;

  // ---------------- decoded control of the instruction in IR ----------------
  logic [15:0] ir;
  logic        ir_valid;
  ctl_t        c;
  assign instr       = ir;
  assign instr_valid = ir_valid;
  assign c           = ir_valid ? ctl : '0;

  // ---------------- data bus ----------------
  logic [15:0] bus, dau_rd, xa_rd, ya_rd, sio_rd, pio_rd, ram_rd;
  always_comb begin
    unique case (c.src)
      R_IMM:   bus = c.imm;
      R_RAM:   bus = ram_rd;
      default: bus = dau_rd | xa_rd | ya_rd | sio_rd | pio_rd;
    endcase
  end

  // ---------------- program memory bus ----------------
  logic [15:0] rom_addr, rom_q, pbus, pc;
  logic        data_rd;
  assign data_rd = c.dau.x_rom_we;   // coefficient read at *pt this cycle
  assign AB      = rom_addr;
  assign pbus    = EXM ? RB : rom_q;

  dsp_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk(clk), .addr(rom_addr[$clog2(ROM_DEPTH)-1:0]), .rdata(rom_q),
    .load_we(rom_load_we), .load_addr(rom_load_addr), .load_data(rom_load_data));

  // ---------------- fetch ----------------
  logic from_cache, fetch, redirect, loop_active, loop_done;
  logic [15:0] cache_word;
  assign redirect    = (c.xa_op != XA_NONE);
  assign fetch_stall = data_rd && !from_cache;
  assign fetch       = !redirect && !fetch_stall;
  assign replay      = fetch && from_cache;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= '0; ir_valid <= 1'b0;
    end else begin
      ir_valid <= fetch;
      if (fetch) ir <= from_cache ? cache_word : pbus;
    end
  end

  icache u_cache (
    .clk(clk), .rst_n(rst_n),
    .do_start(c.do_start), .do_n(c.do_n), .do_k(c.do_k),
    .redo_start(c.redo_start), .redo_k(c.do_k),
    .fetch(fetch), .rom_word(pbus),
    .from_cache(from_cache), .cache_word(cache_word),
    .loop_active(loop_active), .loop_done(loop_done));

  xaau u_xaau (
    .clk(clk), .rst_n(rst_n), .pc_inc(fetch && !from_cache),
    .xa_op(c.xa_op), .target(c.imm), .data_rd(data_rd), .pt_mod(c.pt_mod),
    .wr_sel(c.dst), .wdata(bus), .rd_sel(c.src), .rdata(xa_rd),
    .rom_addr(rom_addr), .pc_o(pc));

  // ---------------- RAM side ----------------
  logic [15:0] ram_addr;
  logic        ram_acc, ram_wrap;
  assign ram_acc = (c.src == R_RAM) || (c.dst == R_RAM);

  yaau u_yaau (
    .clk(clk), .rst_n(rst_n), .acc_en(ram_acc), .sel(c.ya_sel), .mode(c.ya_mod),
    .wr_sel(c.dst), .wdata(bus), .rd_sel(c.src), .rdata(ya_rd),
    .ram_addr(ram_addr), .wrapped(ram_wrap));

  dsp_ram #(.DEPTH(RAM_DEPTH)) u_ram (
    .clk(clk), .we(c.dst == R_RAM), .addr(ram_addr[$clog2(RAM_DEPTH)-1:0]),
    .wdata(bus), .rdata(ram_rd));

  // ---------------- arithmetic ----------------
  logic [35:0] a0, a1;
  logic [31:0] p;
  logic [15:0] psw;
  dau u_dau (
    .clk(clk), .rst_n(rst_n), .ctl(c.dau), .rom_data(pbus),
    .wr_sel(c.dst), .wdata(bus), .rd_sel(c.src), .rdata(dau_rd),
    .a0_o(a0), .a1_o(a1), .p_o(p), .psw_o(psw));

  // ---------------- I/O ----------------
  logic sio_irq, pio_irq;
  sio u_sio (
    .clk(clk), .rst_n(rst_n),
    .di(DI), .ick(ICK), .ild(ILD), .ibf(IBF), .do_o(DO), .ock(OCK), .old(OLD),
    .ose(OSE), .doen(DOEN),
    .wr_sel(c.dst), .wdata(bus), .rd_sel(c.src), .rdata(sio_rd), .irq(sio_irq));

  pio u_pio (
    .clk(clk), .rst_n(rst_n),
    .pb_i(PB_I), .pb_o(PB_O), .pb_oe(PB_OE),
    .pids_i(PIDS_I), .pids_o(PIDS_O), .pids_oe(PIDS_OE),
    .pods_i(PODS_I), .pods_o(PODS_O), .pods_oe(PODS_OE),
    .int_i(INT), .iack_o(IACK), .iack_in(c.iack),
    .wr_sel(c.dst), .wdata(bus), .rd_sel(c.src), .rdata(pio_rd), .irq(pio_irq));

  assign irq = sio_irq || pio_irq;

  // Program-flow changes are not allowed inside a cached loop.
  a_no_jump_in_loop: assert property (@(posedge clk) disable iff (!rst_n)
                                      redirect |-> !loop_active);

endmodule
