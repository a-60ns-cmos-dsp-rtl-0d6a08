// tb_dsp_top: end-to-end testbench of the whole DSP, with every parameter at its default.
//
// The instruction set is not part of the RTL, so the testbench contains the control
// unit as a behavioural model: each program word is an index into a table of decoded
// control words (ctl_t) that the testbench builds while it assembles the program. The
// program, run once from the on-chip ROM and once from external memory (EXM = 1):
//   1. fills a 32-word delay line in RAM with immediates, through r0 with modulo
//      addressing (rb/re), so the pointer wraps back to the start;
//   2. computes a 32-tap FIR filter (coefficients in ROM at 0x400, read through pt) with
//      "do 31 { a0 = a0 + p, p = x * y, y = *r0++, x = *pt++ }" and stores a0 (high
//      half) in RAM and on the parallel port (master mode);
//   3. computes a second FIR from another starting point of the circular buffer, reusing
//      the cached loop body with "redo 31";
//   4. shifts a0 left by 16 into a1 and stores a1, which saturates on extraction;
//   5. waits in a jump-to-self loop; a word arriving on the serial port raises the
//      serial input interrupt, the service routine stores it in RAM and returns.
// Results are compared with a model computed in the testbench. The cycle count of the
// cached loop is checked (one tap per 60 ns machine cycle, with CKI at 33.33 MHz), and
// each mechanism of the design must occur at least once: fetch stall, cache replay,
// redo, modulo wrap, saturation, jump bubble, interrupt, serial input, parallel output,
// external-memory mode.
module tb_dsp_top;
  import dsp_pkg::*;

  localparam int NT = 32;              // taps
  localparam int D = 'h0010;           // delay line base in RAM
  localparam int C = 'h0400;           // coefficient base in program memory
  localparam int RES = 'h0100;         // results in RAM
  localparam int OFF1 = 5, OFF2 = 19;  // starting points in the circular buffer

  logic CKI = 1'b0, CKO, RSTB = 1'b0, EXM = 1'b0;
  logic [15:0] AB, RB;
  logic DI = 0, ICK = 0, ILD = 0, IBF, DO, OCK = 0, OLD = 0, OSE, DOEN;
  logic [15:0] PB_I = '0, PB_O;
  logic PB_OE, PIDS_O, PIDS_OE, PODS_O, PODS_OE, IACK;
  logic rom_load_we = 0;
  logic [10:0] rom_load_addr = '0;
  logic [15:0] rom_load_data = '0;
  logic [15:0] instr;
  logic instr_valid, irq, fetch_stall, replay;
  ctl_t ctl;

  dsp_top dut (
    .CKI, .CKO, .RSTB, .EXM, .AB, .RB,
    .DI, .ICK, .ILD, .IBF, .DO, .OCK, .OLD, .OSE, .DOEN,
    .PB_I, .PB_O, .PB_OE, .PIDS_I(1'b1), .PIDS_O, .PIDS_OE, .PODS_I(1'b1), .PODS_O,
    .PODS_OE, .INT(1'b0), .IACK,
    .rom_load_we, .rom_load_addr, .rom_load_data,
    .instr, .instr_valid, .ctl, .irq, .fetch_stall, .replay);

  always #15 CKI = ~CKI;   // 33.33 MHz external clock

  int checks = 0, failures = 0;
  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] g, input logic [31:0] e, input string what);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  // ---------------- program assembly ----------------
  ctl_t ctab [2048];
  logic [15:0] mem [65536];   // program memory image (ROM or external)
  int pa;
  int a_body, a_halt, a_vec, a_fin1, a_fin2;

  function automatic ctl_t nop();
    ctl_t c;
    c = '0;
    return c;
  endfunction
  task automatic emit(input ctl_t c);
    ctab[pa] = c; mem[pa] = 16'(pa); pa++;
  endtask
  task automatic mov_imm(input breg_t d, input logic [15:0] v);
    ctl_t c;
    c = nop(); c.src = R_IMM; c.dst = d; c.imm = v; emit(c);
  endtask
  function automatic ctl_t load_xy();   // y = *r0++, x = *pt++
    ctl_t c;
    c = nop(); c.src = R_RAM; c.dst = R_YH; c.ya_sel = 2'd0; c.ya_mod = YM_INC;
    c.dau.x_rom_we = 1'b1; c.pt_mod = PT_INC;
    return c;
  endfunction
  function automatic ctl_t acc_p(input ctl_t c0);  // a0 = a0 + p
    ctl_t c;
    c = c0; c.dau.alu_op = A_ADD; c.dau.acc_we = 1'b1; c.dau.flags_we = 1'b1;
    return c;
  endfunction
  task automatic store(input breg_t s);              // *r1++ = s
    ctl_t c;
    c = nop(); c.src = s; c.dst = R_RAM; c.ya_sel = 2'd1; c.ya_mod = YM_INC; emit(c);
  endtask

  logic signed [15:0] coef [NT], data [NT];

  task automatic fir_prologue(input int off);
    ctl_t c;
    mov_imm(R_R0, 16'(D + off));
    mov_imm(R_PT, 16'(C));
    mov_imm(R_A0H, 16'h0000);
    emit(load_xy());
    c = load_xy(); c.dau.mult_en = 1'b1; emit(c);
  endtask

  task automatic assemble();
    ctl_t c;
    pa = 0;
    mov_imm(R_RB, 16'(D));
    mov_imm(R_RE, 16'(D + NT - 1));
    mov_imm(R_R0, 16'(D));
    mov_imm(R_R1, 16'(RES));
    mov_imm(R_PIOC, 16'h0001);                   // parallel port: master
    for (int n = 0; n < NT; n++) begin
      c = nop(); c.src = R_IMM; c.imm = data[n]; c.dst = R_RAM; c.ya_sel = 2'd0;
      c.ya_mod = YM_INC; emit(c);
    end
    // FIR 1: do NT-1 { mac }
    fir_prologue(OFF1);
    c = nop(); c.do_start = 1'b1; c.do_n = 4'd1; c.do_k = 8'(NT - 1); emit(c);
    a_body = pa;
    c = load_xy(); c.dau.mult_en = 1'b1; emit(acc_p(c));
    emit(acc_p(nop()));
    a_fin1 = pa;
    store(R_A0H);
    mov_imm(R_NONE, 16'h0);                      // (no-op)
    c = nop(); c.src = R_A0H; c.dst = R_PDX; emit(c);
    // FIR 2: redo NT-1
    fir_prologue(OFF2);
    c = nop(); c.redo_start = 1'b1; c.do_k = 8'(NT - 1); emit(c);
    emit(acc_p(nop()));
    a_fin2 = pa;
    store(R_A0H);
    // a1 = a0 << 16, store a1 (saturates)
    c = nop(); c.dau.use_shift = 1'b1; c.dau.sh_op = SH_L16; c.dau.a_src = 1'b0;
    c.dau.a_dst = 1'b1; c.dau.acc_we = 1'b1; emit(c);
    store(R_A1H);
    mov_imm(R_SIOC, 16'h0001);                   // serial input interrupt on
    a_halt = pa;
    c = nop(); c.xa_op = XA_JUMP; c.imm = 16'(a_halt); emit(c);
    c = nop(); c.xa_op = XA_JUMP; c.imm = 16'(a_halt); emit(c);
    // interrupt service routine
    a_vec = pa;
    store(R_SDX);
    c = nop(); c.xa_op = XA_IRET; emit(c);
    for (int n = 0; n < NT; n++) mem[C + n] = coef[n];
  endtask

  // ---------------- control unit model ----------------
  logic in_isr = 1'b0;
  always_comb begin
    ctl = ctab[instr[10:0]];
    if (instr_valid && irq && !in_isr && instr == 16'(a_halt)) begin
      ctl = nop(); ctl.xa_op = XA_INT; ctl.imm = 16'(a_vec); ctl.iack = 1'b1;
    end
  end
  always @(posedge CKO) begin
    if (instr_valid && ctl.iack) in_isr <= 1'b1;
    if (instr_valid && ctl.xa_op == XA_IRET) in_isr <= 1'b0;
  end

  // external program memory
  assign RB = mem[AB];

  // ---------------- mechanism counters ----------------
  int n_stall, n_replay, n_redo, n_wrap, n_bubble, n_int, n_pout, n_sat, n_exm;
  int body_first, body_last, body_count;
  time t_first, t_last;
  logic [15:0] pout;
  always @(posedge CKO) if (RSTB) begin
    if (fetch_stall) n_stall++;
    if (replay) n_replay++;
    if (instr_valid && ctl.redo_start) n_redo++;
    if (dut.u_yaau.wrapped) n_wrap++;
    if (instr_valid && ctl.xa_op != XA_NONE) n_bubble++;
    if (instr_valid && ctl.iack) n_int++;
    if (!PODS_O && PB_OE) begin n_pout++; pout = PB_O; end
    if (EXM && instr_valid) n_exm++;
    if (instr_valid && instr == 16'(a_body)) begin
      if (body_count == 0) t_first = $time;
      if (body_count < NT - 1) t_last = $time;
      body_count++;
    end
  end

  // ---------------- reference model ----------------
  function automatic logic [15:0] extract(input logic [35:0] a);
    if (!((&a[35:31]) || !(|a[35:31]))) begin
      n_sat++;
      return a[35] ? 16'h8000 : 16'h7FFF;
    end
    return a[31:16];
  endfunction
  function automatic logic [35:0] fir(input int off);
    longint s;
    s = 0;
    for (int i = 0; i < NT; i++) s += longint'(coef[i]) * longint'(data[(off + i) % NT]);
    return s[35:0];
  endfunction

  task automatic send_serial(input logic [15:0] w);
    for (int b = 15; b >= 0; b--) begin
      DI = w[b]; ILD = (b == 15);
      #240 ICK = 1;
      #240 ICK = 0;
    end
    ILD = 0;
  endtask

  task automatic run(input logic exm, input int pass);
    logic [35:0] e1, e2, e3;
    logic [15:0] sw;
    for (int n = 0; n < NT; n++) begin
      coef[n] = 16'($signed(16'($urandom)) >>> 3);
      data[n] = 16'($signed(16'($urandom)) >>> 3);
    end
    assemble();
    RSTB = 0; EXM = exm; body_count = 0;
    // program the ROM (mask programming) while in reset
    if (!exm) begin
      for (int a = 0; a < 2048; a++) begin
        @(negedge CKO);
        rom_load_we = 1; rom_load_addr = 11'(a); rom_load_data = mem[a];
      end
      @(negedge CKO); rom_load_we = 0;
    end
    repeat (3) @(negedge CKO);
    RSTB = 1;
    wait (instr_valid && instr == 16'(a_halt));
    repeat (4) @(negedge CKO);
    e1 = fir(OFF1);
    e2 = fir(OFF2);
    e3 = e2 << 16;
    chk(32'(dut.u_ram.mem[RES]), 32'(extract(e1)), $sformatf("pass %0d FIR 1", pass));
    chk(32'(dut.u_ram.mem[RES + 1]), 32'(extract(e2)), $sformatf("pass %0d FIR 2 (redo)", pass));
    chk(32'(dut.u_ram.mem[RES + 2]), 32'(extract(e3)), $sformatf("pass %0d a1 = a0 << 16", pass));
    chk(32'(pout), 32'(extract(e1)), $sformatf("pass %0d parallel output", pass));
    for (int n = 0; n < NT; n++)
      chk(32'(dut.u_ram.mem[D + n]), {16'h0, data[n]}, "delay line");
    // one tap per machine cycle inside the cached loop: NT-1 consecutive cycles,
    // twice (do and redo)
    chk(32'(body_count), 32'(2 * (NT - 1)), "loop body executions");
    // serial word -> interrupt -> stored by the service routine
    sw = 16'($urandom);
    send_serial(sw);
    repeat (20) @(negedge CKO);
    chk(32'(dut.u_ram.mem[RES + 3]), 32'(sw), $sformatf("pass %0d serial word via interrupt", pass));
    chk(32'(in_isr), 0, "returned from interrupt");
  endtask

  // timing of the first cached loop: NT-1 taps in NT-1 consecutive 60 ns cycles
  int loop_cycles;
  initial begin
    n_stall = 0; n_replay = 0; n_redo = 0; n_wrap = 0; n_bubble = 0; n_int = 0;
    n_pout = 0; n_sat = 0; n_exm = 0; body_count = 0;
    for (int n = 0; n < 65536; n++) mem[n] = '0;
    run(1'b0, 0);
    run(1'b1, 1);
    // the body executions of the first loop are one cycle apart
    loop_cycles = int'((t_last - t_first) / 60);
    chk(32'(loop_cycles + 1), 32'(NT - 1), "cycles of the first loop (60 ns per tap)");
    $display("mechanisms: stall=%0d replay=%0d redo=%0d wrap=%0d bubble=%0d int=%0d pout=%0d sat=%0d exm=%0d",
             n_stall, n_replay, n_redo, n_wrap, n_bubble, n_int, n_pout, n_sat, n_exm);
    chk(32'(n_stall > 0), 1, "fetch stall happened");
    chk(32'(n_replay >= 4 * (NT - 2)), 1, "cache replays happened");
    chk(32'(n_redo), 2, "redo happened");
    chk(32'(n_wrap > 0), 1, "modulo wrap happened");
    chk(32'(n_bubble > 0), 1, "jump bubble happened");
    chk(32'(n_int), 2, "interrupt happened");
    chk(32'(n_pout > 0), 1, "parallel output happened");
    chk(32'(n_sat > 0), 1, "saturation happened");
    chk(32'(n_exm > 0), 1, "external memory mode used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
