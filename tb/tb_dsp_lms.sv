// tb_dsp_lms: workload testbench - the tap loop of a double-precision adaptive FIR
// filter (LMS), one tap per seven machine cycles (420 ns).
//
// Each tap i filters with the high word of its coefficient and then updates the full
// 32-bit coefficient: out += h_hi[i] * d[i];  h[i] += g * d[i], where h = h_hi:h_lo is
// held in RAM as two words and g (step size times error) is a RAM word prepared for each
// sample. The seven-instruction cached loop body, with the next tap's data word loaded
// in step 5 so that taps overlap:
//   1: x = *r1 (h_hi)
//   2: p = x*y,                     x = *r2 (g)
//   3: a0 = a0 + p,  p = x*y,       a1h = *r1++ (h_hi)
//   4:                              a1l = *r1-- (h_lo)
//   5: a1 = a1 + p,                 y = *r0++ (next data word)
//   6:                              *r1++ = a1h
//   7:                              *r1++ = a1l
// The error computation between samples is left to the testbench, which supplies g for
// each sample. The testbench holds a behavioural model of the control unit (program
// words index a table of decoded control words), runs NSAMP samples of NT taps ("do NT"
// once, then "redo NT"), checks every output and every final coefficient against a
// bit-exact model, and checks that replayed taps start 7 cycles (420 ns) apart.
module tb_dsp_lms;
  import dsp_pkg::*;

  localparam int NT = 8;
  localparam int NSAMP = 6;
  localparam int H = 'h0020;     // coefficients in RAM: h_hi, h_lo per tap
  localparam int DA = 'h0080;    // data samples in RAM
  localparam int G = 'h00C0;     // g per sample in RAM
  localparam int OUT = 'h00E0;   // outputs in RAM

  logic CKI = 1'b0, CKO, RSTB = 1'b0;
  logic [15:0] AB, PB_O;
  logic IBF, DO, OSE, DOEN, PB_OE, PIDS_O, PIDS_OE, PODS_O, PODS_OE, IACK;
  logic rom_load_we = 0;
  logic [10:0] rom_load_addr = '0;
  logic [15:0] rom_load_data = '0;
  logic [15:0] instr;
  logic instr_valid, irq, fetch_stall, replay;
  ctl_t ctl;

  dsp_top dut (
    .CKI, .CKO, .RSTB, .EXM(1'b0), .AB, .RB(16'h0000),
    .DI(1'b0), .ICK(1'b0), .ILD(1'b0), .IBF, .DO, .OCK(1'b0), .OLD(1'b0), .OSE, .DOEN,
    .PB_I(16'h0000), .PB_O, .PB_OE, .PIDS_I(1'b1), .PIDS_O, .PIDS_OE, .PODS_I(1'b1),
    .PODS_O, .PODS_OE, .INT(1'b0), .IACK,
    .rom_load_we, .rom_load_addr, .rom_load_data,
    .instr, .instr_valid, .ctl, .irq, .fetch_stall, .replay);

  always #15 CKI = ~CKI;

  int checks = 0, failures = 0;
  initial begin
    #2ms;
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

  // ---------------- program ----------------
  ctl_t ctab [2048];
  logic [15:0] mem [2048];
  int pa, a_sec, a_halt;

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
  function automatic ctl_t alu(input ctl_t c0, input alu_op_t op, input logic src,
                              input logic dst);
    ctl_t c;
    c = c0; c.dau.alu_op = op; c.dau.a_src = src; c.dau.a_dst = dst; c.dau.acc_we = 1'b1;
    return c;
  endfunction

  logic [15:0] h_hi [NT], h_lo [NT], dat [NT + NSAMP], gv [NSAMP], yout [NSAMP];

  function automatic ctl_t ram(input ctl_t c0, input breg_t s, input breg_t d,
                               input logic [1:0] r, input ya_mod_t m);
    ctl_t c;
    c = c0; c.src = s; c.dst = d; c.ya_sel = r; c.ya_mod = m;
    return c;
  endfunction

  task automatic assemble();
    ctl_t c;
    pa = 0;
    mov_imm(R_R3, 16'(OUT));
    for (int n = 0; n < NSAMP; n++) begin
      mov_imm(R_R0, 16'(DA + n));
      mov_imm(R_R1, 16'(H));
      mov_imm(R_R2, 16'(G + n));
      mov_imm(R_A0H, 16'h0000);
      emit(ram(nop(), R_RAM, R_YH, 2'd0, YM_INC));            // first data word
      if (n == 0) begin
        c = nop(); c.do_start = 1'b1; c.do_n = 4'd7; c.do_k = 8'(NT); emit(c);
        a_sec = pa;
        emit(ram(nop(), R_RAM, R_X, 2'd1, YM_NONE));            // 1
        c = nop(); c.dau.mult_en = 1'b1;
        emit(ram(c, R_RAM, R_X, 2'd2, YM_NONE));                // 2
        c = alu(nop(), A_ADD, 1'b0, 1'b0); c.dau.mult_en = 1'b1;
        emit(ram(c, R_RAM, R_A1H, 2'd1, YM_INC));               // 3
        emit(ram(nop(), R_RAM, R_A1L, 2'd1, YM_DEC));           // 4
        emit(ram(alu(nop(), A_ADD, 1'b1, 1'b1), R_RAM, R_YH, 2'd0, YM_INC));  // 5
        emit(ram(nop(), R_A1H, R_RAM, 2'd1, YM_INC));           // 6
        emit(ram(nop(), R_A1L, R_RAM, 2'd1, YM_INC));           // 7
      end else begin
        c = nop(); c.redo_start = 1'b1; c.do_k = 8'(NT); emit(c);
      end
      emit(ram(nop(), R_A0H, R_RAM, 2'd3, YM_INC));             // output
    end
    a_halt = pa;
    c = nop(); c.xa_op = XA_JUMP; c.imm = 16'(a_halt); emit(c);
  endtask

  always_comb ctl = ctab[instr[10:0]];

  // ---------------- bit-exact model ----------------
  function automatic logic [15:0] ext(input logic [35:0] a);
    if (!((&a[35:31]) || !(|a[35:31]))) return a[35] ? 16'h8000 : 16'h7FFF;
    return a[31:16];
  endfunction
  function automatic logic [35:0] prod(input logic [15:0] a, input logic [15:0] b);
    logic [31:0] p;
    p = 32'($signed(a) * $signed(b));
    return {{4{p[31]}}, p};
  endfunction

  task automatic model();
    logic [35:0] a0, a1;
    for (int n = 0; n < NSAMP; n++) begin
      a0 = '0;
      for (int i = 0; i < NT; i++) begin
        a0 = a0 + prod(h_hi[i], dat[n + i]);
        a1 = {{4{h_hi[i][15]}}, h_hi[i], h_lo[i]} + prod(gv[n], dat[n + i]);
        h_hi[i] = ext(a1);
        h_lo[i] = a1[15:0];
      end
      yout[n] = ext(a0);
    end
  endtask

  // tap starts inside the replayed loop
  time t_prev;
  int n_starts, n_bad_spacing;
  logic first_in_loop = 1'b1;
  logic prev_rep = 1'b0;
  int n_spaced;
  always @(posedge CKO) if (RSTB && instr_valid) begin
    if (ctl.do_start || ctl.redo_start) first_in_loop <= 1'b1;
    if (instr == 16'(a_sec)) begin
      if (!first_in_loop && prev_rep && dut.u_cache.st == dut.u_cache.C_REPLAY) begin
        n_spaced++;
        if (($time - t_prev) != 420) n_bad_spacing++;
      end
      first_in_loop <= 1'b0;
      prev_rep = (dut.u_cache.st == dut.u_cache.C_REPLAY);
      t_prev = $time;
      n_starts++;
    end
  end

  initial begin
    n_starts = 0; n_bad_spacing = 0; n_spaced = 0;
    for (int a = 0; a < 2048; a++) mem[a] = '0;
    for (int i = 0; i < NT; i++) begin
      h_hi[i] = 16'($signed(16'($urandom)) >>> 1);
      h_lo[i] = 16'($urandom);
    end
    for (int i = 0; i < NT + NSAMP; i++) dat[i] = 16'($urandom);
    for (int n = 0; n < NSAMP; n++) gv[n] = 16'($signed(16'($urandom)) >>> 4);
    assemble();
    for (int a = 0; a < 2048; a++) begin
      @(negedge CKO);
      rom_load_we = 1; rom_load_addr = 11'(a); rom_load_data = mem[a];
    end
    @(negedge CKO); rom_load_we = 0;
    // coefficients, data and step factors, put in RAM before the program starts
    for (int i = 0; i < NT; i++) begin
      dut.u_ram.mem[H + 2 * i] = h_hi[i];
      dut.u_ram.mem[H + 2 * i + 1] = h_lo[i];
    end
    for (int i = 0; i < NT + NSAMP; i++) dut.u_ram.mem[DA + i] = dat[i];
    for (int n = 0; n < NSAMP; n++) dut.u_ram.mem[G + n] = gv[n];
    model();
    repeat (2) @(negedge CKO);
    RSTB = 1;
    wait (instr_valid && instr == 16'(a_halt));
    repeat (3) @(negedge CKO);
    for (int n = 0; n < NSAMP; n++)
      chk(32'(dut.u_ram.mem[OUT + n]), 32'(yout[n]), $sformatf("output sample %0d", n));
    for (int i = 0; i < NT; i++) begin
      chk(32'(dut.u_ram.mem[H + 2 * i]), 32'(h_hi[i]), $sformatf("tap %0d h_hi", i));
      chk(32'(dut.u_ram.mem[H + 2 * i + 1]), 32'(h_lo[i]), $sformatf("tap %0d h_lo", i));
    end
    chk(32'(n_starts), 32'(NT * NSAMP), "taps executed");
    chk(32'(n_bad_spacing), 0, "replayed taps 7 cycles (420 ns) apart");
    chk(32'(n_spaced), 32'((NT - 1) * NSAMP - 1), "tap spacings measured");
    $display("taps=%0d, spacings measured=%0d, not 420 ns=%0d", n_starts, n_spaced, n_bad_spacing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
