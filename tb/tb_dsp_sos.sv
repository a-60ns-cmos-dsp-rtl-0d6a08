// tb_dsp_sos: workload testbench - a cascade of second-order IIR sections, one section
// per seven machine cycles (420 ns).
//
// Each section has five multiplies: w = in + a1*w1 + a2*w2 and
// out = b0*in + c1*w1 + c2*w2, where c1 = b1 + b0*a1 and c2 = b2 + b0*a2 fold the
// b0*w term into the state terms, so the output does not wait for w. The state (w2, w1)
// of each section sits in RAM and moves along by one sample per pass. The section input
// arrives in a1 and its output leaves in a1. The cached loop body is these seven
// instructions (coefficients b0, a2, c2, a1, c1 read from ROM through pt):
//   1: a0 = a1,       y = a1 (extracted),                x = *pt++   (b0)
//   2: p = x*y,       y = *r0++ (w2),                    x = *pt++   (a2)
//   3: a1 = p,        p = x*y,                           x = *pt++   (c2)
//   4: a0 = a0 + p,   p = x*y,       y = *r0-- (w1),     x = *pt++   (a1)
//   5: a1 = a1 + p,   p = x*y,       *r0++ = y (w2 := w1), x = *pt++ (c1)
//   6: a0 = a0 + p,   p = x*y
//   7: a1 = a1 + p,                  *r0++ = a0 (w1 := w)
// Every input sample is run through NSEC sections: "do NSEC" for the first sample,
// "redo NSEC" for the others. The testbench holds a behavioural model of the control
// unit (program words index a table of decoded control words), checks every output
// sample and the final state against a bit-exact model, and checks that in the replayed
// loop a section starts every 7 cycles (420 ns). The spacing after a section fetched from
// program memory (the first pass of "do", which stalls on its coefficient reads) and
// after the start of a loop is not timed.
module tb_dsp_sos;
  import dsp_pkg::*;

  localparam int NSEC = 4;
  localparam int NSAMP = 8;
  localparam int ST = 'h0020;    // section state in RAM: w2, w1 per section
  localparam int IN = 'h0080;    // input samples in RAM
  localparam int OUT = 'h00C0;   // output samples in RAM
  localparam int CF = 'h0500;    // coefficients in ROM

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
  function automatic ctl_t xcoef(input ctl_t c0);
    ctl_t c;
    c = c0; c.dau.x_rom_we = 1'b1; c.pt_mod = PT_INC;
    return c;
  endfunction
  function automatic ctl_t alu(input ctl_t c0, input alu_op_t op, input logic src,
                              input logic dst);
    ctl_t c;
    c = c0; c.dau.alu_op = op; c.dau.a_src = src; c.dau.a_dst = dst; c.dau.acc_we = 1'b1;
    return c;
  endfunction

  logic signed [15:0] cf [NSEC][5];   // b0, a2, c2, a1, c1
  logic signed [15:0] xin [NSAMP];

  task automatic assemble();
    ctl_t c;
    pa = 0;
    mov_imm(R_R1, 16'(IN));
    mov_imm(R_R2, 16'(OUT));
    for (int s = 0; s < NSAMP; s++) begin
      mov_imm(R_R0, 16'(ST));
      mov_imm(R_PT, 16'(CF));
      c = nop(); c.src = R_RAM; c.ya_sel = 2'd1; c.ya_mod = YM_INC; c.dst = R_A1H; emit(c);
      if (s == 0) begin
        c = nop(); c.do_start = 1'b1; c.do_n = 4'd7; c.do_k = 8'(NSEC); emit(c);
        a_sec = pa;
        // 1
        c = nop(); c.src = R_A1H; c.dst = R_YH; emit(xcoef(alu(c, A_PASSA, 1'b1, 1'b0)));
        // 2
        c = nop(); c.dau.mult_en = 1'b1; c.src = R_RAM; c.dst = R_YH; c.ya_sel = 2'd0;
        c.ya_mod = YM_INC; emit(xcoef(c));
        // 3
        c = nop(); c.dau.mult_en = 1'b1; emit(xcoef(alu(c, A_PASSB, 1'b1, 1'b1)));
        // 4
        c = nop(); c.dau.mult_en = 1'b1; c.src = R_RAM; c.dst = R_YH; c.ya_sel = 2'd0;
        c.ya_mod = YM_DEC; emit(xcoef(alu(c, A_ADD, 1'b0, 1'b0)));
        // 5
        c = nop(); c.dau.mult_en = 1'b1; c.src = R_YH; c.dst = R_RAM; c.ya_sel = 2'd0;
        c.ya_mod = YM_INC; emit(xcoef(alu(c, A_ADD, 1'b1, 1'b1)));
        // 6
        c = nop(); c.dau.mult_en = 1'b1; emit(alu(c, A_ADD, 1'b0, 1'b0));
        // 7
        c = nop(); c.src = R_A0H; c.dst = R_RAM; c.ya_sel = 2'd0; c.ya_mod = YM_INC;
        emit(alu(c, A_ADD, 1'b1, 1'b1));
      end else begin
        c = nop(); c.redo_start = 1'b1; c.do_k = 8'(NSEC); emit(c);
      end
      c = nop(); c.src = R_A1H; c.dst = R_RAM; c.ya_sel = 2'd2; c.ya_mod = YM_INC; emit(c);
    end
    a_halt = pa;
    c = nop(); c.xa_op = XA_JUMP; c.imm = 16'(a_halt); emit(c);
    for (int s = 0; s < NSEC; s++)
      for (int q = 0; q < 5; q++) mem[CF + 5 * s + q] = cf[s][q];
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

  logic [15:0] w1 [NSEC], w2 [NSEC], yout [NSAMP];

  task automatic model();
    logic [35:0] a0, a1;
    logic [15:0] yin;
    for (int s = 0; s < NSEC; s++) begin w1[s] = '0; w2[s] = '0; end
    for (int n = 0; n < NSAMP; n++) begin
      a1 = {{4{xin[n][15]}}, xin[n], 16'h0};
      for (int s = 0; s < NSEC; s++) begin
        a0  = a1;
        yin = ext(a1);
        a1  = prod(cf[s][0], yin);
        a0  = a0 + prod(cf[s][1], w2[s]);
        a1  = a1 + prod(cf[s][2], w2[s]);
        a0  = a0 + prod(cf[s][3], w1[s]);
        a1  = a1 + prod(cf[s][4], w1[s]);
        w2[s] = w1[s];
        w1[s] = ext(a0);
      end
      yout[n] = ext(a1);
    end
  endtask

  // section starts inside the replayed loop
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
    for (int s = 0; s < NSEC; s++)
      for (int q = 0; q < 5; q++) cf[s][q] = 16'($signed(16'($urandom)) >>> 2);
    for (int n = 0; n < NSAMP; n++) xin[n] = 16'($signed(16'($urandom)) >>> 2);
    assemble();
    model();
    for (int a = 0; a < 2048; a++) begin
      @(negedge CKO);
      rom_load_we = 1; rom_load_addr = 11'(a); rom_load_data = mem[a];
    end
    @(negedge CKO); rom_load_we = 0;
    // input samples and a zero state, put in RAM before the program starts
    for (int n = 0; n < NSAMP; n++) dut.u_ram.mem[IN + n] = xin[n];
    for (int s = 0; s < 2 * NSEC; s++) dut.u_ram.mem[ST + s] = '0;
    repeat (2) @(negedge CKO);
    RSTB = 1;
    wait (instr_valid && instr == 16'(a_halt));
    repeat (3) @(negedge CKO);
    for (int n = 0; n < NSAMP; n++)
      chk(32'(dut.u_ram.mem[OUT + n]), 32'(yout[n]), $sformatf("output sample %0d", n));
    for (int s = 0; s < NSEC; s++) begin
      chk(32'(dut.u_ram.mem[ST + 2 * s]), 32'(w2[s]), $sformatf("section %0d w2", s));
      chk(32'(dut.u_ram.mem[ST + 2 * s + 1]), 32'(w1[s]), $sformatf("section %0d w1", s));
    end
    chk(32'(n_starts), 32'(NSEC * NSAMP), "sections executed");
    chk(32'(n_bad_spacing), 0, "replayed sections 7 cycles (420 ns) apart");
    chk(32'(n_spaced), 32'((NSEC - 1) * NSAMP - 1), "section spacings measured");
    $display("sections=%0d, spacings measured=%0d, not 420 ns=%0d", n_starts, n_spaced, n_bad_spacing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
