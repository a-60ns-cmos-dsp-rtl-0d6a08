// tb_dau: self-checking testbench of the data arithmetic unit.
// Checks the 16x16 multiplier, the product alignment shift (-2/0/+2), the two-stage
// multiply/accumulate with its one-cycle product latency, every ALU and shifter function
// against a reference model written with 64-bit integers, the psw flags and conditional
// accumulator writes, extraction with and without saturation, the counters, and loading
// x from the ROM data bus.
module tb_dau;
  import dsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  dau_ctl_t ctl;
  logic [15:0] rom_data, wdata, rdata;
  breg_t wr_sel, rd_sel;
  logic [35:0] a0, a1;
  logic [31:0] p;
  logic [15:0] psw;
  int checks = 0, failures = 0;

  dau dut (.clk, .rst_n, .ctl, .rom_data, .wr_sel, .wdata, .rd_sel, .rdata,
           .a0_o(a0), .a1_o(a1), .p_o(p), .psw_o(psw));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic idle();
    ctl = '0; wr_sel = R_NONE; rd_sel = R_NONE; wdata = '0; rom_data = '0;
  endtask

  task automatic tick();
    @(posedge clk); #1;
    idle();
  endtask

  task automatic wr(input breg_t r, input logic [15:0] v);
    wr_sel = r; wdata = v; tick();
  endtask

  function automatic logic [35:0] m36(input longint v);
    return v[35:0];
  endfunction
  function automatic longint s36(input logic [35:0] v);
    return longint'({{28{v[35]}}, v});
  endfunction

  // reference of the ALU functions
  function automatic logic [35:0] ref_alu(input alu_op_t op, input logic [35:0] a,
                                          input logic [35:0] b);
    case (op)
      A_PASSB: return b;
      A_ADD:   return m36(s36(a) + s36(b));
      A_SUB:   return m36(s36(a) - s36(b));
      A_RSUB:  return m36(s36(b) - s36(a));
      A_NEGB:  return m36(-s36(b));
      A_AND:   return a & b;
      A_OR:    return a | b;
      A_XOR:   return a ^ b;
      A_NOTA:  return ~a;
      A_NEGA:  return m36(-s36(a));
      A_ABSA:  return m36(s36(a) < 0 ? -s36(a) : s36(a));
      A_INCA:  return m36(s36(a) + 1);
      A_DECA:  return m36(s36(a) - 1);
      A_CLR:   return '0;
      default: return a;
    endcase
  endfunction

  function automatic logic [35:0] ref_sh(input shift_op_t op, input logic [35:0] a);
    int n;
    n = (op[1:0] == 0) ? 1 : (op[1:0] == 1) ? 4 : (op[1:0] == 2) ? 8 : 16;
    if (op[2]) return m36(s36(a) * (longint'(1) << n));
    return m36(s36(a) >>> n);
  endfunction

  logic [15:0] xv, yv, ylv;
  logic [35:0] av, bv, e0, e1;
  longint acc, prod;
  int i;

  initial begin
    idle();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    tick();

    // ---- multiplier, all product alignments, MAC stream with latency ----
    for (int ps = 0; ps < 3; ps++) begin
      wr(R_AUC, 16'(ps));
      wr(R_A0H, 16'h0000);
      acc = 0;
      prod = longint'($signed(p));
      for (i = 0; i < 20; i++) begin
        xv = 16'($urandom); yv = 16'($urandom);
        wr(R_X, xv);
        wr(R_YH, yv);
        // a0 = a0 + p (previous product), p = x * y
        ctl.mult_en = 1'b1; ctl.alu_op = A_ADD; ctl.acc_we = 1'b1;
        ctl.a_src = 1'b0; ctl.a_dst = 1'b0;
        tick();
        acc = acc + ((ps == 1) ? (prod >>> 2) : (ps == 2) ? prod * 4 : prod);
        prod = longint'($signed(xv)) * longint'($signed(yv));
        chk(64'(p), {32'd0, prod[31:0]}, "product");
        chk(64'(a0), 64'(m36(acc)), "mac accumulate");
      end
    end
    wr(R_AUC, 16'h0000);

    // ---- ALU functions with a random a and y operand (16 and 32 bit) ----
    for (i = 0; i < 300; i++) begin
      alu_op_t op;
      logic y32, src, dst;
      op  = alu_op_t'(4'($urandom_range(1, 15)));
      y32 = 1'($urandom);
      src = 1'($urandom);
      dst = 1'($urandom);
      xv = 16'($urandom); yv = 16'($urandom); ylv = 16'($urandom);
      wr(src ? R_A1H : R_A0H, xv);
      wr(src ? R_A1L : R_A0L, 16'($urandom));
      av = src ? a1 : a0;
      wr(R_YH, yv);
      wr(R_YL, ylv);
      bv = y32 ? {{4{yv[15]}}, yv, ylv} : {{4{yv[15]}}, yv, 16'h0};
      e0 = a0; e1 = a1;
      ctl.alu_op = op; ctl.b_sel_y = 1'b1; ctl.y32 = y32; ctl.a_src = src;
      ctl.a_dst = dst; ctl.acc_we = 1'b1; ctl.flags_we = 1'b1;
      tick();
      if (dst) e1 = ref_alu(op, av, bv); else e0 = ref_alu(op, av, bv);
      chk(64'(a0), 64'(e0), $sformatf("alu op %0d a0", op));
      chk(64'(a1), 64'(e1), $sformatf("alu op %0d a1", op));
      chk(64'(psw[15]), 64'(dst ? e1[35] : e0[35]), "flag n");
    end

    // ---- shifter functions ----
    for (i = 0; i < 80; i++) begin
      shift_op_t sop;
      sop = shift_op_t'(3'(i % 8));
      wr(R_A0H, 16'($urandom));
      wr(R_A0L, 16'($urandom));
      av = a0;
      ctl.use_shift = 1'b1; ctl.sh_op = sop; ctl.a_src = 1'b0; ctl.a_dst = 1'b1;
      ctl.acc_we = 1'b1;
      tick();
      chk(64'(a1), 64'(ref_sh(sop, av)), $sformatf("shift %0d", sop));
    end

    // ---- conditional accumulator function: a1 = -a1 if negative (absolute value) ----
    for (i = 0; i < 20; i++) begin
      xv = 16'($urandom);
      wr(R_A1H, xv);
      ctl.alu_op = A_PASSA; ctl.a_src = 1'b1; ctl.a_dst = 1'b1; ctl.flags_we = 1'b1;
      ctl.acc_we = 1'b1;
      tick();
      ctl.alu_op = A_NEGA; ctl.a_src = 1'b1; ctl.a_dst = 1'b1; ctl.acc_we = 1'b1;
      ctl.cond = C_MI;
      tick();
      chk(64'(a1), 64'(m36(longint'($signed(xv)) < 0 ? -longint'($signed(xv)) * 65536
                                                       : longint'($signed(xv)) * 65536)),
          "conditional negate");
    end
    // condition false leaves the accumulator alone: compare only (acc_we = 0)
    wr(R_A0H, 16'h0005);
    wr(R_YH, 16'h0007);
    ctl.alu_op = A_SUB; ctl.b_sel_y = 1'b1; ctl.flags_we = 1'b1;   // flags of 5 - 7
    tick();
    chk(64'(a0), 64'(36'h0_0005_0000), "compare leaves a0");
    ctl.alu_op = A_PASSB; ctl.b_sel_y = 1'b1; ctl.acc_we = 1'b1; ctl.cond = C_GT;
    tick();
    chk(64'(a0), 64'(36'h0_0005_0000), "max: condition false");
    ctl.alu_op = A_PASSB; ctl.b_sel_y = 1'b1; ctl.acc_we = 1'b1; ctl.cond = C_LE;
    tick();
    chk(64'(a0), 64'(36'h0_0007_0000), "max: condition true");

    // ---- extraction and saturation ----
    wr(R_A0H, 16'h7FFF);
    wr(R_YH, 16'h7FFF);
    ctl.alu_op = A_ADD; ctl.b_sel_y = 1'b1; ctl.acc_we = 1'b1; ctl.flags_we = 1'b1;
    tick();
    rd_sel = R_A0H; #1;
    chk(64'(rdata), 64'(16'h7FFF), "saturate positive");
    chk(64'(psw[12]), 64'(1), "lmv flag");
    idle();
    wr(R_AUC, 16'h0004);
    rd_sel = R_A0H; #1;
    chk(64'(rdata), 64'(16'hFFFE), "no saturation when disabled");
    idle();
    wr(R_AUC, 16'h0000);
    wr(R_A1H, 16'h8000);
    wr(R_YH, 16'h8000);
    ctl.alu_op = A_ADD; ctl.a_src = 1'b1; ctl.a_dst = 1'b1; ctl.b_sel_y = 1'b1;
    ctl.acc_we = 1'b1;
    tick();
    rd_sel = R_A1H; #1;
    chk(64'(rdata), 64'(16'h8000), "saturate negative");
    rd_sel = R_A1L; #1;
    chk(64'(rdata), 64'(16'h0000), "low half");
    idle();
    wr(R_A1H, 16'h1234);
    rd_sel = R_A1H; #1;
    chk(64'(rdata), 64'(16'h1234), "in-range extraction");
    idle();

    // ---- x from ROM data bus, counters ----
    rom_data = 16'hBEEF; ctl.x_rom_we = 1'b1;
    tick();
    rd_sel = R_X; #1;
    chk(64'(rdata), 64'(16'hBEEF), "x from rom bus");
    idle();
    wr(R_C1, 16'd10);
    ctl.c_inc = 2'd2; tick();
    ctl.c_inc = 2'd2; tick();
    ctl.c_inc = 2'd1; tick();
    rd_sel = R_C1; #1;
    chk(64'(rdata), 64'(12), "counter c1");
    rd_sel = R_C0; #1;
    chk(64'(rdata), 64'(1), "counter c0");
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
