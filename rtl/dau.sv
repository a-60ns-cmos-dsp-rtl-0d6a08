// dau: data arithmetic unit of the DSP.
//
// Two ways through the unit, selected per instruction:
//  * multiply/accumulate, two stages: stage 1 forms the full-precision 32-bit two's
//    complement product p <= x * yh; stage 2 aligns p (shift right 2, none, left 2, set by
//    auc[1:0]), sign-extends it to 36 bits and adds it into accumulator a0 or a1. Both
//    stages run in the same instruction, so "a0 = a0 + p, p = x * y" streams one tap per
//    cycle with one cycle of latency between a product and its accumulation.
//  * ALU path, one stage: the multiplier is bypassed and y (16-bit yh with a zero low
//    half, or 32-bit yh:yl) feeds a 15-function ALU; alternatively an 8-function
//    shifter shifts an accumulator 1, 4, 8 or 16 places right (arithmetic) or left.
// Every accumulator write can be made conditional on the psw flags of the previous
// result (the conditional accumulator functions). Reading an accumulator's high half onto
// the 16-bit data bus goes through extract/saturate: if the value uses the guard bits
// (a[35:31] not all equal) the word is clamped to 0x7FFF or 0x8000, unless auc[2] is set.
// c0, c1 and c2 are 16-bit counters, incremented on request and readable over the bus.
//
// Interface: ctl carries the decoded arithmetic fields of the current instruction,
// rom_data is the ROM data bus (loads x), wr_sel/wdata write a register from the data
// bus and rd_sel/rdata read one (rdata is 0 when rd_sel names no register of this
// unit). All registers update on the rising clock edge; rdata is combinational.
//
// From the design: the register set, widths (16x16 -> 32 product, 36-bit accumulators,
// two of them), the product shift of -2/0/+2, the 15-function ALU, the 8-function
// shifter with four right and four left shifts, saturation on extraction and the
// conditional accumulator functions. This implementation's own choices: the list of ALU
// functions, the shift distances, the flag set and conditions, the bit layout of auc and
// psw, the counters' behaviour, and a bus write beating an ALU write to the same
// accumulator in the same cycle. Edge-triggered flip-flops replace the two-phase latches.
module dau
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  dau_ctl_t    ctl,
  input  logic [15:0] rom_data,
  input  breg_t       wr_sel,
  input  logic [15:0] wdata,
  input  breg_t       rd_sel,
  output logic [15:0] rdata,
  output logic [35:0] a0_o,
  output logic [35:0] a1_o,
  output logic [31:0] p_o,
  output logic [15:0] psw_o
);

  logic [15:0] x, yh, yl;
  logic [31:0] p;
  logic [35:0] acc [2];
  logic [15:0] c0, c1, c2, auc;
  // psw flags: n (negative), z (zero), v (36-bit overflow), lmv (guard bits in use)
  logic        fn, fz, fv, flmv;

  // ---------------- product alignment ----------------
  logic [35:0] p_ext, p_al;
  always_comb begin
    p_ext = {{4{p[31]}}, p};
    unique case (pshift_t'(auc[1:0]))
      PS_R2:   p_al = {{2{p_ext[35]}}, p_ext[35:2]};
      PS_L2:   p_al = {p_ext[33:0], 2'b00};
      default: p_al = p_ext;
    endcase
  end

  // ---------------- operand selection ----------------
  logic [35:0] opa, opb;
  always_comb begin
    opa = acc[ctl.a_src];
    if (ctl.b_sel_y)
      opb = ctl.y32 ? {{4{yh[15]}}, yh, yl} : {{4{yh[15]}}, yh, 16'h0000};
    else
      opb = p_al;
  end

  // ---------------- ALU / shifter ----------------
  logic [36:0] sum;
  logic [35:0] res;
  logic        ovf;
  always_comb begin
    sum = '0;
    ovf = 1'b0;
    res = opa;
    if (ctl.use_shift) begin
      unique case (ctl.sh_op)
        SH_R1:  res = 36'($signed(opa) >>> 1);
        SH_R4:  res = 36'($signed(opa) >>> 4);
        SH_R8:  res = 36'($signed(opa) >>> 8);
        SH_R16: res = 36'($signed(opa) >>> 16);
        SH_L1:  res = opa << 1;
        SH_L4:  res = opa << 4;
        SH_L8:  res = opa << 8;
        SH_L16: res = opa << 16;
      endcase
    end else begin
      unique case (ctl.alu_op)
        A_PASSB: res = opb;
        A_ADD: begin
          sum = {opa[35], opa} + {opb[35], opb};
          res = sum[35:0];
          ovf = sum[36] ^ sum[35];
        end
        A_SUB: begin
          sum = {opa[35], opa} - {opb[35], opb};
          res = sum[35:0];
          ovf = sum[36] ^ sum[35];
        end
        A_RSUB: begin
          sum = {opb[35], opb} - {opa[35], opa};
          res = sum[35:0];
          ovf = sum[36] ^ sum[35];
        end
        A_NEGB: begin
          sum = 37'd0 - {opb[35], opb};
          res = sum[35:0];
          ovf = sum[36] ^ sum[35];
        end
        A_AND:  res = opa & opb;
        A_OR:   res = opa | opb;
        A_XOR:  res = opa ^ opb;
        A_NOTA: res = ~opa;
        A_NEGA: begin
          sum = 37'd0 - {opa[35], opa};
          res = sum[35:0];
          ovf = sum[36] ^ sum[35];
        end
        A_ABSA: begin
          sum = opa[35] ? 37'd0 - {opa[35], opa} : {opa[35], opa};
          res = sum[35:0];
          ovf = sum[36] ^ sum[35];
        end
        A_INCA: begin
          sum = {opa[35], opa} + 37'd1;
          res = sum[35:0];
          ovf = sum[36] ^ sum[35];
        end
        A_DECA: begin
          sum = {opa[35], opa} - 37'd1;
          res = sum[35:0];
          ovf = sum[36] ^ sum[35];
        end
        A_CLR:   res = '0;
        A_PASSA: res = opa;
        default: res = opa;
      endcase
    end
  end

  // ---------------- condition test ----------------
  logic cond_ok;
  always_comb begin
    unique case (ctl.cond)
      C_TRUE: cond_ok = 1'b1;
      C_MI:   cond_ok = fn;
      C_PL:   cond_ok = !fn;
      C_EQ:   cond_ok = fz;
      C_NE:   cond_ok = !fz;
      C_GT:   cond_ok = !fn && !fz;
      C_LE:   cond_ok = fn || fz;
      C_LMV:  cond_ok = flmv;
    endcase
  end

  logic active;
  assign active = ctl.use_shift || (ctl.alu_op != A_NONE);

  // ---------------- extract / saturate ----------------
  function automatic logic [15:0] extract_hi(input logic [35:0] a, input logic sat_dis);
    if (!sat_dis && !((&a[35:31]) || !(|a[35:31])))
      return a[35] ? 16'h8000 : 16'h7FFF;
    return a[31:16];
  endfunction

  always_comb begin
    unique case (rd_sel)
      R_X:     rdata = x;
      R_YH:    rdata = yh;
      R_YL:    rdata = yl;
      R_A0H:   rdata = extract_hi(acc[0], auc[2]);
      R_A0L:   rdata = acc[0][15:0];
      R_A1H:   rdata = extract_hi(acc[1], auc[2]);
      R_A1L:   rdata = acc[1][15:0];
      R_PH:    rdata = p[31:16];
      R_PL:    rdata = p[15:0];
      R_C0:    rdata = c0;
      R_C1:    rdata = c1;
      R_C2:    rdata = c2;
      R_AUC:   rdata = auc;
      R_PSW:   rdata = {fn, fz, fv, flmv, 12'h000};
      default: rdata = 16'h0000;
    endcase
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; yh <= '0; yl <= '0; p <= '0;
      acc[0] <= '0; acc[1] <= '0;
      c0 <= '0; c1 <= '0; c2 <= '0; auc <= '0;
      fn <= 1'b0; fz <= 1'b0; fv <= 1'b0; flmv <= 1'b0;
    end else begin
      // stage 1: multiplier (uses the x and y values held before this edge)
      if (ctl.mult_en) p <= 32'($signed(x) * $signed(yh));
      if (ctl.x_rom_we) x <= rom_data;
      // stage 2 / ALU path
      if (active && ctl.acc_we && cond_ok) acc[ctl.a_dst] <= res;
      if (active && ctl.flags_we) begin
        fn   <= res[35];
        fz   <= (res == '0);
        fv   <= ovf;
        flmv <= !((&res[35:31]) || !(|res[35:31]));
      end
      unique case (ctl.c_inc)
        2'd1: c0 <= c0 + 16'd1;
        2'd2: c1 <= c1 + 16'd1;
        2'd3: c2 <= c2 + 16'd1;
        default: ;
      endcase
      // data bus writes (take priority over the arithmetic path)
      unique case (wr_sel)
        R_X:   x <= wdata;
        R_YH:  begin yh <= wdata; yl <= '0; end
        R_YL:  yl <= wdata;
        R_A0H: acc[0] <= {{4{wdata[15]}}, wdata, 16'h0000};
        R_A0L: acc[0][15:0] <= wdata;
        R_A1H: acc[1] <= {{4{wdata[15]}}, wdata, 16'h0000};
        R_A1L: acc[1][15:0] <= wdata;
        R_C0:  c0 <= wdata;
        R_C1:  c1 <= wdata;
        R_C2:  c2 <= wdata;
        R_AUC: auc <= wdata;
        R_PSW: {fn, fz, fv, flmv} <= wdata[15:12];
        default: ;
      endcase
    end
  end

  assign a0_o  = acc[0];
  assign a1_o  = acc[1];
  assign p_o   = p;
  assign psw_o = {fn, fz, fv, flmv, 12'h000};

endmodule
