// yaau: RAM-side address arithmetic unit.
//
// Four pointer registers r0-r3 address the data RAM, for reads and writes alike, with
// post-modification: after the access the pointer used steps by 0, +1, -1, +j or +k.
// Modulo addressing: when a pointer equal to the end register re is post-incremented
// by one, the comparator makes it reload the base register rb instead, so a circular
// buffer of any length may start at any address. re = 0 turns modulo addressing off.
// All eight registers are readable and writable over the 16-bit data bus.
//
// Interface: acc_en (a RAM access is made this cycle), sel (which pointer), mode (its
// post-modification), wr_sel/wdata and rd_sel/rdata for the data bus, ram_addr (the
// pointer's value before modification, combinational). Registers update on the rising
// edge.
//
// From the design: r0-r3, j, k, rb, re, the adder and the comparator, register-indirect
// addressing with post-modification and modulo addressing of arbitrary length. This
// implementation's choices: 16-bit registers, the set of modifications, modulo wrap only
// on the +1 step, re = 0 disabling it, and a data-bus write beating a post-modification
// of the same register.
module yaau
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        acc_en,
  input  logic [1:0]  sel,
  input  ya_mod_t     mode,
  input  breg_t       wr_sel,
  input  logic [15:0] wdata,
  input  breg_t       rd_sel,
  output logic [15:0] rdata,
  output logic [15:0] ram_addr,
  output logic        wrapped      // a modulo wrap happened this cycle
);

  logic [15:0] r [4];
  logic [15:0] j, k, rb, re;
  logic [15:0] cur, nxt;

  assign cur = r[sel];

  always_comb begin
    wrapped = 1'b0;
    unique case (mode)
      YM_INC: begin
        if (re != 16'h0000 && cur == re) begin
          nxt = rb;
          wrapped = acc_en;
        end else begin
          nxt = cur + 16'd1;
        end
      end
      YM_DEC:  nxt = cur - 16'd1;
      YM_ADDJ: nxt = cur + j;
      YM_ADDK: nxt = cur + k;
      default: nxt = cur;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r[0] <= '0; r[1] <= '0; r[2] <= '0; r[3] <= '0;
      j <= '0; k <= '0; rb <= '0; re <= '0;
    end else begin
      if (acc_en) r[sel] <= nxt;
      unique case (wr_sel)
        R_R0: r[0] <= wdata;
        R_R1: r[1] <= wdata;
        R_R2: r[2] <= wdata;
        R_R3: r[3] <= wdata;
        R_J:  j  <= wdata;
        R_K:  k  <= wdata;
        R_RB: rb <= wdata;
        R_RE: re <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rd_sel)
      R_R0:    rdata = r[0];
      R_R1:    rdata = r[1];
      R_R2:    rdata = r[2];
      R_R3:    rdata = r[3];
      R_J:     rdata = j;
      R_K:     rdata = k;
      R_RB:    rdata = rb;
      R_RE:    rdata = re;
      default: rdata = 16'h0000;
    endcase
  end

  assign ram_addr = cur;

endmodule
