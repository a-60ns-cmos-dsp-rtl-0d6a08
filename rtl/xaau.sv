// xaau: program-side address arithmetic unit.
//
// Holds the program counter pc, the table pointer pt, the return register pr, the
// interrupt return register pi and the increment register i, with one adder between
// them. pc always points at the next instruction to fetch from program memory; it steps
// by one on every fetch made from program memory (not on fetches that the instruction
// cache replays). pt addresses fixed coefficients or tables in the same memory and is
// post-modified after each coefficient read, by +1 or by +i. A jump loads pc from the
// instruction's target field, a call first saves pc in pr, an interrupt saves pc in pi,
// and the two returns reload pc from pr or pi. pt, pr, pi and i are readable and
// writable over the 16-bit data bus.
//
// Interface: pc_inc (a fetch from program memory this cycle), xa_op/target (program flow),
// data_rd with pt_mod (a coefficient is read at *pt this cycle), wr_sel/wdata and
// rd_sel/rdata for the data bus. rom_addr is the address driven on the program memory
// address bus: pt when data_rd is set, otherwise pc. All registers update on the rising
// edge; outputs are combinational.
//
// From the design: the register names and the adder with i. This implementation's
// choices: 16-bit registers, the encodings of the operations, post-modification by +1
// or +i, reset of every register to 0, and a data-bus write beating an automatic update
// of the same register.
module xaau
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pc_inc,
  input  xa_op_t      xa_op,
  input  logic [15:0] target,
  input  logic        data_rd,
  input  pt_mod_t     pt_mod,
  input  breg_t       wr_sel,
  input  logic [15:0] wdata,
  input  breg_t       rd_sel,
  output logic [15:0] rdata,
  output logic [15:0] rom_addr,
  output logic [15:0] pc_o
);

  logic [15:0] pc, pt, pr, pi, i;
  logic [15:0] pt_step;

  // the adder: pt + (1 or i)
  assign pt_step = (pt_mod == PT_ADDI) ? i : 16'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; pt <= '0; pr <= '0; pi <= '0; i <= '0;
    end else begin
      unique case (xa_op)
        XA_JUMP: pc <= target;
        XA_CALL: begin pr <= pc; pc <= target; end
        XA_RET:  pc <= pr;
        XA_INT:  begin pi <= pc; pc <= target; end
        XA_IRET: pc <= pi;
        default: if (pc_inc) pc <= pc + 16'd1;
      endcase
      if (data_rd && pt_mod != PT_NONE) pt <= pt + pt_step;
      unique case (wr_sel)
        R_PT: pt <= wdata;
        R_PR: pr <= wdata;
        R_PI: pi <= wdata;
        R_I:  i  <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rd_sel)
      R_PT:    rdata = pt;
      R_PR:    rdata = pr;
      R_PI:    rdata = pi;
      R_I:     rdata = i;
      default: rdata = 16'h0000;
    endcase
  end

  assign rom_addr = data_rd ? pt : pc;
  assign pc_o     = pc;

endmodule
