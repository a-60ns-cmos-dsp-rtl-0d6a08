// dsp_pkg: types and constants shared by the blocks of the 16-bit fixed-point DSP.
//
// The DSP moves 16-bit words over one data bus between its units (arithmetic unit,
// two address units, RAM, serial and parallel ports) while a second bus, the ROM data
// bus, carries instructions and fixed coefficients. The register names follow the block
// diagram of the design (x, yh, yl, p, a0, a1, c0-c2, auc, psw, pc, pt, pr, pi, i, r0-r3,
// j, k, rb, re, sdx, sioc, srta, tdms, pdx, pioc). The numeric encodings of every enum
// below are this design's own choice: the instruction set of the processor is not
// published with it, so the control unit that produces these fields sits outside the RTL
// and drives a decoded control word (ctl_t) into the top.
package dsp_pkg;

  // Registers reachable over the 16-bit data bus (source or destination of a move).
  typedef enum logic [5:0] {
    R_NONE = 6'd0,
    R_IMM  = 6'd1,   // immediate field of the instruction (source only)
    R_RAM  = 6'd2,   // RAM word addressed by the YAAU
    R_X    = 6'd3,
    R_YH   = 6'd4,   // write: yh <= data, yl <= 0
    R_YL   = 6'd5,
    R_A0H  = 6'd6,   // read: extracted/saturated a0[31:16]; write: a0 <= sext(data) << 16
    R_A0L  = 6'd7,
    R_A1H  = 6'd8,
    R_A1L  = 6'd9,
    R_PH   = 6'd10,  // read only
    R_PL   = 6'd11,  // read only
    R_C0   = 6'd12,
    R_C1   = 6'd13,
    R_C2   = 6'd14,
    R_AUC  = 6'd15,
    R_PSW  = 6'd16,
    R_PT   = 6'd17,
    R_PR   = 6'd18,
    R_PI   = 6'd19,
    R_I    = 6'd20,
    R_R0   = 6'd21,
    R_R1   = 6'd22,
    R_R2   = 6'd23,
    R_R3   = 6'd24,
    R_J    = 6'd25,
    R_K    = 6'd26,
    R_RB   = 6'd27,
    R_RE   = 6'd28,
    R_SDX  = 6'd29,  // read: serial input buffer; write: serial output buffer
    R_SIOC = 6'd30,
    R_SRTA = 6'd31,
    R_TDMS = 6'd32,
    R_PDX  = 6'd33,  // read: parallel input buffer; write: parallel output buffer
    R_PIOC = 6'd34
  } breg_t;

  // The fifteen ALU functions (A_NONE leaves the accumulator alone).
  // a = the source accumulator, b = the multiplexer output (shifted p or y).
  typedef enum logic [3:0] {
    A_NONE  = 4'd0,
    A_PASSB = 4'd1,   // b
    A_ADD   = 4'd2,   // a + b
    A_SUB   = 4'd3,   // a - b
    A_RSUB  = 4'd4,   // b - a
    A_NEGB  = 4'd5,   // -b
    A_AND   = 4'd6,
    A_OR    = 4'd7,
    A_XOR   = 4'd8,
    A_NOTA  = 4'd9,   // ~a
    A_NEGA  = 4'd10,  // -a
    A_ABSA  = 4'd11,  // |a|
    A_INCA  = 4'd12,  // a + 1
    A_DECA  = 4'd13,  // a - 1
    A_CLR   = 4'd14,  // 0
    A_PASSA = 4'd15   // a (move between accumulators)
  } alu_op_t;

  // The eight shifter functions: four right (arithmetic) and four left.
  typedef enum logic [2:0] {
    SH_R1 = 3'd0, SH_R4 = 3'd1, SH_R8 = 3'd2, SH_R16 = 3'd3,
    SH_L1 = 3'd4, SH_L4 = 3'd5, SH_L8 = 3'd6, SH_L16 = 3'd7
  } shift_op_t;

  // Conditions of the conditional accumulator functions, tested on the psw flags
  // left by the previous ALU/shifter result.
  typedef enum logic [2:0] {
    C_TRUE = 3'd0,  // unconditional
    C_MI   = 3'd1,  // negative
    C_PL   = 3'd2,  // zero or positive
    C_EQ   = 3'd3,
    C_NE   = 3'd4,
    C_GT   = 3'd5,
    C_LE   = 3'd6,
    C_LMV  = 3'd7   // result used the guard bits (would saturate on extraction)
  } cond_t;

  // Product alignment shifter setting, auc[1:0].
  typedef enum logic [1:0] {
    PS_NONE = 2'd0, PS_R2 = 2'd1, PS_L2 = 2'd2, PS_RSVD = 2'd3
  } pshift_t;

  // Arithmetic unit control for one instruction.
  typedef struct packed {
    logic      mult_en;    // p <= x * yh
    logic      x_rom_we;   // x <= ROM data bus (coefficient from *pt)
    logic      b_sel_y;    // ALU operand b: 0 = aligned p, 1 = y
    logic      y32;        // with b_sel_y: 1 = 32-bit yh:yl, 0 = yh:0
    logic      a_src;      // ALU operand a: accumulator 0 or 1
    logic      a_dst;      // destination accumulator
    logic      acc_we;     // write the result (if cond holds)
    logic      flags_we;   // update psw flags from the result
    logic      use_shift;  // result from the shifter instead of the ALU
    alu_op_t   alu_op;
    shift_op_t sh_op;
    cond_t     cond;
    logic [1:0] c_inc;     // increment counter c0 (1), c1 (2), c2 (3)
  } dau_ctl_t;

  // XAAU program-flow operations.
  typedef enum logic [2:0] {
    XA_NONE = 3'd0,
    XA_JUMP = 3'd1,  // pc <= target
    XA_CALL = 3'd2,  // pr <= pc, pc <= target
    XA_RET  = 3'd3,  // pc <= pr
    XA_INT  = 3'd4,  // pi <= pc, pc <= target (interrupt vector)
    XA_IRET = 3'd5   // pc <= pi
  } xa_op_t;

  // Post-modification of the table pointer pt.
  typedef enum logic [1:0] { PT_NONE = 2'd0, PT_INC = 2'd1, PT_ADDI = 2'd2 } pt_mod_t;

  // Post-modification of the RAM pointer r0-r3.
  typedef enum logic [2:0] {
    YM_NONE = 3'd0, YM_INC = 3'd1, YM_DEC = 3'd2, YM_ADDJ = 3'd3, YM_ADDK = 3'd4
  } ya_mod_t;

  // Decoded control word of one instruction, produced by the control unit.
  typedef struct packed {
    breg_t        src;        // data bus source
    breg_t        dst;        // data bus destination
    logic [15:0]  imm;        // immediate / jump target
    dau_ctl_t     dau;
    logic [1:0]   ya_sel;     // RAM pointer r0..r3 used by R_RAM
    ya_mod_t      ya_mod;     // its post-modification
    pt_mod_t      pt_mod;     // post-modification of pt after a ROM data read
    xa_op_t       xa_op;
    logic         do_start;   // do k {next do_n instructions}
    logic         redo_start; // redo k
    logic [3:0]   do_n;       // 1..15 instructions
    logic [7:0]   do_k;       // loop count, 1..255
    logic         iack;       // interrupt acknowledged (drives IACK)
  } ctl_t;

endpackage
