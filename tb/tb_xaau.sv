// tb_xaau: self-checking testbench of the program-side address unit.
// Checks pc stepping on fetches, jump/call/return/interrupt/interrupt-return, table
// pointer post-modification by +1 and +i, the address multiplexer (pc or pt) and the
// data-bus access to pt, pr, pi and i, against a model kept in the testbench.
module tb_xaau;
  import dsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pc_inc, data_rd;
  xa_op_t xa_op;
  pt_mod_t pt_mod;
  logic [15:0] target, wdata, rdata, rom_addr, pc;
  breg_t wr_sel, rd_sel;
  int checks = 0, failures = 0;

  xaau dut (.clk, .rst_n, .pc_inc, .xa_op, .target, .data_rd, .pt_mod, .wr_sel, .wdata,
            .rd_sel, .rdata, .rom_addr, .pc_o(pc));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic idle();
    pc_inc = 0; data_rd = 0; xa_op = XA_NONE; pt_mod = PT_NONE; target = '0;
    wdata = '0; wr_sel = R_NONE; rd_sel = R_NONE;
  endtask
  task automatic tick();
    @(posedge clk); #1; idle();
  endtask

  logic [15:0] m_pc, m_pt, m_pr, m_pi, m_i;
  int op;

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_pc = 0; m_pt = 0; m_pr = 0; m_pi = 0; m_i = 0;
    for (int n = 0; n < 600; n++) begin
      op = $urandom_range(0, 9);
      case (op)
        0, 1, 2: begin pc_inc = 1; m_pc++; end
        3: begin xa_op = XA_JUMP; target = 16'($urandom); m_pc = target; end
        4: begin xa_op = XA_CALL; target = 16'($urandom); m_pr = m_pc; m_pc = target; end
        5: begin xa_op = XA_RET; m_pc = m_pr; end
        6: begin xa_op = XA_INT; target = 16'($urandom); m_pi = m_pc; m_pc = target; end
        7: begin xa_op = XA_IRET; m_pc = m_pi; end
        8: begin
          data_rd = 1; pt_mod = pt_mod_t'($urandom_range(0, 2)); pc_inc = 1'($urandom);
          #1 chk(rom_addr, m_pt, "address bus = pt on data read");
          if (pt_mod == PT_INC) m_pt = m_pt + 1;
          if (pt_mod == PT_ADDI) m_pt = m_pt + m_i;
          if (pc_inc) m_pc++;
        end
        default: begin
          wdata = 16'($urandom);
          case ($urandom_range(0, 3))
            0: begin wr_sel = R_PT; m_pt = wdata; end
            1: begin wr_sel = R_PR; m_pr = wdata; end
            2: begin wr_sel = R_PI; m_pi = wdata; end
            default: begin wr_sel = R_I; m_i = wdata; end
          endcase
        end
      endcase
      tick();
      #1;
      chk(pc, m_pc, "pc");
      chk(rom_addr, m_pc, "address bus = pc");
      rd_sel = R_PT; #1 chk(rdata, m_pt, "pt");
      rd_sel = R_PR; #1 chk(rdata, m_pr, "pr");
      rd_sel = R_PI; #1 chk(rdata, m_pi, "pi");
      rd_sel = R_I;  #1 chk(rdata, m_i, "i");
      rd_sel = R_NONE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
