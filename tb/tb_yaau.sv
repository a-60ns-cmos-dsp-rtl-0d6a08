// tb_yaau: self-checking testbench of the RAM address unit.
// Checks register-indirect addressing through r0-r3 with every post-modification
// (none, +1, -1, +j, +k), modulo wrap from re back to rb, re = 0 disabling the wrap, and
// data-bus access to all eight registers, against a model in the testbench.
module tb_yaau;
  import dsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic acc_en, wrapped;
  logic [1:0] sel;
  ya_mod_t mode;
  logic [15:0] wdata, rdata, ram_addr;
  breg_t wr_sel, rd_sel;
  int checks = 0, failures = 0, wraps = 0;

  yaau dut (.clk, .rst_n, .acc_en, .sel, .mode, .wr_sel, .wdata, .rd_sel, .rdata,
            .ram_addr, .wrapped);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
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
    acc_en = 0; sel = 0; mode = YM_NONE; wdata = '0; wr_sel = R_NONE; rd_sel = R_NONE;
  endtask
  task automatic tick();
    @(posedge clk); #1; idle();
  endtask
  task automatic wr(input breg_t r, input logic [15:0] v);
    wr_sel = r; wdata = v; tick();
  endtask

  logic [15:0] m_r [4];
  logic [15:0] m_j, m_k, m_rb, m_re;
  breg_t rn [4] = '{R_R0, R_R1, R_R2, R_R3};

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      m_r[n] = 16'($urandom_range(0, 40));
      wr(rn[n], m_r[n]);
    end
    m_j = 16'd3;  wr(R_J, m_j);
    m_k = 16'hFFFE; wr(R_K, m_k);
    m_rb = 16'd10; wr(R_RB, m_rb);
    m_re = 16'd0;  wr(R_RE, m_re);
    for (int n = 0; n < 2000; n++) begin
      if (n == 1000) begin m_re = 16'd17; wr(R_RE, m_re); end
      sel = 2'($urandom);
      mode = ya_mod_t'($urandom_range(0, 4));
      if (n >= 1000 && $urandom_range(0, 1) == 1) mode = YM_INC;
      acc_en = 1;
      #1 chk(ram_addr, m_r[sel], "address");
      case (mode)
        YM_INC: begin
          if (m_re != 0 && m_r[sel] == m_re) begin
            m_r[sel] = m_rb;
            checks++;
            if (!wrapped) begin failures++; $display("FAIL wrap flag"); end
            wraps++;
          end else m_r[sel] = m_r[sel] + 1;
        end
        YM_DEC:  m_r[sel] = m_r[sel] - 1;
        YM_ADDJ: m_r[sel] = m_r[sel] + m_j;
        YM_ADDK: m_r[sel] = m_r[sel] + m_k;
        default: ;
      endcase
      tick();
      // keep pointers near the circular buffer so the wrap is exercised
      if (n >= 1000 && (m_r[sel] > 16'd40)) begin
        m_r[sel] = 16'd12; wr(rn[sel], m_r[sel]);
      end
      for (int q = 0; q < 4; q++) begin
        rd_sel = rn[q]; #1 chk(rdata, m_r[q], "pointer");
      end
      rd_sel = R_NONE;
    end
    rd_sel = R_J;  #1 chk(rdata, m_j, "j");
    rd_sel = R_K;  #1 chk(rdata, m_k, "k");
    rd_sel = R_RB; #1 chk(rdata, m_rb, "rb");
    rd_sel = R_RE; #1 chk(rdata, m_re, "re");
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no modulo wrap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
