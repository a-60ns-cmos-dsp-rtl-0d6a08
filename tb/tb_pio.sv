// tb_pio: self-checking testbench of the parallel I/O port.
// The testbench plays an external host (slave mode) and an external peripheral (master
// mode) and checks: slave writes through PIDS into pdx(in) with PIBF, slave reads through
// PODS with PB driven from pdx(out) and the output buffer marked empty, master output
// strobes on PODS of STROBE cycles with the data on PB, master input strobes on PIDS
// with PB captured at their end, 8-bit mode, the three interrupt sources with their
// masks, and IACK.
module tb_pio;
  import dsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] pb_i = '0, pb_o;
  logic pb_oe, pids_i = 1, pids_o, pids_oe, pods_i = 1, pods_o, pods_oe;
  logic int_i = 0, iack_o, iack_in = 0, irq;
  breg_t wr_sel = R_NONE, rd_sel = R_NONE;
  logic [15:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  pio #(.STROBE(3)) dut (.clk, .rst_n, .pb_i, .pb_o, .pb_oe, .pids_i, .pids_o, .pids_oe,
                         .pods_i, .pods_o, .pods_oe, .int_i, .iack_o, .iack_in,
                         .wr_sel, .wdata, .rd_sel, .rdata, .irq);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] g, input logic [15:0] e, input string what);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask
  task automatic cpu_read(input breg_t r, output logic [15:0] v);
    @(negedge clk); rd_sel = r; #1 v = rdata;
    @(negedge clk); rd_sel = R_NONE;
  endtask
  task automatic cpu_write(input breg_t r, input logic [15:0] v);
    @(negedge clk); wr_sel = r; wdata = v;
    @(negedge clk); wr_sel = R_NONE;
  endtask

  logic [15:0] v, w;
  int lowc;
  logic [15:0] seen;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // ---------------- slave mode, 16 bit ----------------
    cpu_write(R_PIOC, 16'h000C);                  // PIBF and POBE interrupts enabled
    chk(16'(irq), 1, "output empty interrupt after reset");
    for (int t = 0; t < 10; t++) begin
      w = 16'($urandom);
      pb_i = w; pids_i = 0;
      #50 pids_i = 1;
      #10 pb_i = '1;
      #50;
      cpu_read(R_PIOC, v);
      chk(16'(v[15]), 1, "PIBF set by host write");
      cpu_read(R_PDX, v);
      chk(v, w, "host write data");
      cpu_read(R_PIOC, v);
      chk(16'(v[15]), 0, "PIBF cleared by read");
      w = 16'($urandom);
      cpu_write(R_PDX, w);
      chk(16'(irq), 0, "no interrupt with buffers idle");
      pods_i = 0;
      #50 chk(16'(pb_oe), 1, "PB driven during host read");
      chk(pb_o, w, "host read data");
      pods_i = 1;
      #50 chk(16'(pb_oe), 0, "PB released");
      chk(16'(irq), 1, "output empty interrupt after host read");
    end
    // ---------------- master mode ----------------
    cpu_write(R_PIOC, 16'h0001);
    for (int t = 0; t < 5; t++) begin
      w = 16'($urandom);
      @(negedge clk); wr_sel = R_PDX; wdata = w;
      @(negedge clk); wr_sel = R_NONE;
      lowc = 0;
      for (int c = 0; c < 10; c++) begin
        if (!pods_o) begin
          lowc++;
          seen = pb_o;
          chk(16'(pb_oe), 1, "PB driven by master");
        end
        @(negedge clk);
      end
      chk(16'(lowc), 3, "PODS strobe length");
      chk(seen, w, "master output data");
      chk(16'(pods_oe), 1, "PODS driven in master mode");
      // input transfer
      w = 16'($urandom);
      pb_i = w;
      cpu_write(R_PIOC, 16'h0021);
      chk(16'(pids_o), 0, "PIDS strobe");
      repeat (4) @(negedge clk);
      chk(16'(pids_o), 1, "PIDS released");
      cpu_read(R_PDX, v);
      chk(v, w, "master input data");
    end
    // ---------------- 8-bit mode (slave) ----------------
    cpu_write(R_PIOC, 16'h0002);
    pb_i = 16'hABCD; pids_i = 0;
    #50 pids_i = 1;
    #60 cpu_read(R_PDX, v);
    chk(v, 16'h00CD, "8-bit input");
    cpu_write(R_PDX, 16'h1234);
    chk(pb_o, 16'h0034, "8-bit output");
    // ---------------- external interrupt and acknowledge ----------------
    cpu_write(R_PIOC, 16'h0000);
    int_i = 1;
    #50 chk(16'(irq), 0, "INT masked");
    cpu_write(R_PIOC, 16'h0010);
    chk(16'(irq), 1, "INT enabled");
    iack_in = 1; #1 chk(16'(iack_o), 1, "IACK");
    iack_in = 0; int_i = 0;
    #50 chk(16'(irq), 0, "INT removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
