// tb_sio: self-checking testbench of the serial I/O port.
// The testbench plays the external codec: it drives bit clocks ICK and OCK eight times
// slower than the internal clock, frames received words with ILD and transmitted words
// with OLD, and checks: received words in sdx(in) with IBF, double buffering (a second
// word shifts in before the first is read), IBF cleared by the read, transmitted words
// bit by bit on DO (MSB first) with DOEN and OSE, and both interrupt sources with their
// masks.
module tb_sio;
  import dsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic di = 0, ick = 0, ild = 0, ock = 0, old = 0;
  logic ibf, do_o, ose, doen, irq;
  breg_t wr_sel = R_NONE, rd_sel = R_NONE;
  logic [15:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  sio dut (.clk, .rst_n, .di, .ick, .ild, .ibf, .do_o, .ock, .old, .ose, .doen,
           .wr_sel, .wdata, .rd_sel, .rdata, .irq);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
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

  // one ICK period of 80 ns; data and ILD change while ICK is low
  task automatic rx_word(input logic [15:0] w);
    for (int b = 15; b >= 0; b--) begin
      di = w[b]; ild = (b == 15);
      #40 ick = 1;
      #40 ick = 0;
    end
    ild = 0;
  endtask

  task automatic cpu_read(input breg_t r, output logic [15:0] v);
    @(negedge clk); rd_sel = r; #1 v = rdata;
    @(negedge clk); rd_sel = R_NONE;
  endtask
  task automatic cpu_write(input breg_t r, input logic [15:0] v);
    @(negedge clk); wr_sel = r; wdata = v;
    @(negedge clk); wr_sel = R_NONE;
  endtask

  logic [15:0] w1, w2, v, txw, rxd;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cpu_write(R_SIOC, 16'h0001);               // input-buffer-full interrupt enabled
    for (int t = 0; t < 10; t++) begin
      w1 = 16'($urandom); w2 = 16'($urandom);
      rx_word(w1);
      #60;
      chk(16'(ibf), 1, "IBF after word");
      chk(16'(irq), 1, "input interrupt");
      rx_word(w2);                               // double buffering: w1 not read yet
      #60;
      cpu_read(R_SDX, v);
      chk(v, w2, "second word");
      chk(16'(ibf), 0, "IBF cleared by read");
      chk(16'(irq), 0, "interrupt cleared");
      rx_word(w1);
      #60;
      cpu_read(R_SDX, v);
      chk(v, w1, "received word");
    end
    // double buffering: the processor reads word 1 while word 2 is shifting in
    w1 = 16'hA55A;
    rx_word(w1);
    fork
      rx_word(16'h1234);
      begin
        #400 cpu_read(R_SDX, v);
        chk(v, w1, "buffered word read during next shift");
      end
    join
    #60 cpu_read(R_SDX, v);
    chk(v, 16'h1234, "next word");

    // ---------------- transmit ----------------
    cpu_write(R_SIOC, 16'h0002);               // output-buffer-empty interrupt enabled
    chk(16'(irq), 1, "output empty interrupt");
    chk(16'(ose), 1, "OSE idle");
    for (int t = 0; t < 10; t++) begin
      txw = 16'($urandom);
      cpu_write(R_SDX, txw);
      chk(16'(irq), 0, "output interrupt cleared by write");
      old = 1;
      #40 ock = 1;
      #40 ock = 0; old = 0;
      chk(16'(doen), 1, "DOEN while shifting");
      chk(16'(ose), 0, "OSE low while shifting");
      rxd = '0;
      for (int b = 0; b < 16; b++) begin
        rxd = {rxd[14:0], do_o};
        #40 ock = 1;
        #40 ock = 0;
      end
      chk(rxd, txw, "transmitted word");
      chk(16'(ose), 1, "OSE after word");
      chk(16'(irq), 1, "output interrupt after load");
    end
    cpu_read(R_SIOC, v);
    chk(v, 16'h4002, "sioc status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
