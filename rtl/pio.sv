// pio: parallel I/O port, bus slave or bus master, 8- or 16-bit.
//
// Buffers pdx(in) and pdx(out) sit between the data bus and the 16 pins PB00-PB15;
// pioc sets the mode. Strobes are active low.
//  * Slave (pioc[0] = 0): an external master writes by pulling PIDS low with data on PB;
//    the data are taken when PIDS returns high, and PIBF (input buffer full) is set. It
//    reads by pulling PODS low: the port drives pdx(out) on PB while PODS is low and marks
//    the output buffer empty when PODS returns high.
//  * Master (pioc[0] = 1): a write of pdx by the processor drives pdx(out) on PB and pulls
//    PODS low for STROBE cycles; writing pioc with bit 5 set starts an input transfer,
//    pulling PIDS low for STROBE cycles and taking PB into pdx(in) at the end.
//  * 8-bit mode (pioc[1] = 1): only PB00-PB07 carry data; input words are zero-extended.
// Interrupts: irq is set while PIBF is set and pioc[2] is set, while the output buffer
// is empty and pioc[3] is set, or while the external INT pin is high and pioc[4] is set.
// IACK echoes the control unit's acknowledgement of an interrupt.
//
// Interface: PB, PIDS, PODS, INT are synchronised with two flip-flops; the bidirectional
// pins appear as _i/_o/_oe triples. pioc reads back {pibf, pobe, 9'b0, pioc[4:0]}. A
// read of R_PDX clears PIBF and must only be presented when the instruction reads it.
//
// From the design: pdx(in), pdx(out), pioc, master or slave operation, 8- and 16-bit
// interfaces, the pins PB, PIDS, PODS, INT, IACK, and the maskable interrupt. This
// implementation's choices: everything about timing and the pioc bit layout, the strobe
// length, the zero extension. PSEL (peripheral select) is not implemented.
module pio
  import dsp_pkg::*;
#(
  parameter int unsigned STROBE = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // pins
  input  logic [15:0] pb_i,
  output logic [15:0] pb_o,
  output logic        pb_oe,
  input  logic        pids_i,
  output logic        pids_o,
  output logic        pids_oe,
  input  logic        pods_i,
  output logic        pods_o,
  output logic        pods_oe,
  input  logic        int_i,
  output logic        iack_o,
  input  logic        iack_in,
  // data bus
  input  breg_t       wr_sel,
  input  logic [15:0] wdata,
  input  breg_t       rd_sel,
  output logic [15:0] rdata,
  output logic        irq
);

  logic [15:0] pb_s1, pb_s2;
  logic [2:0]  pids_s, pods_s;
  logic [1:0]  int_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_s1 <= '0; pb_s2 <= '0; pids_s <= '1; pods_s <= '1; int_s <= '0;
    end else begin
      pb_s1  <= pb_i;  pb_s2 <= pb_s1;
      pids_s <= {pids_s[1:0], pids_i};
      pods_s <= {pods_s[1:0], pods_i};
      int_s  <= {int_s[0], int_i};
    end
  end

  logic [4:0]  pioc;
  logic [15:0] pdx_in, pdx_out;
  logic        pibf, pobe;
  logic [7:0]  ocnt, icnt;     // master strobe timers
  logic        master, mode8;
  assign master = pioc[0];
  assign mode8  = pioc[1];

  function automatic logic [15:0] narrow(input logic [15:0] v, input logic m8);
    return m8 ? {8'h00, v[7:0]} : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pioc <= '0; pdx_in <= '0; pdx_out <= '0; pibf <= 1'b0; pobe <= 1'b1;
      ocnt <= '0; icnt <= '0;
    end else begin
      if (rd_sel == R_PDX) pibf <= 1'b0;
      if (!master) begin
        // slave: external strobes, action on their rising (trailing) edge
        if (pids_s[1] && !pids_s[2]) begin
          pdx_in <= narrow(pb_s2, mode8);
          pibf   <= 1'b1;
        end
        if (pods_s[1] && !pods_s[2]) pobe <= 1'b1;
      end else begin
        if (ocnt != '0) begin
          ocnt <= ocnt - 8'd1;
          if (ocnt == 8'd1) pobe <= 1'b1;
        end
        if (icnt != '0) begin
          icnt <= icnt - 8'd1;
          if (icnt == 8'd1) begin
            pdx_in <= narrow(pb_i, mode8);
            pibf   <= 1'b1;
          end
        end
      end
      if (wr_sel == R_PDX) begin
        pdx_out <= wdata;
        pobe    <= 1'b0;
        if (master) ocnt <= 8'(STROBE);
      end
      if (wr_sel == R_PIOC) begin
        pioc <= wdata[4:0];
        if (wdata[5] && wdata[0]) icnt <= 8'(STROBE);
      end
    end
  end

  // pins
  always_comb begin
    pb_o    = narrow(pdx_out, mode8);
    pb_oe   = master ? (ocnt != '0) : !pods_s[1];
    pods_oe = master;
    pods_o  = !(master && ocnt != '0);
    pids_oe = master;
    pids_o  = !(master && icnt != '0);
  end
  assign iack_o = iack_in;

  always_comb begin
    unique case (rd_sel)
      R_PDX:   rdata = pdx_in;
      R_PIOC:  rdata = {pibf, pobe, 9'h000, pioc};
      default: rdata = 16'h0000;
    endcase
  end

  assign irq = (pibf && pioc[2]) || (pobe && pioc[3]) || (int_s[1] && pioc[4]);

endmodule
