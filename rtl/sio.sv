// sio: double-buffered serial I/O port.
//
// Receive side: the input shift register isr collects bits from DI on rising edges of
// the input bit clock ICK; a high ILD seen on an ICK rising edge marks the first bit of a
// 16-bit word. When the sixteenth bit has arrived the word moves to the input buffer
// sdx(in) and IBF (input buffer full) is raised; reading sdx over the data bus clears it.
// While the processor has not yet read the buffer the next word can already be shifting
// in: that is the double buffering.
// Transmit side: the processor writes sdx(out), which empties no buffer until a high OLD
// is seen on a rising edge of the output bit clock OCK; the word then moves into the
// output shift register osr and its bits leave on DO, most significant first, one per
// OCK rising edge. OSE (output shift empty) is high when no word is being shifted; DOEN
// is high while DO carries data.
// Both directions can interrupt the processor: irq is set while IBF is set and sioc[0] is
// set, or while the output buffer is empty and sioc[1] is set.
//
// Interface: DI, ICK, ILD, OCK, OLD are external pins and are synchronised to the
// internal clock with two flip-flops, so the bit clocks must run at most at a quarter of
// the internal clock. rd_sel/rdata and wr_sel/wdata are the data bus; a read of R_SDX
// must only be presented when the instruction really reads it (it clears IBF).
// sioc reads back {ibf, obe, 12'b0, sioc[1:0]}.
//
// From the design: the registers sdx(in), isr, sdx(out), osr, sioc, double buffering,
// the pins DI, ICK, ILD, IBF, DO, OCK, OLD, OSE, DOEN and the maskable interrupt. This
// implementation's choices: 16-bit words, MSB first, the framing by ILD/OLD described
// above, passive (externally clocked) operation only, the sioc bit layout. The time-
// division-multiplex features (srta, tdms, SYNC, SADD) are not implemented.
module sio
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // pins
  input  logic        di,
  input  logic        ick,
  input  logic        ild,
  output logic        ibf,
  output logic        do_o,
  input  logic        ock,
  input  logic        old,
  output logic        ose,
  output logic        doen,
  // data bus
  input  breg_t       wr_sel,
  input  logic [15:0] wdata,
  input  breg_t       rd_sel,
  output logic [15:0] rdata,
  output logic        irq
);

  // ---------------- pin synchronisers ----------------
  logic [2:0] ick_s, ock_s;
  logic [1:0] di_s, ild_s, old_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ick_s <= '0; ock_s <= '0; di_s <= '0; ild_s <= '0; old_s <= '0;
    end else begin
      ick_s <= {ick_s[1:0], ick};
      ock_s <= {ock_s[1:0], ock};
      di_s  <= {di_s[0], di};
      ild_s <= {ild_s[0], ild};
      old_s <= {old_s[0], old};
    end
  end
  logic ick_rise, ock_rise;
  assign ick_rise = ick_s[1] && !ick_s[2];
  assign ock_rise = ock_s[1] && !ock_s[2];

  // ---------------- receive ----------------
  logic [15:0] isr, sdx_in;
  logic [4:0]  ibits;          // bits received of the current word
  logic        rx_busy;
  logic [1:0]  sioc;
  logic [15:0] sdx_out, osr;
  logic        obe;            // output buffer empty
  logic [4:0]  obits;          // bits still to shift out

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      isr <= '0; sdx_in <= '0; ibits <= '0; rx_busy <= 1'b0; ibf <= 1'b0;
    end else begin
      if (rd_sel == R_SDX) ibf <= 1'b0;
      if (ick_rise && (ild_s[1] || rx_busy)) begin
        isr <= {isr[14:0], di_s[1]};
        if (ild_s[1] && !rx_busy) begin
          ibits   <= 5'd1;
          rx_busy <= 1'b1;
        end else if (ibits == 5'd15) begin
          sdx_in  <= {isr[14:0], di_s[1]};
          ibf     <= 1'b1;
          ibits   <= '0;
          rx_busy <= 1'b0;
        end else begin
          ibits <= ibits + 5'd1;
        end
      end
    end
  end

  // ---------------- transmit ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sdx_out <= '0; osr <= '0; obe <= 1'b1; obits <= '0; sioc <= '0;
    end else begin
      if (ock_rise) begin
        if (obits > 5'd1) begin
          osr   <= {osr[14:0], 1'b0};
          obits <= obits - 5'd1;
        end else if (old_s[1] && !obe) begin
          osr   <= sdx_out;
          obits <= 5'd16;
          obe   <= 1'b1;
        end else begin
          obits <= '0;
        end
      end
      if (wr_sel == R_SDX) begin
        sdx_out <= wdata;
        obe     <= 1'b0;
      end
      if (wr_sel == R_SIOC) sioc <= wdata[1:0];
    end
  end

  assign do_o = (obits != '0) && osr[15];
  assign doen = (obits != '0);
  assign ose  = (obits == '0);

  always_comb begin
    unique case (rd_sel)
      R_SDX:   rdata = sdx_in;
      R_SIOC:  rdata = {ibf, obe, 12'h000, sioc};
      default: rdata = 16'h0000;
    endcase
  end

  assign irq = (ibf && sioc[0]) || (obe && sioc[1]);

endmodule
