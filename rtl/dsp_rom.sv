// dsp_rom: on-chip instruction and coefficient ROM, 2048 x 16.
//
// Holds the program and the fixed coefficients; the program memory bus reads it either
// for an instruction (address from pc) or for a coefficient (address from pt). The read
// is asynchronous: rdata follows addr within the cycle. In silicon the contents are fixed
// by a mask; here the load port (load_we, load_addr, load_data, written on the rising
// edge) stands in for that programming step and must not be used while the processor
// runs. Only the low log2(DEPTH) address bits are decoded; the external-memory mode
// that replaces this ROM is selected outside it.
//
// From the design: the size of 2048 words of 16 bits and its use for both instructions
// and coefficients. This implementation's choices: the asynchronous read and the load
// port.
module dsp_rom #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AB    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AB-1:0] addr,
  output logic [15:0]   rdata,
  input  logic          load_we,
  input  logic [AB-1:0] load_addr,
  input  logic [15:0]   load_data
);

  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign rdata = mem[addr];

endmodule
