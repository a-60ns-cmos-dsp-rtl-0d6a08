// dsp_ram: on-chip data RAM, 512 x 16.
//
// Holds variable data (filter state, results). One access per cycle, read or write, at
// the address produced by the RAM address unit. A write is taken on the rising clock
// edge; a read is asynchronous, so the word at addr is on rdata within the same cycle and
// can be moved across the data bus in that cycle.
//
// From the design: the size of 512 words of 16 bits and its place on the data bus. This
// implementation's choices: a single port with asynchronous read and no reset of the
// contents.
module dsp_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AB    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AB-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata
);

  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
