// tb_dsp_ram: self-checking testbench of the 512 x 16 data RAM at its full size.
// Random reads and writes compared with a model array; reads are checked in the cycle
// of the access (asynchronous read) and writes take effect at the clock edge.
module tb_dsp_ram;
  logic clk = 1'b0;
  logic we;
  logic [8:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [512];
  int checks = 0, failures = 0;

  dsp_ram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int a = 0; a < 512; a++) begin
      we = 1; addr = 9'(a); wdata = 16'($urandom); model[a] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 5000; n++) begin
      addr = 9'($urandom); we = 1'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL ram[%0d] = %h expected %h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
