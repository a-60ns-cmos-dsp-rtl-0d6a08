// tb_dsp_rom: self-checking testbench of the 2048 x 16 ROM at its full size.
// Programs every word with a value computed from its address, (a * 40503) ^ 0x5A5A
// truncated to 16 bits, then reads all words back in a random order and checks them.
module tb_dsp_rom;
  logic clk = 1'b0;
  logic [10:0] addr, load_addr;
  logic [15:0] rdata, load_data;
  logic load_we;
  int checks = 0, failures = 0;

  dsp_rom dut (.clk, .addr, .rdata, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] word(input int a);
    return 16'((a * 40503) ^ 16'h5A5A);
  endfunction

  initial begin
    load_we = 0; addr = '0; load_addr = '0; load_data = '0;
    for (int a = 0; a < 2048; a++) begin
      load_we = 1; load_addr = 11'(a); load_data = word(a);
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int n = 0; n < 4096; n++) begin
      int a;
      a = (n < 2048) ? n : $urandom_range(0, 2047);
      addr = 11'(a); #1;
      checks++;
      if (rdata !== word(a)) begin
        failures++;
        $display("FAIL rom[%0d] = %h expected %h", a, rdata, word(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
