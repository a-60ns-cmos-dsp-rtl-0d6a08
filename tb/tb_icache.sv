// tb_icache: self-checking testbench of the instruction cache and its loop control.
// A model fetch unit walks a program memory filled with distinct words. For random block
// lengths N (1..15) and loop counts k it issues "do k" and checks that the stream of
// fetched words is the N-word block k times followed by the rest of the program, that
// the block came from program memory only once (pc advanced by N, N*(k-1) words came
// from the cache), and that "redo k" replays the block k more times without touching
// program memory. Random fetch stalls are inserted inside the loops.
module tb_icache;
  logic clk = 1'b0, rst_n = 1'b0;
  logic do_start, redo_start, fetch, from_cache, loop_active, loop_done;
  logic [3:0] do_n;
  logic [7:0] do_k, redo_k;
  logic [15:0] rom_word, cache_word;
  int checks = 0, failures = 0;

  icache dut (.clk, .rst_n, .do_start, .do_n, .do_k, .redo_start, .redo_k, .fetch,
              .rom_word, .from_cache, .cache_word, .loop_active, .loop_done);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] prog(input int a);
    return 16'(a * 7 + 16'h1000);
  endfunction

  int pc, cache_fetches, dones;
  logic [15:0] got;

  task automatic chk(input logic [31:0] g, input logic [31:0] e, input string what);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, g, e);
    end
  endtask

  // one fetch (with optional stall cycles before it); returns the fetched word
  task automatic fetch_one(output logic [15:0] w, input bit allow_stall);
    if (allow_stall) begin
      while ($urandom_range(0, 3) == 0) begin
        fetch = 0; rom_word = prog(pc);
        @(posedge clk); #1;
        do_start = 0; redo_start = 0;
      end
    end
    fetch = 1; rom_word = prog(pc); #1;
    w = from_cache ? cache_word : rom_word;
    if (from_cache) cache_fetches++; else pc++;
    if (loop_done) dones++;
    @(posedge clk); #1;
    do_start = 0; redo_start = 0; fetch = 0;
  endtask

  initial begin
    do_start = 0; redo_start = 0; fetch = 0; do_n = 0; do_k = 0; redo_k = 0;
    rom_word = 0; pc = 0; dones = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int n, k, base;
      n = $urandom_range(1, 15);
      k = $urandom_range(1, 12);
      // a few ordinary fetches
      repeat ($urandom_range(0, 3)) begin
        fetch_one(got, 1);
        chk(32'(got), 32'(prog(pc - 1)), "straight-line fetch");
      end
      // execute "do k": takes effect for the next fetch
      do_start = 1; do_n = 4'(n); do_k = 8'(k);
      base = pc;
      cache_fetches = 0;
      for (int pass = 0; pass < k; pass++)
        for (int q = 0; q < n; q++) begin
          fetch_one(got, q != 0 || pass != 0);
          chk(32'(got), 32'(prog(base + q)), $sformatf("do pass %0d word %0d", pass, q));
        end
      chk(32'(pc - base), 32'(n), "program memory read once per block word");
      chk(32'(cache_fetches), 32'(n * (k - 1)), "replayed words");
      chk(32'(loop_active), 0, "loop finished");
      // "redo k2"
      if (t % 3 == 0) begin
        int k2;
        k2 = $urandom_range(1, 5);
        redo_start = 1; redo_k = 8'(k2);
        cache_fetches = 0;
        base = pc;
        for (int pass = 0; pass < k2; pass++)
          for (int q = 0; q < n; q++) begin
            fetch_one(got, q != 0 || pass != 0);
            chk(32'(got), 32'(prog(base - n + q)), "redo replays last block");
          end
        chk(32'(pc), 32'(base), "redo reads no program memory");
        chk(32'(cache_fetches), 32'(n * k2), "redo replayed words");
      end
      fetch_one(got, 0);
      chk(32'(got), 32'(prog(pc - 1)), "fetch after loop");
    end
    chk(32'(dones), 32'(40 + 14), "loop_done count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
