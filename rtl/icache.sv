// icache: 15-word instruction cache with hardware loop control (do k / redo k).
//
// "do k {instr1 ... instrN}" (N = 1..15) executes the N instructions that follow it k
// times. On the first pass the instructions come from program memory as usual and are
// written into the cache as they are fetched; the remaining k-1 passes replay them from
// the cache, so program memory is free during every cycle of the replay and can deliver
// a coefficient instead of an instruction. "redo k" replays the N instructions already
// in the cache k more times without fetching them again.
//
// As drawn in the design, a register holds N and a counter steps the cache address;
// when the counter reaches the end of the block it is reloaded from the register and the
// loop counter counts one pass; when the loop counter reaches zero control returns to
// program memory. The multiplexer in front of the control unit picks the program memory
// word or the cache word.
//
// Interface: do_start/do_n/do_k and redo_start/redo_k come from the instruction being
// executed and take effect for the very next fetch. fetch says that an instruction is
// fetched this cycle (the fetch unit may stall); rom_word is the program memory word
// being fetched. from_cache (combinational) says the fetch of this cycle must take
// cache_word instead of rom_word and that pc must not step. State and cache contents
// update on the rising edge.
//
// From the design: 15 x 16 cache, the do/redo syntax, the N register with address
// counter, the loop counter and their zero tests, the multiplexer. This implementation's
// choices: 8-bit loop count, k = 0 behaving as k = 1, a do or redo met while a loop runs
// restarting the loop machinery, and N = 0 treated as N = 1.
module icache
  import dsp_pkg::*;
#(
  parameter int unsigned DEPTH = 15,
  parameter int unsigned KW    = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          do_start,
  input  logic [3:0]    do_n,
  input  logic [KW-1:0] do_k,
  input  logic          redo_start,
  input  logic [KW-1:0] redo_k,
  input  logic          fetch,
  input  logic [15:0]   rom_word,
  output logic          from_cache,
  output logic [15:0]   cache_word,
  output logic          loop_active,
  output logic          loop_done    // last instruction of the last pass fetched this cycle
);

  typedef enum logic [1:0] { C_IDLE, C_LOAD, C_REPLAY } cstate_t;

  logic [15:0]   mem [DEPTH];
  cstate_t       st, st_e;
  logic [3:0]    nreg, n_e;      // register: block length N
  logic [3:0]    cnt, cnt_e;     // counter: cache address of the next fetch
  logic [KW-1:0] loops, loops_e; // loop counter: passes still to run, this one included

  // Effective state for this cycle: a do or redo being executed takes effect at once.
  always_comb begin
    st_e = st; n_e = nreg; cnt_e = cnt; loops_e = loops;
    if (do_start) begin
      st_e    = C_LOAD;
      n_e     = (do_n == 4'd0) ? 4'd1 : do_n;
      cnt_e   = 4'd0;
      loops_e = (do_k == '0) ? KW'(1) : do_k;
    end else if (redo_start) begin
      st_e    = C_REPLAY;
      cnt_e   = 4'd0;
      loops_e = (redo_k == '0) ? KW'(1) : redo_k;
    end
  end

  logic last_in_block;
  assign last_in_block = (cnt_e == n_e - 4'd1);
  assign from_cache    = (st_e == C_REPLAY);
  assign cache_word    = mem[cnt_e];
  assign loop_active   = (st_e != C_IDLE);
  assign loop_done     = fetch && (st_e != C_IDLE) && last_in_block && (loops_e <= KW'(1));

  always_ff @(posedge clk) begin
    if (fetch && st_e == C_LOAD) mem[cnt_e] <= rom_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; nreg <= 4'd1; cnt <= '0; loops <= '0;
    end else begin
      st <= st_e; nreg <= n_e; cnt <= cnt_e; loops <= loops_e;
      if (fetch && st_e != C_IDLE) begin
        if (last_in_block) begin
          // counter at end of block: reload, count one pass
          cnt   <= 4'd0;
          loops <= loops_e - KW'(1);
          st    <= (loops_e <= KW'(1)) ? C_IDLE : C_REPLAY;
        end else begin
          cnt <= cnt_e + 4'd1;
        end
      end
    end
  end

  // A block never exceeds the cache.
  a_n_fits: assert property (@(posedge clk) disable iff (!rst_n)
                             do_start |-> (32'(do_n) <= DEPTH));

endmodule
