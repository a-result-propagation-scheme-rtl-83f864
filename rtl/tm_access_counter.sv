// tm_access_counter: the access / free-entry counter of one temporal memory.
//
// After reset the memory is in start-up mode: the counter holds the number
// of entries N and counts down by the number of leading-thread accesses in
// each cycle (su_acc). When it reaches zero the start-up phase is over; the
// counter is reloaded with N and from then on (lookup mode) holds the
// number of free entries: it goes down by the number of entries the leading
// thread stores in a cycle (n_wr) and goes up again when the trailing
// thread has read the last entry of a group written in one cycle, by the
// size of that group (t_free, the sum if several groups end in one cycle). The leading thread must stall when
// fewer entries are free than it wants to store. Entries of a group that
// is only partly read are thus not yet counted free; this keeps every
// outstanding FREE@acc stamp distinct.
//
// Besides the free count, the block keeps the two FREE@acc time stamps:
//   lead_stamp  - value written into FREE@acc of every entry stored by the
//                 leading thread in this cycle (all simultaneous writes share
//                 it); it goes down by n_wr per cycle.
//   trail_stamp - value the trailing thread searches FREE@acc for; it goes
//                 down by t_free, i.e. by the size of a group of equal-stamp
//                 entries once the trailing thread has read all of them.
//   t_grp       - entries of the current group read so far; the memory
//                 computes its next value (t_grp_next) from its read ports.
// Both stamps start at N modulo 2**STAMP_W and wrap. Because at most N
// entries are outstanding, outstanding stamps are distinct modulo N.
//
// The published design gives one counter that is decremented by leading
// writes, incremented by trailing accesses and written into FREE@acc; it
// also says the trailing thread decrements the counter by its parallel
// reads. A single register cannot do both, so this design keeps the free
// count and the two stamp counters apart. All updates take effect on the
// rising clock edge; rst_n is synchronous and active low.
module tm_access_counter
  import tm_pkg::*;
#(
  parameter int unsigned N       = TM_ENTRIES,
  parameter int unsigned WPORTS  = TM_WPORTS,
  parameter int unsigned STAMP_W = TM_STAMP_W,
  localparam int unsigned CNT_W  = $clog2(N + 1),
  localparam int unsigned WCNT_W = $clog2(WPORTS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WCNT_W-1:0]  su_acc,       // start-up accesses this cycle
  input  logic [WCNT_W-1:0]  n_wr,         // entries stored this cycle (lookup)
  input  logic [CNT_W-1:0]   t_free,       // size of the groups fully read this cycle
  input  logic [WCNT_W-1:0]  t_grp_next,   // entries of the current group read so far
  output logic [WCNT_W-1:0]  t_grp,
  output tm_mode_e           mode,
  output logic [CNT_W-1:0]   count,        // start-up: accesses left; lookup: free entries
  output logic [STAMP_W-1:0] lead_stamp,
  output logic [STAMP_W-1:0] trail_stamp,
  output logic               startup_done  // one-cycle pulse at the mode switch
);

  localparam logic [STAMP_W-1:0] STAMP_INIT = STAMP_W'(N);

  tm_mode_e           mode_q;
  logic [CNT_W-1:0]   cnt_q;
  logic [STAMP_W-1:0] lead_q, trail_q;
  logic [WCNT_W-1:0]  grp_q;          // entries of the current stamp already read
  logic               done_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q  <= MODE_STARTUP;
      cnt_q   <= CNT_W'(N);
      lead_q  <= STAMP_INIT;
      trail_q <= STAMP_INIT;
      grp_q   <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (mode_q == MODE_STARTUP) begin
        if (CNT_W'(su_acc) >= cnt_q) begin
          mode_q <= MODE_LOOKUP;
          cnt_q  <= CNT_W'(N);
          done_q <= 1'b1;
        end else begin
          cnt_q <= cnt_q - CNT_W'(su_acc);
        end
      end else begin
        lead_q  <= lead_q - STAMP_W'(n_wr);
        cnt_q   <= cnt_q - CNT_W'(n_wr) + t_free;
        trail_q <= trail_q - STAMP_W'(t_free);
        grp_q   <= t_grp_next;
      end
    end
  end

  assign mode         = mode_q;
  assign count        = cnt_q;
  assign lead_stamp   = lead_q;
  assign trail_stamp  = trail_q;
  assign startup_done = done_q;
  assign t_grp        = grp_q;

  // Handshake rules: the memory never stores more entries than are free and
  // never frees more entries than are occupied.
  always_ff @(posedge clk) begin
    if (rst_n && mode_q == MODE_LOOKUP) begin
      assert (CNT_W'(n_wr) <= cnt_q)
        else $error("tm_access_counter: %0d writes with %0d free entries", n_wr, cnt_q);
      assert (t_free <= CNT_W'(N) - cnt_q)
        else $error("tm_access_counter: %0d entries freed with %0d occupied", t_free, CNT_W'(N) - cnt_q);
    end
  end

endmodule
