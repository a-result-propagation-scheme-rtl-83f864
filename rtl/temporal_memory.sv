// temporal_memory: result-forwarding memory shared by the leading and the
// trailing thread of a redundantly multithreaded (RMT) processor.
//
// It replaces the FIFO outcome queue / delay buffer between the threads and,
// for branches, also the branch target address cache (BTAC) and branch
// target instruction cache (BTIC). Each entry holds a key (PC for branches,
// memory address for data), a payload ({DEST, INST} for branches, the data
// value for loads/stores) and the FREE@acc time stamp. One module serves
// both memories; KEY_W and PAY_W choose which.
//
// Start-up mode (after reset). All N entries are loaded in parallel from the
// start-up entry-point store (su_key / su_pay). Every leading-thread access
// presented on the write ports is looked up by key; if no entry has that
// key, or the entry's payload differs, a bus fault has corrupted the issued
// address or the fetched word and `fault` pulses (the system is expected to
// restart). The access counter counts the accesses down from N; at zero the
// memory enters lookup mode. The loaded entries then stay readable as
// BTAC/BTIC contents but are free for reuse.
//
// Lookup mode. Up to WPORTS leading-thread results per cycle arrive on the
// write ports. A result whose key and payload already sit in a valid entry
// (or in a lower-numbered port of the same cycle) is not stored again. The
// others are stored in the lowest-numbered free entries, all stamped with
// the same FREE@acc value. If fewer entries are free than results to store,
// l_stall is raised, nothing is stored and the leading thread must present
// the same results again. Retained (already consumed) entries with the same
// key but a different payload are invalidated when a new value is stored.
//
// Leading lookup port (BTAC/BTIC): every issued PC is searched among all
// valid entries; on a hit the stored DEST is the next PC and INST the
// instruction at the target.
//
// Trailing read ports (TRPORTS, one by default): the trailing thread
// presents the keys of decoded branches/loads/stores, port 0 the oldest. An
// occupied entry with that key whose FREE@acc equals the trailing stamp is
// returned and freed (t_rd_consumed). Otherwise a valid, already-consumed
// entry with that key is returned without freeing (the leading thread had
// suppressed the repeated result). No hit means the trailing thread must
// fetch over the bus. With several ports, entries of one stamp are read in
// parallel, and a port may continue into the next group once a lower port
// has read the last entry of the current one.
//
// All lookups are combinational within the cycle; entry and counter
// updates take effect at the next rising edge. rst_n is synchronous, active
// low, and must be held while the start-up store is programmed.
//
// Follows the published design: entry fields and widths, 16 entries, four
// leading write ports, one leading and one trailing read port (more
// trailing ports optional, as the scheme allows), start-up
// check and counter, shared FREE@acc for simultaneous writes, suppression
// of repeated results. Own choices: the stall protocol, lowest-index
// allocation, invalidation of stale retained entries, the separate stamp
// counters (see tm_access_counter) and the fallback to retained entries on
// the trailing port. A known limit of suppressing repeats for data: if a
// value for an address is repeated and later changed while the first copy
// is still unread, the trailing thread can be handed the newer value early.
// Branch entries cannot hit this because a PC always has one target.
module temporal_memory
  import tm_pkg::*;
#(
  parameter int unsigned N       = TM_ENTRIES,
  parameter int unsigned WPORTS  = TM_WPORTS,
  parameter int unsigned KEY_W   = 32,
  parameter int unsigned PAY_W   = 64,
  parameter int unsigned STAMP_W = TM_STAMP_W,
  parameter int unsigned TRPORTS = 1,
  localparam int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CNT_W  = $clog2(N + 1),
  localparam int unsigned WCNT_W = $clog2(WPORTS + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // start-up entry points (loaded during reset)
  input  logic [N-1:0][KEY_W-1:0]      su_key,
  input  logic [N-1:0][PAY_W-1:0]      su_pay,
  // leading-thread write ports
  input  logic [WPORTS-1:0]            w_valid,
  input  logic [WPORTS-1:0][KEY_W-1:0] w_key,
  input  logic [WPORTS-1:0][PAY_W-1:0] w_pay,
  output logic                         l_stall,
  output logic [WPORTS-1:0]            w_dup,      // result suppressed as repeat
  // leading-thread lookup port (BTAC / BTIC)
  input  logic                         l_rd_valid,
  input  logic [KEY_W-1:0]             l_rd_key,
  output logic                         l_rd_hit,
  output logic [PAY_W-1:0]             l_rd_pay,
  // trailing-thread read ports, port 0 oldest in program order
  input  logic [TRPORTS-1:0]            t_rd_valid,
  input  logic [TRPORTS-1:0][KEY_W-1:0] t_rd_key,
  output logic [TRPORTS-1:0]            t_rd_hit,
  output logic [TRPORTS-1:0][PAY_W-1:0] t_rd_pay,
  output logic [TRPORTS-1:0]            t_rd_consumed,
  // status
  output tm_mode_e                     mode,
  output logic [CNT_W-1:0]             count,
  output logic                         startup_done,
  output logic                         fault,      // start-up bus check failed
  output logic [WPORTS-1:0]            fault_lane
);

  // ---------------------------------------------------------------- storage
  logic [N-1:0][KEY_W-1:0]   key_q;
  logic [N-1:0][PAY_W-1:0]   pay_q;
  logic [N-1:0][STAMP_W-1:0] stamp_q;
  logic [N-1:0]              cv_q;    // entry contents are valid
  logic [N-1:0]              pend_q;  // entry is occupied (not yet read by trailing)

  logic [STAMP_W-1:0] lead_stamp, trail_stamp;
  logic               lookup;

  // ------------------------------------------------------------ write side
  logic [WPORTS-1:0]            need;
  logic [WPORTS-1:0][IDX_W-1:0] slot;
  logic [WCNT_W-1:0]            n_need, n_acc;
  logic                         do_write;
  logic [N-1:0]                 stale;

  always_comb begin
    logic [N-1:0] taken;
    logic         found;
    w_dup  = '0;
    need   = '0;
    n_need = '0;
    n_acc  = '0;
    for (int j = 0; j < WPORTS; j++) begin
      for (int i = 0; i < N; i++)
        if (cv_q[i] && key_q[i] == w_key[j] && pay_q[i] == w_pay[j]) w_dup[j] = 1'b1;
      for (int k = 0; k < j; k++)
        if (w_valid[k] && w_key[k] == w_key[j] && w_pay[k] == w_pay[j]) w_dup[j] = 1'b1;
      w_dup[j] = w_dup[j] && w_valid[j] && lookup;
      need[j]  = w_valid[j] && !w_dup[j];
      n_need   = n_need + WCNT_W'(need[j]);
      n_acc    = n_acc + WCNT_W'(w_valid[j]);
    end
    l_stall  = lookup && (CNT_W'(n_need) > count);
    do_write = lookup && !l_stall;

    // allocate the lowest free entries, one per result to store
    taken = pend_q;
    slot  = '0;
    for (int j = 0; j < WPORTS; j++) begin
      found = 1'b0;
      if (need[j]) begin
        for (int i = 0; i < N; i++) begin
          if (!found && !taken[i]) begin
            slot[j]  = IDX_W'(i);
            taken[i] = 1'b1;
            found    = 1'b1;
          end
        end
      end
    end

    // retained entries whose key gets a new value
    stale = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < WPORTS; j++)
        if (need[j] && cv_q[i] && !pend_q[i] && key_q[i] == w_key[j] && pay_q[i] != w_pay[j])
          stale[i] = 1'b1;
  end

  // ------------------------------------------------------ start-up checking
  always_comb begin
    logic hit, ok;
    fault_lane = '0;
    for (int j = 0; j < WPORTS; j++) begin
      hit = 1'b0;
      ok  = 1'b0;
      for (int i = 0; i < N; i++) begin
        if (key_q[i] == w_key[j]) begin
          hit = 1'b1;
          if (pay_q[i] == w_pay[j]) ok = 1'b1;
        end
      end
      fault_lane[j] = !lookup && w_valid[j] && !(hit && ok);
    end
    fault = |fault_lane;
  end

  // -------------------------------------------------- leading lookup (BTAC)
  always_comb begin
    l_rd_hit = 1'b0;
    l_rd_pay = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (l_rd_valid && cv_q[i] && key_q[i] == l_rd_key) begin
        l_rd_hit = 1'b1;
        l_rd_pay = pay_q[i];
      end
    end
  end

  // --------------------------------------------------------- trailing read
  // The ports are served in order. Each searches the occupied entries that
  // carry the current trailing stamp and were not taken by a lower port.
  // When a port reads the last entry of its group, the stamp moves on by
  // the group size, so the next port already searches the next group.
  logic [N-1:0]       t_taken;   // entries freed this cycle
  logic [CNT_W-1:0]   t_free;    // sizes of the groups completed this cycle
  logic [WCNT_W-1:0]  t_grp, t_grp_next;

  always_comb begin
    logic [STAMP_W-1:0] st;
    logic [WCNT_W-1:0]  g;
    logic [IDX_W:0]     rem;
    logic [IDX_W-1:0]   sl;
    logic               pm, rm;
    logic               in_grp;
    st      = trail_stamp;
    g       = t_grp;
    t_free  = '0;
    t_taken = '0;
    t_rd_hit      = '0;
    t_rd_consumed = '0;
    t_rd_pay      = '0;
    for (int p = 0; p < TRPORTS; p++) begin
      pm  = 1'b0;
      rm  = 1'b0;
      sl  = '0;
      rem = '0;
      for (int i = N - 1; i >= 0; i--) begin
        in_grp = pend_q[i] && !t_taken[i] && stamp_q[i] == st;
        rem    = rem + (IDX_W + 1)'(in_grp);
        if (lookup && t_rd_valid[p] && in_grp && key_q[i] == t_rd_key[p]) begin
          pm = 1'b1;
          sl = IDX_W'(i);
        end
      end
      if (pm) begin
        t_taken[sl]  = 1'b1;
        t_rd_pay[p]  = pay_q[sl];
        if (rem == (IDX_W + 1)'(1)) begin
          t_free = t_free + CNT_W'(g) + CNT_W'(1);
          st     = st - STAMP_W'(g) - STAMP_W'(1);
          g      = '0;
        end else begin
          g = g + WCNT_W'(1);
        end
      end else begin
        // suppressed repeat: an entry already read (possibly this cycle)
        for (int i = N - 1; i >= 0; i--) begin
          if (t_rd_valid[p] && cv_q[i] && (!pend_q[i] || t_taken[i]) && key_q[i] == t_rd_key[p]) begin
            rm          = 1'b1;
            t_rd_pay[p] = pay_q[i];
          end
        end
      end
      t_rd_hit[p]      = pm || rm;
      t_rd_consumed[p] = pm;
    end
    t_grp_next = g;
  end

  // ------------------------------------------------------------- counters
  logic [WCNT_W-1:0] n_wr;
  assign n_wr = do_write ? n_need : '0;

  tm_access_counter #(
    .N      (N),
    .WPORTS (WPORTS),
    .STAMP_W(STAMP_W)
  ) u_counter (
    .clk         (clk),
    .rst_n       (rst_n),
    .su_acc      (lookup ? '0 : n_acc),
    .n_wr        (n_wr),
    .t_free      (t_free),
    .t_grp_next  (t_grp_next),
    .t_grp       (t_grp),
    .mode        (mode),
    .count       (count),
    .lead_stamp  (lead_stamp),
    .trail_stamp (trail_stamp),
    .startup_done(startup_done)
  );

  assign lookup = (mode == MODE_LOOKUP);

  // --------------------------------------------------------- entry update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_q   <= su_key;
      pay_q   <= su_pay;
      stamp_q <= '0;
      cv_q    <= '1;
      pend_q  <= '0;
    end else if (lookup) begin
      pend_q <= pend_q & ~t_taken;
      if (do_write) begin
        cv_q <= cv_q & ~stale;
        for (int j = 0; j < WPORTS; j++) begin
          if (need[j]) begin
            key_q[slot[j]]   <= w_key[j];
            pay_q[slot[j]]   <= w_pay[j];
            stamp_q[slot[j]] <= lead_stamp;
            cv_q[slot[j]]    <= 1'b1;
            pend_q[slot[j]]  <= 1'b1;
          end
        end
      end
    end
  end

  // The free count never exceeds the number of unoccupied entries (it lags
  // while a group is partly read).
  always_ff @(posedge clk)
    if (rst_n && lookup)
      assert (count <= CNT_W'($countones(~pend_q)))
        else $error("temporal_memory: free count %0d disagrees with occupancy", count);

endmodule
