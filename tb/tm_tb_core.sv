// tm_tb_core: the test sequence for temporal_memory at its default size
// (16 entries, 4 write ports, 32-bit key, 64-bit payload) with TR trailing
// read ports. tb_temporal_memory runs it with one and with two ports.
//
// 1. Start-up: the start-up entries are loaded during reset; all of them are
//    presented in random order and groups of 1..4. No fault may be raised,
//    the counter must count the accesses down and the mode must switch
//    after exactly N accesses. A corrupted payload and a corrupted address
//    must each raise fault on their lane.
// 2. Lookup, unique values: loads/stores to a few addresses with values
//    that never repeat. The trailing thread must receive every value, in
//    order, from an occupied entry, even though addresses repeat (the
//    FREE@acc ordering). The trailing thread pauses so the memory fills and
//    the stall must follow a free-entry model kept here.
// 3. Lookup, branch-like: each key always has the same payload, so repeats
//    are suppressed. Every hit must carry the right payload, suppressed
//    repeats and reads of retained entries must happen, the BTAC port must
//    return correct payloads, and at the end every stored entry must have
//    been consumed exactly once (free count back at N).
// With several trailing ports, port 0 takes the oldest event and each
// higher port the next one; parallel reads must occur.
module tm_tb_core
  import tm_pkg::*;
#(
  parameter int TR = 1
) (
  output bit finished,
  output int checks,
  output int failures
);

  localparam int N  = 16;
  localparam int W  = 4;
  localparam int KW = 32;
  localparam int PW = 64;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [N-1:0][KW-1:0] su_key;
  logic [N-1:0][PW-1:0] su_pay;
  logic [W-1:0]         w_valid;
  logic [W-1:0][KW-1:0] w_key;
  logic [W-1:0][PW-1:0] w_pay;
  logic                 l_stall;
  logic [W-1:0]         w_dup;
  logic                 l_rd_valid, l_rd_hit;
  logic [KW-1:0]        l_rd_key;
  logic [PW-1:0]        l_rd_pay;
  logic [TR-1:0]          t_rd_valid, t_rd_hit, t_rd_consumed;
  logic [TR-1:0][KW-1:0]  t_rd_key;
  logic [TR-1:0][PW-1:0]  t_rd_pay;
  tm_mode_e             mode;
  logic [4:0]           count;
  logic                 startup_done, fault;
  logic [W-1:0]         fault_lane;

  temporal_memory #(.TRPORTS(TR)) dut (.*);

  initial begin
    finished = 0;
    checks = 0;
    failures = 0;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (%0d trailing ports) @%0t: %s", TR, $time, msg);
    end
  endtask

  function automatic logic [PW-1:0] br_pay(input logic [KW-1:0] k);
    return {k * 32'd3 + 32'd4, k ^ 32'h5a5a_00ff};
  endfunction

  task automatic idle_inputs();
    w_valid    = '0;
    w_key      = '0;
    w_pay      = '0;
    l_rd_valid = 1'b0;
    l_rd_key   = '0;
    t_rd_valid = '0;
    t_rd_key   = '0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    idle_inputs();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // trace of results accepted by the memory
  typedef struct {
    logic [KW-1:0] key;
    logic [PW-1:0] pay;
    bit            stored;
  } ev_t;

  ev_t trace[$];
  int  ref_free;
  int  groups[$];   // sizes of the groups written in one cycle, oldest first
  int  grp_read = 0;
  int  n_stall, n_dup, n_ret_hit, n_cons, n_stored, n_miss, n_btac_hit, n_par;

  // One cycle of lookup-mode traffic. mode_b selects branch-like payloads.
  task automatic lookup_phase(input bit mode_b, input int cycles, input logic [KW-1:0] kbase);
    int  t_idx;
    int  committed;
    bit  hold;
    int  pause;
    logic [W-1:0]          h_valid;
    logic [W-1:0][KW-1:0]  h_key;
    logic [W-1:0][PW-1:0]  h_pay;
    int  need;
    int  uniq;
    t_idx = trace.size();
    committed = trace.size();
    hold = 0;
    pause = 0;
    uniq = 0;
    for (int cyc = 0; cyc < cycles || t_idx < committed; cyc++) begin
      @(negedge clk);
      // leading thread
      if (!hold) begin
        h_valid = (cyc < cycles) ? W'($urandom) : '0;
        for (int j = 0; j < W; j++) begin
          h_key[j] = kbase + KW'(($urandom % (mode_b ? 8 : 5)) * 4);
          uniq++;
          h_pay[j] = mode_b ? br_pay(h_key[j]) : {32'($urandom), 32'(uniq)};
        end
      end
      w_valid = h_valid;
      w_key   = h_key;
      w_pay   = h_pay;
      // leading BTAC lookup
      l_rd_valid = mode_b;
      l_rd_key   = kbase + KW'(($urandom % 8) * 4);
      // trailing thread: pauses now and then so the memory fills up
      if (pause > 0) pause--;
      else if ($urandom % 40 == 0) pause = 30;
      // ports take consecutive events, port 0 the oldest
      t_rd_valid = '0;
      t_rd_key   = '0;
      for (int p = 0; p < TR; p++) begin
        if (pause == 0 && t_idx + p < committed && (p == 0 || t_rd_valid[p - 1]) && ($urandom % 4 != 0)) begin
          t_rd_valid[p] = 1'b1;
          t_rd_key[p]   = trace[t_idx + p].key;
        end
      end
      #2;
      // checks on the combinational outputs
      need = 0;
      for (int j = 0; j < W; j++) if (w_valid[j] && !w_dup[j]) need++;
      if (!mode_b) chk(w_dup == '0, "unique values must never be suppressed");
      chk(count == 5'(ref_free), $sformatf("free count %0d, expected %0d", count, ref_free));
      chk(l_stall == (need > ref_free), "stall disagrees with free-entry model");
      if (l_stall) n_stall++;
      if (l_rd_valid && l_rd_hit) begin
        n_btac_hit++;
        chk(l_rd_pay == br_pay(l_rd_key), "BTAC/BTIC payload wrong");
      end
      for (int p = 0; p < TR; p++) begin
        if (t_rd_valid[p]) begin
          if (!mode_b) begin
            chk(t_rd_hit[p] && t_rd_consumed[p], "trailing read of a stored value missed");
            chk(t_rd_pay[p] == trace[t_idx + p].pay,
                $sformatf("trailing value %h, expected %h (event %0d)", t_rd_pay[p], trace[t_idx + p].pay, t_idx + p));
          end else begin
            if (t_rd_hit[p]) chk(t_rd_pay[p] == trace[t_idx + p].pay, "trailing branch payload wrong");
            else n_miss++;
            if (t_rd_hit[p] && !t_rd_consumed[p]) n_ret_hit++;
          end
          if (t_rd_consumed[p]) n_cons++;
          if (p > 0) n_par++;
        end
      end
      @(posedge clk);
      for (int p = 0; p < TR; p++) begin
        if (t_rd_valid[p]) t_idx++;
        if (t_rd_consumed[p]) begin
          grp_read++;
          if (grp_read == groups[0]) begin
            ref_free += groups[0];
            void'(groups.pop_front());
            grp_read = 0;
          end
        end
      end
      if (!l_stall) begin
        for (int j = 0; j < W; j++) begin
          if (w_valid[j]) begin
            trace.push_back('{key: w_key[j], pay: w_pay[j], stored: !w_dup[j]});
            if (w_dup[j]) n_dup++;
            else n_stored++;
          end
        end
        ref_free -= need;
        if (need > 0) groups.push_back(need);
        hold = 0;
      end else begin
        hold = 1;
      end
      committed = trace.size();
    end
  endtask

  initial begin : main
    int order[N];
    int done, k;
    rst_n = 1'b0;
    idle_inputs();
    for (int i = 0; i < N; i++) begin
      su_key[i] = 32'h0000_1000 + 32'(i * 32) + 32'($urandom % 4);
      su_pay[i] = {32'($urandom), 32'($urandom)};
    end

    // ---------------- start-up, fault injection (payload, then address)
    do_reset();
    @(negedge clk);
    w_valid = 4'b0011;
    w_key[0] = su_key[2];  w_pay[0] = su_pay[2];
    w_key[1] = su_key[5];  w_pay[1] = su_pay[5] ^ 64'h0000_0000_0001_0000;
    #2;
    chk(mode == MODE_STARTUP, "mode after reset");
    chk(fault && fault_lane == 4'b0010, "corrupted data word not detected");
    do_reset();
    @(negedge clk);
    w_valid = 4'b0100;
    w_key[2] = su_key[7] ^ 32'h0000_0800;  w_pay[2] = su_pay[7];
    #2;
    chk(fault && fault_lane == 4'b0100, "corrupted address not detected");

    // ---------------- start-up, clean run
    do_reset();
    for (int i = 0; i < N; i++) order[i] = i;
    order.shuffle();
    done = 0;
    while (done < N) begin
      @(negedge clk);
      idle_inputs();
      k = 1 + $urandom % W;
      if (k > N - done) k = N - done;
      for (int j = 0; j < k; j++) begin
        w_valid[j] = 1'b1;
        w_key[j]   = su_key[order[done + j]];
        w_pay[j]   = su_pay[order[done + j]];
      end
      l_rd_valid = 1'b1;
      l_rd_key   = su_key[order[N - 1 - done]];
      #2;
      chk(mode == MODE_STARTUP, "left start-up mode early");
      chk(count == 5'(N - done), $sformatf("start-up count %0d, expected %0d", count, N - done));
      chk(!fault, "false start-up fault");
      chk(l_rd_hit && l_rd_pay == su_pay[order[N - 1 - done]], "start-up entry not visible to BTAC port");
      @(posedge clk);
      done += k;
    end
    #1;
    chk(mode == MODE_LOOKUP && startup_done, "no switch to lookup mode after N accesses");
    chk(count == 5'(N), "free count not reloaded with N");
    @(negedge clk);
    idle_inputs();
    @(posedge clk);
    #1;
    chk(!startup_done, "startup_done is not a pulse");

    // ---------------- lookup mode
    ref_free = N;
    lookup_phase(1'b0, 600, 32'h0002_0000);
    chk(n_cons == n_stored, "not every stored value was consumed");
    lookup_phase(1'b1, 600, 32'h0004_0000);
    @(negedge clk);
    idle_inputs();
    #2;
    chk(count == 5'(N), $sformatf("entries left occupied at the end: free=%0d", count));
    chk(n_cons == n_stored, $sformatf("consumed %0d of %0d stored", n_cons, n_stored));
    chk(n_stall > 0, "stall never happened");
    chk(n_dup > 0, "repeat suppression never happened");
    chk(n_ret_hit > 0, "trailing read of a retained entry never happened");
    chk(n_btac_hit > 0, "BTAC lookup never hit");
    if (TR > 1) chk(n_par > 0, "parallel trailing reads never happened");
    $display("%0d trailing port(s): stalls=%0d suppressed=%0d stored=%0d consumed=%0d retained_hits=%0d misses=%0d btac_hits=%0d parallel_reads=%0d",
             TR, n_stall, n_dup, n_stored, n_cons, n_ret_hit, n_miss, n_btac_hit, n_par);
    finished = 1;
  end

endmodule
