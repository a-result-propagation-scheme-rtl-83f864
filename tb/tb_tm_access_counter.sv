// tb_tm_access_counter: self-checking testbench for tm_access_counter at its
// default size (N = 16, 4 write ports, 4-bit stamps).
//
// A reference model kept here predicts the mode, the count and both stamps
// every cycle. Start-up: random numbers of accesses per cycle until N are
// reached; the mode must switch on exactly that cycle with a one-cycle
// startup_done pulse. Lookup: random write groups (never more than are
// free) and trailing reads that walk through the groups in order; the free
// count must only recover when a whole group has been read (the model
// reads up to two entries per cycle), and the trailing stamp must move by
// the size of the groups completed.
module tb_tm_access_counter;
  import tm_pkg::*;

  localparam int N = 16;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] su_acc, n_wr;
  logic [4:0] t_free;
  logic [2:0] t_grp_next, t_grp;
  tm_mode_e   mode;
  logic [4:0] count;
  logic [3:0] lead_stamp, trail_stamp;
  logic       startup_done;

  always #5 clk = ~clk;

  tm_access_counter dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int  r_cnt, r_lead, r_trail, r_grp;
  bit  r_lookup;
  int  groups[$];
  int  pend;        // entries written and not yet read
  int  n_switch, n_full, n_group_done;

  initial begin : main
    int acc, w, rd, fr, g;
    rst_n = 1'b0;
    su_acc = '0; n_wr = '0; t_free = '0; t_grp_next = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    r_cnt = N; r_lead = N % 16; r_trail = N % 16; r_grp = 0; r_lookup = 0;
    pend = 0;

    // start-up, twice (with a reset in between)
    for (int run = 0; run < 2; run++) begin
      while (!r_lookup) begin
        @(negedge clk);
        acc = $urandom % 5;
        su_acc = 3'(acc);
        #1;
        chk(mode == MODE_STARTUP, "start-up mode expected");
        chk(count == 5'(r_cnt), $sformatf("start-up count %0d, expected %0d", count, r_cnt));
        chk(startup_done == 1'b0, "early startup_done");
        @(posedge clk);
        if (acc >= r_cnt) begin
          r_lookup = 1; r_cnt = N; n_switch++;
        end else r_cnt -= acc;
        #1;
        chk(startup_done == r_lookup, "startup_done must pulse at the switch");
      end
      @(negedge clk);
      su_acc = '0;
      #1;
      chk(mode == MODE_LOOKUP && count == 5'(N), "lookup mode with N free");
      @(posedge clk);
      #1;
      chk(!startup_done, "startup_done longer than one cycle");
      if (run == 0) begin
        // mode must return to start-up after reset
        @(negedge clk);
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        r_cnt = N; r_lookup = 0;
        #1;
        chk(mode == MODE_STARTUP && count == 5'(N), "reset restarts the start-up phase");
      end
    end

    // lookup
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      w = (cyc % 500 < 250) ? $urandom % 5 : $urandom % 2;
      if (w > r_cnt) w = r_cnt;
      n_wr = 3'(w);
      // trailing reads of this cycle (0..2), walked through the groups
      rd = ($urandom % ((cyc % 500 < 250) ? 6 : 2) == 0) ? 2 : ($urandom % 2);
      if (rd > pend) rd = pend;
      fr = 0;
      g  = r_grp;
      for (int k = 0; k < rd; k++) begin
        g++;
        if (g == groups[0]) begin
          fr += groups[0];
          void'(groups.pop_front());
          g = 0;
          n_group_done++;
        end
      end
      t_free = 5'(fr);
      t_grp_next = 3'(g);
      #1;
      chk(count == 5'(r_cnt), $sformatf("free count %0d, expected %0d", count, r_cnt));
      chk(lead_stamp == 4'(r_lead), "leading stamp");
      chk(trail_stamp == 4'(r_trail), "trailing stamp");
      chk(t_grp == 3'(r_grp), "group read count");
      if (r_cnt == 0) n_full++;
      @(posedge clk);
      r_cnt = r_cnt - w + fr;
      r_lead = (r_lead - w) & 15;
      r_trail = (r_trail - fr) & 15;
      r_grp = g;
      pend = pend - rd + w;
      if (w > 0) groups.push_back(w);
    end
    chk(n_switch == 2, "start-up switch count");
    chk(n_full > 0, "memory never became full");
    chk(n_group_done > 0, "no group completed");
    $display("switches=%0d full_cycles=%0d groups_done=%0d", n_switch, n_full, n_group_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
