// tb_rmt_tm_system: end-to-end testbench of the temporal-memory result
// propagation system, run with every parameter at its default (16 entries
// per memory, 4 leading write ports).
//
// The testbench plays both threads of a redundantly multithreaded core:
//  * It programs both start-up entry-point stores and reads them back.
//  * Start-up, first attempt: the leading thread replays the start-up code's
//    branches and loads, one with a corrupted fetched instruction; the bus
//    fault must raise restart_req. The system is reset and the start-up
//    accesses are replayed cleanly; both memories must enter lookup mode.
//  * Lookup: the leading thread commits up to four branch results and up to
//    four load/store results per cycle from a synthetic program (an outer
//    sequence of 20 branches with a 3-branch inner loop; loads/stores to six
//    variables whose values change every time). Its fetch stage queries the
//    BTAC/BTIC port. The trailing thread replays the same program with a
//    variable slack and pauses.
// Checked: every BTAC/BTIC hit returns target + 4 and the target
// instruction; every trailing branch hit returns the right entry; every
// load/store value reaches the trailing thread in program order; both free
// counts return to 16 at the end. Each mechanism (restart on bus fault, mode
// switch, stall of each memory, repeat suppression, four-wide write, BTAC
// hit, trailing consume, trailing read of a retained entry, repeated
// address with a new value) is counted and must occur at least once.
module tb_rmt_tm_system;
  import tm_pkg::*;

  localparam int N = TM_ENTRIES;
  localparam int W = TM_WPORTS;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  br_write_t   [W-1:0] br_wr;
  data_write_t [W-1:0] dt_wr;
  logic              br_stall, dt_stall;
  logic [W-1:0]      br_dup, dt_dup;
  logic              fetch_valid, fetch_hit;
  logic [31:0]       fetch_pc, fetch_next_pc, fetch_tgt_inst;
  logic              t_br_valid, t_br_hit, t_br_consumed;
  logic [31:0]       t_br_pc, t_br_dest, t_br_inst;
  logic              t_dt_valid, t_dt_hit, t_dt_consumed;
  logic [31:0]       t_dt_addr, t_dt_val;
  logic              br_prog_we, dt_prog_we;
  logic [3:0]        br_prog_idx, dt_prog_idx, prog_rd_idx;
  logic [31:0]       br_prog_pc, br_prog_target, br_prog_inst, dt_prog_addr, dt_prog_val;
  logic [31:0]       br_prog_rd_pc, dt_prog_rd_addr, dt_prog_rd_val;
  logic [63:0]       br_prog_rd_pay;
  logic              br_startup_done, dt_startup_done;
  tm_mode_e          br_mode, dt_mode;
  logic [4:0]        br_count, dt_count;
  logic              restart_req;
  logic [W-1:0]      br_fault_lane, dt_fault_lane;

  rmt_tm_system dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ synthetic program
  // Branch at a PC always goes to the same target, whose instruction is fixed.
  function automatic logic [31:0] tgt_of(input logic [31:0] pc);
    return pc + 32'h0000_0100 + 32'({pc[7:0], 2'b00});
  endfunction
  function automatic logic [31:0] inst_of(input logic [31:0] tgt);
    return {6'b001000, tgt[25:0]} ^ 32'h0123_4567;
  endfunction

  int br_seq = 0;   // position in the branch stream
  function automatic logic [31:0] next_br_pc();
    int pos, outer, k;
    pos   = br_seq++;
    outer = pos % 32;          // 20 outer branches + 12 inner-loop events
    if (outer < 20) return 32'h0040_0000 + 32'(outer * 16);
    k = (outer - 20) % 3;      // inner loop: 3 branches, 4 iterations
    return 32'h0041_0000 + 32'(k * 8);
  endfunction

  int dt_seq = 0;
  task automatic next_dt(output logic [31:0] a, output logic [31:0] v);
    a = 32'h1000_0000 + 32'(($urandom % 6) * 4);
    v = 32'h5000_0000 + 32'(dt_seq++);
  endtask

  // start-up code
  logic [31:0] su_pc[N], su_addr[N], su_val[N];

  task automatic idle();
    br_wr = '0; dt_wr = '0;
    fetch_valid = 1'b0; fetch_pc = '0;
    t_br_valid = 1'b0; t_br_pc = '0;
    t_dt_valid = 1'b0; t_dt_addr = '0;
    br_prog_we = 1'b0; dt_prog_we = 1'b0;
    br_prog_idx = '0; dt_prog_idx = '0; prog_rd_idx = '0;
    br_prog_pc = '0; br_prog_target = '0; br_prog_inst = '0;
    dt_prog_addr = '0; dt_prog_val = '0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // mechanism counters
  int n_restart, n_switch, n_br_stall, n_dt_stall, n_dup, n_wide, n_btac;
  int n_tbr_cons, n_tbr_ret, n_tbr_miss, n_tdt_cons, n_readdr;

  // replays the start-up accesses, 1..4 per cycle; corrupt >= 0 damages one
  task automatic startup_run(input int corrupt);
    int i, k;
    bit seen_fault;
    seen_fault = 0;
    i = 0;
    while (i < N) begin
      @(negedge clk);
      idle();
      k = 1 + $urandom % W;
      if (k > N - i) k = N - i;
      for (int j = 0; j < k; j++) begin
        br_wr[j] = '{valid: 1'b1, pc: su_pc[i + j], target: tgt_of(su_pc[i + j]),
                     inst: inst_of(tgt_of(su_pc[i + j]))};
        dt_wr[j] = '{valid: 1'b1, addr: su_addr[i + j], val: su_val[i + j]};
        if (i + j == corrupt) br_wr[j].inst[corrupt % 32] = ~br_wr[j].inst[corrupt % 32];
      end
      #2;
      if (restart_req) seen_fault = 1;
      if (corrupt < 0) chk(!restart_req, "false bus fault during start-up");
      chk(br_mode == MODE_STARTUP && dt_mode == MODE_STARTUP, "start-up mode expected");
      @(posedge clk);
      i += k;
    end
    #1;
    if (corrupt >= 0) begin
      chk(seen_fault, "corrupted start-up fetch not detected");
      if (seen_fault) n_restart++;
    end else begin
      chk(br_startup_done && dt_startup_done, "start-up did not finish after 16 accesses");
      chk(br_mode == MODE_LOOKUP && dt_mode == MODE_LOOKUP, "lookup mode expected");
      if (br_mode == MODE_LOOKUP && dt_mode == MODE_LOOKUP) n_switch++;
    end
  endtask

  // streams committed by the leading thread, replayed by the trailing one
  logic [31:0] br_trace[$], dt_a_trace[$], dt_v_trace[$];

  initial begin : main
    logic [W-1:0] hb, hd;
    br_write_t   [W-1:0] hbr;
    data_write_t [W-1:0] hdt;
    int tb_i, td_i, pause, nb, nd;
    logic [31:0] last_val[logic [31:0]];
    rst_n = 1'b0;
    idle();
    for (int i = 0; i < N; i++) begin
      su_pc[i]   = 32'hBFC0_0000 + 32'(i * 12);
      su_addr[i] = 32'hBFC1_0000 + 32'(i * 4);
      su_val[i]  = 32'hA5A5_0000 ^ 32'(i * 32'h0101);
    end

    // program the start-up stores while in reset
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      br_prog_we = 1'b1; br_prog_idx = 4'(i);
      br_prog_pc = su_pc[i]; br_prog_target = tgt_of(su_pc[i]);
      br_prog_inst = inst_of(tgt_of(su_pc[i]));
      dt_prog_we = 1'b1; dt_prog_idx = 4'(N - 1 - i);
      dt_prog_addr = su_addr[N - 1 - i]; dt_prog_val = su_val[N - 1 - i];
    end
    @(negedge clk);
    idle();
    for (int i = 0; i < N; i++) begin
      prog_rd_idx = 4'(i);
      #1;
      chk(br_prog_rd_pc == su_pc[i] &&
          br_prog_rd_pay == {tgt_of(su_pc[i]) + 32'd4, inst_of(tgt_of(su_pc[i]))},
          "branch start-up store read-back");
      chk(dt_prog_rd_addr == su_addr[i] && dt_prog_rd_val == su_val[i],
          "data start-up store read-back");
    end

    do_reset();
    startup_run(5);       // bus fault, must request a restart
    do_reset();
    startup_run(-1);      // clean start-up

    // ------------------------------------------------------------ lookup
    hb = '0; hd = '0; hbr = '0; hdt = '0;
    tb_i = 0; td_i = 0; pause = 0;
    for (int cyc = 0; cyc < 4000 || tb_i < br_trace.size() || td_i < dt_a_trace.size(); cyc++) begin
      @(negedge clk);
      // leading thread: new results unless the memory stalled last cycle
      if (hb == '0) begin
        nb = (cyc < 4000) ? $urandom % (W + 1) : 0;
        for (int j = 0; j < W; j++) begin
          if (j < nb) begin
            hbr[j].valid = 1'b1;
            hbr[j].pc = next_br_pc();
            hbr[j].target = tgt_of(hbr[j].pc);
            hbr[j].inst = inst_of(hbr[j].target);
          end else hbr[j] = '0;
        end
      end
      if (hd == '0) begin
        nd = (cyc < 4000) ? $urandom % (W + 1) : 0;
        for (int j = 0; j < W; j++) begin
          if (j < nd) begin
            hdt[j].valid = 1'b1;
            next_dt(hdt[j].addr, hdt[j].val);
          end else hdt[j] = '0;
        end
      end
      br_wr = hbr;
      dt_wr = hdt;
      // leading fetch stage
      fetch_valid = 1'b1;
      fetch_pc = ($urandom % 2 != 0) ? 32'h0041_0000 + 32'(($urandom % 3) * 8)
                                : 32'h0040_0000 + 32'(($urandom % 20) * 16);
      // trailing thread, with pauses that let the memories fill
      if (pause > 0) pause--;
      else if ($urandom % 60 == 0) pause = 25;
      t_br_valid = (pause == 0) && tb_i < br_trace.size() && ($urandom % 3 != 0);
      t_br_pc    = t_br_valid ? br_trace[tb_i] : '0;
      t_dt_valid = (pause == 0) && td_i < dt_a_trace.size() && ($urandom % 3 != 0);
      t_dt_addr  = t_dt_valid ? dt_a_trace[td_i] : '0;
      #2;
      chk(!restart_req, "bus fault reported in lookup mode");
      if (fetch_hit) begin
        n_btac++;
        chk(fetch_next_pc == tgt_of(fetch_pc) + 32'd4 && fetch_tgt_inst == inst_of(tgt_of(fetch_pc)),
            "BTAC/BTIC returned a wrong target");
      end
      if (t_br_valid) begin
        if (t_br_hit) begin
          chk(t_br_dest == tgt_of(t_br_pc) + 32'd4 && t_br_inst == inst_of(tgt_of(t_br_pc)),
              "trailing branch entry wrong");
          if (t_br_consumed) n_tbr_cons++;
          else n_tbr_ret++;
        end else n_tbr_miss++;
      end
      if (t_dt_valid) begin
        chk(t_dt_hit && t_dt_consumed, "trailing load/store value missing");
        chk(t_dt_val == dt_v_trace[td_i],
            $sformatf("trailing value %h, expected %h", t_dt_val, dt_v_trace[td_i]));
        if (t_dt_hit) n_tdt_cons++;
      end
      if (br_stall) n_br_stall++;
      if (dt_stall) n_dt_stall++;
      @(posedge clk);
      if (t_br_valid) tb_i++;
      if (t_dt_valid) td_i++;
      if (!br_stall) begin
        for (int j = 0; j < W; j++) begin
          if (br_wr[j].valid) br_trace.push_back(br_wr[j].pc);
          if (br_dup[j]) n_dup++;
        end
        if (&{br_wr[0].valid, br_wr[1].valid, br_wr[2].valid, br_wr[3].valid} && br_dup == '0) n_wide++;
        hb = '0;
      end else hb = '1;
      if (!dt_stall) begin
        for (int j = 0; j < W; j++) begin
          if (dt_wr[j].valid) begin
            if (last_val.exists(dt_wr[j].addr)) n_readdr++;
            last_val[dt_wr[j].addr] = dt_wr[j].val;
            dt_a_trace.push_back(dt_wr[j].addr);
            dt_v_trace.push_back(dt_wr[j].val);
          end
        end
        hd = '0;
      end else hd = '1;
    end
    @(negedge clk);
    idle();
    #2;
    chk(br_count == 5'(N) && dt_count == 5'(N), $sformatf("free counts at the end: %0d, %0d", br_count, dt_count));

    chk(n_restart > 0, "restart on bus fault never happened");
    chk(n_switch > 0, "start-up to lookup switch never happened");
    chk(n_br_stall > 0, "branch memory never stalled");
    chk(n_dt_stall > 0, "data memory never stalled");
    chk(n_dup > 0, "repeated branch never suppressed");
    chk(n_wide > 0, "four-wide write never happened");
    chk(n_btac > 0, "BTAC/BTIC never hit");
    chk(n_tbr_cons > 0, "trailing branch never consumed an entry");
    chk(n_tbr_ret > 0, "trailing branch never read a retained entry");
    chk(n_tdt_cons > 0, "trailing load/store never consumed an entry");
    chk(n_readdr > 0, "no address was written twice");
    $display("restart=%0d switch=%0d br_stall=%0d dt_stall=%0d suppressed=%0d wide4=%0d btac_hit=%0d",
             n_restart, n_switch, n_br_stall, n_dt_stall, n_dup, n_wide, n_btac);
    $display("trailing: br_consumed=%0d br_retained=%0d br_miss=%0d dt_consumed=%0d readdr=%0d",
             n_tbr_cons, n_tbr_ret, n_tbr_miss, n_tdt_cons, n_readdr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
