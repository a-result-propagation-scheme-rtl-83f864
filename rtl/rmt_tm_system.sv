// rmt_tm_system: temporal-memory result propagation for a redundantly
// multithreaded SMT core.
//
// The leading (A) thread of a program commits branch targets and load/store
// values into two temporal memories; the trailing (R) thread, running the
// same program some instructions behind, reads them instead of recomputing
// or refetching. The branch memory (key PC, payload {DEST, INST}) also
// serves the leading thread's fetch stage as branch target address cache
// and branch target instruction cache. The data memory (key ADDR, payload
// VAL) forwards load and store values. Each memory has its own start-up
// entry-point store and access counter: after reset both memories hold the
// start-up code's entry points and check the first bus transfers against
// them; a mismatch raises restart_req.
//
// Interface, all synchronous to clk, rst_n synchronous active low:
//   br_wr[4]     leading-thread branch results (PC, target, instruction at
//                target). DEST is stored as target + 4, the next fetch
//                address after the target instruction. br_stall: the branch
//                memory is full, present the same results again.
//   dt_wr[4]     leading-thread load/store results; dt_stall as above.
//   fetch_*      leading-thread BTAC/BTIC lookup, combinational.
//   t_br_*/t_dt_* trailing-thread reads, combinational; *_consumed says the
//                entry was freed at the next edge. TRPORTS ports per
//                memory (one by default), port 0 oldest in program order.
//   *_prog_*     programming ports of the start-up stores; program them
//                while rst_n is low, the memories load them during reset.
// The two memories stall independently. Sizes (16 entries, four write
// ports, one read port per thread) follow the published design; the port
// bundling and the separate stall and counter per memory are own choices.
module rmt_tm_system
  import tm_pkg::*;
#(
  parameter int unsigned N      = TM_ENTRIES,
  parameter int unsigned WPORTS = TM_WPORTS,
  parameter int unsigned TRPORTS = 1,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CNT_W = $clog2(N + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // leading thread: branch results
  input  br_write_t [WPORTS-1:0]  br_wr,
  output logic                    br_stall,
  output logic [WPORTS-1:0]       br_dup,
  // leading thread: load/store results
  input  data_write_t [WPORTS-1:0] dt_wr,
  output logic                    dt_stall,
  output logic [WPORTS-1:0]       dt_dup,
  // leading thread fetch: BTAC / BTIC lookup
  input  logic                    fetch_valid,
  input  logic [XLEN-1:0]         fetch_pc,
  output logic                    fetch_hit,
  output logic [XLEN-1:0]         fetch_next_pc,   // DEST = target + 4
  output logic [XLEN-1:0]         fetch_tgt_inst,  // INST at the target
  // trailing thread: branches (port 0 oldest)
  input  logic [TRPORTS-1:0]      t_br_valid,
  input  logic [TRPORTS-1:0][XLEN-1:0] t_br_pc,
  output logic [TRPORTS-1:0]      t_br_hit,
  output logic [TRPORTS-1:0][XLEN-1:0] t_br_dest,
  output logic [TRPORTS-1:0][XLEN-1:0] t_br_inst,
  output logic [TRPORTS-1:0]      t_br_consumed,
  // trailing thread: loads/stores (port 0 oldest)
  input  logic [TRPORTS-1:0]      t_dt_valid,
  input  logic [TRPORTS-1:0][XLEN-1:0] t_dt_addr,
  output logic [TRPORTS-1:0]      t_dt_hit,
  output logic [TRPORTS-1:0][XLEN-1:0] t_dt_val,
  output logic [TRPORTS-1:0]      t_dt_consumed,
  // start-up entry-point programming
  input  logic                    br_prog_we,
  input  logic [IDX_W-1:0]        br_prog_idx,
  input  logic [XLEN-1:0]         br_prog_pc,
  input  logic [XLEN-1:0]         br_prog_target,
  input  logic [XLEN-1:0]         br_prog_inst,
  input  logic                    dt_prog_we,
  input  logic [IDX_W-1:0]        dt_prog_idx,
  input  logic [XLEN-1:0]         dt_prog_addr,
  input  logic [XLEN-1:0]         dt_prog_val,
  input  logic [IDX_W-1:0]        prog_rd_idx,     // read-back of both stores
  output logic [XLEN-1:0]         br_prog_rd_pc,
  output logic [2*XLEN-1:0]       br_prog_rd_pay,  // {target + 4, inst}
  output logic [XLEN-1:0]         dt_prog_rd_addr,
  output logic [XLEN-1:0]         dt_prog_rd_val,
  // status
  output logic                    br_startup_done,
  output logic                    dt_startup_done,
  output tm_mode_e                br_mode,
  output tm_mode_e                dt_mode,
  output logic [CNT_W-1:0]        br_count,
  output logic [CNT_W-1:0]        dt_count,
  output logic                    restart_req,     // start-up bus check failed
  output logic [WPORTS-1:0]       br_fault_lane,
  output logic [WPORTS-1:0]       dt_fault_lane
);

  localparam int unsigned BR_PAY_W = 2 * XLEN;  // {DEST, INST}

  // ------------------------------------------------------------ branches
  logic [N-1:0][XLEN-1:0]       br_su_key;
  logic [N-1:0][BR_PAY_W-1:0]   br_su_pay;
  logic [WPORTS-1:0]            br_w_valid;
  logic [WPORTS-1:0][XLEN-1:0]  br_w_key;
  logic [WPORTS-1:0][BR_PAY_W-1:0] br_w_pay;
  logic [BR_PAY_W-1:0]          fetch_pay;
  logic [TRPORTS-1:0][BR_PAY_W-1:0] t_br_pay;
  logic                         br_fault;

  always_comb begin
    for (int j = 0; j < WPORTS; j++) begin
      br_w_valid[j] = br_wr[j].valid;
      br_w_key[j]   = br_wr[j].pc;
      br_w_pay[j]   = {br_wr[j].target + XLEN'(4), br_wr[j].inst};
    end
  end

  tm_startup_rom #(.N(N), .KEY_W(XLEN), .PAY_W(BR_PAY_W)) u_br_rom (
    .clk     (clk),
    .prog_we (br_prog_we),
    .prog_idx(br_prog_idx),
    .prog_key(br_prog_pc),
    .prog_pay({br_prog_target + XLEN'(4), br_prog_inst}),
    .rd_idx  (prog_rd_idx),
    .rd_key  (br_prog_rd_pc),
    .rd_pay  (br_prog_rd_pay),
    .ent_key (br_su_key),
    .ent_pay (br_su_pay)
  );

  temporal_memory #(
    .N(N), .WPORTS(WPORTS), .KEY_W(XLEN), .PAY_W(BR_PAY_W), .STAMP_W(TM_STAMP_W),
    .TRPORTS(TRPORTS)
  ) u_br_tm (
    .clk          (clk),
    .rst_n        (rst_n),
    .su_key       (br_su_key),
    .su_pay       (br_su_pay),
    .w_valid      (br_w_valid),
    .w_key        (br_w_key),
    .w_pay        (br_w_pay),
    .l_stall      (br_stall),
    .w_dup        (br_dup),
    .l_rd_valid   (fetch_valid),
    .l_rd_key     (fetch_pc),
    .l_rd_hit     (fetch_hit),
    .l_rd_pay     (fetch_pay),
    .t_rd_valid   (t_br_valid),
    .t_rd_key     (t_br_pc),
    .t_rd_hit     (t_br_hit),
    .t_rd_pay     (t_br_pay),
    .t_rd_consumed(t_br_consumed),
    .mode         (br_mode),
    .count        (br_count),
    .startup_done (br_startup_done),
    .fault        (br_fault),
    .fault_lane   (br_fault_lane)
  );

  assign {fetch_next_pc, fetch_tgt_inst} = fetch_pay;
  always_comb
    for (int p = 0; p < TRPORTS; p++) {t_br_dest[p], t_br_inst[p]} = t_br_pay[p];

  // ---------------------------------------------------------------- data
  logic [N-1:0][XLEN-1:0]      dt_su_key, dt_su_pay;
  logic [WPORTS-1:0]           dt_w_valid;
  logic [WPORTS-1:0][XLEN-1:0] dt_w_key, dt_w_pay;
  logic                        dt_fault;
  logic                        dt_lk_hit;
  logic [XLEN-1:0]             dt_lk_pay;

  always_comb begin
    for (int j = 0; j < WPORTS; j++) begin
      dt_w_valid[j] = dt_wr[j].valid;
      dt_w_key[j]   = dt_wr[j].addr;
      dt_w_pay[j]   = dt_wr[j].val;
    end
  end

  tm_startup_rom #(.N(N), .KEY_W(XLEN), .PAY_W(XLEN)) u_dt_rom (
    .clk     (clk),
    .prog_we (dt_prog_we),
    .prog_idx(dt_prog_idx),
    .prog_key(dt_prog_addr),
    .prog_pay(dt_prog_val),
    .rd_idx  (prog_rd_idx),
    .rd_key  (dt_prog_rd_addr),
    .rd_pay  (dt_prog_rd_val),
    .ent_key (dt_su_key),
    .ent_pay (dt_su_pay)
  );

  // The leading thread does not look data up, so its lookup port is idle
  // (dt_lk_hit / dt_lk_pay stay unused on purpose).
  temporal_memory #(
    .N(N), .WPORTS(WPORTS), .KEY_W(XLEN), .PAY_W(XLEN), .STAMP_W(TM_STAMP_W),
    .TRPORTS(TRPORTS)
  ) u_dt_tm (
    .clk          (clk),
    .rst_n        (rst_n),
    .su_key       (dt_su_key),
    .su_pay       (dt_su_pay),
    .w_valid      (dt_w_valid),
    .w_key        (dt_w_key),
    .w_pay        (dt_w_pay),
    .l_stall      (dt_stall),
    .w_dup        (dt_dup),
    .l_rd_valid   (1'b0),
    .l_rd_key     ('0),
    .l_rd_hit     (dt_lk_hit),
    .l_rd_pay     (dt_lk_pay),
    .t_rd_valid   (t_dt_valid),
    .t_rd_key     (t_dt_addr),
    .t_rd_hit     (t_dt_hit),
    .t_rd_pay     (t_dt_val),
    .t_rd_consumed(t_dt_consumed),
    .mode         (dt_mode),
    .count        (dt_count),
    .startup_done (dt_startup_done),
    .fault        (dt_fault),
    .fault_lane   (dt_fault_lane)
  );

  assign restart_req = br_fault | dt_fault;

endmodule
