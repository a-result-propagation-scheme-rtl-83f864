// tm_startup_rom: programmable start-up entry-point store.
//
// Holds one {key, payload} pair per temporal-memory entry: the jump targets
// and load/store addresses, with their expected instructions or data, that
// the system start-up code produces first after reset. At reset the
// temporal memory copies every word in parallel from this store and then
// checks the first bus transfers of the leading thread against it.
//
// The store is written through a simple programming port (prog_we with an
// entry index) and is not cleared by reset, so its contents survive the
// restart that follows a detected bus fault. All words are presented in
// parallel on ent_key / ent_pay; a write appears there on the cycle after
// prog_we. Read-back of one word through rd_idx is combinational.
//
// The published design names this store and its purpose only; its
// programming interface and the non-reset behaviour are choices of this
// design.
module tm_startup_rom
  import tm_pkg::TM_ENTRIES;
#(
  parameter int unsigned N     = TM_ENTRIES,
  parameter int unsigned KEY_W = 32,
  parameter int unsigned PAY_W = 64,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  // programming port
  input  logic                  prog_we,
  input  logic [IDX_W-1:0]      prog_idx,
  input  logic [KEY_W-1:0]      prog_key,
  input  logic [PAY_W-1:0]      prog_pay,
  // single-word read-back
  input  logic [IDX_W-1:0]      rd_idx,
  output logic [KEY_W-1:0]      rd_key,
  output logic [PAY_W-1:0]      rd_pay,
  // all entries, for the parallel load into the temporal memory
  output logic [N-1:0][KEY_W-1:0] ent_key,
  output logic [N-1:0][PAY_W-1:0] ent_pay
);

  logic [N-1:0][KEY_W-1:0] key_q;
  logic [N-1:0][PAY_W-1:0] pay_q;

  always_ff @(posedge clk) begin
    if (prog_we) begin
      key_q[prog_idx] <= prog_key;
      pay_q[prog_idx] <= prog_pay;
    end
  end

  assign ent_key = key_q;
  assign ent_pay = pay_q;
  assign rd_key  = key_q[rd_idx];
  assign rd_pay  = pay_q[rd_idx];

  if (N != (1 << IDX_W)) begin : g_idx_chk
    // index values at or above N do not name an entry
    always_ff @(posedge clk)
      assert (!prog_we || prog_idx < IDX_W'(N))
        else $error("tm_startup_rom: programming index %0d out of range", prog_idx);
  end

endmodule
