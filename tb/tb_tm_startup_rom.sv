// tb_tm_startup_rom: self-checking testbench for tm_startup_rom (16 entries,
// 32-bit key, 64-bit payload).
//
// Programs every entry with random words, reprograms some of them, and
// checks the parallel outputs and the read-back port against a copy kept
// here, one cycle after each write.
module tb_tm_startup_rom;

  localparam int N = 16;

  logic                    clk = 1'b0;
  logic                    prog_we;
  logic [3:0]              prog_idx, rd_idx;
  logic [31:0]             prog_key, rd_key;
  logic [63:0]             prog_pay, rd_pay;
  logic [N-1:0][31:0]      ent_key;
  logic [N-1:0][63:0]      ent_pay;

  always #5 clk = ~clk;

  tm_startup_rom dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] m_key[N];
  logic [63:0] m_pay[N];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prog_entry(input int i);
    @(negedge clk);
    prog_we  = 1'b1;
    prog_idx = 4'(i);
    prog_key = $urandom;
    prog_pay = {32'($urandom), 32'($urandom)};
    m_key[i] = prog_key;
    m_pay[i] = prog_pay;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      rd_idx = 4'(i);
      #1;
      chk(ent_key[i] == m_key[i] && ent_pay[i] == m_pay[i], $sformatf("entry %0d parallel output", i));
      chk(rd_key == m_key[i] && rd_pay == m_pay[i], $sformatf("entry %0d read-back", i));
    end
  endtask

  initial begin : main
    prog_we = 1'b0; prog_idx = '0; prog_key = '0; prog_pay = '0; rd_idx = '0;
    for (int i = 0; i < N; i++) prog_entry(i);
    check_all();
    for (int r = 0; r < 40; r++) prog_entry($urandom % N);
    check_all();
    // no write without prog_we
    @(negedge clk);
    prog_idx = 4'd3; prog_key = ~m_key[3]; prog_pay = ~m_pay[3];
    @(negedge clk);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
