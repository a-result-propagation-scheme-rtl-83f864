// tb_temporal_memory: self-checking testbench for temporal_memory.
//
// Runs the test sequence of tm_tb_core twice in parallel on two memories of
// the default size: one with the default single trailing read port, one
// with two trailing read ports, where entries are read in parallel. See
// tm_tb_core for what is driven and checked. Ends with the summed result.
module tb_temporal_memory;

  bit done1, done2;
  int checks1, checks2, failures1, failures2;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  tm_tb_core #(.TR(1)) u_one (.finished(done1), .checks(checks1), .failures(failures1));
  tm_tb_core #(.TR(2)) u_two (.finished(done2), .checks(checks2), .failures(failures2));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks2, failures1 + failures2 + 1);
    $finish;
  end

  initial begin : main
    do @(posedge clk); while (!(done1 && done2));
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks2, failures1 + failures2);
    $finish;
  end

endmodule
