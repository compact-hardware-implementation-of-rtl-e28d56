// tb_clefia_const_gen: runs the constant generator through all 60 constants
// of a 128-bit key, one per clock, and compares each with a reference model
// and a few with published constant values. Also checks that a clock without
// step holds the constant and that load restarts the sequence.
module tb_clefia_const_gen;
  import clefia_pkg::*;
  import clefia_ref_pkg::*;
  logic  clk = 0, rst_n = 0, load = 0, step = 0, odd_phase;
  word_t con;
  int checks = 0, failures = 0;

  clefia_const_gen dut (.clk, .rst_n, .iv(CON_IV), .p(CON_P), .q(CON_Q),
                        .load, .step, .con, .odd_phase);

  always #5 clk = ~clk;

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    load <= 1;
    @(posedge clk);
    load <= 0;
    step <= 1;
    for (int i = 0; i < 60; i++) begin
      #1;
      check($sformatf("CON_%0d", i), con, ref_con(i));
      if (i == 0)  check("CON_0 published",  con, 32'hf56b7aeb);
      if (i == 1)  check("CON_1 published",  con, 32'h994a8a42);
      if (i == 2)  check("CON_2 published",  con, 32'h96a4bd75);
      if (i == 59) check("CON_59",           con, 32'h7c73b3a7);
      if (i == 30) begin
        // one idle clock: the constant must hold
        step <= 0;
        @(posedge clk); #1;
        check("CON_30 held", con, ref_con(30));
        step <= 1;
      end
      @(posedge clk);
    end
    step <= 0;
    load <= 1;
    @(posedge clk);
    load <= 0;
    #1;
    check("CON_0 after reload", con, 32'hf56b7aeb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
