// tb_clefia_ctrl: checks the schedule produced by the sequencer: the clock on
// which each event happens, how many times it happens per operation, the
// 26-clock L phase and 42-clock encryption phase, F0/F1 alternation, and that
// start is ignored while busy.
module tb_clefia_ctrl;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, selconrk, cg_load, cg_step, dp_en, dp_load, f1_sel;
  logic l_load, con_shift, rk_load, rk_shift;
  int checks = 0, failures = 0;
  int n_cg_step, n_dp_en, n_dp_load, n_con_shift, n_rk_load, n_rk_shift;
  int t_l_load, t_done, t_cg_load, t_sel_low, cyc;
  int first_rk_load, last_rk_load, f0_en, f1_en;

  clefia_ctrl dut (.clk, .rst_n, .start, .busy, .done, .selconrk, .cg_load, .cg_step,
                   .dp_en, .dp_load, .f1_sel, .l_load, .con_shift, .rk_load, .rk_shift);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    for (int op = 0; op < 2; op++) begin
      n_cg_step = 0; n_dp_en = 0; n_dp_load = 0; n_con_shift = 0; n_rk_load = 0;
      n_rk_shift = 0; t_l_load = -1; t_done = -1; t_cg_load = -1; t_sel_low = -1;
      first_rk_load = -1; last_rk_load = -1; f0_en = 0; f1_en = 0;
      start <= 1;
      @(posedge clk);
      cyc = 0;
      // start held high during the whole operation must not restart it
      while (t_done < 0 && cyc < 200) begin
        #1;
        if (cg_load) t_cg_load = cyc;
        if (cg_step) n_cg_step++;
        if (dp_en) begin
          n_dp_en++;
          if (f1_sel) f1_en++; else f0_en++;
        end
        if (dp_load) n_dp_load++;
        if (con_shift) n_con_shift++;
        if (rk_load) begin
          n_rk_load++;
          if (first_rk_load < 0) first_rk_load = cyc;
          last_rk_load = cyc;
        end
        if (rk_shift) n_rk_shift++;
        if (l_load) t_l_load = cyc;
        if (!selconrk && t_sel_low < 0 && busy) t_sel_low = cyc;
        if (done) t_done = cyc;
        @(posedge clk);
        cyc++;
      end
      start <= 0;
      check("constant load clock", t_cg_load, 0);
      check("L capture clock (26-clock L phase)", t_l_load, 25);
      check("selconrk switches after L phase", t_sel_low, 26);
      check("done clock (68 clocks total)", t_done, 67);
      check("encryption phase length", t_done - t_l_load, 42);
      check("constant steps", n_cg_step, 60);
      check("data path clocks", n_dp_en, 60);
      check("F0 clocks", f0_en, 30);
      check("F1 clocks", f1_en, 30);
      check("input load clocks", n_dp_load, 4);
      check("SIPO shifts", n_con_shift, 36);
      check("PISO loads", n_rk_load, 9);
      check("first PISO load", first_rk_load, 30);
      check("last PISO load", last_rk_load, 62);
      check("PISO shifts", n_rk_shift, 36);
      #1;
      check("idle after done", int'(busy), 0);
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
