// tb_clefia_rk_gen: feeds the round-key generator the intermediate key L of
// the published CLEFIA-128 test vector and the constants CON_24..59 one per
// clock (as the core does), and checks all 36 round keys, in order and on the
// expected clocks, against a reference model and published values.
module tb_clefia_rk_gen;
  import clefia_pkg::*;
  import clefia_ref_pkg::*;
  localparam block_t K = 128'hffeeddccbbaa99887766554433221100;
  localparam block_t L = 128'h8f89a61b9db9d0f393e65627da0d027e;
  logic   clk = 0, rst_n = 0, con_shift = 0, l_load = 0, rk_load = 0, rk_shift = 0;
  word_t  con, rk;
  int checks = 0, failures = 0, odd_groups = 0, even_groups = 0;
  word_t  pub [8] = '{32'hf3e6cef9, 32'h8df75e38, 32'h41c06256, 32'h640ac51b,
                      32'h6a27e20a, 32'h5a791b90, 32'he8c528dc, 32'h00336ea3};

  clefia_rk_gen dut (.clk, .rst_n, .con, .con_shift, .l_load, .l_in(L), .k_in(K),
                     .rk_load, .rk_shift, .rk);

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

  // Schedule relative to the capture of L at clock 0: constants shifted in
  // clocks 1..36, PISO loads at 5, 9, .., 37, RK_j read at clock 6 + j.
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c <= 42; c++) begin
      l_load    <= (c == 0);
      con_shift <= (c >= 1 && c <= 36);
      con       <= (c >= 1 && c <= 36) ? ref_con(24 + c - 1) : 32'h0;
      rk_load   <= (c >= 5 && c <= 37 && (c - 5) % 4 == 0);
      rk_shift  <= (c >= 6 && c <= 41);
      #1;
      if (c >= 6 && c <= 41) begin
        check($sformatf("RK_%0d", c - 6), rk, ref_rk(L, K, c - 6));
        if (c - 6 < 8)   check($sformatf("RK_%0d published", c - 6), rk, pub[c - 6]);
        if (c - 6 == 35) check("RK_35 published", rk, 32'h5142f434);
      end
      // groups 1, 3, 5, 7 carry K, groups 0, 2, .., 8 do not
      if (c >= 6 && c <= 41 && (c - 6) % 4 == 0) begin
        if (rk != (ref_rk(L, 128'h0, c - 6))) odd_groups++; else even_groups++;
      end
      @(posedge clk);
    end
    checks++;
    if (odd_groups != 4 || even_groups != 5) begin
      failures++;
      $display("FAIL groups with and without K odd=%0d even=%0d", odd_groups, even_groups);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
