// tb_clefia_top: end-to-end test of the CLEFIA-128 core at its default size.
// Encrypts the published CLEFIA-128 test vector and four vectors from an
// independent software model, back to back, and checks for each:
//   * the intermediate key L at l_valid, 26 clocks after the start edge;
//   * the ciphertext at done, 68 clocks after the start edge (42 after L);
//   * that a start pulse while busy is ignored and the captured inputs hold.
// It counts the mechanisms of the core and fails if one never happened: the
// L phase with constants, the switch of selconrk to encryption, round-key
// groups without and with the K term (even and odd Ct0), PISO reloads while
// the previous group is still shifting out, and an ignored start.
module tb_clefia_top;
  import clefia_pkg::*;
  logic   clk = 0, rst_n = 0, start = 0;
  block_t plaintext, key, ciphertext, l_key;
  logic   busy, done, l_valid;
  int checks = 0, failures = 0;
  int t, t_l, t_done;
  int n_l_phase = 0, n_switch = 0, n_even_grp = 0, n_odd_grp = 0, n_overlap = 0;
  int n_ignored = 0;

  localparam int NV = 5;
  block_t vp [NV] = '{128'h000102030405060708090a0b0c0d0e0f,
                      128'h78e510617311d8a3c2ce6f447ed4d57b,
                      128'he4b06ce60741c7a87ce42c8218072e8c,
                      128'hb2221a58008a05a6c4647159c324c985,
                      128'h1a2b8f1ff1fd42a29755d4c13a902931};
  block_t vk [NV] = '{128'hffeeddccbbaa99887766554433221100,
                      128'h35bf992dc9e9c616612e7696a6cecc1b,
                      128'h9b810e766ec9d28663ca828dd5f4b3b2,
                      128'hcd447e35b8b6d8fe442e3d437204e52d,
                      128'h05b6e6e307d4bedc51431193e6c3f339};
  block_t vc [NV] = '{128'hde2bf2fd9b74aacdf1298555459494fd,
                      128'h2d0b04f9bbfd686881ec281e753b63bf,
                      128'h15a8831997ce2712a760134f675e0149,
                      128'h5664acdcec7bbf45c5b75a9a5c2daf57,
                      128'h5476bdb40f6fe6acd20681107116f4de};
  block_t vl [NV] = '{128'h8f89a61b9db9d0f393e65627da0d027e,
                      128'h2aa028dcc6ae380c52972af1dbf59a67,
                      128'h69f05c72c31fda678cc93ecb4a326468,
                      128'h3e984b68491f290ae8384aeb50f391f9,
                      128'ha99bed888b0cde84e3bf01ab4d0eccf7};

  clefia_top dut (.clk, .rst_n, .start, .plaintext, .key, .busy, .done, .ciphertext,
                  .l_valid, .l_key);

  always #5 clk = ~clk;

  // Mechanism counters, observed on internal control signals.
  logic sel_d = 1'b0;
  always @(posedge clk) begin
    sel_d <= dut.selconrk;
    if (dut.selconrk && dut.dp_en && dut.dp_load && !dut.f1_sel) n_l_phase++;
    if (sel_d && !dut.selconrk && dut.busy) n_switch++;
    if (dut.rk_load && !dut.u_rk.ct0_q) n_even_grp++;
    if (dut.rk_load &&  dut.u_rk.ct0_q) n_odd_grp++;
    if (dut.rk_load && dut.rk_shift) n_overlap++;
  end

  task automatic check(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic check_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_seen(input string what, input int n);
    checks++;
    $display("mechanism %-34s happened %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    plaintext = '0;
    key = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      plaintext <= vp[v];
      key       <= vk[v];
      start     <= 1;
      @(posedge clk);            // start edge: t = 0 is the clock after it
      start <= 0;
      t = 0; t_l = -1; t_done = -1;
      while (t_done < 0 && t < 100) begin
        #1;
        if (t == 5) begin
          // a second start and new inputs while busy must be ignored
          start     <= 1;
          plaintext <= ~vp[v];
          key       <= ~vk[v];
          n_ignored++;
        end else begin
          start <= 0;
        end
        if (l_valid) begin
          t_l = t;
          check($sformatf("L vector %0d", v), l_key, vl[v]);
        end
        if (done) begin
          t_done = t;
          check($sformatf("C vector %0d", v), ciphertext, vc[v]);
        end
        @(posedge clk);
        t++;
      end
      check_int($sformatf("L latency vector %0d (26 clocks)", v), t_l + 1, 26);
      check_int($sformatf("total latency vector %0d (68 clocks)", v), t_done + 1, 68);
      check_int($sformatf("encryption latency vector %0d (42 clocks)", v), t_done - t_l, 42);
      #1;
      check($sformatf("C vector %0d held after done", v), ciphertext, vc[v]);
      check_int("idle after done", int'(busy), 0);
    end
    check_seen("L phase with constants", n_l_phase);
    check_seen("selconrk switch to encryption", n_switch);
    check_seen("even round-key group (T)", n_even_grp);
    check_seen("odd round-key group (T ^ K)", n_odd_grp);
    check_seen("PISO reload during shift-out", n_overlap);
    check_seen("start ignored while busy", n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
