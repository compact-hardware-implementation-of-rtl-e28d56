// tb_clefia_data_proc: drives the word-serial GFN data path as the core does,
// first 12 rounds on K keyed by the constants (expecting the intermediate key
// L), then 18 rounds on the whitened plaintext keyed by the round keys
// (expecting the ciphertext after output whitening). Uses the published
// CLEFIA-128 test vector and four vectors from an independent software model.
// Also checks that the result appears exactly one clock after the last round.
module tb_clefia_data_proc;
  import clefia_pkg::*;
  import clefia_ref_pkg::*;
  logic   clk = 0, rst_n = 0, en = 0, load_in = 0, f1_sel = 0;
  word_t  rk;
  block_t din, dout, c_out;
  int checks = 0, failures = 0;

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

  clefia_data_proc dut (.clk, .rst_n, .en, .load_in, .f1_sel, .rk, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // Runs 'rounds' GFN rounds on 'x'; key word n comes from the constants
  // (use_con) or from the round keys of (l, k).
  task automatic run(input block_t x, input int rounds, input bit use_con,
                     input block_t l, input block_t k);
    din <= x;
    for (int n = 0; n < 2 * rounds; n++) begin
      en      <= 1;
      load_in <= (n < 2);
      f1_sel  <= n[0];
      rk      <= use_con ? ref_con(n) : ref_rk(l, k, n);
      @(posedge clk);
    end
    en <= 0;
    load_in <= 0;
    rk <= '0;
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      run(vk[v], L_ROUNDS, 1'b1, '0, '0);
      #1;
      check($sformatf("L vector %0d", v), dout, vl[v]);
      @(posedge clk); #1;
      check($sformatf("L vector %0d held", v), dout, vl[v]);
      run({vp[v][127:96], vp[v][95:64] ^ vk[v][127:96],
           vp[v][63:32],  vp[v][31:0]  ^ vk[v][95:64]}, ENC_ROUNDS, 1'b0, vl[v], vk[v]);
      #1;
      c_out = {dout[127:96], dout[95:64] ^ vk[v][63:32], dout[63:32], dout[31:0] ^ vk[v][31:0]};
      check($sformatf("C vector %0d", v), c_out, vc[v]);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
