// tb_clefia_s0: checks S0 against sample values of the CLEFIA specification
// and checks that it is a permutation of the 256 byte values.
module tb_clefia_s0;
  logic [7:0] x, y;
  int checks = 0, failures = 0;
  logic seen [256];

  clefia_s0 dut (.x, .y);

  task automatic expect_val(input logic [7:0] xi, input logic [7:0] ye);
    x = xi; #1;
    checks++;
    if (y !== ye) begin
      failures++;
      $display("FAIL S0(%02h) = %02h, expected %02h", xi, y, ye);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_val(8'h00, 8'h57);
    expect_val(8'h01, 8'h49);
    expect_val(8'h37, 8'h13);
    expect_val(8'h80, 8'hcd);
    expect_val(8'ha5, 8'h8d);
    expect_val(8'hff, 8'h8e);
    expect_val(8'h10, 8'h28);
    expect_val(8'h2a, 8'he4);
    expect_val(8'h4c, 8'h39);
    expect_val(8'h5e, 8'h09);
    expect_val(8'h63, 8'h37);
    expect_val(8'h7f, 8'h0b);
    expect_val(8'h99, 8'h2c);
    expect_val(8'hb1, 8'hf3);
    expect_val(8'hc4, 8'h80);
    expect_val(8'hd7, 8'h96);
    expect_val(8'he8, 8'h1a);
    expect_val(8'hf0, 8'h9a);
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1;
      seen[y] = 1'b1;
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL S0 never outputs %02h", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
