// tb_clefia_s1: checks S1 against sample values of the CLEFIA specification
// and checks that it is a permutation of the 256 byte values.
module tb_clefia_s1;
  logic [7:0] x, y;
  int checks = 0, failures = 0;
  logic seen [256];

  clefia_s1 dut (.x, .y);

  task automatic expect_val(input logic [7:0] xi, input logic [7:0] ye);
    x = xi; #1;
    checks++;
    if (y !== ye) begin
      failures++;
      $display("FAIL S1(%02h) = %02h, expected %02h", xi, y, ye);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_val(8'h00, 8'h6c);
    expect_val(8'h01, 8'hda);
    expect_val(8'h37, 8'hbc);
    expect_val(8'h80, 8'h55);
    expect_val(8'ha5, 8'h70);
    expect_val(8'hff, 8'h1d);
    expect_val(8'h10, 8'hbf);
    expect_val(8'h2a, 8'h27);
    expect_val(8'h4c, 8'ha4);
    expect_val(8'h5e, 8'h73);
    expect_val(8'h63, 8'h62);
    expect_val(8'h7f, 8'h99);
    expect_val(8'h99, 8'h08);
    expect_val(8'hb1, 8'h4b);
    expect_val(8'hc4, 8'hd5);
    expect_val(8'hd7, 8'hd6);
    expect_val(8'he8, 8'h01);
    expect_val(8'hf0, 8'hf7);
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1;
      seen[y] = 1'b1;
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL S1 never outputs %02h", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
