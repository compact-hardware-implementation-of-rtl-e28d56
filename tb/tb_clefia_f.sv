// tb_clefia_f: checks the F0/F1 unit against F-function values computed with
// an independent software model of CLEFIA.
module tb_clefia_f;
  import clefia_pkg::*;
  logic  f1_sel;
  word_t rk, x, y;
  int checks = 0, failures = 0;

  clefia_f dut (.f1_sel, .rk, .x, .y);

  task automatic expect_val(input logic f1, input word_t k, input word_t xi, input word_t ye);
    f1_sel = f1; rk = k; x = xi; #1;
    checks++;
    if (y !== ye) begin
      failures++;
      $display("FAIL F%0d(%08h, %08h) = %08h, expected %08h", f1, k, xi, y, ye);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_val(1'b0, 32'h2265b1f5, 32'h91b7584a, 32'hee4a35a9);
    expect_val(1'b1, 32'h2265b1f5, 32'h91b7584a, 32'hee369b70);
    expect_val(1'b0, 32'hd8f16adf, 32'hcd613e30, 32'h83914a6b);
    expect_val(1'b1, 32'hd8f16adf, 32'hcd613e30, 32'h80742734);
    expect_val(1'b0, 32'hc386bbc4, 32'h1027c4d1, 32'h2c719982);
    expect_val(1'b1, 32'hc386bbc4, 32'h1027c4d1, 32'he492ab40);
    expect_val(1'b0, 32'h414c343c, 32'h1e2feb89, 32'h8c4946e0);
    expect_val(1'b1, 32'h414c343c, 32'h1e2feb89, 32'hbd05eea6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
