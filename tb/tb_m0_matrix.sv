// tb_m0_matrix: exhaustive test of the 13-XOR M0 circuit against the matrix
// rows (row masks with X0 in the most significant bit).
module tb_m0_matrix;
  localparam logic [7:0] M0_ROWS [8] = '{8'hCA, 8'hC8, 8'h66, 8'h19, 8'h68, 8'hF0, 8'h46, 8'hA4};
  logic [7:0] x, y, exp_y;
  int checks = 0, failures = 0;

  m0_matrix dut (.x(x), .y(y));

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      for (int k = 0; k < 8; k++) exp_y[7 - k] = ^(x & M0_ROWS[k]);
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL x=%02h y=%02h expected %02h", x, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
