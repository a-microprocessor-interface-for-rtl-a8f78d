// byte_mux_tb: random address/data values through all four selections,
// compared with the control-byte layouts built bit by bit in the testbench.
module byte_mux_tb;
  import ferro_pkg::*;
  byte_sel_t  sel;
  logic [1:0] chip;
  logic       page;
  logic [7:0] word, wdata, q, exp;
  int checks = 0, failures = 0;

  byte_mux dut (.sel(sel), .chip(chip), .page(page), .word(word), .wdata(wdata), .q(q));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      sel   = byte_sel_t'(i % 4);
      chip  = 2'($urandom);
      page  = 1'($urandom);
      word  = 8'($urandom);
      wdata = 8'($urandom);
      #10;
      case (i % 4)
        0: exp = {1'b1, 1'b0, 1'b1, 1'b0, chip[1], chip[0], page, 1'b0};
        1: exp = word;
        2: exp = wdata;
        default: exp = {1'b1, 1'b0, 1'b1, 1'b0, chip[1], chip[0], page, 1'b1};
      endcase
      checks++;
      if (q !== exp) begin failures++; $display("FAIL: sel %0d q %h exp %h", i % 4, q, exp); end
    end
    // the example from the board test: chip 3, page 1, write
    sel = BYTE_SLAVE_WR; chip = 2'b11; page = 1'b1; #10;
    checks++; if (q !== 8'b1010_1110) begin failures++; $display("FAIL: byte 0 example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
